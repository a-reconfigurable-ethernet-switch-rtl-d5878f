// tb_load_monitor: checks the load formula L = (K*IFGmin + RXactive)/T over
// measurement intervals shortened to 1000 clocks. Each interval gets a known
// number of frames of known length; the expected percentage is worked out
// here and compared, as is the 20 % threshold (strictly exceeded) and the
// interval length.
module tb_load_monitor;
  localparam int T = 1000;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge applies the asynchronous reset
  always #20 clk = ~clk;

  logic rx_dv = 0, load_high, sample_pulse;
  logic [6:0] load_pct;

  load_monitor #(.T_CYCLES(T)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one interval with n frames of len clocks each
  task automatic interval(int n, int len);
    int exp_pct, t0, t1;
    @(posedge clk iff sample_pulse);
    t0 = $time;
    repeat (10) @(posedge clk);
    for (int i = 0; i < n; i++) begin
      rx_dv <= 1; repeat (len) @(posedge clk);
      rx_dv <= 0; repeat (30) @(posedge clk);
    end
    @(posedge clk iff sample_pulse);
    t1 = $time;
    check((t1 - t0) == T * 40, $sformatf("interval %0d ns", t1 - t0));
    exp_pct = (n * 24 + n * len) * 100 / T;
    check(load_pct == 7'(exp_pct), $sformatf("%0d x %0d: load %0d %%, expected %0d", n, len, load_pct, exp_pct));
    check(load_high == ((n * 24 + n * len) * 100 > 20 * T), $sformatf("%0d x %0d: threshold flag", n, len));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    interval(3, 40);    // 19.2 %
    interval(4, 40);    // 25.6 %
    interval(0, 0);     // idle
    interval(1, 176);   // exactly 20 %: not above
    interval(12, 50);   // 88.8 %
    interval(2, 100);   // 24.8 %, same load from larger frames
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
