// tb_pkt_buffer: self-checking test of the store-and-forward packet FIFO.
// Writes committed and aborted frames, reads them back under a random
// ready pattern and checks data, frame boundaries, lengths, the frame count
// and that a frame that does not fit is dropped whole and counted.
module tb_pkt_buffer;
  localparam int DEPTH = 256;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge applies the asynchronous reset
  always #20 clk = ~clk;

  logic wr_valid = 0, wr_commit = 0, wr_abort = 0;
  logic [7:0] wr_data = 0;
  logic rd_valid, rd_last, rd_ready = 0, head_valid, drop_pulse;
  logic [7:0] rd_data;
  logic [15:0] pkt_count, drop_cnt;
  logic [$clog2(DEPTH+1)-1:0] used_bytes;
  logic [10:0] head_len;

  pkt_buffer #(.DEPTH(DEPTH), .DESC_DEPTH(8)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_frame(int len, int seed, bit abort);
    for (int i = 0; i < len; i++) begin
      wr_valid <= 1; wr_data <= 8'(seed + i * 3);
      wr_commit <= (i == len - 1) && !abort;
      @(posedge clk);
    end
    wr_valid <= 0; wr_commit <= 0;
    if (abort) begin wr_abort <= 1; @(posedge clk); wr_abort <= 0; end
  endtask

  // read one frame and compare with the expected pattern
  task automatic read_frame(int len, int seed);
    int n = 0;
    bit done = 0;
    while (!done) begin
      rd_ready <= ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (rd_valid && rd_ready) begin
        check(rd_data == 8'(seed + n * 3), $sformatf("data byte %0d of frame seed %0d", n, seed));
        check(rd_last == (n == len - 1), $sformatf("last flag at byte %0d", n));
        n++;
        if (rd_last) done = 1;
      end
    end
    rd_ready <= 0;
    check(n == len, $sformatf("frame length %0d, expected %0d", n, len));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    write_frame(50, 10, 0);
    write_frame(30, 99, 1);     // aborted: must never appear
    write_frame(20, 40, 0);
    repeat (3) @(posedge clk);
    check(pkt_count == 2, $sformatf("pkt_count %0d after two commits", pkt_count));
    check(head_len == 20 || head_len == 50, "head_len is a committed length");
    check(used_bytes + 32'(rd_valid) == 70, $sformatf("used_bytes %0d plus output register, expected 70", used_bytes));
    read_frame(50, 10);
    read_frame(20, 40);
    repeat (3) @(posedge clk);
    check(pkt_count == 0, "empty after reading");
    check(used_bytes == 0, "no bytes held after reading");
    // overflow: two frames of 100 fit in 256 bytes, the third is dropped
    write_frame(100, 1, 0);
    write_frame(100, 2, 0);
    write_frame(100, 3, 0);
    repeat (2) @(posedge clk);
    check(drop_cnt == 1, $sformatf("drop_cnt %0d, expected 1", drop_cnt));
    check(pkt_count == 2, "two frames kept after overflow");
    read_frame(100, 1);
    // write while reading
    fork
      read_frame(100, 2);
      write_frame(120, 7, 0);
    join
    read_frame(120, 7);
    repeat (3) @(posedge clk);
    check(pkt_count == 0 && !rd_valid, "empty at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
