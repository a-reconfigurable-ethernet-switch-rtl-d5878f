// tb_reconfig_ctrl: the hand-over sequence with the multiplexers modelled
// as immediate followers of the requests. Checks: receive moves at once,
// transmit only after the old side is drained, completion waits for the old
// receive buffers to empty, the duration counter, automatic start on the
// overflow warning and on high load, and a requested return.
module tb_reconfig_ctrl;
  import eth_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge applies the asynchronous reset
  always #20 clk = ~clk;

  logic start = 0, auto_en = 0, sw_rx_empty = 1, hw_rx_empty = 1;
  sw_sel_e target = SEL_HW, cfg;
  logic [1:0] load_high = 0, ovf_warn = 0, sw_tx_drained = 0, hw_tx_drained = 2'b11;
  sw_sel_e [1:0] rx_sel, tx_sel, rx_sel_req, tx_sel_req;
  logic [1:0] tx_enable_sw, tx_enable_hw, cause;
  logic busy, done_pulse;
  logic [31:0] last_cycles;
  logic [15:0] reconf_cnt;

  reconfig_ctrl dut (.*);

  // multiplexer model: follows the requests one clock later; hold_rx
  // stands for a frame still arriving on port 1
  logic hold_rx = 0;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin rx_sel <= {SEL_SW, SEL_SW}; tx_sel <= {SEL_SW, SEL_SW}; end
    else begin
      rx_sel[0] <= rx_sel_req[0];
      if (!hold_rx) rx_sel[1] <= rx_sel_req[1];
      tx_sel <= tx_sel_req;
    end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_done = 0;
  always @(posedge clk) if (done_pulse) n_done++;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    check(cfg == SEL_SW && !busy && tx_enable_sw == 2'b11 && tx_enable_hw == 2'b00, "software switch after reset");
    // requested hand-over to the hardware switch
    sw_rx_empty <= 0;
    start <= 1; target <= SEL_HW;
    @(posedge clk);
    start <= 0;
    repeat (3) @(posedge clk);
    check(busy && rx_sel == {SEL_HW, SEL_HW}, "receive processes moved at once");
    check(tx_sel == {SEL_SW, SEL_SW} && tx_enable_hw == 2'b00, "transmit stays while old side busy");
    sw_tx_drained <= 2'b01;
    repeat (3) @(posedge clk);
    check(tx_sel[0] == SEL_HW && tx_sel[1] == SEL_SW, "port 0 transmit moved once drained");
    check(tx_enable_hw == 2'b01 && tx_enable_sw == 2'b10, "transmit enables follow the owner");
    sw_tx_drained <= 2'b11;
    repeat (3) @(posedge clk);
    check(tx_sel == {SEL_HW, SEL_HW} && busy, "still busy while old receive buffers hold frames");
    repeat (10) @(posedge clk);
    sw_rx_empty <= 1;
    repeat (3) @(posedge clk);
    check(!busy && cfg == SEL_HW && n_done == 1, "hand-over complete");
    check(last_cycles >= 18 && last_cycles <= 22, $sformatf("duration %0d clocks", last_cycles));
    check(cause == 2'd0, "cause: request");
    // return to the software switch
    sw_tx_drained <= 0; hw_tx_drained <= 2'b11; hold_rx <= 1;
    start <= 1; target <= SEL_SW;
    @(posedge clk);
    start <= 0;
    repeat (5) @(posedge clk);
    check(tx_sel == {SEL_HW, SEL_HW}, "return: transmit waits while a receive process has not moved");
    hw_tx_drained <= 0; hold_rx <= 0;
    repeat (5) @(posedge clk);
    check(rx_sel == {SEL_SW, SEL_SW} && tx_sel == {SEL_HW, SEL_HW}, "return: receive first");
    hw_tx_drained <= 2'b11;
    repeat (8) @(posedge clk);
    check(!busy && cfg == SEL_SW && n_done == 2, $sformatf("returned to the software switch %0d %0d %0d", busy, cfg, n_done));
    // automatic start on the overflow warning, ignored without auto_en
    ovf_warn <= 2'b10;
    repeat (5) @(posedge clk);
    check(!busy && cfg == SEL_SW, "no automatic start when disabled");
    auto_en <= 1;
    repeat (2) @(posedge clk);
    check(busy && cause == 2'd2, "automatic start on the overflow warning");
    ovf_warn <= 0; sw_tx_drained <= 2'b11;
    repeat (5) @(posedge clk);
    check(cfg == SEL_HW && reconf_cnt == 3, "automatic hand-over complete");
    // back, then automatic start on load
    start <= 1; target <= SEL_SW;
    @(posedge clk);
    start <= 0;
    repeat (5) @(posedge clk);
    check(cfg == SEL_SW, "back to software (auto does not fire while load is low)");
    load_high <= 2'b01;
    repeat (2) @(posedge clk);
    check(busy && cause == 2'd1, "automatic start on high load");
    repeat (5) @(posedge clk);
    check(cfg == SEL_HW && reconf_cnt == 5, "load-triggered hand-over complete");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
