// tb_mii_mux: the port multiplexer. A change of owner requested in the
// middle of a received or transmitted frame must wait for the line to go
// idle; RX_DV must reach only the receive owner and the transmit lines must
// come from the transmit owner.
module tb_mii_mux;
  import eth_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge applies the asynchronous reset
  always #20 clk = ~clk;

  sw_sel_e rx_sel_req = SEL_SW, tx_sel_req = SEL_SW, rx_sel, tx_sel;
  logic rx_dv = 0, tx_en, sw_rx_dv, hw_rx_dv, sw_tx_en = 0, hw_tx_en = 0;
  logic [3:0] rxd = 0, txd, sw_rxd, hw_rxd, sw_txd = 4'h1, hw_txd = 4'h2;

  mii_mux dut (.*);

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

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    check(rx_sel == SEL_SW && tx_sel == SEL_SW, "software switch owns the port after reset");
    // receive: frame in progress
    rx_dv <= 1; rxd <= 4'h5;
    repeat (2) @(posedge clk);
    #1 check(sw_rx_dv && !hw_rx_dv && sw_rxd == 4'h5, "RX_DV to the software side only");
    rx_sel_req <= SEL_HW;
    repeat (20) @(posedge clk);
    #1 check(rx_sel == SEL_SW && sw_rx_dv, "no receive hand-over inside a frame");
    rx_dv <= 0;
    repeat (3) @(posedge clk);
    #1 check(rx_sel == SEL_HW, "receive hand-over in the gap");
    rx_dv <= 1;
    @(posedge clk);
    #1 check(hw_rx_dv && !sw_rx_dv && hw_rxd == rxd, "RX_DV to the hardware side only");
    rx_dv <= 0;
    // transmit: software side sending
    sw_tx_en <= 1;
    @(posedge clk);
    #1 check(tx_en && txd == 4'h1, "transmit lines from the software side");
    tx_sel_req <= SEL_HW;
    repeat (10) @(posedge clk);
    #1 check(tx_sel == SEL_SW && txd == 4'h1, "no transmit hand-over inside a frame");
    sw_tx_en <= 0;
    repeat (2) @(posedge clk);
    #1 check(tx_sel == SEL_HW, "transmit hand-over when idle");
    hw_tx_en <= 1;
    @(posedge clk);
    #1 check(tx_en && txd == 4'h2, "transmit lines from the hardware side");
    // back to the software switch
    tx_sel_req <= SEL_SW; rx_sel_req <= SEL_SW;
    repeat (5) @(posedge clk);
    #1 check(tx_sel == SEL_HW, "hardware frame not cut");
    hw_tx_en <= 0;
    repeat (2) @(posedge clk);
    #1 check(tx_sel == SEL_SW && rx_sel == SEL_SW, "both back to the software switch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
