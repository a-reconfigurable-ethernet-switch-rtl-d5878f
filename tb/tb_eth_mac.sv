// tb_eth_mac: software-switch MAC. Frames arrive on the MII and are read by
// a processor model over the host receive stream; a corrupted frame must not
// reach it. The receive overflow warning must rise with two frames waiting.
// Frames written by the processor must leave on the MII unchanged, not while
// tx_enable is low, and tx_drained must follow.
module tb_eth_mac;
  import tb_eth_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge applies the asynchronous reset
  always #20 clk = ~clk;

  logic rx_dv = 0, tx_en, tx_enable = 1;
  logic [3:0] rxd = 0, txd;
  logic host_rx_valid, host_rx_last, host_rx_ready = 0;
  logic [7:0] host_rx_data;
  logic [10:0] host_rx_len;
  logic host_tx_valid = 0, host_tx_last = 0, host_tx_ready;
  logic [7:0] host_tx_data = 0;
  logic [15:0] rx_pkts, tx_pkts, rx_good_cnt, rx_bad_cnt, rx_drop_cnt, tx_sent_cnt;
  logic [12:0] tx_free_bytes;
  logic ovf_warn, tx_drained, load_high;
  logic [6:0] load_pct;

  eth_mac #(.LOAD_T(2000)) dut (.*);
  tb_mii_sink u_sink (.clk, .tx_en, .txd);

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

  task automatic send(byte_q_t f);
    nib_q_t n = mii_nibbles(f);
    foreach (n[i]) begin rx_dv <= 1; rxd <= n[i]; @(posedge clk); end
    rx_dv <= 0; rxd <= 0;
    repeat (24) @(posedge clk);
  endtask

  task automatic host_read(output byte_q_t b);
    bit done = 0;
    b.delete();
    while (!done) begin
      host_rx_ready <= 1;
      @(posedge clk);
      if (host_rx_valid && host_rx_ready) begin
        b.push_back(host_rx_data);
        if (host_rx_last) done = 1;
      end
    end
    host_rx_ready <= 0;
  endtask

  task automatic host_write(byte_q_t f);
    foreach (f[i]) begin
      host_tx_valid <= 1; host_tx_data <= f[i]; host_tx_last <= (i == f.size() - 1);
      @(posedge clk);
    end
    host_tx_valid <= 0; host_tx_last <= 0;
  endtask

  initial begin
    byte_q_t f0, f1, bad, g;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (30) @(posedge clk);
    f0 = make_frame(48'h0200_0000_00C3, 48'h0200_0000_00A1, 100, 1);
    f1 = make_frame(48'h0200_0000_00C3, 48'h0200_0000_00A1, 200, 2);
    bad = make_frame(48'h0200_0000_00C3, 48'h0200_0000_00A1, 100, 3);
    bad[20] = ~bad[20];
    send(f0);
    check(rx_pkts == 1 && !ovf_warn, "one frame waiting, no warning");
    send(bad);
    check(rx_pkts == 1, "corrupted frame not stored");
    send(f1);
    check(rx_pkts == 2 && ovf_warn, "two frames waiting raise the overflow warning");
    check(host_rx_len == 11'(f0.size()), "head length");
    host_read(g);
    check(same(g, f0), "first frame read by the processor");
    host_read(g);
    check(same(g, f1), "second frame read by the processor");
    repeat (3) @(posedge clk);
    check(rx_pkts == 0 && !ovf_warn, "receive queue empty again");
    check(rx_good_cnt == 2 && rx_bad_cnt == 1, "receive counters");
    // transmit, first suspended
    tx_enable <= 0;
    host_write(f1);
    host_write(f0);
    repeat (100) @(posedge clk);
    check(u_sink.frames.size() == 0 && !tx_drained, "nothing sent while suspended");
    tx_enable <= 1;
    wait (u_sink.frames.size() == 2);
    repeat (30) @(posedge clk);
    check(same(u_sink.frames[0], f1) && same(u_sink.frames[1], f0), "frames sent in order");
    check(u_sink.gaps[0] == 24, $sformatf("inter-frame gap %0d", u_sink.gaps[0]));
    check(tx_drained && tx_pkts == 0, "drained after sending");
    check(tx_free_bytes == 13'(6144), "transmit buffer free again");
    check(u_sink.bad_preamble == 0, "preambles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
