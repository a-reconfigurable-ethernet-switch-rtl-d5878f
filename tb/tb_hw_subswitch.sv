// tb_hw_subswitch: one sub-switch with its forwarding output looped back to
// its own forwarding input, so forwarded frames leave on the same port.
// Checks the hardware switching decision (own address -> processor queue
// only, broadcast -> both, other -> forwarded only, corrupted -> dropped),
// transmission of processor frames, the alternating source monitor and
// the overflow warning.
module tb_hw_subswitch;
  import tb_eth_pkg::*;
  localparam logic [47:0] ME = 48'h0200_0000_00B0;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge applies the asynchronous reset
  always #20 clk = ~clk;

  logic rx_dv = 0, tx_en, tx_enable = 1;
  logic [3:0] rxd = 0, txd;
  logic f_valid, f_last, f_ready;
  logic [7:0] f_data;
  logic [15:0] f_pkts;
  logic host_rx_valid, host_rx_last, host_rx_ready = 0;
  logic [7:0] host_rx_data;
  logic [10:0] host_rx_len;
  logic host_tx_valid = 0, host_tx_last = 0, host_tx_ready;
  logic [7:0] host_tx_data = 0;
  logic [15:0] rx_pkts, tx_pkts, rx_good_cnt, rx_bad_cnt, fwd_frames, proc_frames, tx_sent_cnt, poll_miss_cnt;
  logic [12:0] tx_free_bytes;
  logic ovf_warn, tx_drained, load_high;
  logic [6:0] load_pct;

  hw_subswitch #(.LOAD_T(2000)) dut (
    .clk, .rst_n, .my_addr(ME), .rx_dv, .rxd, .tx_en, .txd, .tx_enable,
    .fwd_out_valid(f_valid), .fwd_out_data(f_data), .fwd_out_last(f_last),
    .fwd_out_ready(f_ready), .fwd_out_pkts(f_pkts),
    .fwd_in_valid(f_valid), .fwd_in_data(f_data), .fwd_in_last(f_last),
    .fwd_in_ready(f_ready), .fwd_in_pkts(f_pkts),
    .host_rx_valid, .host_rx_data, .host_rx_last, .host_rx_ready, .host_rx_len,
    .host_tx_valid, .host_tx_data, .host_tx_last, .host_tx_ready,
    .rx_pkts, .tx_pkts, .tx_free_bytes, .ovf_warn, .tx_drained, .load_pct, .load_high,
    .rx_good_cnt, .rx_bad_cnt, .fwd_frames, .proc_frames, .tx_sent_cnt, .poll_miss_cnt
  );
  tb_mii_sink u_sink (.clk, .tx_en, .txd);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
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
    byte_q_t mine, bc, other, bad, own, g;
    byte_q_t others[8];
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (30) @(posedge clk);
    mine  = make_frame(ME, 48'h0200_0000_00A1, 80, 1);
    bc    = make_frame(48'hFFFF_FFFF_FFFF, 48'h0200_0000_00A1, 60, 2);
    other = make_frame(48'h0200_0000_00C3, 48'h0200_0000_00A1, 120, 3);
    bad   = make_frame(48'h0200_0000_00C3, 48'h0200_0000_00A1, 120, 4);
    bad[30] = ~bad[30];
    own   = make_frame(48'h0200_0000_00C3, ME, 90, 5);

    send(mine);
    repeat (200) @(posedge clk);
    check(rx_pkts == 1 && u_sink.frames.size() == 0, "own-address frame only to the processor");
    send(bc);
    repeat (400) @(posedge clk);
    check(rx_pkts == 2 && ovf_warn, "broadcast also to the processor; two frames raise the warning");
    check(u_sink.frames.size() == 1 && same(u_sink.frames[0], bc), "broadcast forwarded");
    send(other);
    repeat (400) @(posedge clk);
    check(rx_pkts == 2, "foreign frame not for the processor");
    check(u_sink.frames.size() == 2 && same(u_sink.frames[1], other), "foreign frame forwarded");
    send(bad);
    repeat (400) @(posedge clk);
    check(u_sink.frames.size() == 2 && rx_pkts == 2, "corrupted frame dropped");
    host_read(g);
    check(same(g, mine), "processor reads the own-address frame");
    host_read(g);
    check(same(g, bc), "processor reads the broadcast");
    // processor frame and forwarded frames share the transmitter
    for (int k = 0; k < 8; k++) others[k] = make_frame(48'h0200_0000_00C3, 48'h0200_0000_00A1, 46 + k, 10 + k);
    fork
      for (int k = 0; k < 8; k++) send(others[k]);
      begin repeat (300) @(posedge clk); host_write(own); end
    join
    wait (u_sink.frames.size() == 11);
    repeat (40) @(posedge clk);
    begin
      int nf = 0, no = 0;
      for (int i = 2; i < 11; i++) begin
        if (same(u_sink.frames[i], own)) no++;
        else if (same(u_sink.frames[i], others[nf])) nf++;
      end
      check(nf == 8, $sformatf("forwarded frames in order (%0d)", nf));
      check(no == 1, "processor frame sent");
    end
    check(poll_miss_cnt != 0, "monitor observed the processor queue while a forwarded frame was ready");
    check(fwd_frames == 10 && proc_frames == 2, $sformatf("decision counters %0d %0d", fwd_frames, proc_frames));
    check(rx_bad_cnt == 1, "bad counter");
    check(tx_drained, "transmit side drained");
    foreach (u_sink.gaps[i]) check(u_sink.gaps[i] >= 24, $sformatf("gap %0d = %0d", i, u_sink.gaps[i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
