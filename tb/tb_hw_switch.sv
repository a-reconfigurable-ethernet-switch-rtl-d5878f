// tb_hw_switch: the dual-port hardware switch at full line rate. Twelve
// frames per direction are sent back to back with the minimum gap on both
// ports at once; every frame must appear unchanged and in order on the other
// port. Store-and-forward latency is checked: a frame starts leaving a fixed
// few clocks after it has been received completely, independent of its
// size, so the latency from first received to first sent nibble grows by
// 2 clocks per byte. Own-address frames go to the processor queue of the
// receiving port.
module tb_hw_switch;
  import tb_eth_pkg::*;
  localparam logic [47:0] ME = 48'h0200_0000_00B0;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge applies the asynchronous reset
  always #20 clk = ~clk;

  logic [1:0] rx_dv = 0, tx_en, tx_enable = 2'b11;
  logic [1:0][3:0] rxd = 0, txd;
  logic [1:0] host_rx_valid, host_rx_last, host_rx_ready = 0;
  logic [1:0][7:0] host_rx_data;
  logic [1:0][10:0] host_rx_len;
  logic [1:0] host_tx_valid = 0, host_tx_last = 0, host_tx_ready;
  logic [1:0][7:0] host_tx_data = 0;
  logic [1:0][15:0] rx_pkts, tx_pkts, rx_good_cnt, rx_bad_cnt, fwd_frames, proc_frames, tx_sent_cnt, poll_miss_cnt;
  logic [1:0][12:0] tx_free_bytes;
  logic [1:0] ovf_warn, tx_drained, load_high;
  logic [1:0][6:0] load_pct;

  hw_switch #(.LOAD_T(2000)) dut (.*, .my_addr(ME));
  tb_mii_sink u_sink0 (.clk, .tx_en(tx_en[0]), .txd(txd[0]));
  tb_mii_sink u_sink1 (.clk, .tx_en(tx_en[1]), .txd(txd[1]));

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

  longint cyc = 0;
  always @(posedge clk) cyc++;
  longint rx_start[2][$], rx_end[2][$];

  task automatic send(int p, byte_q_t f);
    nib_q_t n = mii_nibbles(f);
    rx_start[p].push_back(cyc + 1);
    foreach (n[i]) begin rx_dv[p] <= 1; rxd[p] <= n[i]; @(posedge clk); end
    rx_dv[p] <= 0; rxd[p] <= 0;
    rx_end[p].push_back(cyc);
    repeat (24) @(posedge clk);
  endtask

  byte_q_t fr[2][12];

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (30) @(posedge clk);
    for (int p = 0; p < 2; p++)
      for (int k = 0; k < 12; k++)
        fr[p][k] = make_frame(48'h0200_0000_0100 + 48'(p), 48'h0200_0000_00A1,
                              (k % 3 == 0) ? 46 : (k % 3 == 1) ? 400 : 1500, 16 * p + k);
    fork
      for (int k = 0; k < 12; k++) send(0, fr[0][k]);
      for (int k = 0; k < 12; k++) send(1, fr[1][k]);
    join
    wait (u_sink0.frames.size() == 12 && u_sink1.frames.size() == 12);
    for (int k = 0; k < 12; k++) begin
      check(same(u_sink1.frames[k], fr[0][k]), $sformatf("port 0 -> 1 frame %0d", k));
      check(same(u_sink0.frames[k], fr[1][k]), $sformatf("port 1 -> 0 frame %0d", k));
    end
    // the first frame of each direction meets an idle transmitter: its
    // start follows the end of reception by a few clocks
    for (int p = 0; p < 2; p++) begin
      longint d;
      d = (p == 0 ? u_sink1.start_cyc[0] : u_sink0.start_cyc[0]) - rx_end[p][0];
      check(d >= 2 && d <= 8, $sformatf("port %0d forwarding delay after reception %0d clocks", p, d));
    end
    check(poll_miss_cnt[0] + poll_miss_cnt[1] <= 24, "monitor costs at most one clock per frame");
    // an own-address frame stays on the receiving port's processor queue
    begin
      byte_q_t m;
      m = make_frame(ME, 48'h0200_0000_00A1, 50, 99);
      send(1, m);
      repeat (100) @(posedge clk);
      check(rx_pkts[1] == 1 && rx_pkts[0] == 0, "own-address frame queued for the processor of port 1");
      check(u_sink0.frames.size() == 12, "own-address frame not forwarded");
    end
    check(fwd_frames[0] == 12 && fwd_frames[1] == 12, "forward counters");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
