// tb_latency_sweep: forwarding latency against packet size, payload 100 to
// 1500 bytes in steps of 100 (the frame is the payload plus 18 bytes of
// header and FCS, plus 8 bytes of preamble on the wire), through the whole
// switch at its default sizes.
//
// The latency is measured from the first received nibble on port 0 to the
// first transmitted nibble on port 1. First with the software switch, with a
// processor model that reads and writes one byte per clock; then, after a
// requested hand-over, with the hardware switch. Both are store-and-forward,
// so latency grows linearly with size. For the hardware switch the slope
// must be exactly 2 clocks per byte (0.08 us per byte at 100 Mbit/s), up to
// one clock of monitor delay, and the fixed part a few clocks; the
// software switch must have the steeper slope.
module tb_latency_sweep;
  import eth_pkg::*;
  import tb_eth_pkg::*;
  localparam logic [47:0] ME = 48'h0200_0000_00B0;
  localparam int UW = 13;
  localparam int NS = 15;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge applies the asynchronous reset
  always #20 clk = ~clk;

  logic [1:0] mii_rx_dv = 0, mii_tx_en;
  logic [1:0][3:0] mii_rxd = 0, mii_txd;
  logic [1:0] sw_rx_valid, sw_rx_last, sw_rx_ready = 0, sw_tx_valid = 0, sw_tx_last = 0, sw_tx_ready;
  logic [1:0][7:0] sw_rx_data, sw_tx_data = 0;
  logic [1:0][10:0] sw_rx_len, hw_rx_len;
  logic [1:0][UW-1:0] sw_tx_free, hw_tx_free;
  logic [1:0][15:0] sw_rx_pkts, hw_rx_pkts;
  logic [1:0] hw_rx_valid, hw_rx_last, hw_rx_ready = 0, hw_tx_valid = 0, hw_tx_last = 0, hw_tx_ready;
  logic [1:0][7:0] hw_rx_data, hw_tx_data = 0;
  logic reconf_start = 0, reconf_auto = 0, reconf_busy, reconf_done;
  sw_sel_e reconf_target = SEL_HW, cfg;
  logic [1:0] reconf_cause;
  logic [31:0] reconf_cycles;
  sw_sel_e [1:0] rx_owner, tx_owner;
  logic [1:0] sw_ovf_warn, sw_load_high, hw_ovf_warn;
  logic [1:0][6:0] sw_load_pct, hw_load_pct;
  logic [1:0][15:0] sw_rx_bad, hw_rx_bad, hw_fwd_frames, hw_poll_miss, sw_tx_sent, hw_tx_sent, sw_rx_drop;

  reconfig_eth_switch dut (.*, .my_addr(ME));
  tb_mii_sink u_sink1 (.clk, .tx_en(mii_tx_en[1]), .txd(mii_txd[1]));

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

  // processor model: software forwarding port 0 -> port 1, one byte per clock
  initial begin : processor
    forever begin
      byte_q_t b;
      bit done;
      @(posedge clk);
      if (!sw_rx_valid[0]) continue;
      b.delete();
      done = 0;
      while (!done) begin
        sw_rx_ready[0] <= 1;
        @(posedge clk);
        if (sw_rx_valid[0] && sw_rx_ready[0]) begin
          b.push_back(sw_rx_data[0]);
          if (sw_rx_last[0]) done = 1;
        end
      end
      sw_rx_ready[0] <= 0;
      foreach (b[i]) begin
        sw_tx_valid[1] <= 1; sw_tx_data[1] <= b[i]; sw_tx_last[1] <= (i == b.size() - 1);
        @(posedge clk);
      end
      sw_tx_valid[1] <= 0; sw_tx_last[1] <= 0;
    end
  end

  // one frame in, wait for it to come out, return the latency in clocks
  task automatic measure(int payload, int s, output longint lat);
    byte_q_t f;
    nib_q_t n;
    longint t0;
    int n_before;
    f = make_frame(48'h0200_0000_0C00, 48'h0200_0000_0A00, payload, s);
    n = mii_nibbles(f);
    n_before = u_sink1.frames.size();
    t0 = cyc + 1;
    foreach (n[i]) begin mii_rx_dv[0] <= 1; mii_rxd[0] <= n[i]; @(posedge clk); end
    mii_rx_dv[0] <= 0; mii_rxd[0] <= 0;
    wait (u_sink1.frames.size() == n_before + 1);
    lat = u_sink1.start_cyc[n_before] - t0;
    check(same(u_sink1.frames[n_before], f), $sformatf("frame of %0d bytes forwarded intact", payload));
    repeat (100) @(posedge clk);
  endtask

  longint lat_sw[NS], lat_hw[NS];

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (50) @(posedge clk);
    for (int i = 0; i < NS; i++) measure(100 * (i + 1), i, lat_sw[i]);
    reconf_target <= SEL_HW; reconf_start <= 1;
    @(posedge clk);
    reconf_start <= 0;
    wait (reconf_done);
    repeat (50) @(posedge clk);
    check(cfg == SEL_HW, "hardware switch active");
    for (int i = 0; i < NS; i++) measure(100 * (i + 1), 50 + i, lat_hw[i]);
    $display(" payload  software(us)  hardware(us)");
    for (int i = 0; i < NS; i++)
      $display("  %5d   %9.2f     %9.2f", 100 * (i + 1), lat_sw[i] * 0.04, lat_hw[i] * 0.04);
    for (int i = 0; i < NS; i++) begin
      longint fixed;
      fixed = lat_hw[i] - (16 + 2 * (100 * (i + 1) + 18));
      check(fixed >= 2 && fixed <= 8, $sformatf("hardware fixed delay %0d clocks at %0d bytes", fixed, 100 * (i + 1)));
    end
    for (int i = 1; i < NS; i++) begin
      longint d;
      d = lat_hw[i] - lat_hw[i - 1];
      check(d >= 199 && d <= 201, $sformatf("hardware slope %0d clocks per 100 bytes", d));
    end
    begin
      real gs, gh;
      gs = real'(lat_sw[NS - 1] - lat_sw[0]) / real'(100 * (NS - 1));
      gh = real'(lat_hw[NS - 1] - lat_hw[0]) / real'(100 * (NS - 1));
      $display("slope: software %0.3f, hardware %0.3f clocks per byte, ratio %0.2f", gs, gh, gs / gh);
      check(gs > gh, "software switch has the steeper latency slope");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
