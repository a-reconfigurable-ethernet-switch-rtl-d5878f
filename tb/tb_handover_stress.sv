// tb_handover_stress: lossless hand-over under random traffic. Both ports
// receive frames of random size (46..800 payload bytes), destination (10 %
// for this node, a few broadcasts) and gap, while hand-overs between the
// software and the hardware switch are requested back and forth at random
// moments, 16 in all. A processor model plays the software switch as in
// tb_reconfig_eth_switch. Every frame must come out of the right port, or
// reach the processor, exactly once; no buffer may drop a frame; gaps on the
// wire must stay at 24 clocks or more. Default sizes throughout.
module tb_handover_stress;
  import eth_pkg::*;
  import tb_eth_pkg::*;
  localparam logic [47:0] ME = 48'h0200_0000_00B0;
  localparam int UW = 13;
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
  tb_mii_sink u_sink0 (.clk, .tx_en(mii_tx_en[0]), .txd(mii_txd[0]));
  tb_mii_sink u_sink1 (.clk, .tx_en(mii_tx_en[1]), .txd(mii_txd[1]));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- expectations ----------------
  byte_q_t expect_out[2][$];   // frames that must leave on port p
  byte_q_t expect_in[$];       // frames that must reach the processor
  byte_q_t inbox[$];
  int seed = 100;

  // ---------------- mechanism counters ----------------
  int n_sw_fwd = 0, n_copy_new = 0, n_cause[3] = '{0, 0, 0}, n_split = 0, n_done = 0;
  always @(posedge clk) begin
    if (reconf_done) begin
      n_done++;
      n_cause[reconf_cause]++;
      $display("hand-over %0d to %s, cause %0d, %0d clocks (%0d ns)", n_done,
               cfg == SEL_HW ? "hardware" : "software", reconf_cause, reconf_cycles, reconf_cycles * 40);
    end
    if (reconf_busy && (rx_owner != tx_owner)) n_split++;
  end

  // ---------------- wire side ----------------
  task automatic send(int p, byte_q_t f, int gap);
    nib_q_t n = mii_nibbles(f);
    foreach (n[i]) begin mii_rx_dv[p] <= 1; mii_rxd[p] <= n[i]; @(posedge clk); end
    mii_rx_dv[p] <= 0; mii_rxd[p] <= 0;
    repeat (gap) @(posedge clk);
  endtask

  // frame to a foreign station: must come out of the other port
  function automatic byte_q_t fwd_frame(int p, int len);
    byte_q_t f = make_frame(48'h0200_0000_0C00 + 48'(seed), 48'h0200_0000_0A00 + 48'(p), len, seed);
    seed++;
    expect_out[1 - p].push_back(f);
    return f;
  endfunction

  // ---------------- processor model ----------------
  int proc_delay = 0;

  task automatic read_q(bit hw, int p, output byte_q_t b);
    bit done = 0;
    b.delete();
    while (!done) begin
      if (hw) hw_rx_ready[p] <= 1; else sw_rx_ready[p] <= 1;
      @(posedge clk);
      if (hw ? (hw_rx_valid[p] && hw_rx_ready[p]) : (sw_rx_valid[p] && sw_rx_ready[p])) begin
        b.push_back(hw ? hw_rx_data[p] : sw_rx_data[p]);
        if (hw ? hw_rx_last[p] : sw_rx_last[p]) done = 1;
      end
    end
    hw_rx_ready[p] <= 0; sw_rx_ready[p] <= 0;
  endtask

  task automatic write_q(bit hw, int p, byte_q_t f);
    while ((hw ? hw_tx_free[p] : sw_tx_free[p]) < UW'(f.size())) @(posedge clk);
    foreach (f[i]) begin
      if (hw) begin hw_tx_valid[p] <= 1; hw_tx_data[p] <= f[i]; hw_tx_last[p] <= (i == f.size() - 1); end
      else    begin sw_tx_valid[p] <= 1; sw_tx_data[p] <= f[i]; sw_tx_last[p] <= (i == f.size() - 1); end
      @(posedge clk);
    end
    hw_tx_valid[p] <= 0; hw_tx_last[p] <= 0; sw_tx_valid[p] <= 0; sw_tx_last[p] <= 0;
  endtask

  initial begin : processor
    forever begin
      bit hw;
      int p;
      byte_q_t b;
      logic [47:0] da;
      @(posedge clk);
      if      (sw_rx_valid[0]) begin hw = 0; p = 0; end
      else if (sw_rx_valid[1]) begin hw = 0; p = 1; end
      else if (hw_rx_valid[0]) begin hw = 1; p = 0; end
      else if (hw_rx_valid[1]) begin hw = 1; p = 1; end
      else continue;
      read_q(hw, p, b);
      repeat (proc_delay) @(posedge clk);
      da = {b[0], b[1], b[2], b[3], b[4], b[5]};
      if (da == ME || da == 48'hFFFF_FFFF_FFFF) inbox.push_back(b);
      if (da != ME && !hw) begin
        // forward in software, into the switch that is or becomes active
        bit to_hw;
        to_hw = reconf_busy ? (cfg == SEL_SW) : (cfg == SEL_HW);
        if (reconf_busy) n_copy_new++; else n_sw_fwd++;
        write_q(to_hw, 1 - p, b);
      end
    end
  end

  // ---------------- checks ----------------
  task automatic match_all(string phase);
    for (int q = 0; q < 2; q++) begin
      int missing = 0;
      byte_q_t got[$];
      got = (q == 0) ? u_sink0.frames : u_sink1.frames;
      foreach (expect_out[q][i]) begin
        int hit = -1;
        foreach (got[j]) if (hit < 0 && same(got[j], expect_out[q][i])) hit = j;
        if (hit < 0) missing++; else got.delete(hit);
      end
      check(missing == 0, $sformatf("%s: port %0d lost %0d of %0d frames", phase, q, missing, expect_out[q].size()));
      check(got.size() == 0, $sformatf("%s: port %0d sent %0d unexpected frames", phase, q, got.size()));
    end
    begin
      int missing = 0;
      foreach (expect_in[i]) begin
        bit hit = 0;
        foreach (inbox[j]) if (same(inbox[j], expect_in[i])) hit = 1;
        if (!hit) missing++;
      end
      check(missing == 0 && inbox.size() == expect_in.size(),
            $sformatf("%s: processor frames %0d missing, %0d received of %0d", phase, missing, inbox.size(), expect_in.size()));
    end
  endtask

  task automatic settle(int n);
    repeat (n) @(posedge clk);
    wait (!reconf_busy && sw_rx_pkts == '0 && hw_rx_pkts == '0);
    repeat (3000) @(posedge clk);
  endtask

  bit traffic_done = 0;

  task automatic traffic(int p, int n);
    for (int k = 0; k < n; k++) begin
      int r, len;
      byte_q_t f;
      r = $urandom_range(0, 99);
      len = $urandom_range(46, 800);
      if (r < 10) begin
        f = make_frame(ME, 48'h0200_0000_0A00 + 48'(p), len, seed++);
        expect_in.push_back(f);
      end else if (r < 13) begin
        f = make_frame(48'hFFFF_FFFF_FFFF, 48'h0200_0000_0A00 + 48'(p), len, seed++);
        expect_in.push_back(f);
        expect_out[1 - p].push_back(f);
      end else f = fwd_frame(p, len);
      send(p, f, $urandom_range(24, 4000));
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (50) @(posedge clk);
    proc_delay = 20;
    fork
      traffic(0, 150);
      traffic(1, 150);
      begin
        for (int h = 0; h < 16; h++) begin
          repeat ($urandom_range(3000, 9000)) @(posedge clk);
          wait (!reconf_busy);
          reconf_target <= (cfg == SEL_SW) ? SEL_HW : SEL_SW;
          reconf_start <= 1;
          @(posedge clk);
          reconf_start <= 0;
          @(posedge clk);
        end
      end
    join
    settle(100);
    match_all("stress");
    check(n_done == 16, $sformatf("%0d hand-overs done", n_done));
    foreach (u_sink0.gaps[i]) check(u_sink0.gaps[i] >= 24, $sformatf("port 0 gap %0d = %0d", i, u_sink0.gaps[i]));
    foreach (u_sink1.gaps[i]) check(u_sink1.gaps[i] >= 24, $sformatf("port 1 gap %0d = %0d", i, u_sink1.gaps[i]));
    check(sw_rx_drop == '0, $sformatf("no frame dropped by a full buffer (%0d, %0d)", sw_rx_drop[0], sw_rx_drop[1]));
    $display("frames out %0d/%0d, processor %0d, copies during hand-over %0d", u_sink0.frames.size(), u_sink1.frames.size(), inbox.size(), n_copy_new);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
