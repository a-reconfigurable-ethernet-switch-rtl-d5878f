// reconfig_eth_switch: dual-port Ethernet switch that can move, while
// running and without losing a frame, between a software switch (two plain
// MACs whose frames the processor forwards) and a hardware switch (two
// cross-connected store-and-forward sub-switches).
//
// Both implementations sit side by side behind one hardware multiplexer per
// port. The reconfiguration controller hands each port's receive and
// transmit process from one to the other in inter-frame gaps (see
// reconfig_ctrl); while it does, the processor empties the old receive
// queues into the new transmit queues. A hand-over starts on request, or
// automatically when a software-switch port's load exceeds 20 % or its
// receive buffer is about to overflow.
//
// Interface: one MII per port (25 MHz nibble clock = clk), the processor
// queues of the software switch (sw_*) and of the hardware switch (hw_*) as
// byte streams indexed by port, the control inputs of the controller and
// status outputs. All per-port signals are packed arrays [port].
//
// The arrangement follows the published design's architecture; the
// processor, its bus and the FPGA's partial reconfiguration lie outside
// this RTL, so both switches are always present and their processor
// queues are brought out as ports.
module reconfig_eth_switch
  import eth_pkg::*;
#(
  parameter int unsigned BUF_DEPTH  = 6144,
  parameter int unsigned WARN_PKTS  = 2,
  parameter int unsigned LOAD_T     = 25000,
  parameter int unsigned LOAD_PCT   = 20,
  localparam int unsigned UW        = $clog2(BUF_DEPTH+1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  mac_addr_t         my_addr,
  // port MII pins
  input  logic [1:0]        mii_rx_dv,
  input  logic [1:0][3:0]   mii_rxd,
  output logic [1:0]        mii_tx_en,
  output logic [1:0][3:0]   mii_txd,
  // software switch processor queues
  output logic [1:0]        sw_rx_valid,
  output logic [1:0][7:0]   sw_rx_data,
  output logic [1:0]        sw_rx_last,
  input  logic [1:0]        sw_rx_ready,
  output logic [1:0][10:0]  sw_rx_len,
  input  logic [1:0]        sw_tx_valid,
  input  logic [1:0][7:0]   sw_tx_data,
  input  logic [1:0]        sw_tx_last,
  output logic [1:0]        sw_tx_ready,
  output logic [1:0][UW-1:0] sw_tx_free,
  output logic [1:0][15:0]  sw_rx_pkts,
  // hardware switch processor queues
  output logic [1:0]        hw_rx_valid,
  output logic [1:0][7:0]   hw_rx_data,
  output logic [1:0]        hw_rx_last,
  input  logic [1:0]        hw_rx_ready,
  output logic [1:0][10:0]  hw_rx_len,
  input  logic [1:0]        hw_tx_valid,
  input  logic [1:0][7:0]   hw_tx_data,
  input  logic [1:0]        hw_tx_last,
  output logic [1:0]        hw_tx_ready,
  output logic [1:0][UW-1:0] hw_tx_free,
  output logic [1:0][15:0]  hw_rx_pkts,
  // reconfiguration control and status
  input  logic              reconf_start,
  input  sw_sel_e           reconf_target,
  input  logic              reconf_auto,
  output sw_sel_e           cfg,
  output logic              reconf_busy,
  output logic              reconf_done,
  output logic [1:0]        reconf_cause,
  output logic [31:0]       reconf_cycles,
  output sw_sel_e [1:0]     rx_owner,
  output sw_sel_e [1:0]     tx_owner,
  output logic [1:0]        sw_ovf_warn,
  output logic [1:0]        sw_load_high,
  output logic [1:0][6:0]   sw_load_pct,
  output logic [1:0][6:0]   hw_load_pct,
  output logic [1:0][15:0]  sw_rx_bad,
  output logic [1:0][15:0]  hw_rx_bad,
  output logic [1:0][15:0]  hw_fwd_frames,
  output logic [1:0][15:0]  hw_poll_miss,
  output logic [1:0][15:0]  sw_tx_sent,
  output logic [1:0][15:0]  hw_tx_sent,
  output logic [1:0][15:0]  sw_rx_drop,
  output logic [1:0]        hw_ovf_warn
);
  logic [1:0]      s_rx_dv, h_rx_dv, s_tx_en, h_tx_en;
  logic [1:0][3:0] s_rxd, h_rxd, s_txd, h_txd;
  logic [1:0]      tx_enable_sw, tx_enable_hw, sw_drained, hw_drained;
  sw_sel_e [1:0]   rx_req, tx_req;

  // ---------------- software switch: one MAC per port ----------------
  logic [1:0][15:0] unused_s_tx_pkts, unused_s_good;
  for (genvar p = 0; p < 2; p++) begin : g_mac
    eth_mac #(.BUF_DEPTH(BUF_DEPTH), .WARN_PKTS(WARN_PKTS), .LOAD_T(LOAD_T),
              .LOAD_PCT(LOAD_PCT)) u_mac (
      .clk, .rst_n,
      .rx_dv(s_rx_dv[p]), .rxd(s_rxd[p]), .tx_en(s_tx_en[p]), .txd(s_txd[p]),
      .tx_enable(tx_enable_sw[p]),
      .host_rx_valid(sw_rx_valid[p]), .host_rx_data(sw_rx_data[p]), .host_rx_last(sw_rx_last[p]),
      .host_rx_ready(sw_rx_ready[p]), .host_rx_len(sw_rx_len[p]),
      .host_tx_valid(sw_tx_valid[p]), .host_tx_data(sw_tx_data[p]), .host_tx_last(sw_tx_last[p]),
      .host_tx_ready(sw_tx_ready[p]),
      .rx_pkts(sw_rx_pkts[p]), .tx_pkts(unused_s_tx_pkts[p]), .tx_free_bytes(sw_tx_free[p]),
      .ovf_warn(sw_ovf_warn[p]), .tx_drained(sw_drained[p]),
      .load_pct(sw_load_pct[p]), .load_high(sw_load_high[p]),
      .rx_good_cnt(unused_s_good[p]), .rx_bad_cnt(sw_rx_bad[p]), .rx_drop_cnt(sw_rx_drop[p]),
      .tx_sent_cnt(sw_tx_sent[p])
    );
  end

  // ---------------- hardware switch ----------------
  logic [1:0][15:0] unused_h_tx_pkts, unused_h_good, unused_h_proc;
  logic [1:0]       unused_h_load_high;
  hw_switch #(.BUF_DEPTH(BUF_DEPTH), .WARN_PKTS(WARN_PKTS), .LOAD_T(LOAD_T),
              .LOAD_PCT(LOAD_PCT)) u_hw (
    .clk, .rst_n, .my_addr,
    .rx_dv(h_rx_dv), .rxd(h_rxd), .tx_en(h_tx_en), .txd(h_txd), .tx_enable(tx_enable_hw),
    .host_rx_valid(hw_rx_valid), .host_rx_data(hw_rx_data), .host_rx_last(hw_rx_last),
    .host_rx_ready(hw_rx_ready), .host_rx_len(hw_rx_len),
    .host_tx_valid(hw_tx_valid), .host_tx_data(hw_tx_data), .host_tx_last(hw_tx_last),
    .host_tx_ready(hw_tx_ready),
    .rx_pkts(hw_rx_pkts), .tx_pkts(unused_h_tx_pkts), .tx_free_bytes(hw_tx_free),
    .ovf_warn(hw_ovf_warn), .tx_drained(hw_drained),
    .load_pct(hw_load_pct), .load_high(unused_h_load_high),
    .rx_good_cnt(unused_h_good), .rx_bad_cnt(hw_rx_bad),
    .fwd_frames(hw_fwd_frames), .proc_frames(unused_h_proc),
    .tx_sent_cnt(hw_tx_sent), .poll_miss_cnt(hw_poll_miss)
  );

  // ---------------- port multiplexers ----------------
  for (genvar p = 0; p < 2; p++) begin : g_mux
    mii_mux u_mux (
      .clk, .rst_n,
      .rx_sel_req(rx_req[p]), .tx_sel_req(tx_req[p]), .rx_sel(rx_owner[p]), .tx_sel(tx_owner[p]),
      .rx_dv(mii_rx_dv[p]), .rxd(mii_rxd[p]), .tx_en(mii_tx_en[p]), .txd(mii_txd[p]),
      .sw_rx_dv(s_rx_dv[p]), .sw_rxd(s_rxd[p]), .sw_tx_en(s_tx_en[p]), .sw_txd(s_txd[p]),
      .hw_rx_dv(h_rx_dv[p]), .hw_rxd(h_rxd[p]), .hw_tx_en(h_tx_en[p]), .hw_txd(h_txd[p])
    );
  end

  // ---------------- reconfiguration controller ----------------
  logic [15:0] unused_reconf_cnt;
  reconfig_ctrl u_ctrl (
    .clk, .rst_n,
    .start(reconf_start), .target(reconf_target), .auto_en(reconf_auto),
    .load_high(sw_load_high), .ovf_warn(sw_ovf_warn),
    .sw_tx_drained(sw_drained), .hw_tx_drained(hw_drained),
    .sw_rx_empty(sw_rx_pkts[0] == '0 && sw_rx_pkts[1] == '0),
    .hw_rx_empty(hw_rx_pkts[0] == '0 && hw_rx_pkts[1] == '0),
    .rx_sel(rx_owner), .tx_sel(tx_owner), .rx_sel_req(rx_req), .tx_sel_req(tx_req),
    .tx_enable_sw, .tx_enable_hw,
    .cfg, .busy(reconf_busy), .done_pulse(reconf_done), .cause(reconf_cause),
    .last_cycles(reconf_cycles), .reconf_cnt(unused_reconf_cnt)
  );
endmodule
