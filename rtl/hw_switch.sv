// hw_switch: the dual-port hardware switch, two hw_subswitch instances whose
// forwarding buffers are cross-connected. A frame received on port 0 that
// is not addressed to this node is stored whole in sub-switch 0's forwarding
// buffer and sent by sub-switch 1 on port 1, and the other way round. Each
// port also has a processor queue pair (receive and transmit), so the
// software driver sees the same queues as with the software switch's MACs.
// Per-port signals are packed arrays indexed by port number.
//
// Two cross-connected sub-switches follow the published design.
module hw_switch
  import eth_pkg::*;
#(
  parameter int unsigned BUF_DEPTH  = 6144,
  parameter int unsigned WARN_PKTS  = 2,
  parameter int unsigned LOAD_T     = 25000,
  parameter int unsigned LOAD_PCT   = 20
) (
  input  logic              clk,
  input  logic              rst_n,
  input  mac_addr_t         my_addr,
  input  logic [1:0]        rx_dv,
  input  logic [1:0][3:0]   rxd,
  output logic [1:0]        tx_en,
  output logic [1:0][3:0]   txd,
  input  logic [1:0]        tx_enable,
  output logic [1:0]        host_rx_valid,
  output logic [1:0][7:0]   host_rx_data,
  output logic [1:0]        host_rx_last,
  input  logic [1:0]        host_rx_ready,
  output logic [1:0][10:0]  host_rx_len,
  input  logic [1:0]        host_tx_valid,
  input  logic [1:0][7:0]   host_tx_data,
  input  logic [1:0]        host_tx_last,
  output logic [1:0]        host_tx_ready,
  output logic [1:0][15:0]  rx_pkts,
  output logic [1:0][15:0]  tx_pkts,
  output logic [1:0][$clog2(BUF_DEPTH+1)-1:0] tx_free_bytes,
  output logic [1:0]        ovf_warn,
  output logic [1:0]        tx_drained,
  output logic [1:0][6:0]   load_pct,
  output logic [1:0]        load_high,
  output logic [1:0][15:0]  rx_good_cnt,
  output logic [1:0][15:0]  rx_bad_cnt,
  output logic [1:0][15:0]  fwd_frames,
  output logic [1:0][15:0]  proc_frames,
  output logic [1:0][15:0]  tx_sent_cnt,
  output logic [1:0][15:0]  poll_miss_cnt
);
  logic [1:0]       f_valid, f_last, f_ready;
  logic [1:0][7:0]  f_data;
  logic [1:0][15:0] f_pkts;

  for (genvar p = 0; p < 2; p++) begin : g_sub
    localparam int unsigned Q = 1 - p;   // the other port
    hw_subswitch #(.BUF_DEPTH(BUF_DEPTH), .WARN_PKTS(WARN_PKTS), .LOAD_T(LOAD_T),
                   .LOAD_PCT(LOAD_PCT)) u_sub (
      .clk, .rst_n, .my_addr,
      .rx_dv(rx_dv[p]), .rxd(rxd[p]), .tx_en(tx_en[p]), .txd(txd[p]), .tx_enable(tx_enable[p]),
      .fwd_out_valid(f_valid[p]), .fwd_out_data(f_data[p]), .fwd_out_last(f_last[p]),
      .fwd_out_ready(f_ready[p]), .fwd_out_pkts(f_pkts[p]),
      .fwd_in_valid(f_valid[Q]), .fwd_in_data(f_data[Q]), .fwd_in_last(f_last[Q]),
      .fwd_in_ready(f_ready[Q]), .fwd_in_pkts(f_pkts[Q]),
      .host_rx_valid(host_rx_valid[p]), .host_rx_data(host_rx_data[p]),
      .host_rx_last(host_rx_last[p]), .host_rx_ready(host_rx_ready[p]), .host_rx_len(host_rx_len[p]),
      .host_tx_valid(host_tx_valid[p]), .host_tx_data(host_tx_data[p]),
      .host_tx_last(host_tx_last[p]), .host_tx_ready(host_tx_ready[p]),
      .rx_pkts(rx_pkts[p]), .tx_pkts(tx_pkts[p]), .tx_free_bytes(tx_free_bytes[p]),
      .ovf_warn(ovf_warn[p]), .tx_drained(tx_drained[p]),
      .load_pct(load_pct[p]), .load_high(load_high[p]),
      .rx_good_cnt(rx_good_cnt[p]), .rx_bad_cnt(rx_bad_cnt[p]),
      .fwd_frames(fwd_frames[p]), .proc_frames(proc_frames[p]),
      .tx_sent_cnt(tx_sent_cnt[p]), .poll_miss_cnt(poll_miss_cnt[p])
    );
  end
endmodule
