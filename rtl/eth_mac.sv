// eth_mac: one Ethernet MAC of the software switch (one per switch port).
//
// Receive path: mii_rx -> receive buffer, committed only for frames with a
// good FCS and legal length; the processor reads frames out over the host
// receive stream (host_rx_*). Transmit path: the processor writes a frame
// into the transmit buffer over the host transmit stream (host_tx_*, the
// frame is committed with its last byte) and mii_tx sends it, honouring the
// minimum inter-frame gap and tx_enable. The forwarding decision is left to
// the processor, as in a software switch.
//
// Status for the processor and the reconfiguration controller: buffer fill,
// network load (load_monitor), and ovf_warn, an impending receive buffer
// overflow, raised when WARN_PKTS frames wait in the receive buffer or less
// than one maximum frame of space is left. tx_drained is high when the
// transmit buffer is empty and the transmitter idle with the gap satisfied.
// The processor bus is represented by the byte streams; its protocol is not
// modelled. host_tx_ready is always high: the processor must check
// tx_free_bytes first, otherwise an oversize write is dropped and counted.
//
// One MAC per port, status for network load and buffer state, and a
// software forwarding decision follow the published design; the warning
// rule beyond "two frames waiting" and the stream queues are own choices.
module eth_mac
  import eth_pkg::*;
#(
  parameter int unsigned BUF_DEPTH  = 6144,
  parameter int unsigned WARN_PKTS  = 2,
  parameter int unsigned LOAD_T     = 25000,
  parameter int unsigned LOAD_PCT   = 20
) (
  input  logic        clk,
  input  logic        rst_n,
  // MII (through the port multiplexer)
  input  logic        rx_dv,
  input  logic [3:0]  rxd,
  output logic        tx_en,
  output logic [3:0]  txd,
  input  logic        tx_enable,
  // processor receive queue
  output logic        host_rx_valid,
  output logic [7:0]  host_rx_data,
  output logic        host_rx_last,
  input  logic        host_rx_ready,
  output logic [10:0] host_rx_len,
  // processor transmit queue
  input  logic        host_tx_valid,
  input  logic [7:0]  host_tx_data,
  input  logic        host_tx_last,
  output logic        host_tx_ready,
  // status
  output logic [15:0] rx_pkts,
  output logic [15:0] tx_pkts,
  output logic [$clog2(BUF_DEPTH+1)-1:0] tx_free_bytes,
  output logic        ovf_warn,
  output logic        tx_drained,
  output logic [6:0]  load_pct,
  output logic        load_high,
  output logic [15:0] rx_good_cnt,
  output logic [15:0] rx_bad_cnt,
  output logic [15:0] rx_drop_cnt,
  output logic [15:0] tx_sent_cnt
);
  localparam int unsigned UW = $clog2(BUF_DEPTH+1);

  logic        rb_valid, rb_end, rb_good;
  logic [7:0]  rb_data;
  mac_addr_t   unused_da;
  logic        unused_dav, unused_dp, unused_tdp, unused_thv, unused_rhv, unused_ls;
  logic [UW-1:0] rx_used, tx_used;
  logic [15:0] unused_tdc;
  logic [10:0] unused_tlen;
  logic        tb_valid, tb_last, tb_ready, tx_busy, tx_ifg_ok;
  logic [7:0]  tb_data;

  mii_rx u_rx (
    .clk, .rst_n, .rx_dv, .rxd,
    .byte_valid(rb_valid), .byte_data(rb_data), .frame_end(rb_end), .frame_good(rb_good),
    .dest_addr(unused_da), .dest_valid(unused_dav), .good_cnt(rx_good_cnt), .bad_cnt(rx_bad_cnt)
  );

  pkt_buffer #(.DEPTH(BUF_DEPTH)) u_rxbuf (
    .clk, .rst_n,
    .wr_valid(rb_valid), .wr_data(rb_data),
    .wr_commit(rb_end && rb_good), .wr_abort(rb_end && !rb_good),
    .rd_valid(host_rx_valid), .rd_data(host_rx_data), .rd_last(host_rx_last), .rd_ready(host_rx_ready),
    .pkt_count(rx_pkts), .used_bytes(rx_used), .head_len(host_rx_len), .head_valid(unused_rhv),
    .drop_pulse(unused_dp), .drop_cnt(rx_drop_cnt)
  );

  assign host_tx_ready = 1'b1;

  pkt_buffer #(.DEPTH(BUF_DEPTH)) u_txbuf (
    .clk, .rst_n,
    .wr_valid(host_tx_valid), .wr_data(host_tx_data),
    .wr_commit(host_tx_valid && host_tx_last), .wr_abort(1'b0),
    .rd_valid(tb_valid), .rd_data(tb_data), .rd_last(tb_last), .rd_ready(tb_ready),
    .pkt_count(tx_pkts), .used_bytes(tx_used), .head_len(unused_tlen), .head_valid(unused_thv),
    .drop_pulse(unused_tdp), .drop_cnt(unused_tdc)
  );

  mii_tx u_tx (
    .clk, .rst_n, .tx_enable,
    .in_valid(tb_valid), .in_data(tb_data), .in_last(tb_last), .in_ready(tb_ready),
    .tx_en, .txd, .busy(tx_busy), .ifg_ok(tx_ifg_ok), .sent_cnt(tx_sent_cnt)
  );

  load_monitor #(.T_CYCLES(LOAD_T), .THRESH_PCT(LOAD_PCT)) u_load (
    .clk, .rst_n, .rx_dv, .load_pct, .load_high, .sample_pulse(unused_ls)
  );

  assign tx_free_bytes = UW'(BUF_DEPTH) - tx_used;
  assign ovf_warn      = (rx_pkts >= 16'(WARN_PKTS))
                         || (UW'(BUF_DEPTH) - rx_used < UW'(MAX_FRAME));
  assign tx_drained    = (tx_pkts == '0) && !tx_busy && tx_ifg_ok;
endmodule
