// hw_subswitch: one half of the hardware switch, a MAC extended by a
// forwarding buffer. It receives on its own port and transmits on its own
// port; two of them cross-connected make the dual-port switch.
//
// Receive: every received frame is written at the same time into the
// processor receive queue and into the forwarding buffer. When the frame ends
// the switching decision is taken in hardware from the destination address:
// a frame for this node's address goes only to the processor queue, a
// broadcast to both, any other frame only to the forwarding buffer. The
// other buffer discards its copy; a bad frame is discarded by both
// (store-and-forward). The forwarding buffer is read by the other
// sub-switch (fwd_out_*).
//
// Transmit: mii_tx sends either a frame the processor wrote into the
// transmit queue or a frame forwarded by the other sub-switch (fwd_in_*).
// A monitor looks at the two sources one per clock, alternately, and locks
// onto the first one seen holding a frame until that frame's last byte; a
// forwarded frame that is ready while the processor queue is being looked
// at thus waits one clock (poll_miss_cnt counts those clocks).
//
// Status as in eth_mac; tx_drained additionally needs fwd_in empty.
//
// The forwarding buffer, store-and-forward operation and the alternating
// monitor with its one-clock penalty follow the published design; the
// broadcast rule and the station address input are own choices.
module hw_subswitch
  import eth_pkg::*;
#(
  parameter int unsigned BUF_DEPTH  = 6144,
  parameter int unsigned WARN_PKTS  = 2,
  parameter int unsigned LOAD_T     = 25000,
  parameter int unsigned LOAD_PCT   = 20
) (
  input  logic        clk,
  input  logic        rst_n,
  input  mac_addr_t   my_addr,
  // MII of this port (through the port multiplexer)
  input  logic        rx_dv,
  input  logic [3:0]  rxd,
  output logic        tx_en,
  output logic [3:0]  txd,
  input  logic        tx_enable,
  // forwarded frames leaving toward the other sub-switch
  output logic        fwd_out_valid,
  output logic [7:0]  fwd_out_data,
  output logic        fwd_out_last,
  input  logic        fwd_out_ready,
  output logic [15:0] fwd_out_pkts,
  // forwarded frames arriving from the other sub-switch
  input  logic        fwd_in_valid,
  input  logic [7:0]  fwd_in_data,
  input  logic        fwd_in_last,
  output logic        fwd_in_ready,
  input  logic [15:0] fwd_in_pkts,
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
  output logic [15:0] fwd_frames,
  output logic [15:0] proc_frames,
  output logic [15:0] tx_sent_cnt,
  output logic [15:0] poll_miss_cnt
);
  localparam int unsigned UW = $clog2(BUF_DEPTH+1);

  logic        rb_valid, rb_end, rb_good, unused_dav;
  logic [7:0]  rb_data;
  mac_addr_t   da;
  logic [UW-1:0] rx_used, tx_used, fwd_used;
  logic        unused_0, unused_1, unused_2, unused_3, unused_4, unused_5, unused_6;
  logic [15:0] unused_rxdrop, unused_txdrop, unused_fwddrop;
  logic [10:0] unused_tlen, unused_flen;

  mii_rx u_rx (
    .clk, .rst_n, .rx_dv, .rxd,
    .byte_valid(rb_valid), .byte_data(rb_data), .frame_end(rb_end), .frame_good(rb_good),
    .dest_addr(da), .dest_valid(unused_dav), .good_cnt(rx_good_cnt), .bad_cnt(rx_bad_cnt)
  );

  // switching decision, valid at frame_end (dest_addr holds the address)
  wire for_me   = (da == my_addr);
  wire is_bcast = (da == BROADCAST);
  wire to_proc  = rb_good && (for_me || is_bcast);
  wire to_fwd   = rb_good && !for_me;

  pkt_buffer #(.DEPTH(BUF_DEPTH)) u_rxbuf (
    .clk, .rst_n,
    .wr_valid(rb_valid), .wr_data(rb_data),
    .wr_commit(rb_end && to_proc), .wr_abort(rb_end && !to_proc),
    .rd_valid(host_rx_valid), .rd_data(host_rx_data), .rd_last(host_rx_last), .rd_ready(host_rx_ready),
    .pkt_count(rx_pkts), .used_bytes(rx_used), .head_len(host_rx_len), .head_valid(unused_0),
    .drop_pulse(unused_1), .drop_cnt(unused_rxdrop)
  );

  pkt_buffer #(.DEPTH(BUF_DEPTH)) u_fwdbuf (
    .clk, .rst_n,
    .wr_valid(rb_valid), .wr_data(rb_data),
    .wr_commit(rb_end && to_fwd), .wr_abort(rb_end && !to_fwd),
    .rd_valid(fwd_out_valid), .rd_data(fwd_out_data), .rd_last(fwd_out_last), .rd_ready(fwd_out_ready),
    .pkt_count(fwd_out_pkts), .used_bytes(fwd_used), .head_len(unused_flen), .head_valid(unused_2),
    .drop_pulse(unused_3), .drop_cnt(unused_fwddrop)
  );

  assign host_tx_ready = 1'b1;

  logic        ptx_valid, ptx_last, ptx_ready;
  logic [7:0]  ptx_data;

  pkt_buffer #(.DEPTH(BUF_DEPTH)) u_txbuf (
    .clk, .rst_n,
    .wr_valid(host_tx_valid), .wr_data(host_tx_data),
    .wr_commit(host_tx_valid && host_tx_last), .wr_abort(1'b0),
    .rd_valid(ptx_valid), .rd_data(ptx_data), .rd_last(ptx_last), .rd_ready(ptx_ready),
    .pkt_count(tx_pkts), .used_bytes(tx_used), .head_len(unused_tlen), .head_valid(unused_4),
    .drop_pulse(unused_5), .drop_cnt(unused_txdrop)
  );

  // transmit monitor: observe one source per clock, lock for a whole frame
  logic poll;      // 0: processor queue, 1: forwarding input
  logic locked, sel_fwd;
  logic m_valid, m_last, m_ready, tx_busy, tx_ifg_ok;
  logic [7:0] m_data;

  assign m_valid      = locked && (sel_fwd ? fwd_in_valid : ptx_valid);
  assign m_data       = sel_fwd ? fwd_in_data : ptx_data;
  assign m_last       = sel_fwd ? fwd_in_last : ptx_last;
  assign ptx_ready    = locked && !sel_fwd && m_ready;
  assign fwd_in_ready = locked &&  sel_fwd && m_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      poll <= 1'b0; locked <= 1'b0; sel_fwd <= 1'b0; poll_miss_cnt <= '0;
    end else if (!locked) begin
      poll <= !poll;
      if (!poll && ptx_valid) begin
        locked <= 1'b1; sel_fwd <= 1'b0;
      end else if (poll && fwd_in_valid) begin
        locked <= 1'b1; sel_fwd <= 1'b1;
      end else if (!poll && fwd_in_valid) begin
        poll_miss_cnt <= poll_miss_cnt + 1'b1;
      end
    end else if (m_ready && m_valid && m_last) begin
      locked <= 1'b0;
    end
  end

  mii_tx u_tx (
    .clk, .rst_n, .tx_enable,
    .in_valid(m_valid), .in_data(m_data), .in_last(m_last), .in_ready(m_ready),
    .tx_en, .txd, .busy(tx_busy), .ifg_ok(tx_ifg_ok), .sent_cnt(tx_sent_cnt)
  );

  load_monitor #(.T_CYCLES(LOAD_T), .THRESH_PCT(LOAD_PCT)) u_load (
    .clk, .rst_n, .rx_dv, .load_pct, .load_high, .sample_pulse(unused_6)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fwd_frames <= '0; proc_frames <= '0;
    end else if (rb_end) begin
      if (to_fwd)  fwd_frames  <= fwd_frames + 1'b1;
      if (to_proc) proc_frames <= proc_frames + 1'b1;
    end
  end

  assign tx_free_bytes = UW'(BUF_DEPTH) - tx_used;
  assign ovf_warn      = (rx_pkts >= 16'(WARN_PKTS))
                         || (UW'(BUF_DEPTH) - rx_used  < UW'(MAX_FRAME))
                         || (UW'(BUF_DEPTH) - fwd_used < UW'(MAX_FRAME));
  assign tx_drained    = (tx_pkts == '0) && (fwd_in_pkts == '0) && !locked
                         && !tx_busy && tx_ifg_ok;
endmodule
