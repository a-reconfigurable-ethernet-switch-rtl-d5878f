// pkt_buffer: store-and-forward packet FIFO, one per Rx/Tx queue.
//
// Bytes of a frame are written at a tentative write pointer. The frame
// becomes visible to the reader only when the writer pulses wr_commit; a
// wr_abort (for example a bad FCS) rewinds the tentative pointer so the frame
// never leaves the buffer. This is how the store-and-forward switches avoid
// forwarding corrupt frames. A frame that does not fit (byte space or
// descriptor slots exhausted) is dropped at commit and counted in drop_cnt.
// Committed frame lengths are kept in a small descriptor FIFO.
//
// Read side: a valid/ready byte stream with rd_last on the final byte of
// each frame. The byte memory is read synchronously (block RAM style), so the
// first byte of a frame appears one cycle after it is committed. head_len is
// the length of the frame being read out, or else of the oldest
// committed frame.
//
// Status: pkt_count counts committed frames not yet completely read, and
// used_bytes the bytes held including a frame still being written.
// The default depth of 6144 bytes is this design's split of the 24 kByte the
// software switch gives its four queues (and of the 36 kByte for the six
// buffers of the hardware switch); the descriptor depth is a design choice.
module pkt_buffer #(
  parameter int unsigned DEPTH      = 6144,
  parameter int unsigned DESC_DEPTH = 128,
  parameter int unsigned LEN_W      = 11
) (
  input  logic             clk,
  input  logic             rst_n,
  // write side
  input  logic             wr_valid,
  input  logic [7:0]       wr_data,
  input  logic             wr_commit,
  input  logic             wr_abort,
  // read side
  output logic             rd_valid,
  output logic [7:0]       rd_data,
  output logic             rd_last,
  input  logic             rd_ready,
  // status
  output logic [15:0]      pkt_count,
  output logic [$clog2(DEPTH+1)-1:0] used_bytes,
  output logic [LEN_W-1:0] head_len,
  output logic             head_valid,
  output logic             drop_pulse,
  output logic [15:0]      drop_cnt
);
  localparam int unsigned AW  = $clog2(DEPTH);
  localparam int unsigned DW  = $clog2(DESC_DEPTH);
  localparam int unsigned UW  = $clog2(DEPTH+1);

  logic [7:0]       mem [DEPTH];
  logic [LEN_W-1:0] desc [DESC_DEPTH];

  logic [AW-1:0]    wptr_c, wptr_t, rptr;   // committed / tentative / read
  logic [LEN_W-1:0] cur_len;
  logic             cur_ovf;
  logic [DW-1:0]    dwp, drp;
  logic [DW:0]      dcnt;
  logic [UW-1:0]    used;
  logic [LEN_W-1:0] rd_rem;
  logic             in_frame;               // a frame is being read out
  logic [LEN_W-1:0] rd_len;                 // length of that frame

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  wire space_ok = (used < UW'(DEPTH)) && (cur_len != '1);
  wire do_write = wr_valid && !cur_ovf && space_ok;
  wire advance  = !rd_valid || rd_ready;
  wire fetch_cont  = advance && (rd_rem != '0);
  wire fetch_start = advance && (rd_rem == '0) && (dcnt != '0);
  wire fetch       = fetch_cont || fetch_start;
  wire commit_ok   = wr_commit && !wr_abort && !(wr_valid && !do_write) && !cur_ovf
                     && (dcnt != (DW+1)'(DESC_DEPTH)) && (cur_len != '0 || do_write);
  wire [LEN_W-1:0] commit_len = cur_len + LEN_W'(do_write);

  logic [UW-1:0] used_next;
  always_comb begin
    used_next = used + UW'(do_write) - UW'(fetch);
    if ((wr_commit || wr_abort) && !commit_ok)
      used_next = used_next - UW'(cur_len) - UW'(do_write);
  end

  always_ff @(posedge clk)
    if (do_write) mem[wptr_t] <= wr_data;

  always_ff @(posedge clk)
    if (commit_ok) desc[dwp] <= commit_len;

  always_ff @(posedge clk)
    if (fetch) rd_data <= mem[rptr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr_c <= '0; wptr_t <= '0; rptr <= '0;
      cur_len <= '0; cur_ovf <= 1'b0;
      dwp <= '0; drp <= '0; dcnt <= '0;
      used <= '0; rd_rem <= '0; rd_len <= '0; rd_valid <= 1'b0; rd_last <= 1'b0;
      in_frame <= 1'b0; drop_pulse <= 1'b0; drop_cnt <= '0;
    end else begin
      drop_pulse <= 1'b0;
      // ---------------- write side ----------------
      if (wr_valid && !do_write) cur_ovf <= 1'b1;
      if (wr_commit || wr_abort) begin
        cur_len <= '0;
        cur_ovf <= 1'b0;
        if (commit_ok) begin
          wptr_c <= do_write ? inc(wptr_t) : wptr_t;
          wptr_t <= do_write ? inc(wptr_t) : wptr_t;
          dwp    <= dwp + 1'b1;
        end else begin
          wptr_t <= wptr_c;
          if (wr_commit && !wr_abort) begin
            drop_pulse <= 1'b1;
            drop_cnt   <= drop_cnt + 1'b1;
          end
        end
      end else if (do_write) begin
        wptr_t  <= inc(wptr_t);
        cur_len <= cur_len + 1'b1;
      end
      // ---------------- read side ----------------
      if (advance) begin
        rd_valid <= fetch;
        if (fetch) begin
          rptr <= inc(rptr);
          if (fetch_start) begin
            rd_rem  <= desc[drp] - 1'b1;
            rd_len  <= desc[drp];
            rd_last <= (desc[drp] == LEN_W'(1));
            drp     <= drp + 1'b1;
          end else begin
            rd_rem  <= rd_rem - 1'b1;
            rd_last <= (rd_rem == LEN_W'(1));
          end
        end
        if (fetch_start) in_frame <= 1'b1;
        else if (!fetch) in_frame <= 1'b0;
      end
      // ---------------- counters ----------------
      dcnt <= dcnt + (DW+1)'(commit_ok) - (DW+1)'(fetch_start);
      used <= used_next;
    end
  end

  // read handshake: a presented byte stays until it is taken
  a_rd_hold: assert property (@(posedge clk) disable iff (!rst_n)
                              rd_valid && !rd_ready |=> rd_valid && $stable(rd_data) && $stable(rd_last));

  assign pkt_count  = 16'(dcnt) + 16'(in_frame);
  assign used_bytes = used;
  assign head_valid = in_frame || (dcnt != '0);
  assign head_len   = in_frame ? rd_len : desc[drp];

endmodule
