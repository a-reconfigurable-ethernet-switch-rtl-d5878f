// mii_rx: receive half of an Ethernet MAC on a 100 Mbit/s MII.
//
// One nibble arrives per clock while RX_DV is high, low nibble of each byte
// first. The block waits for the preamble and the start-of-frame delimiter
// (nibbles 5 then D), then packs nibble pairs into bytes and streams them out
// (byte_valid/byte_data) while running the CRC-32 over them. The first six
// bytes are captured as the destination address. When RX_DV falls a one-cycle
// frame_end pulse is given together with frame_good: good means the FCS
// residue matched, the length (destination address to FCS) lies within
// 64..1518 bytes and no half byte was left over. Downstream buffers commit
// the frame on a good end and discard it otherwise (store-and-forward).
// dest_valid is high from the cycle after the sixth byte until frame_end.
// The MII receive clock is taken to be the system clock.
//
// The published design names only RX_DV; the nibble format, the FCS and
// length checks and the address capture are this design's choices.
module mii_rx
  import eth_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        rx_dv,
  input  logic [3:0]  rxd,
  output logic        byte_valid,
  output logic [7:0]  byte_data,
  output logic        frame_end,
  output logic        frame_good,
  output mac_addr_t   dest_addr,
  output logic        dest_valid,
  output logic [15:0] good_cnt,
  output logic [15:0] bad_cnt
);
  typedef enum logic [1:0] {S_IDLE, S_PRE, S_DATA, S_WAIT} state_e;
  state_e      state;
  logic [3:0]  lo_nib;
  logic        half;        // low nibble of a byte is held
  logic [31:0] crc;
  logic [11:0] len;
  logic [3:0]  prev_nib;
  logic        good;

  assign good = (crc == CRC_RESIDUE) && !half && (len >= 12'(MIN_FRAME))
                && (len <= 12'(MAX_FRAME));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; lo_nib <= '0; half <= 1'b0; crc <= CRC_INIT; len <= '0;
      prev_nib <= '0; byte_valid <= 1'b0; byte_data <= '0; frame_end <= 1'b0;
      frame_good <= 1'b0; dest_addr <= '0; dest_valid <= 1'b0;
      good_cnt <= '0; bad_cnt <= '0;
    end else begin
      byte_valid <= 1'b0;
      frame_end  <= 1'b0;
      unique case (state)
        S_IDLE: if (rx_dv) begin
          state    <= S_PRE;
          prev_nib <= rxd;
        end
        S_PRE: begin
          prev_nib <= rxd;
          if (!rx_dv) state <= S_IDLE;
          else if (prev_nib == SFD_BYTE[3:0] && rxd == SFD_BYTE[7:4]) begin
            state <= S_DATA; half <= 1'b0; crc <= CRC_INIT; len <= '0;
            dest_valid <= 1'b0;
          end else if (rxd != PREAMBLE_BYTE[3:0]) state <= S_WAIT;  // not a preamble
        end
        S_DATA: begin
          if (!rx_dv) begin
            frame_end  <= 1'b1;
            frame_good <= good;
            dest_valid <= 1'b0;
            if (good) good_cnt <= good_cnt + 1'b1;
            else      bad_cnt  <= bad_cnt + 1'b1;
            state <= S_IDLE;
          end else if (!half) begin
            lo_nib <= rxd;
            half   <= 1'b1;
          end else begin
            half       <= 1'b0;
            byte_valid <= 1'b1;
            byte_data  <= {rxd, lo_nib};
            crc        <= crc32_byte(crc, {rxd, lo_nib});
            if (len != '1) len <= len + 1'b1;
            if (len < 12'd6) dest_addr <= {dest_addr[39:0], rxd, lo_nib};
            if (len == 12'd5) dest_valid <= 1'b1;
          end
        end
        S_WAIT: if (!rx_dv) state <= S_IDLE;   // wait out a malformed burst
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
