// mii_tx: transmit half of an Ethernet MAC on a 100 Mbit/s MII.
//
// Takes whole frames (destination address to FCS) from a store-and-forward
// buffer as a valid/ready byte stream and sends them as nibbles, low nibble
// first: 15 preamble nibbles 5, the SFD nibble D, then the frame. TXD/TX_EN
// are registered. A new frame starts only when a frame is waiting, tx_enable
// is high and at least IFG_CYCLES clocks (0.96 us at 25 MHz) have passed with
// TX_EN low, so the minimum inter-frame gap holds even across a hand-over
// of the port. tx_enable low suspends transmission between frames (a frame
// already started is always finished); the reconfiguration uses it to keep
// queued frames from leaving before the port's multiplexer points here.
// One byte is taken (in_ready) every second clock. ifg_ok is high when idle
// with the gap satisfied. The frame data is sent verbatim: its FCS comes with
// the frame.
//
// Keeping the minimum gap across a hand-over and suspending transmission
// follow the published design; the nibble format is standard MII.
module mii_tx
  import eth_pkg::*;
#(
  parameter int unsigned IFG_CYCLES = IFG_MIN_CYCLES
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        tx_enable,
  input  logic        in_valid,
  input  logic [7:0]  in_data,
  input  logic        in_last,
  output logic        in_ready,
  output logic        tx_en,
  output logic [3:0]  txd,
  output logic        busy,
  output logic        ifg_ok,
  output logic [15:0] sent_cnt
);
  typedef enum logic [1:0] {T_IDLE, T_PRE, T_DATA} state_e;
  state_e      state;
  logic [3:0]  cnt;
  logic        phase;
  logic [7:0]  ifg_cnt;

  // ifg_cnt counts idle clocks before the current one, so a frame may start
  // (TX_EN high in the next clock) once IFG-1 idle clocks lie behind
  localparam logic [7:0] IFG = 8'(IFG_CYCLES);

  assign in_ready = (state == T_DATA) && phase && in_valid;
  assign busy     = (state != T_IDLE);
  assign ifg_ok   = (state == T_IDLE) && !tx_en && (ifg_cnt >= IFG - 8'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= T_IDLE; cnt <= '0; phase <= 1'b0; ifg_cnt <= IFG;
      tx_en <= 1'b0; txd <= '0; sent_cnt <= '0;
    end else begin
      if (!tx_en && ifg_cnt < IFG) ifg_cnt <= ifg_cnt + 1'b1;
      unique case (state)
        T_IDLE: begin
          tx_en <= 1'b0;
          txd   <= '0;
          if (ifg_ok && tx_enable && in_valid) begin
            state <= T_PRE; cnt <= '0;
            tx_en <= 1'b1; txd <= PREAMBLE_BYTE[3:0];
          end
        end
        T_PRE: begin
          cnt <= cnt + 1'b1;
          if (cnt == 4'd14) begin
            txd <= SFD_BYTE[7:4];
            state <= T_DATA; phase <= 1'b0;
          end else txd <= PREAMBLE_BYTE[3:0];
        end
        T_DATA: begin
          if (!phase) begin
            if (in_valid) begin
              txd <= in_data[3:0];
              phase <= 1'b1;
            end
          end else begin
            txd   <= in_data[7:4];
            phase <= 1'b0;
            if (in_last) begin
              state    <= T_IDLE;
              sent_cnt <= sent_cnt + 1'b1;
              ifg_cnt  <= '0;
            end
          end
        end
        default: state <= T_IDLE;
      endcase
    end
  end

  // a frame starts only after at least the minimum gap of idle clocks
  a_min_gap: assert property (@(posedge clk) disable iff (!rst_n)
                              $rose(tx_en) |-> $past(ifg_cnt) >= IFG - 8'd1);
endmodule
