// load_monitor: network load measurement of one port, L = (K*IFGmin + RXactive) / T.
//
// Over a fixed interval of T_CYCLES clocks the block counts the clocks with
// RX_DV high (RXactive) and the number of frames that ended (K, falling edges
// of RX_DV). Each frame is charged one minimum inter-frame gap so that the
// result does not depend on the packet size: 100 % corresponds to the full
// line rate. At the end of each interval load_pct (0..100, integer percent)
// and load_high (load strictly above THRESH_PCT) are updated and
// sample_pulse is high for one clock. The 20 % threshold and the formula
// follow the source design; the 1 ms interval (25000 clocks at 25 MHz) is
// this design's choice.
module load_monitor
  import eth_pkg::*;
#(
  parameter int unsigned T_CYCLES   = 25000,
  parameter int unsigned IFG_CYCLES = IFG_MIN_CYCLES,
  parameter int unsigned THRESH_PCT = 20
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rx_dv,
  output logic [6:0] load_pct,
  output logic       load_high,
  output logic       sample_pulse
);
  localparam int unsigned CW = $clog2(T_CYCLES + 1);
  localparam int unsigned BW = CW + 8;   // room for K*IFG beyond T

  logic [CW-1:0] tcnt, active;
  logic [CW-1:0] k;
  logic          dv_q;
  logic [BW-1:0] busy;
  logic [BW+6:0] busy100;

  wire fall = dv_q && !rx_dv;

  always_comb begin
    busy    = BW'(k) * BW'(IFG_CYCLES) + BW'(active);
    busy100 = (BW+7)'(busy) * (BW+7)'(100);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tcnt <= '0; active <= '0; k <= '0; dv_q <= 1'b0;
      load_pct <= '0; load_high <= 1'b0; sample_pulse <= 1'b0;
    end else begin
      dv_q <= rx_dv;
      sample_pulse <= 1'b0;
      if (tcnt == CW'(T_CYCLES - 1)) begin
        tcnt         <= '0;
        active       <= CW'(rx_dv);
        k            <= CW'(fall);
        sample_pulse <= 1'b1;
        load_high    <= busy100 > (BW+7)'(THRESH_PCT) * (BW+7)'(T_CYCLES);
        load_pct     <= (busy100 >= (BW+7)'(100) * (BW+7)'(T_CYCLES)) ? 7'd100
                        : 7'(busy100 / (BW+7)'(T_CYCLES));
      end else begin
        tcnt   <= tcnt + 1'b1;
        active <= active + CW'(rx_dv);
        k      <= k + CW'(fall);
      end
    end
  end
endmodule
