// mii_mux: hardware multiplexer of one switch port (Rx_n and Tx_n).
//
// The port's MII is shared by the software switch MAC and the hardware
// switch. Receive and transmit are switched separately. The receive data
// lines go to both sides; RX_DV is passed only to the side that owns the
// receive process, the other sees an idle line. The transmit lines come from
// the side that owns the transmit process.
//
// The owner of each direction follows rx_sel_req / tx_sel_req, but only
// while the line is idle: the receive owner changes only in a clock with
// RX_DV low (and low the clock before), the transmit owner only while both
// sides hold TX_EN low. A frame is therefore never cut; the hand-over happens
// in the inter-frame gap. rx_sel / tx_sel give the owner in effect (0 software
// switch, 1 hardware switch); both start at the software switch after reset.
// The outputs are combinational from the owner registers.
//
// Separate receive and transmit switching in the inter-frame gap follows
// the published design; gating RX_DV (rather than RXD) is an own choice.
module mii_mux
  import eth_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  sw_sel_e    rx_sel_req,
  input  sw_sel_e    tx_sel_req,
  output sw_sel_e    rx_sel,
  output sw_sel_e    tx_sel,
  // port pins
  input  logic       rx_dv,
  input  logic [3:0] rxd,
  output logic       tx_en,
  output logic [3:0] txd,
  // software switch side
  output logic       sw_rx_dv,
  output logic [3:0] sw_rxd,
  input  logic       sw_tx_en,
  input  logic [3:0] sw_txd,
  // hardware switch side
  output logic       hw_rx_dv,
  output logic [3:0] hw_rxd,
  input  logic       hw_tx_en,
  input  logic [3:0] hw_txd
);
  logic dv_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_sel <= SEL_SW; tx_sel <= SEL_SW; dv_q <= 1'b0;
    end else begin
      dv_q <= rx_dv;
      if (!rx_dv && !dv_q)        rx_sel <= rx_sel_req;
      if (!sw_tx_en && !hw_tx_en) tx_sel <= tx_sel_req;
    end
  end

  always_comb begin
    sw_rxd   = rxd;
    hw_rxd   = rxd;
    sw_rx_dv = rx_dv && (rx_sel == SEL_SW);
    hw_rx_dv = rx_dv && (rx_sel == SEL_HW);
    tx_en    = (tx_sel == SEL_HW) ? hw_tx_en : sw_tx_en;
    txd      = (tx_sel == SEL_HW) ? hw_txd   : sw_txd;
  end

  // a frame is never cut: the owner changes only on an idle line
  a_rx_idle: assert property (@(posedge clk) disable iff (!rst_n)
                              (rx_sel != $past(rx_sel)) |-> !$past(rx_dv));
  a_tx_idle: assert property (@(posedge clk) disable iff (!rst_n)
                              (tx_sel != $past(tx_sel)) |-> !$past(sw_tx_en) && !$past(hw_tx_en));
endmodule
