// reconfig_ctrl: reconfiguration controller for a lossless hand-over of both
// switch ports between the software switch and the hardware switch.
//
// It implements the fast-activation method: once started, each port's
// receive process is handed to the new switch at once (the port multiplexer
// carries it out in the next inter-frame gap), so new frames land in the new
// switch's buffers. A port's transmit process stays with the old switch until
// the old side has sent every queued frame and the minimum inter-frame gap
// since its last frame has elapsed (old_tx_drained); only then is the
// transmit multiplexer asked to switch. Frames still in the old receive
// buffers are moved to the new switch's transmit queues by the processor; the
// reconfiguration ends when both ports' receive and transmit processes have
// moved and the old receive buffers are empty (old_rx_empty). Frame order
// can change during the hand-over; no frame is lost.
//
// A reconfiguration starts on start (toward target), or, with auto_en, from
// the software switch toward the hardware switch when a port's load exceeds
// the threshold (load_high) or an overflow is impending (ovf_warn).
// cfg is the configuration in use; busy is high during the hand-over;
// last_cycles holds the duration of the last hand-over in clocks. Start
// requests during a hand-over, or toward the configuration in use, are
// ignored. tx_enable_sw/hw suspend the transmitter of the side that does
// not own a port's transmit lines.
//
// The order of the hand-over (the first of three published methods) and
// the triggers follow the published design; putting the automatic trigger
// in hardware behind auto_en and measuring the duration are own choices.
module reconfig_ctrl
  import eth_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  sw_sel_e     target,
  input  logic        auto_en,
  input  logic [1:0]  load_high,      // from the software switch MACs
  input  logic [1:0]  ovf_warn,       // from the software switch MACs
  input  logic [1:0]  sw_tx_drained,
  input  logic [1:0]  hw_tx_drained,
  input  logic        sw_rx_empty,    // both software switch receive buffers empty
  input  logic        hw_rx_empty,    // both hardware switch processor receive buffers empty
  input  sw_sel_e [1:0] rx_sel,       // owners in effect, from the multiplexers
  input  sw_sel_e [1:0] tx_sel,
  output sw_sel_e [1:0] rx_sel_req,
  output sw_sel_e [1:0] tx_sel_req,
  output logic [1:0]  tx_enable_sw,
  output logic [1:0]  tx_enable_hw,
  output sw_sel_e     cfg,
  output logic        busy,
  output logic        done_pulse,
  output logic [1:0]  cause,          // 0 start, 1 load, 2 overflow warning
  output logic [31:0] last_cycles,
  output logic [15:0] reconf_cnt
);
  sw_sel_e     tgt;
  logic [31:0] cyc;

  wire auto_go = auto_en && (cfg == SEL_SW) && ((|load_high) || (|ovf_warn));
  wire go      = !busy && ((start && target != cfg) || auto_go);

  wire [1:0] old_drained = (cfg == SEL_SW) ? sw_tx_drained : hw_tx_drained;
  wire       old_empty   = (cfg == SEL_SW) ? sw_rx_empty   : hw_rx_empty;
  wire       rx_moved    = (rx_sel[0] == tgt) && (rx_sel[1] == tgt);
  wire       all_moved   = (rx_sel[0] == tgt) && (rx_sel[1] == tgt)
                        && (tx_sel[0] == tgt) && (tx_sel[1] == tgt);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg <= SEL_SW; tgt <= SEL_SW; busy <= 1'b0; done_pulse <= 1'b0; cause <= '0;
      rx_sel_req <= {SEL_SW, SEL_SW}; tx_sel_req <= {SEL_SW, SEL_SW};
      cyc <= '0; last_cycles <= '0; reconf_cnt <= '0;
    end else begin
      done_pulse <= 1'b0;
      if (go) begin
        busy <= 1'b1;
        tgt  <= (start && target != cfg) ? target : SEL_HW;
        cause <= (start && target != cfg) ? 2'd0 : ((|load_high) ? 2'd1 : 2'd2);
        // receive processes move at once (in the next gap)
        rx_sel_req <= (start && target != cfg) ? {target, target} : {SEL_HW, SEL_HW};
        cyc <= 32'd1;
      end else if (busy) begin
        cyc <= cyc + 1'b1;
        // transmit moves only after both receive processes have moved, so
        // the old side can receive nothing more that it would have to send
        for (int p = 0; p < 2; p++)
          if (old_drained[p] && rx_moved) tx_sel_req[p] <= tgt;
        if (all_moved && old_empty) begin
          busy        <= 1'b0;
          cfg         <= tgt;
          done_pulse  <= 1'b1;
          last_cycles <= cyc;
          reconf_cnt  <= reconf_cnt + 1'b1;
        end
      end
    end
  end

  always_comb
    for (int p = 0; p < 2; p++) begin
      tx_enable_sw[p] = (tx_sel[p] == SEL_SW) && (tx_sel_req[p] == SEL_SW);
      tx_enable_hw[p] = (tx_sel[p] == SEL_HW) && (tx_sel_req[p] == SEL_HW);
    end
endmodule
