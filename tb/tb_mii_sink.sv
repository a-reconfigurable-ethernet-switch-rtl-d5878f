// tb_mii_sink: testbench monitor of one MII transmit pair. It decodes each
// burst of TX_EN into a frame (checking preamble and SFD), and records the
// frames, the clock at which each started and the idle gap before it.
module tb_mii_sink (
  input logic       clk,
  input logic       tx_en,
  input logic [3:0] txd
);
  import tb_eth_pkg::*;
  byte_q_t frames[$];
  longint  start_cyc[$];
  int      gaps[$];
  int      bad_preamble = 0;
  longint  cyc = 0;
  nib_q_t  cur;
  int      gap_c = 0;
  bit      seen = 0;

  always @(posedge clk) begin
    cyc++;
    if (tx_en) begin
      if (cur.size() == 0) begin
        start_cyc.push_back(cyc);
        if (seen) gaps.push_back(gap_c);
      end
      cur.push_back(txd);
    end else begin
      if (cur.size() != 0) begin
        byte_q_t b;
        b.delete();
        for (int i = 0; i < 15; i++) if (cur[i] != 4'h5) bad_preamble++;
        if (cur[15] != 4'hD) bad_preamble++;
        for (int i = 16; i + 1 < cur.size(); i += 2) b.push_back({cur[i+1], cur[i]});
        frames.push_back(b);
        seen  = 1;
        gap_c = 0;
        cur.delete();
      end
      gap_c++;
    end
  end
endmodule
