// tb_mii_tx: feeds frames to the MII transmitter and decodes the TXD/TX_EN
// lines: preamble and SFD, frame bytes, duration (16 + 2 clocks per byte at
// 100 Mbit/s), the inter-frame gap (exactly 24 clocks for queued frames, the
// 0.96 us minimum) and that tx_enable low holds back a waiting frame.
module tb_mii_tx;
  import tb_eth_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge applies the asynchronous reset
  always #20 clk = ~clk;

  logic tx_enable = 1, in_valid, in_last, in_ready, tx_en, busy, ifg_ok;
  logic [7:0] in_data;
  logic [3:0] txd;
  logic [15:0] sent_cnt;

  mii_tx dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // source: a queue of frames presented as a byte stream
  byte_q_t src[$];
  int pos = 0;
  assign in_valid = (src.size() != 0);
  assign in_data  = (src.size() != 0) ? src[0][pos] : 8'h00;
  assign in_last  = (src.size() != 0) && (pos == src[0].size() - 1);
  logic fire_q = 0, last_q = 0;
  always @(posedge clk) begin
    fire_q <= in_valid && in_ready;
    last_q <= in_last;
  end
  always @(negedge clk)
    if (fire_q) begin
      if (last_q) begin void'(src.pop_front()); pos = 0; end
      else pos++;
    end

  // sink: decode frames from the MII
  byte_q_t rxf[$];
  int durations[$], gaps[$];
  nib_q_t cur;
  int len_c = 0, gap_c = 0;
  bit seen_frame = 0;
  always @(posedge clk) begin
    if (tx_en) begin
      if (len_c == 0 && seen_frame) gaps.push_back(gap_c);
      cur.push_back(txd); len_c++;
    end else begin
      if (len_c != 0) begin
        byte_q_t b;
        bit pre_ok;
        pre_ok = 1;
        b.delete();
        for (int i = 0; i < 15; i++) if (cur[i] != 4'h5) pre_ok = 0;
        if (cur[15] != 4'hD) pre_ok = 0;
        for (int i = 16; i + 1 < cur.size(); i += 2) b.push_back({cur[i+1], cur[i]});
        check(pre_ok, "preamble and SFD");
        rxf.push_back(b);
        durations.push_back(len_c);
        seen_frame = 1;
        gap_c = 0;
      end
      cur.delete(); len_c = 0;
      gap_c++;
    end
  end

  initial begin
    byte_q_t f[3];
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int k = 0; k < 3; k++) f[k] = make_frame(48'h0200_0000_0001 + k, 48'h0200_0000_00A1, 46 + 20 * k, k);
    for (int k = 0; k < 3; k++) src.push_back(f[k]);
    wait (rxf.size() == 3);
    for (int k = 0; k < 3; k++) begin
      check(same(rxf[k], f[k]), $sformatf("frame %0d bytes %0d vs %0d first %h %h", k, rxf[k].size(), f[k].size(), rxf[k][0], f[k][0]));
      check(durations[k] == 16 + 2 * f[k].size(), $sformatf("frame %0d lasts %0d clocks", k, durations[k]));
    end
    check(gaps.size() == 2, "two gaps");
    foreach (gaps[i]) check(gaps[i] == 24, $sformatf("gap %0d is %0d clocks", i, gaps[i]));
    // suspend: a waiting frame must not start while tx_enable is low
    tx_enable <= 0;
    repeat (40) @(posedge clk);
    src.push_back(f[0]);
    repeat (200) begin
      @(posedge clk);
      if (tx_en) break;
    end
    check(!tx_en && rxf.size() == 3, "suspended transmitter stays silent");
    check(ifg_ok && !busy, "idle with the gap satisfied while suspended");
    tx_enable <= 1;
    wait (rxf.size() == 4);
    check(same(rxf[3], f[0]), "frame after resume");
    check(sent_cnt == 4, $sformatf("sent_cnt %0d", sent_cnt));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
