// tb_mii_rx: drives frames onto the MII receive lines and checks the byte
// stream, the destination address and the good/bad verdict: a good frame,
// one with a corrupted payload byte, one with an odd nibble count, a runt
// (shorter than 64 bytes) and back-to-back frames at the minimum gap.
module tb_mii_rx;
  import tb_eth_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge applies the asynchronous reset
  always #20 clk = ~clk;

  logic rx_dv = 0;
  logic [3:0] rxd = 0;
  logic byte_valid, frame_end, frame_good, dest_valid;
  logic [7:0] byte_data;
  logic [47:0] dest_addr;
  logic [15:0] good_cnt, bad_cnt;

  mii_rx dut (.*);

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

  byte_q_t got;
  int ends = 0;
  bit last_good;
  logic [47:0] last_da;
  always @(posedge clk) begin
    if (byte_valid) got.push_back(byte_data);
    if (frame_end) begin ends++; last_good = frame_good; last_da = dest_addr; end
  end

  task automatic send(nib_q_t n, int gap);
    foreach (n[i]) begin rx_dv <= 1; rxd <= n[i]; @(posedge clk); end
    rx_dv <= 0; rxd <= 0;
    repeat (gap) @(posedge clk);
  endtask

  task automatic run(byte_q_t f, nib_q_t n, bit exp_good, string name);
    int e0 = ends;
    got.delete();
    send(n, 30);
    check(ends == e0 + 1, {name, ": one frame end"});
    check(last_good == exp_good, {name, ": verdict"});
    if (exp_good) begin
      check(same(got, f), {name, ": bytes"});
      check(last_da == {f[0], f[1], f[2], f[3], f[4], f[5]}, {name, ": destination"});
    end
  endtask

  initial begin
    byte_q_t f;
    nib_q_t n;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    f = make_frame(48'h0200_0000_00C3, 48'h0200_0000_00A1, 100, 1);
    run(f, mii_nibbles(f), 1, "good 100");
    f = make_frame(48'hFFFF_FFFF_FFFF, 48'h0200_0000_00A1, 46, 2);
    run(f, mii_nibbles(f), 1, "good minimum");
    f = make_frame(48'h0200_0000_00C3, 48'h0200_0000_00A1, 1500, 3);
    run(f, mii_nibbles(f), 1, "good maximum");
    f = make_frame(48'h0200_0000_00C3, 48'h0200_0000_00A1, 100, 4);
    f[40] = f[40] ^ 8'h10;
    run(f, mii_nibbles(f), 0, "corrupted");
    f = make_frame(48'h0200_0000_00C3, 48'h0200_0000_00A1, 100, 5);
    n = mii_nibbles(f);
    n.push_back(4'h3);
    run(f, n, 0, "dribble nibble");
    f = make_frame(48'h0200_0000_00C3, 48'h0200_0000_00A1, 20, 6);
    run(f, mii_nibbles(f), 0, "runt");
    // back to back at the minimum gap of 24 clocks
    begin
      int e0;
      e0 = ends;
      got.delete();
      for (int k = 0; k < 3; k++) begin
        f = make_frame(48'h0200_0000_00C3, 48'h0200_0000_00A1, 60 + k, 10 + k);
        send(mii_nibbles(f), 24);
      end
      repeat (5) @(posedge clk);
      check(ends == e0 + 3, "three back-to-back frames ended");
      check(last_good, "last back-to-back frame good");
      check(got.size() == (78 + 79 + 80), $sformatf("back-to-back byte count %0d", got.size()));
    end
    check(good_cnt == 6 && bad_cnt == 3, $sformatf("counters good %0d bad %0d", good_cnt, bad_cnt));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
