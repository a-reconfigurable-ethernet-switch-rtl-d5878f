// tb_eth_pkg: frame helpers shared by the testbenches.
//
// Frames are byte queues from destination address to FCS. The FCS is
// computed here with a bit-serial CRC-32 shift register (polynomial
// 0x04C11DB7, MSB-first register, bits fed LSB first as on the wire), a
// formulation independent of the byte-wise reflected one in the RTL.
// mii_nibbles turns a frame into the nibble sequence on the MII, preamble
// and SFD included.
package tb_eth_pkg;

  typedef logic [7:0] byte_q_t[$];
  typedef logic [3:0] nib_q_t[$];

  function automatic logic [31:0] crc_serial(byte_q_t d);
    logic [31:0] r = 32'hFFFF_FFFF;
    foreach (d[i])
      for (int b = 0; b < 8; b++) begin
        logic fb;
        fb = r[31] ^ d[i][b];
        r  = {r[30:0], 1'b0} ^ (fb ? 32'h04C1_1DB7 : 32'h0);
      end
    return r;
  endfunction

  function automatic void append_fcs(ref byte_q_t d);
    logic [31:0] r;
    r = crc_serial(d);
    for (int k = 0; k < 4; k++) begin
      logic [7:0] v;
      for (int i = 0; i < 8; i++) v[i] = ~r[31 - (8*k + i)];
      d.push_back(v);
    end
  endfunction

  // frame with DA, SA, a length/type field and payload_len payload bytes
  function automatic byte_q_t make_frame(logic [47:0] da, logic [47:0] sa,
                                         int payload_len, int seed);
    byte_q_t d;
    for (int i = 5; i >= 0; i--) d.push_back(da[8*i +: 8]);
    for (int i = 5; i >= 0; i--) d.push_back(sa[8*i +: 8]);
    d.push_back(8'(payload_len >> 8));
    d.push_back(8'(payload_len));
    for (int i = 0; i < payload_len; i++) d.push_back(8'((seed * 31 + i * 7 + (i >> 3)) & 8'hFF));
    append_fcs(d);
    return d;
  endfunction

  function automatic nib_q_t mii_nibbles(byte_q_t d);
    nib_q_t n;
    for (int i = 0; i < 15; i++) n.push_back(4'h5);
    n.push_back(4'hD);
    foreach (d[i]) begin
      n.push_back(d[i][3:0]);
      n.push_back(d[i][7:4]);
    end
    return n;
  endfunction

  function automatic bit same(byte_q_t a, byte_q_t b);
    if (a.size() != b.size()) return 0;
    foreach (a[i]) if (a[i] !== b[i]) return 0;
    return 1;
  endfunction

endpackage
