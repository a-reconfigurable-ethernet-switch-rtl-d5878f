// eth_pkg: constants and helpers shared by the MII, MAC and switch blocks.
//
// All blocks run on one clock that is the 25 MHz MII nibble clock of
// 100 Mbit/s Fast Ethernet, so one cycle carries 4 bits. The minimum
// inter-frame gap of 0.96 us (96 bit times) is therefore 24 cycles. Frame
// limits follow the Ethernet standard: 64 to 1518 bytes from destination
// address to FCS, i.e. 72 to 1526 bytes on the wire with the 8 bytes of
// preamble and start-of-frame delimiter. The CRC-32 helper is the reflected
// IEEE 802.3 polynomial processed one byte at a time; running it over a
// frame including its FCS leaves the fixed residue CRC_RESIDUE.
//
// The gap of 0.96 us and the 72..1526-byte frame range come from the
// published design; the CRC and the single 25 MHz clock are standard
// Ethernet knowledge and this design's choice.
package eth_pkg;

  localparam int unsigned IFG_MIN_CYCLES = 24;    // 0.96 us at 25 MHz
  localparam int unsigned MIN_FRAME      = 64;    // bytes, DA..FCS
  localparam int unsigned MAX_FRAME      = 1518;  // bytes, DA..FCS
  localparam int unsigned PREAMBLE_BYTES = 7;
  localparam logic [7:0]  PREAMBLE_BYTE  = 8'h55;
  localparam logic [7:0]  SFD_BYTE       = 8'hD5;
  localparam logic [31:0] CRC_INIT       = 32'hFFFF_FFFF;
  localparam logic [31:0] CRC_POLY_REFL  = 32'hEDB8_8320;
  localparam logic [31:0] CRC_RESIDUE    = 32'hDEBB_20E3;

  typedef logic [47:0] mac_addr_t;
  localparam mac_addr_t BROADCAST = 48'hFFFF_FFFF_FFFF;

  // which switch implementation owns a port's MII signals
  typedef enum logic {SEL_SW = 1'b0, SEL_HW = 1'b1} sw_sel_e;

  function automatic logic [31:0] crc32_byte(input logic [31:0] crc, input logic [7:0] data);
    logic [31:0] c;
    c = crc ^ {24'd0, data};
    for (int i = 0; i < 8; i++)
      c = c[0] ? ((c >> 1) ^ CRC_POLY_REFL) : (c >> 1);
    return c;
  endfunction

endpackage
