// bist_pkg: instruction codes of the board-level BIST processor.
// The codes of TMS0 (00), TMS1 (01), LD C16 (02), NSHF (04), NSHFCP (05),
// JPE (06), SELTAP0 (1A) and SELTAP1 (1B) are those of the published test
// program listing. The codes of the other instructions are not published and
// are this design's choice. Multi-byte operands are stored most significant
// byte first, as the listing shows for LD C16 and JPE.
package bist_pkg;

  typedef enum logic [7:0] {
    OP_TMS0    = 8'h00,  // one TCK cycle with TMS = 0
    OP_TMS1    = 8'h01,  // one TCK cycle with TMS = 1
    OP_LDC16   = 8'h02,  // LD C16,N : two operand bytes
    OP_LDC24   = 8'h03,  // LD C24,N : three operand bytes
    OP_NSHF    = 8'h04,  // shift N = C16 bits, one data byte per 8 bits
    OP_NSHFCP  = 8'h05,  // shift and compare, data/expected/mask bytes
    OP_JPE     = 8'h06,  // jump if error flag set, 3-byte address
    OP_JPNE    = 8'h07,  // jump if error flag clear, 3-byte address
    OP_NTCK    = 8'h08,  // N = C24 TCK cycles with TMS = 0
    OP_TRST    = 8'h09,  // pulse /TRST of the selected chain
    OP_SS0     = 8'h0A,  // synchronism output <= 0
    OP_SS1     = 8'h0B,  // synchronism output <= 1
    OP_WS0     = 8'h0C,  // wait for synchronism input = 0
    OP_WS1     = 8'h0D,  // wait for synchronism input = 1
    OP_HALT    = 8'h0F,  // end of test
    OP_SELTAP0 = 8'h1A,
    OP_SELTAP1 = 8'h1B
  } opcode_e;

  localparam int unsigned ADDR_W = 20;  // program counter width (1 Mbyte)
  localparam int unsigned C16_W  = 16;
  localparam int unsigned C24_W  = 24;
  localparam int unsigned TRST_CYCLES = 2;  // clock cycles /TRST is held low

endpackage
