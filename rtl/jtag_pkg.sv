// jtag_pkg: types shared by the IEEE 1149.1 parts of the board-level BIST kit.
// The TAP state encoding is the customary 4-bit one used by many 1149.1
// devices; the standard fixes the state diagram, not the codes, so the
// encoding is this design's choice. jtag_drv_t bundles the four signals a
// tester drives into one boundary scan chain.
package jtag_pkg;

  typedef enum logic [3:0] {
    TLR     = 4'hF,  // Test-Logic-Reset
    RTI     = 4'hC,  // Run-Test/Idle
    SEL_DR  = 4'h7,
    CAP_DR  = 4'h6,
    SH_DR   = 4'h2,
    EX1_DR  = 4'h1,
    PAU_DR  = 4'h3,
    EX2_DR  = 4'h0,
    UPD_DR  = 4'h5,
    SEL_IR  = 4'h4,
    CAP_IR  = 4'hE,
    SH_IR   = 4'hA,
    EX1_IR  = 4'h9,
    PAU_IR  = 4'hB,
    EX2_IR  = 4'h8,
    UPD_IR  = 4'hD
  } tap_state_e;

  // Signals driven into one boundary scan chain.
  typedef struct packed {
    logic tck;
    logic tms;
    logic tdi;
    logic trst_n;
  } jtag_drv_t;

endpackage
