// prim_io_bst: boundary scan component for primary I/O pins.
//
// An IEEE 1149.1 component with no core logic: only external boundary scan
// cells, used to extend a board's chain across its edge connector so that
// the board-level BIST processor can drive and observe the primary I/O pins.
// It serves N_IN input pins and N_IO bidirectional pins, each bidirectional
// pin with its own tristate control; the document gives 10 and 26. Chips
// are cascaded for more pins.
//
// Boundary scan register (bit 0 is nearest TDO, this design's order):
//   bits 0 .. N_IN-1      input cells, capture in[i]
//   bit  N_IN+2k          data cell of io k: captures the pin, drives io_out[k]
//   bit  N_IN+2k+1        control cell of io k: 1 enables the driver
// Each bidirectional pin uses one data cell for both capture and drive and
// one control cell (this design's choice; the document gives only the pin
// counts), so the register is N_IN + 2*N_IO = 62 bits long.
// Instructions (2-bit IR, codes are this design's): EXTEST 00,
// SAMPLE/PRELOAD 01, BYPASS 11 and 10. The IR captures 01 and resets to
// BYPASS. Outside EXTEST all drivers are off, the component having no core
// logic to connect them to. Pads are split into io_in / io_out / io_oe;
// the tristate buffer itself is outside this module.
// Timing: capture and shift on rising TCK; update latches and TDO change on
// falling TCK. tdo_oe is high in Shift-IR/Shift-DR; tdo idles at 1.
module prim_io_bst
  import jtag_pkg::*;
#(
  parameter int unsigned N_IN = 10,
  parameter int unsigned N_IO = 26
) (
  input  logic            tck,
  input  logic            tms,
  input  logic            tdi,
  input  logic            trst_n,
  output logic            tdo,
  output logic            tdo_oe,
  input  logic [N_IN-1:0] in,
  input  logic [N_IO-1:0] io_in,
  output logic [N_IO-1:0] io_out,
  output logic [N_IO-1:0] io_oe
);

  localparam int unsigned BSR_LEN = N_IN + 2 * N_IO;

  typedef enum logic [1:0] {
    I_EXTEST = 2'b00, I_SAMPLE = 2'b01, I_BYP2 = 2'b10, I_BYPASS = 2'b11
  } instr_e;

  tap_state_e state;
  logic [1:0] ir;
  logic       ir_so;
  logic [BSR_LEN-1:0] bsr, bsr_cap, upd;
  logic       byp;
  logic       sel_bsr, extest;
  logic       tdo_r;

  tap_controller u_tap (.tck, .trst_n, .tms, .state);

  jtag_ir #(.W(2), .RESET_IR(I_BYPASS)) u_ir (
    .tck, .trst_n, .state, .tdi, .cap_val(2'b01), .ir, .so(ir_so)
  );

  assign extest  = (ir == I_EXTEST);
  assign sel_bsr = (ir == I_EXTEST) || (ir == I_SAMPLE);

  always_comb begin
    bsr_cap = '0;
    for (int i = 0; i < N_IN; i++) bsr_cap[i] = in[i];
    for (int k = 0; k < N_IO; k++) begin
      bsr_cap[N_IN + 2*k]     = io_in[k];
      bsr_cap[N_IN + 2*k + 1] = upd[N_IN + 2*k + 1];
    end
  end

  // capture / shift stage
  always_ff @(posedge tck) begin
    if (sel_bsr && state == CAP_DR)     bsr <= bsr_cap;
    else if (sel_bsr && state == SH_DR) bsr <= {tdi, bsr[BSR_LEN-1:1]};
    if (state == CAP_DR)                byp <= 1'b0;
    else if (state == SH_DR)            byp <= tdi;
  end

  // update stage; control cells reset to "driver off"
  always_ff @(negedge tck or negedge trst_n) begin
    if (!trst_n)                           upd <= '0;
    else if (state == TLR)                 upd <= '0;
    else if (sel_bsr && state == UPD_DR)   upd <= bsr;
  end

  always_comb begin
    for (int k = 0; k < N_IO; k++) begin
      io_out[k] = upd[N_IN + 2*k];
      io_oe[k]  = extest && upd[N_IN + 2*k + 1];
    end
  end

  // TDO, changed on the falling edge
  always_ff @(negedge tck or negedge trst_n) begin
    if (!trst_n) begin
      tdo_r  <= 1'b1;
      tdo_oe <= 1'b0;
    end else begin
      tdo_oe <= (state == SH_IR) || (state == SH_DR);
      if (state == SH_IR)      tdo_r <= ir_so;
      else if (state == SH_DR) tdo_r <= sel_bsr ? bsr[0] : byp;
      else                     tdo_r <= 1'b1;
    end
  end

  assign tdo = tdo_oe ? tdo_r : 1'b1;

endmodule
