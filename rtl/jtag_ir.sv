// jtag_ir: IEEE 1149.1 instruction register with its update stage.
// A W-bit shift register loads cap_val in Capture-IR (the standard requires
// the two least significant bits to be 01; the rest carry design status),
// shifts TDI in at the top and out at bit 0 in Shift-IR, on rising TCK. The
// instruction (ir) is updated from it on the falling TCK edge in Update-IR,
// and reset to RESET_IR in Test-Logic-Reset or by /TRST.
module jtag_ir
  import jtag_pkg::*;
#(
  parameter int unsigned   W        = 2,
  parameter logic [W-1:0]  RESET_IR = '1
) (
  input  logic         tck,
  input  logic         trst_n,
  input  tap_state_e   state,
  input  logic         tdi,
  input  logic [W-1:0] cap_val,
  output logic [W-1:0] ir,
  output logic         so
);

  logic [W-1:0] sr;

  always_ff @(posedge tck) begin
    if (state == CAP_IR)     sr <= cap_val;
    else if (state == SH_IR) sr <= {tdi, sr[W-1:1]};
  end

  always_ff @(negedge tck or negedge trst_n) begin
    if (!trst_n)              ir <= RESET_IR;
    else if (state == TLR)    ir <= RESET_IR;
    else if (state == UPD_IR) ir <= sr;
  end

  assign so = sr[0];

endmodule
