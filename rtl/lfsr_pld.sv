// lfsr_pld: boundary scan component with programmable-length PRPG and SA.
//
// An IEEE 1149.1 component placed beside a non-BST combinational cluster:
// its N outputs (20) apply pseudo-random patterns to the cluster and its N
// inputs (20) compress the responses into a signature, so the cluster is
// tested through the board's BST chain. Two features the document stresses:
// every output has its own tristate control, and the LFSR used for pattern
// generation has a programmable length N - CR, where CR (0..15) is a 4-bit
// control register loaded through its own instruction. The CR topmost
// output bits are left out of the LFSR and keep the values preloaded into
// them, so they can apply guarding values to the cluster.
//
// Boundary scan register, bit 0 nearest TDO (order is this design's):
//   bits 0..N-1      input cells: capture in[i]; in SA they form a
//                    N-bit multiple-input signature register
//   bits N..2N-1     output cells: drive out[i]; their update stage is the
//                    pattern generator in PRPG
//   bits 2N..3N-1    control cells: 1 enables out[i]
// Instructions (3-bit IR; codes and the split into PRPG / SA / PRPG+SA are
// this design's choice): EXTEST 000, SAMPLE/PRELOAD 001, CTRLREG 010
// (selects the 4-bit control register), PRPG 011, SA 100, PRPG_SA 101,
// BYPASS 110/111. IR captures 001 and resets to BYPASS.
// Test timing (this design's choice, as in common PRPG/PSA scan parts): the
// test runs in Run-Test/Idle. On each falling TCK edge there the pattern
// generator steps; on each rising TCK edge there the signature register
// takes in[]. The cluster thus has half a TCK period to respond. In SA and
// PRPG_SA, Capture-DR leaves the input cells alone so the signature can be
// shifted out. Outputs are enabled only in EXTEST, PRPG, SA and PRPG_SA.
module lfsr_pld
  import jtag_pkg::*;
#(
  parameter int unsigned N = 20
) (
  input  logic         tck,
  input  logic         tms,
  input  logic         tdi,
  input  logic         trst_n,
  output logic         tdo,
  output logic         tdo_oe,
  input  logic [N-1:0] in,
  output logic [N-1:0] out,
  output logic [N-1:0] out_oe,
  output logic [3:0]   cr
);

  localparam int unsigned BSR_LEN = 3 * N;

  typedef enum logic [2:0] {
    I_EXTEST = 3'b000, I_SAMPLE = 3'b001, I_CTRL = 3'b010, I_PRPG = 3'b011,
    I_SA = 3'b100, I_PRPG_SA = 3'b101, I_BYP6 = 3'b110, I_BYPASS = 3'b111
  } instr_e;

  tap_state_e state;
  logic [2:0] ir;
  logic       ir_so;
  logic [BSR_LEN-1:0] bsr;
  logic [N-1:0] upd_out, upd_ctl;
  logic [3:0]   cr_sr;
  logic         byp, tdo_r;
  logic         sel_bsr, sel_cr, drive, prpg, sa;
  logic [N-1:0] prpg_nxt, misr_nxt;

  tap_controller u_tap (.tck, .trst_n, .tms, .state);

  jtag_ir #(.W(3), .RESET_IR(I_BYPASS)) u_ir (
    .tck, .trst_n, .state, .tdi, .cap_val(3'b001), .ir, .so(ir_so)
  );

  always_comb begin
    prpg    = (ir == I_PRPG) || (ir == I_PRPG_SA);
    sa      = (ir == I_SA)   || (ir == I_PRPG_SA);
    sel_cr  = (ir == I_CTRL);
    sel_bsr = (ir == I_EXTEST) || (ir == I_SAMPLE) || prpg || sa;
    drive   = (ir == I_EXTEST) || prpg || sa;
  end

  // pattern generator of programmable length on the output update stage
  prog_lfsr #(.W(N)) u_prpg (
    .q(upd_out), .cr, .mix(1'b0), .in('0), .nxt(prpg_nxt)
  );

  // full-length signature register on the input capture cells
  prog_lfsr #(.W(N)) u_misr (
    .q(bsr[N-1:0]), .cr(4'd0), .mix(1'b1), .in, .nxt(misr_nxt)
  );

  // capture / shift stage, rising TCK
  always_ff @(posedge tck) begin
    if (sel_bsr && state == CAP_DR) begin
      if (!sa) bsr[N-1:0] <= in;
      bsr[2*N-1:N]   <= upd_out;
      bsr[3*N-1:2*N] <= upd_ctl;
    end else if (sel_bsr && state == SH_DR) begin
      bsr <= {tdi, bsr[BSR_LEN-1:1]};
    end else if (sa && state == RTI) begin
      bsr[N-1:0] <= misr_nxt;
    end
    if (sel_cr && state == CAP_DR)      cr_sr <= cr;
    else if (sel_cr && state == SH_DR)  cr_sr <= {tdi, cr_sr[3:1]};
    if (state == CAP_DR)                byp <= 1'b0;
    else if (state == SH_DR)            byp <= tdi;
  end

  // update stage, falling TCK; PRPG steps here in Run-Test/Idle
  always_ff @(negedge tck or negedge trst_n) begin
    if (!trst_n) begin
      upd_out <= '0;
      upd_ctl <= '0;
      cr      <= '0;
    end else if (state == TLR) begin
      upd_out <= '0;
      upd_ctl <= '0;
      cr      <= '0;
    end else begin
      if (sel_bsr && state == UPD_DR) begin
        upd_out <= bsr[2*N-1:N];
        upd_ctl <= bsr[3*N-1:2*N];
      end else if (prpg && state == RTI) begin
        upd_out <= prpg_nxt;
      end
      if (sel_cr && state == UPD_DR) cr <= cr_sr;
    end
  end

  assign out    = upd_out;
  assign out_oe = drive ? upd_ctl : '0;

  always_ff @(negedge tck or negedge trst_n) begin
    if (!trst_n) begin
      tdo_r  <= 1'b1;
      tdo_oe <= 1'b0;
    end else begin
      tdo_oe <= (state == SH_IR) || (state == SH_DR);
      if (state == SH_IR)      tdo_r <= ir_so;
      else if (state == SH_DR) tdo_r <= sel_bsr ? bsr[0] : (sel_cr ? cr_sr[0] : byp);
      else                     tdo_r <= 1'b1;
    end
  end

  assign tdo = tdo_oe ? tdo_r : 1'b1;

endmodule
