// bist_tap_sel: the TAP selector of the BIST processor.
// The processor's single set of TAP resources serves two board BST chains.
// SELTAP0/SELTAP1 write the selection (sel_we, sel_val); the selected chain
// gets the processor's TCK, TMS, TDI and /TRST, and its TDO is returned. The
// chain that is not selected sees TCK held low, TMS and TDI high and /TRST
// inactive, so its TAP controller stays in whatever state it was left in,
// which the published program relies on when it switches chains in the middle
// of a scan. Those idle levels are this design's choice. seltap is the
// SelTAP status pin. Synchronous to clk, reset selects chain 0.
module bist_tap_sel
  import jtag_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      sel_we,
  input  logic      sel_val,
  input  jtag_drv_t drv,
  input  logic      tdo0,
  input  logic      tdo1,
  output jtag_drv_t tap0,
  output jtag_drv_t tap1,
  output logic      tdo,
  output logic      seltap
);

  localparam jtag_drv_t IDLE = '{tck: 1'b0, tms: 1'b1, tdi: 1'b1, trst_n: 1'b1};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      seltap <= 1'b0;
    else if (sel_we) seltap <= sel_val;
  end

  always_comb begin
    tap0 = seltap ? IDLE : drv;
    tap1 = seltap ? drv  : IDLE;
    tdo  = seltap ? tdo1 : tdo0;
  end

endmodule
