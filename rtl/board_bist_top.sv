// board_bist_top: board-level BIST set-up built from the testability blocks.
//
// One board-level BIST processor runs a stored test program and controls two
// board BST chains, as in the document's application example:
//   TAP 0 chain: processor -> analog I/O interface controller -> LFSR
//                component -> processor
//   TAP 1 chain: processor -> primary I/O test component -> processor
// The order of the parts in chain 0 and the single primary I/O component on
// chain 1 are this design's choice; on a real board further 1149.1 devices
// sit in both chains. The processor's synchronism output is the A/D start
// request of the analog controller, and the controller's end of conversion
// (ORed with ext_sync_in) is the processor's synchronism input, the
// handshake the document suggests. The program memory, converters, analog
// multiplexers and pad buffers are outside: their signals are ports.
// Everything on a chain is clocked by the TCK the processor generates.
module board_bist_top
  import jtag_pkg::*;
  import bist_pkg::*;
#(
  parameter int unsigned N_IN  = 10,  // primary I/O component input pins
  parameter int unsigned N_IO  = 26,  // primary I/O component bidirectional pins
  parameter int unsigned N_LF  = 20,  // LFSR component outputs / inputs
  parameter int unsigned NB_AD = 8    // converter resolution
) (
  input  logic              clk,
  input  logic              rst_n,
  // program memory
  output logic [ADDR_W-1:0] addr,
  input  logic [7:0]        data,
  // processor status
  output logic              deser_en,
  output logic              error,
  output logic              end_of_test,
  output logic              seltap,
  output logic              sync_out,
  input  logic              ext_sync_in,
  // primary I/O pins
  input  logic [N_IN-1:0]   pio_in,
  input  logic [N_IO-1:0]   pio_io_in,
  output logic [N_IO-1:0]   pio_io_out,
  output logic [N_IO-1:0]   pio_io_oe,
  // non-BST cluster access
  input  logic [N_LF-1:0]   lf_in,
  output logic [N_LF-1:0]   lf_out,
  output logic [N_LF-1:0]   lf_out_oe,
  // converters and analog multiplexers
  input  logic [NB_AD-1:0]  ad_data,
  input  logic              adc_eoc,
  output logic              adc_soc,
  output logic [3:0]        ad_ch,
  output logic [NB_AD-1:0]  da_data,
  output logic              da_load,
  output logic [3:0]        da_ch,
  output logic              amux_ctl
);

  jtag_drv_t tap0, tap1;
  logic tdo0, tdo1, tdo_an, an_oe, lf_oe, pio_oe, eoc_out;
  logic [3:0] lf_cr;

  bist_processor u_proc (
    .clk, .rst_n, .addr, .data,
    .tap0, .tap0_tdo(tdo0), .tap1, .tap1_tdo(tdo1),
    .deser_en, .error, .end_of_test, .seltap, .sync_out,
    .sync_in(eoc_out | ext_sync_in)
  );

  analog_io_ctrl #(.NB(NB_AD)) u_analog (
    .tck(tap0.tck), .tms(tap0.tms), .tdi(tap0.tdi), .trst_n(tap0.trst_n),
    .tdo(tdo_an), .tdo_oe(an_oe),
    .ad_data, .adc_eoc, .adc_soc, .ad_ch,
    .da_data, .da_load, .da_ch, .amux_ctl,
    .soc_req(sync_out), .eoc_out
  );

  lfsr_pld #(.N(N_LF)) u_lfsr (
    .tck(tap0.tck), .tms(tap0.tms), .tdi(tdo_an), .trst_n(tap0.trst_n),
    .tdo(tdo0), .tdo_oe(lf_oe),
    .in(lf_in), .out(lf_out), .out_oe(lf_out_oe), .cr(lf_cr)
  );

  prim_io_bst #(.N_IN(N_IN), .N_IO(N_IO)) u_pio (
    .tck(tap1.tck), .tms(tap1.tms), .tdi(tap1.tdi), .trst_n(tap1.trst_n),
    .tdo(tdo1), .tdo_oe(pio_oe),
    .in(pio_in), .io_in(pio_io_in), .io_out(pio_io_out), .io_oe(pio_io_oe)
  );

endmodule
