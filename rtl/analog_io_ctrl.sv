// analog_io_ctrl: boundary scan controller for analog I/O nodes.
//
// Gives a BST chain access to 16 analog inputs (through an external A/D
// converter and analog multiplexer) and 16 analog outputs (through an
// external D/A converter and analog multiplexers placed in the analog
// signal paths). An 11-bit instruction register selects the operation and,
// separately, the A/D channel and the D/A channel:
//   ir[2:0]  opcode   EXTEST 000, SAMPLE/PRELOAD 001, ADC 010, DAC 011,
//                     ADDA 100 (both converters), BYPASS 101..111
//   ir[6:3]  A/D channel, driven on ad_ch
//   ir[10:7] D/A channel, driven on da_ch
// The 11-bit length and the channel counts are the document's; the field
// layout and codes are this design's choice.
//
// Data registers (bit 0 nearest TDO): the boundary-scan-in register BSI
// (NB bits, from the A/D) and the boundary-scan-out register BSO (NB bits,
// to the D/A). ADC selects BSI alone, DAC selects BSO alone, and EXTEST,
// SAMPLE/PRELOAD and ADDA select TDI -> BSO -> BSI -> TDO. BSI captures
// the A/D result converted to Gray code (g[NB-1] = b[NB-1],
// g[i] = b[i+1] ^ b[i]), so that a tester can check a range of +-2 codes
// around an expected value with a mask. BSO drives da_data from its update
// stage; da_load pulses for one TCK period after each Update-DR in EXTEST,
// DAC and ADDA, telling the D/A to take the new value.
//
// Converter handshake: in ADC and ADDA the start request from the BIST
// processor (soc_req, its synchronism output) is passed to the A/D as
// adc_soc, and the A/D's end of conversion is passed back as eoc_out (to
// the processor's synchronism input). The A/D end-of-conversion state is
// also captured into ir[2] at Capture-IR (ir[1:0] capture 01).
// amux_ctl switches the analog multiplexers to the D/A in DAC and ADDA.
// Timing: capture/shift on rising TCK, update and TDO on falling TCK.
module analog_io_ctrl
  import jtag_pkg::*;
#(
  parameter int unsigned NB = 8
) (
  input  logic          tck,
  input  logic          tms,
  input  logic          tdi,
  input  logic          trst_n,
  output logic          tdo,
  output logic          tdo_oe,
  // A/D converter
  input  logic [NB-1:0] ad_data,
  input  logic          adc_eoc,
  output logic          adc_soc,
  output logic [3:0]    ad_ch,
  // D/A converter and analog multiplexers
  output logic [NB-1:0] da_data,
  output logic          da_load,
  output logic [3:0]    da_ch,
  output logic          amux_ctl,
  // handshake with the board BIST processor
  input  logic          soc_req,
  output logic          eoc_out
);

  typedef enum logic [2:0] {
    I_EXTEST = 3'b000, I_SAMPLE = 3'b001, I_ADC = 3'b010, I_DAC = 3'b011,
    I_ADDA = 3'b100, I_BYP5 = 3'b101, I_BYP6 = 3'b110, I_BYPASS = 3'b111
  } opcode_e;

  tap_state_e state;
  logic [10:0] ir;
  logic        ir_so;
  opcode_e     opc;
  logic [NB-1:0] bsi, bso, gray;
  logic        byp, tdo_r;
  logic        sel_bsi, sel_bso, both, ad_en, da_en, upd_en;

  tap_controller u_tap (.tck, .trst_n, .tms, .state);

  jtag_ir #(.W(11), .RESET_IR(11'b0000_0000_111)) u_ir (
    .tck, .trst_n, .state, .tdi, .cap_val({8'b0, adc_eoc, 2'b01}), .ir, .so(ir_so)
  );

  always_comb begin
    opc     = opcode_e'(ir[2:0]);
    both    = (opc == I_EXTEST) || (opc == I_SAMPLE) || (opc == I_ADDA);
    sel_bsi = both || (opc == I_ADC);
    sel_bso = both || (opc == I_DAC);
    ad_en   = (opc == I_ADC) || (opc == I_ADDA);
    da_en   = (opc == I_DAC) || (opc == I_ADDA);
    upd_en  = (opc == I_EXTEST) || da_en;
    gray    = ad_data ^ (ad_data >> 1);
  end

  // capture / shift, rising TCK
  always_ff @(posedge tck) begin
    if (state == CAP_DR) begin
      if (sel_bsi) bsi <= gray;
      if (sel_bso) bso <= da_data;
      byp <= 1'b0;
    end else if (state == SH_DR) begin
      if (sel_bso) bso <= {tdi, bso[NB-1:1]};
      if (sel_bsi) bsi <= {(both ? bso[0] : tdi), bsi[NB-1:1]};
      byp <= tdi;
    end
  end

  // update stage and D/A load strobe, falling TCK
  always_ff @(negedge tck or negedge trst_n) begin
    if (!trst_n) begin
      da_data <= '0;
      da_load <= 1'b0;
    end else if (state == TLR) begin
      da_data <= '0;
      da_load <= 1'b0;
    end else begin
      if (sel_bso && state == UPD_DR) da_data <= bso;
      da_load <= upd_en && (state == UPD_DR);
    end
  end

  always_comb begin
    ad_ch    = ir[6:3];
    da_ch    = ir[10:7];
    amux_ctl = da_en;
    adc_soc  = ad_en && soc_req;
    eoc_out  = ad_en && adc_eoc;
  end

  always_ff @(negedge tck or negedge trst_n) begin
    if (!trst_n) begin
      tdo_r  <= 1'b1;
      tdo_oe <= 1'b0;
    end else begin
      tdo_oe <= (state == SH_IR) || (state == SH_DR);
      if (state == SH_IR)      tdo_r <= ir_so;
      else if (state == SH_DR) tdo_r <= sel_bsi ? bsi[0] : (sel_bso ? bso[0] : byp);
      else                     tdo_r <= 1'b1;
    end
  end

  assign tdo = tdo_oe ? tdo_r : 1'b1;

endmodule
