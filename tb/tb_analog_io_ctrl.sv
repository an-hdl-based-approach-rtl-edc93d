// tb_analog_io_ctrl: drives the analog I/O interface controller through its
// TAP. Checks the 11-bit IR capture with the end-of-conversion status bit,
// BYPASS, the channel fields, the A/D path (Gray-coded capture for every
// 8-bit code, and the document's mask example: expected Gray 00011100 with
// mask 11110110 must accept exactly four adjacent codes), the D/A path
// (update, load strobe, multiplexer control), the 16-bit EXTEST register,
// and the converter handshake gating. Gray codes are computed here bit by
// bit from the definition.
module tb_analog_io_ctrl;
  localparam int NB = 8;
  logic tck = 0, tms = 1, tdi = 1, trst_n = 1;
  logic tdo, tdo_oe;
  logic [NB-1:0] ad_data = '0, da_data;
  logic adc_eoc = 0, adc_soc, da_load, amux_ctl, soc_req = 0, eoc_out;
  logic [3:0] ad_ch, da_ch;
  int checks = 0, failures = 0, loads = 0;

  analog_io_ctrl dut (.*);

  `include "jtag_tb_tasks.svh"

  always @(posedge da_load) loads++;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [NB-1:0] to_gray(logic [NB-1:0] b);
    logic [NB-1:0] g;
    g[NB-1] = b[NB-1];
    for (int i = NB - 2; i >= 0; i--) g[i] = b[i+1] ^ b[i];
    return g;
  endfunction

  function automatic logic [127:0] ir_word(int op, int adc, int dac);
    return 128'({4'(dac), 4'(adc), 3'(op)});
  endfunction

  initial begin
    repeat (400000) #10;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] cap, v;
    logic [NB-1:0] g_exp, mask, dv;
    int hits, first_hit, nload;
    #1 trst_n = 0; #2 trst_n = 1;
    tap_reset_to_rti();

    // IR capture: bits 1:0 = 01, bit 2 = A/D end of conversion
    adc_eoc = 1;
    shift_ir(11, ir_word(7, 0, 0), cap);
    check(cap[10:0] == 11'b000_0000_0101, "IR capture with EOC");
    adc_eoc = 0;
    shift_ir(11, ir_word(7, 0, 0), cap);
    check(cap[10:0] == 11'b000_0000_0001, "IR capture without EOC");
    shift_dr(16, 128'h9E37, cap);
    check(cap[0] == 0 && cap[15:1] == 15'h1E37, "BYPASS");
    check(amux_ctl == 0 && adc_soc == 0, "idle outputs");

    // A/D on channel 5
    shift_ir(11, ir_word(2, 5, 3), cap);
    check(ad_ch == 4'd5 && da_ch == 4'd3 && amux_ctl == 0, "ADC channel fields");
    soc_req = 1; #1 check(adc_soc == 1, "start passed in ADC");
    soc_req = 0; #1 check(adc_soc == 0, "start released");
    adc_eoc = 1; #1 check(eoc_out == 1, "EOC passed in ADC");
    adc_eoc = 0; #1;
    g_exp = 8'b00011100;
    mask = ~((g_exp ^ 8'b00000001) ^ (g_exp ^ 8'b00001000));  // !(00011101 ^ 00010100)
    check(mask == 8'b11110110, "document mask example");
    hits = 0; first_hit = -1;
    for (int b = 0; b < 256; b++) begin
      ad_data = 8'(b);
      shift_dr(8, 128'h0, cap);
      check(cap[7:0] == to_gray(8'(b)), $sformatf("Gray capture of %0d", b));
      if (((cap[7:0] ^ g_exp) & mask) == 0) begin
        if (first_hit < 0) first_hit = b;
        hits++;
      end
    end
    check(hits == 4 && first_hit == 22, $sformatf("mask accepts %0d codes from %0d", hits, first_hit));

    // D/A on channel 9
    nload = loads;
    shift_ir(11, ir_word(3, 0, 9), cap);
    check(da_ch == 4'd9 && amux_ctl == 1, "DAC channel and mux control");
    soc_req = 1; #1 check(adc_soc == 0, "no A/D start in DAC");
    soc_req = 0;
    for (int t = 0; t < 8; t++) begin
      dv = 8'($urandom);
      shift_dr(8, 128'(dv), cap);
      check(da_data == dv, "D/A data after update");
    end
    check(loads - nload == 8, $sformatf("D/A load strobes %0d", loads - nload));

    // SAMPLE/PRELOAD: 16-bit register, no load strobe, no mux
    nload = loads;
    ad_data = 8'h5C;
    shift_ir(11, ir_word(1, 0, 0), cap);
    check(amux_ctl == 0, "mux off in SAMPLE");
    v = 128'h3C00;
    shift_dr(16, v, cap);
    check(cap[7:0] == to_gray(8'h5C) && cap[15:8] == dv, "SAMPLE capture");
    check(da_data == 8'h3C && loads == nload, "PRELOAD without load strobe");

    // EXTEST
    shift_ir(11, ir_word(0, 0, 0), cap);
    ad_data = 8'hA7;
    shift_dr(16, 128'hC300, cap);
    check(cap[7:0] == to_gray(8'hA7) && cap[15:8] == 8'h3C, "EXTEST capture");
    check(da_data == 8'hC3 && loads == nload + 1, "EXTEST update and strobe");

    // ADDA on channels 2 / 14
    shift_ir(11, ir_word(4, 2, 14), cap);
    check(ad_ch == 4'd2 && da_ch == 4'd14 && amux_ctl == 1, "ADDA fields");
    soc_req = 1; #1 check(adc_soc == 1, "start passed in ADDA");
    soc_req = 0;
    ad_data = 8'h80;
    shift_dr(16, 128'h7F00, cap);
    check(cap[7:0] == to_gray(8'h80) && da_data == 8'h7F, "ADDA data");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
