// tb_board_bist_top: end-to-end test of the board BIST set-up at its default
// sizes. A test program, assembled here into a behavioural program ROM, is
// run twice by the BIST processor: once on a fault-free board and once with
// an open on one primary I/O pin. The board around the chips is modelled
// here: a successive-approximation A/D converter with a start/end-of-
// conversion handshake, a combinational non-BST cluster between the LFSR
// component's outputs and inputs, and loop-backs on the primary I/O pins.
// The program follows the document's style of test code:
//   chain 0 (analog controller + LFSR component): TRST, IR scan with
//   capture check, control register load (LFSR length 8), preload, A/D
//   conversion with the SS/WS handshake and a Gray-code compare, PRPG+SA run
//   with NTCK, signature compare, D/A write;
//   chain 1 (primary I/O component): SAMPLE/PRELOAD, EXTEST interconnect
//   test with compare; JPE to a fault exit after each compare.
// Expected responses are computed here from models of each chip's cells.
// Mechanisms counted: TRST, SelTAP switch, NSHF, NSHFCP, NTCK, handshake
// waits, A/D conversions, D/A loads, PRPG steps, error detection, JPE taken,
// HALT. Each must happen at least once.
module tb_board_bist_top;
  import jtag_pkg::*;
  import bist_pkg::*;
  localparam int N_IN = 10, N_IO = 26, N_LF = 20, NB = 8;
  localparam int LPIO = N_IN + 2 * N_IO;   // 62
  localparam int LLF  = 3 * N_LF;          // 60
  localparam int CRV  = 12;                // LFSR length 20 - 12 = 8
  localparam int K    = 50;                // PRPG/SA clock count

  logic clk = 0, rst_n = 0;
  logic [19:0] addr;
  logic [7:0]  data;
  logic deser_en, error, end_of_test, seltap, sync_out;
  logic [N_IN-1:0] pio_in;
  logic [N_IO-1:0] pio_io_in, pio_io_out, pio_io_oe;
  logic [N_LF-1:0] lf_in, lf_out, lf_out_oe;
  logic [NB-1:0] ad_data = '0, da_data;
  logic adc_eoc = 0, adc_soc, da_load, amux_ctl;
  logic [3:0] ad_ch, da_ch;
  logic fault = 0;

  logic [7:0] rom [0:4095];
  int pc_asm = 0, checks = 0, failures = 0;
  int fail_pc, end_pc;
  int n_trst, n_sel, n_nshf, n_nshfcp, n_ntck_tck, n_wait, n_conv, n_daload, n_prpg, n_halt;

  board_bist_top dut (
    .clk, .rst_n, .addr, .data, .deser_en, .error, .end_of_test, .seltap, .sync_out,
    .ext_sync_in(1'b0), .pio_in, .pio_io_in, .pio_io_out, .pio_io_oe,
    .lf_in, .lf_out, .lf_out_oe, .ad_data, .adc_eoc, .adc_soc, .ad_ch,
    .da_data, .da_load, .da_ch, .amux_ctl
  );

  assign data = rom[addr[11:0]];
  always #5 clk = ~clk;

  // ---------------------------------------------------------- board models
  function automatic logic [N_LF-1:0] cluster(logic [N_LF-1:0] o);
    return {o[9:0], o[19:10]} ^ (o << 3) ^ 20'h5A5A5;
  endfunction
  function automatic logic [N_IN-1:0] pio_in_of(logic [N_IO-1:0] pins);
    return pins[9:0] ^ pins[19:10];
  endfunction
  function automatic logic [NB-1:0] adc_value(logic [3:0] ch);
    return 8'(ch * 37 + 11);
  endfunction

  logic [N_LF-1:0] lf_pins;
  logic [N_IO-1:0] io_pins;
  always_comb begin
    for (int i = 0; i < N_LF; i++) lf_pins[i] = lf_out_oe[i] ? lf_out[i] : 1'b1;
    lf_in = cluster(lf_pins);
    for (int k = 0; k < N_IO; k++) io_pins[k] = pio_io_oe[k] ? pio_io_out[k] : 1'b1;
    pio_io_in = io_pins;
    if (fault) pio_io_in[4] = 1'b0;          // open on pin 4, reads low
    pio_in = pio_in_of(io_pins);
  end

  // A/D converter: start on adc_soc rising, result and EOC 16 clocks later,
  // EOC cleared when the start request is withdrawn
  initial begin
    forever begin
      @(posedge adc_soc);
      repeat (16) @(posedge clk);
      ad_data <= adc_value(ad_ch);
      adc_eoc <= 1'b1;
      n_conv++;
      @(negedge adc_soc);
      adc_eoc <= 1'b0;
    end
  end

  // --------------------------------------------------------- event counters
  always @(negedge dut.u_proc.tap0.trst_n or negedge dut.u_proc.tap1.trst_n) n_trst++;
  always @(seltap) n_sel++;
  always @(posedge da_load) n_daload++;
  always @(posedge clk) begin
    if (dut.u_proc.state == dut.u_proc.S_EXEC && dut.u_proc.op == OP_NSHF)   n_nshf++;
    if (dut.u_proc.state == dut.u_proc.S_EXEC && dut.u_proc.op == OP_NSHFCP) n_nshfcp++;
    if (dut.u_proc.state == dut.u_proc.S_EXEC && dut.u_proc.op == OP_HALT)   n_halt++;
    if (dut.u_proc.state == dut.u_proc.S_WAIT) n_wait++;
  end
  always @(posedge dut.u_proc.tap0.tck) if (dut.u_proc.kind == dut.u_proc.K_NTCK) n_ntck_tck++;
  always @(lf_out) if (dut.u_lfsr.prpg) n_prpg++;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // -------------------------------------------------------------- assembler
  task automatic b(input logic [7:0] v); rom[pc_asm] = v; pc_asm++; endtask
  task automatic op(input opcode_e o); b(o); endtask
  task automatic ldc16(input int n); b(OP_LDC16); b(8'(n >> 8)); b(8'(n)); endtask
  task automatic ldc24(input int n); b(OP_LDC24); b(8'(n >> 16)); b(8'(n >> 8)); b(8'(n)); endtask
  task automatic jpe_fail; b(OP_JPE); b(8'(fail_pc >> 16)); b(8'(fail_pc >> 8)); b(8'(fail_pc)); endtask
  task automatic nshf(input int n, input logic [127:0] d);
    ldc16(n);
    b(OP_NSHF);
    for (int i = 0; i < (n + 7) / 8; i++) b(d[8*i +: 8]);
  endtask
  task automatic nshfcp(input int n, input logic [127:0] d, input logic [127:0] e, input logic [127:0] m);
    ldc16(n);
    b(OP_NSHFCP);
    for (int i = 0; i < (n + 7) / 8; i++) begin b(d[8*i +: 8]); b(e[8*i +: 8]); b(m[8*i +: 8]); end
  endtask
  // scans start in Run-Test/Idle or Update-xR and end in Run-Test/Idle
  task automatic to_shift_ir; op(OP_TMS1); op(OP_TMS1); op(OP_TMS0); op(OP_TMS0); endtask
  task automatic to_shift_dr; op(OP_TMS1); op(OP_TMS0); op(OP_TMS0); endtask
  task automatic to_rti; op(OP_TMS1); op(OP_TMS0); endtask   // Exit1 -> Update -> RTI

  function automatic logic [127:0] ones(int n);
    return (128'(1) << n) - 1;
  endfunction

  // reference LFSR step (taps of degree 20: 20,17; degree 8: 8,6,5,4)
  function automatic logic [N_LF-1:0] lf_step(logic [N_LF-1:0] q, int c);
    logic [N_LF-1:0] tm, r;
    int len = N_LF - c;
    tm = (len == 20) ? ((1 << 19) | (1 << 16)) : ((1 << 7) | (1 << 5) | (1 << 4) | (1 << 3));
    r = q;
    for (int i = len - 1; i > 0; i--) r[i] = q[i-1];
    r[0] = ^(q & tm);
    return r;
  endfunction

  function automatic logic [NB-1:0] gray(logic [NB-1:0] v);
    logic [NB-1:0] g;
    g[NB-1] = v[NB-1];
    for (int i = 0; i < NB - 1; i++) g[i] = v[i] ^ v[i+1];
    return g;
  endfunction

  // ---------------------------------------------------------------- program
  logic [N_LF-1:0] seed, p, sig;
  logic [N_IO-1:0] dat, ctl;
  logic [127:0] v, e, m;

  task automatic build_program;
    logic [NB-1:0] g;
    for (int i = 0; i < 4096; i++) rom[i] = OP_HALT;
    fail_pc = 12'hF00;
    rom[fail_pc] = OP_HALT;
    seed = 20'hB3C5A;
    dat = 26'h2A5C3F1; ctl = 26'h3FFFFFF;

    // ---- chain 0: analog controller (IR 11) + LFSR component (IR 3)
    op(OP_TRST);
    op(OP_SELTAP1); op(OP_TRST); op(OP_SELTAP0);
    op(OP_TMS0);                                         // Run-Test/Idle
    to_shift_ir();
    // analog: ADC on channel 5; LFSR: CTRLREG. Captures: 001, then 0..0 eoc 01
    v = {11'b0000_0101_010, 3'b010};
    e = {11'b000_0000_0001, 3'b001};
    nshfcp(14, v, e, ones(14));
    jpe_fail();
    to_rti();
    to_shift_dr();                                       // BSI (8) + CR (4)
    nshf(12, {8'h00, 4'(CRV)});
    to_rti();
    to_shift_ir();                                       // analog ADC ch5, LFSR SAMPLE
    nshf(14, {11'b0000_0101_010, 3'b001});
    to_rti();
    to_shift_dr();                                       // preload seed, enables, MISR=0
    nshf(68, {8'h00, ctl[19:0], seed, 20'h00000});
    to_rti();
    // A/D conversion through the handshake
    op(OP_SS1); op(OP_WS1); op(OP_SS0); op(OP_WS0);
    to_shift_dr();
    g = gray(adc_value(4'd5));
    e = '0; e[LLF +: 8] = 128'(g);
    m = '0; m[LLF +: 8] = 8'hFF;
    nshfcp(68, {8'h00, ctl[19:0], seed, 20'h00000}, e, m);
    jpe_fail();
    to_rti();
    // PRPG + SA on the LFSR component, D/A on channel 9
    to_shift_ir();
    nshf(14, {11'b1001_0000_011, 3'b101});
    to_rti();                                            // PRPG steps once here
    ldc24(K); op(OP_NTCK);
    p = lf_step(seed, CRV);
    sig = '0;
    for (int i = 0; i < K + 1; i++) begin
      sig = lf_step(sig, 0) ^ cluster(p);
      if (i < K) p = lf_step(p, CRV);
    end
    to_shift_dr();
    e = '0; e[LLF-1:0] = {ctl[19:0], p, sig};
    m = '0; m[LLF-1:0] = ones(LLF);
    nshfcp(68, {8'hA5, ctl[19:0], seed, 20'h00000}, e, m);
    jpe_fail();
    to_rti();

    // ---- chain 1: primary I/O component (IR 2)
    op(OP_SELTAP1);
    op(OP_TMS0);
    to_shift_ir();
    nshfcp(2, 128'b01, 128'b01, 128'b11);                // SAMPLE/PRELOAD, capture 01
    jpe_fail();
    to_rti();
    v = '0;
    for (int k = 0; k < N_IO; k++) begin
      v[N_IN + 2*k] = dat[k];
      v[N_IN + 2*k + 1] = ctl[k];
    end
    to_shift_dr();
    nshf(LPIO, v);                                       // preload
    to_rti();
    to_shift_ir();
    nshf(2, 128'b00);                                    // EXTEST
    to_rti();
    to_shift_dr();
    e = '0;
    e[N_IN-1:0] = 128'(pio_in_of(dat));
    for (int k = 0; k < N_IO; k++) begin
      e[N_IN + 2*k] = dat[k];
      e[N_IN + 2*k + 1] = ctl[k];
    end
    nshfcp(LPIO, v, e, ones(LPIO));
    jpe_fail();
    to_rti();
    op(OP_HALT);
    end_pc = pc_asm;
  endtask

  task automatic run(input logic with_fault);
    fault = with_fault;
    rst_n = 0;
    n_halt = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    while (!end_of_test) @(posedge clk);
    repeat (4) @(posedge clk);
    #1;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {n_trst, n_sel, n_nshf, n_nshfcp, n_ntck_tck, n_wait, n_conv, n_daload, n_prpg, n_halt} = '0;
    build_program();
    check(pc_asm < fail_pc, "program fits below the fault exit");

    // ---- fault-free board
    run(1'b0);
    check(error == 0, "no fault reported on a good board");
    check(addr == 20'(end_pc), $sformatf("normal end at %h (exp %h)", addr, end_pc));
    check(da_data == 8'hA5 && da_ch == 4'd9 && amux_ctl == 1, "D/A written on channel 9");
    check(dut.u_lfsr.cr == 4'(CRV), "LFSR length programmed");
    check(pio_io_out == dat && pio_io_oe == ctl, "EXTEST drives the primary I/O pins");
    check(seltap == 1, "SelTAP shows chain 1");

    // ---- same program, board with an open pin
    run(1'b1);
    check(error == 1, "fault detected");
    check(addr == 20'(fail_pc + 1), "JPE took the fault exit");

    // ---- every mechanism happened
    check(n_trst >= 2, $sformatf("TRST pulses %0d", n_trst));
    check(n_sel >= 2, $sformatf("SelTAP switches %0d", n_sel));
    check(n_nshf > 0, $sformatf("NSHF %0d", n_nshf));
    check(n_nshfcp > 0, $sformatf("NSHFCP %0d", n_nshfcp));
    check(n_ntck_tck == 2 * K, $sformatf("NTCK clocks %0d", n_ntck_tck));
    check(n_wait > 0, $sformatf("handshake wait cycles %0d", n_wait));
    check(n_conv == 2, $sformatf("A/D conversions %0d", n_conv));
    check(n_daload > 0, $sformatf("D/A loads %0d", n_daload));
    check(n_prpg >= K, $sformatf("PRPG steps %0d", n_prpg));
    $display("mechanisms: trst=%0d seltap=%0d nshf=%0d nshfcp=%0d ntck=%0d wait=%0d conv=%0d daload=%0d prpg=%0d",
             n_trst, n_sel, n_nshf, n_nshfcp, n_ntck_tck, n_wait, n_conv, n_daload, n_prpg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
