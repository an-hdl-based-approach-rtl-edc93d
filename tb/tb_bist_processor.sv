// tb_bist_processor: runs a test program on the BIST processor against two
// behavioural BST chains (chain_model) and an asynchronous-read program ROM.
// The program exercises every instruction: TRST, TMS0/TMS1, LD C16/C24,
// NSHF, NSHFCP (pass, masked-off difference, real mismatch), JPE and JPNE
// both taken and not taken, NTCK, SS0/SS1, WS0/WS1, SELTAP0/SELTAP1 and
// HALT. Checks: data arriving in each chain, scan lengths (TMS high on the
// last bit only), TCK and Run-Test/Idle counts, /TRST pulses, error flag,
// DeserEn cycle count, SelTAP, and the total clock count against the
// per-instruction cycle costs.
module tb_bist_processor;
  import jtag_pkg::*;
  import bist_pkg::*;
  localparam int L0 = 12, L1 = 20;
  logic clk = 0, rst_n = 0;
  logic [19:0] addr;
  logic [7:0]  data;
  jtag_drv_t tap0, tap1;
  logic tap0_tdo, tap1_tdo, deser_en, error, end_of_test, seltap, sync_out;
  logic sync_in = 0;
  logic [7:0] rom [0:1023];
  int pc_asm = 0, exp_cycles = 0, checks = 0, failures = 0, deser_cycles = 0, exp_deser = 0;
  int err_pc;

  bist_processor dut (.*);

  chain_model #(.L(L0)) ch0 (.tck(tap0.tck), .tms(tap0.tms), .tdi(tap0.tdi),
                             .trst_n(tap0.trst_n), .tdo(tap0_tdo));
  chain_model #(.L(L1)) ch1 (.tck(tap1.tck), .tms(tap1.tms), .tdi(tap1.tdi),
                             .trst_n(tap1.trst_n), .tdo(tap1_tdo));

  assign data = rom[addr[9:0]];

  always #5 clk = ~clk;

  always @(posedge clk) if (deser_en) deser_cycles++;

  // the other test resource answers the handshake a few clocks later
  always @(posedge clk) sync_in <= #1 sync_out;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---- tiny assembler; each emit adds the instruction's documented cost
  task automatic b(input logic [7:0] v); rom[pc_asm] = v; pc_asm++; endtask
  task automatic op1(input opcode_e o, input int cyc); b(o); exp_cycles += cyc; endtask
  task automatic ldc16(input int n); b(OP_LDC16); b(8'(n >> 8)); b(8'(n)); exp_cycles += 4; endtask
  task automatic ldc24(input int n);
    b(OP_LDC24); b(8'(n >> 16)); b(8'(n >> 8)); b(8'(n)); exp_cycles += 5;
  endtask
  task automatic jp(input opcode_e o, input int a);
    b(o); b(8'(a >> 16)); b(8'(a >> 8)); b(8'(a)); exp_cycles += 6;
  endtask
  task automatic nshf(input int n, input logic [63:0] d);
    int nb = (n + 7) / 8;
    b(OP_NSHF);
    for (int i = 0; i < nb; i++) b(d[8*i +: 8]);
    exp_cycles += 2 + nb + 2 * n;
  endtask
  task automatic nshfcp(input int n, input logic [63:0] d, input logic [63:0] e, input logic [63:0] m);
    int nb = (n + 7) / 8;
    b(OP_NSHFCP);
    for (int i = 0; i < nb; i++) begin b(d[8*i +: 8]); b(e[8*i +: 8]); b(m[8*i +: 8]); end
    exp_cycles += 2 + 3 * nb + 2 * n;
    exp_deser += 2 * n;
  endtask
  task automatic to_shift_dr_from_upd; op1(OP_TMS1, 4); op1(OP_TMS0, 4); op1(OP_TMS0, 4); endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] d0a, d1a, d0b;
    int cyc, halt_pc, fail_pc, skip_pc, p;
    for (int i = 0; i < 1024; i++) rom[i] = OP_HALT;
    d0a = 64'($urandom) & 64'hFFF;
    d1a = 64'($urandom) & 64'hFFFFF;
    d0b = 64'($urandom) & 64'hFFF;

    // ---- program
    op1(OP_TRST, 2 + TRST_CYCLES);                // chain 0 to Test-Logic-Reset
    op1(OP_TMS0, 4);                              // Run-Test/Idle
    op1(OP_TMS1, 4); op1(OP_TMS0, 4); op1(OP_TMS0, 4);   // Shift-DR
    ldc16(L0); nshf(L0, d0a);
    op1(OP_TMS1, 4);                              // Update-DR
    op1(OP_SELTAP1, 2);
    op1(OP_TRST, 2 + TRST_CYCLES);
    op1(OP_TMS0, 4);
    op1(OP_TMS1, 4); op1(OP_TMS0, 4); op1(OP_TMS0, 4);
    ldc16(L1); nshf(L1, d1a);
    op1(OP_TMS1, 4);
    to_shift_dr_from_upd();
    // read back what was loaded, all bits checked: no error
    ldc16(L1); nshfcp(L1, 64'hFFFFF, d1a, 64'hFFFFF);
    op1(OP_TMS1, 4);
    skip_pc = pc_asm + 4 + 5;
    jp(OP_JPE, 0);      p = pc_asm - 3;           // not taken (patched below)
    jp(OP_JPNE, skip_pc);                         // taken: skips a TRST
    op1(OP_TRST, 0);                              // skipped, costs nothing
    check(pc_asm == skip_pc, "assembler skip address");
    ldc24(37); op1(OP_NTCK, 2 + 2 * 37);          // 37 TCK with TMS low
    op1(OP_SS1, 2); op1(OP_NTCK, 2);              // NTCK with C24 now 0 does nothing
    ldc16(0); op1(OP_NSHF, 2);                    // NSHF with C16 = 0 does nothing
    op1(OP_TMS0, 4); op1(OP_TMS0, 4);
    op1(OP_WS1, 3);
    op1(OP_SS0, 2); op1(OP_TMS0, 4); op1(OP_TMS0, 4); op1(OP_WS0, 3);
    op1(OP_SELTAP0, 2);
    to_shift_dr_from_upd();
    // chain 0 returns d0a; compare with one bit flipped but masked off
    ldc16(L0); nshfcp(L0, d0b, d0a ^ 64'h004, 64'hFFB);
    op1(OP_TMS1, 4);
    jp(OP_JPE, 0);      rom[p] = 8'(0);           // placeholder; both JPE targets set below
    fail_pc = pc_asm - 3;
    to_shift_dr_from_upd();
    // now a real mismatch on bit 7
    ldc16(L0); nshfcp(L0, d0a, d0b ^ 64'h080, 64'hFFF);
    op1(OP_TMS1, 4);
    jp(OP_JPNE, 0);     err_pc = pc_asm - 3;      // not taken: error is set
    jp(OP_JPE, 0);      halt_pc = pc_asm - 3;     // taken
    op1(OP_SS0, 0);                               // skipped
    op1(OP_HALT, 0);                              // skipped
    begin
      int tgt;
      tgt = pc_asm;
      // targets: JPE not-taken ones point at a trap, the final JPE to tgt
      rom[halt_pc] = 8'(tgt >> 16); rom[halt_pc+1] = 8'(tgt >> 8); rom[halt_pc+2] = 8'(tgt);
      rom[p] = 8'h0; rom[p+1] = 8'h3; rom[p+2] = 8'hF0;          // trap at 0x3F0
      rom[fail_pc] = 8'h0; rom[fail_pc+1] = 8'h3; rom[fail_pc+2] = 8'hF0;
      rom[err_pc] = 8'h0; rom[err_pc+1] = 8'h3; rom[err_pc+2] = 8'hF0;
    end
    op1(OP_SS1, 2);
    op1(OP_HALT, 2);
    rom[10'h3F0] = OP_SS0; rom[10'h3F1] = OP_HALT;  // trap: would leave sync_out low

    // ---- run
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    cyc = 0;
    while (!end_of_test) begin
      @(posedge clk); #1;
      cyc++;
    end
    repeat (20) @(posedge clk);
    #1;
    check(cyc == exp_cycles, $sformatf("cycles %0d expected %0d", cyc, exp_cycles));
    check(sync_out == 1, "final jump reached its target");
    check(error == 1, "error flag set by mismatch");
    check(seltap == 0, "SelTAP shows chain 0");
    check(deser_cycles == exp_deser, $sformatf("DeserEn cycles %0d exp %0d", deser_cycles, exp_deser));
    check(ch0.trsts == 1 && ch1.trsts == 1, "one TRST per chain (skipped TRST not run)");
    check(ch0.scans == 3 && ch1.scans == 2, "scan counts");
    check(ch0.last_scan == L0 && ch1.last_scan == L1, "TMS high on the last bit only");
    check(ch1.upd[L1-1:0] == 20'hFFFFF, "chain 1 data after NSHFCP");
    check(ch0.upd[L0-1:0] == d0a[L0-1:0], "chain 0 data after last NSHFCP");
    check(ch1.rti_cycles >= 37, $sformatf("NTCK in Run-Test/Idle: %0d", ch1.rti_cycles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
