// tb_lfsr_pld: drives the programmable-length LFSR component through its TAP.
// Checks the control register (load, read back, length 20-CR), preload and
// EXTEST with individual output enables, PRPG stepping in Run-Test/Idle
// with the guard bits held, and a PRPG+SA run against a combinational
// cluster model, comparing the shifted-out signature with a reference
// computed here. The reference LFSR uses its own copy of the polynomial taps
// for the lengths exercised.
module tb_lfsr_pld;
  localparam int N = 20, L = 3 * N;
  logic tck = 0, tms = 1, tdi = 1, trst_n = 1;
  logic tdo, tdo_oe;
  logic [N-1:0] in, out, out_oe;
  logic [3:0] cr;
  int checks = 0, failures = 0;
  int prpg_steps = 0;

  lfsr_pld dut (.*);

  `include "jtag_tb_tasks.svh"

  // cluster under test: some combinational function of the patterns
  always_comb in = {out[9:0], out[19:10]} ^ (out << 3) ^ 20'h5A5A5;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // reference taps (bit t-1 for tap t): degree 20: 20,17; 12: 12,6,4,1; 8: 8,6,5,4
  function automatic logic [N-1:0] ref_step(logic [N-1:0] q, int c);
    logic [N-1:0] tm;
    int len = N - c;
    logic [N-1:0] r = q;
    case (len)
      20: tm = (1 << 19) | (1 << 16);
      12: tm = (1 << 11) | (1 << 5) | (1 << 3) | 1;
      8:  tm = (1 << 7) | (1 << 5) | (1 << 4) | (1 << 3);
      default: tm = 0;
    endcase
    for (int i = len - 1; i > 0; i--) r[i] = q[i-1];
    r[0] = ^(q & tm);
    return r;
  endfunction

  initial begin
    repeat (400000) #10;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] cap, v;
    logic [N-1:0] seed, ctl, p, sig, misr_in;
    int crv, k;
    #1 trst_n = 0; #2 trst_n = 1;
    tap_reset_to_rti();
    shift_ir(3, 128'b111, cap);
    check(cap[2:0] == 3'b001, "IR capture 001");
    check(out_oe == '0, "outputs off after reset");

    for (int pass = 0; pass < 3; pass++) begin
      crv = (pass == 0) ? 12 : (pass == 1) ? 8 : 0;
      // control register
      shift_ir(3, 128'b010, cap);
      shift_dr(4, 128'(crv), cap);
      check(cr == 4'(crv), "control register load");
      shift_dr(4, 128'(crv), cap);
      check(cap[3:0] == 4'(crv), "control register read back");
      // preload seed and enables; SAMPLE leaves outputs off
      seed = N'($urandom) | 1;
      ctl = N'($urandom);
      v = {68'b0, ctl, seed, 20'h00000};
      shift_ir(3, 128'b001, cap);
      shift_dr(L, v, cap);
      check(out_oe == '0, "SAMPLE drives nothing");
      // EXTEST
      shift_ir(3, 128'b000, cap);
      check(out == seed && out_oe == ctl, "EXTEST from preload");
      // PRPG alone: one step happens on entering Run-Test/Idle
      shift_ir(3, 128'b011, cap);
      p = ref_step(seed, crv);
      check(out == p, $sformatf("PRPG first step out=%h exp=%h seed=%h", out, p, seed));
      k = 5 + $urandom % 20;
      repeat (k) begin
        tck_only(1'b0);
        p = ref_step(p, crv);
        prpg_steps++;
        check(out == p, $sformatf("PRPG step cr=%0d", crv));
        check((out >> (N - crv)) == (seed >> (N - crv)), "guard bits held");
      end
      // back to a known state: preload seed, signature register cleared
      shift_ir(3, 128'b001, cap);
      shift_dr(L, v, cap);
      // PRPG + SA
      shift_ir(3, 128'b101, cap);
      p = ref_step(seed, crv);
      sig = '0;
      k = 10 + $urandom % 30;
      repeat (k) begin
        misr_in = {p[9:0], p[19:10]} ^ (p << 3) ^ 20'h5A5A5;
        sig = ref_step(sig, 0) ^ misr_in;
        tck_only(1'b0);
        p = ref_step(p, crv);
      end
      // last compression happens on the TCK that leaves Run-Test/Idle
      misr_in = {p[9:0], p[19:10]} ^ (p << 3) ^ 20'h5A5A5;
      sig = ref_step(sig, 0) ^ misr_in;
      shift_dr(L, v, cap);
      check(cap[N-1:0] == sig, $sformatf("signature cr=%0d got %h exp %h", crv, cap[N-1:0], sig));
      check(cap[2*N-1:N] == p, "output cells capture pattern");
    end
    check(prpg_steps > 0, "PRPG stepped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
