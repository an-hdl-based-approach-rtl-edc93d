// tb_tap_controller: walks the TAP controller with random TMS and compares
// its state with a reference state machine written here from the 1149.1
// state diagram (states numbered in diagram order, independent of the
// design's encoding). Also checks asynchronous /TRST and that five TCKs with
// TMS high reach Test-Logic-Reset from every state.
module tb_tap_controller;
  import jtag_pkg::*;
  logic tck = 0, trst_n = 1, tms = 1;
  tap_state_e state;
  int checks = 0, failures = 0;
  int visited[16];

  tap_controller dut (.*);

  // reference: 0 TLR 1 RTI 2 SelDR 3 CapDR 4 ShDR 5 Ex1DR 6 PauDR 7 Ex2DR
  // 8 UpdDR 9 SelIR 10 CapIR 11 ShIR 12 Ex1IR 13 PauIR 14 Ex2IR 15 UpdIR
  function automatic int ref_next(int s, logic m);
    int t1[16] = '{0, 2, 9, 5, 5, 8, 7, 8, 2, 0, 12, 12, 15, 14, 15, 2};
    int t0[16] = '{1, 1, 3, 4, 4, 6, 6, 4, 1, 10, 11, 11, 13, 13, 11, 1};
    return m ? t1[s] : t0[s];
  endfunction

  function automatic tap_state_e enc(int s);
    tap_state_e e[16] = '{TLR, RTI, SEL_DR, CAP_DR, SH_DR, EX1_DR, PAU_DR, EX2_DR,
                          UPD_DR, SEL_IR, CAP_IR, SH_IR, EX1_IR, PAU_IR, EX2_IR, UPD_IR};
    return e[s];
  endfunction

  task automatic pulse;
    #5 tck = 1; #5 tck = 0;
  endtask

  initial begin
    repeat (40000) #10;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s;
    #1 trst_n = 0;
    #2 trst_n = 1;
    s = 0;
    checks++; if (state !== TLR) begin failures++; $display("FAIL reset"); end
    for (int t = 0; t < 5000; t++) begin
      tms = ($urandom % 3) == 0;
      pulse();
      s = ref_next(s, tms);
      visited[s]++;
      checks++;
      if (state !== enc(s)) begin
        failures++;
        $display("FAIL t=%0d state=%h exp=%h", t, state, enc(s));
      end
      if (t % 500 == 250) begin
        trst_n = 0; #1;
        checks++; if (state !== TLR) begin failures++; $display("FAIL async trst"); end
        trst_n = 1; s = 0;
      end
    end
    for (int st = 0; st < 16; st++) begin
      checks++;
      if (visited[st] == 0) begin failures++; $display("FAIL state %0d never reached", st); end
    end
    // five TMS=1 cycles from any state
    for (int t = 0; t < 50; t++) begin
      tms = 0;
      repeat ($urandom % 7) begin tms = $urandom; pulse(); end
      tms = 1;
      repeat (5) pulse();
      checks++;
      if (state !== TLR) begin failures++; $display("FAIL five TMS=1"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
