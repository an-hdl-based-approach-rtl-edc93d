// tb_bist_pc: checks the program counter's increment, the three-byte jump
// staging (most significant byte first) and the one-clock load, against
// values computed in the testbench.
module tb_bist_pc;
  logic clk = 0, rst_n = 0;
  logic [7:0] d = '0;
  logic inc = 0, stage_en = 0, load = 0;
  logic [19:0] pc;
  int checks = 0, failures = 0;

  bist_pc dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic [19:0] exp, input string what);
    checks++;
    if (pc !== exp) begin
      failures++;
      $display("FAIL %s: pc=%h exp=%h", what, pc, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [19:0] model;
    logic [23:0] tgt;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(20'h0, "reset");
    model = 0;
    for (int i = 0; i < 200; i++) begin
      inc = ($urandom % 3) != 0;
      @(negedge clk);
      if (inc) model = model + 1;
      check(model, "inc");
    end
    inc = 0;
    for (int j = 0; j < 50; j++) begin
      tgt = $urandom;
      for (int b = 2; b >= 0; b--) begin
        d = tgt[8*b +: 8];
        stage_en = 1; inc = 1;
        @(negedge clk);
        model = model + 1;
        check(model, "inc while staging");
      end
      stage_en = 0; inc = 0; load = 1;
      @(negedge clk);
      load = 0;
      model = tgt[19:0];
      check(model, "jump load");
    end
    // load has priority over inc
    d = 8'h00; stage_en = 1; @(negedge clk); @(negedge clk); d = 8'h42; @(negedge clk);
    stage_en = 0; load = 1; inc = 1; @(negedge clk); load = 0; inc = 0;
    check(20'h00042, "load over inc");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
