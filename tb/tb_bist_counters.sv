// tb_bist_counters: loads C16 and C24 byte by byte (most significant byte
// first), counts them down and checks values and the zero / last-unit flags
// against a model in the testbench; also checks that a count stops at zero.
module tb_bist_counters;
  logic clk = 0, rst_n = 0;
  logic [7:0] d = '0;
  logic ld16 = 0, ld24 = 0, dec16 = 0, dec24 = 0;
  logic [15:0] c16;
  logic [23:0] c24;
  logic c16_zero, c16_one, c24_zero, c24_one;
  int checks = 0, failures = 0;

  bist_counters dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic [15:0] e16, input logic [23:0] e24, input string what);
    checks++;
    if (c16 !== e16 || c24 !== e24 || c16_zero !== (e16 == 0) || c16_one !== (e16 == 1)
        || c24_zero !== (e24 == 0) || c24_one !== (e24 == 1)) begin
      failures++;
      $display("FAIL %s: c16=%0d/%0d c24=%0d/%0d", what, c16, e16, c24, e24);
    end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] m16;
    logic [23:0] m24;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(0, 0, "reset");
    for (int t = 0; t < 20; t++) begin
      m16 = (t < 3) ? 16'(t) : 16'($urandom % 40);
      m24 = (t < 3) ? 24'(t + 1) : 24'($urandom % 50);
      ld16 = 1; d = m16[15:8]; @(negedge clk); d = m16[7:0]; @(negedge clk); ld16 = 0;
      ld24 = 1; d = m24[23:16]; @(negedge clk); d = m24[15:8]; @(negedge clk);
      d = m24[7:0]; @(negedge clk); ld24 = 0;
      check(m16, m24, "load");
      for (int k = 0; k < 60; k++) begin
        dec16 = $urandom % 2;
        dec24 = $urandom % 2;
        @(negedge clk);
        if (dec16 && m16 != 0) m16--;
        if (dec24 && m24 != 0) m24--;
        check(m16, m24, "count");
      end
      dec16 = 0; dec24 = 0;
    end
    // large value
    ld24 = 1; d = 8'hAB; @(negedge clk); d = 8'hCD; @(negedge clk); d = 8'hEF; @(negedge clk);
    ld24 = 0;
    check(m16, 24'hABCDEF, "24-bit load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
