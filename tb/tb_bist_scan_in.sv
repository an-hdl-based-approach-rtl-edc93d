// tb_bist_scan_in: loads expected and mask bytes, feeds random TDO bits and
// checks the mismatch output bit by bit (mask 1 = compare) and the received
// byte, against the testbench's own comparison.
module tb_bist_scan_in;
  logic clk = 0, rst_n = 0;
  logic [7:0] d = '0;
  logic ld_exp = 0, ld_mask = 0, sample = 0, tdo = 0, mismatch;
  logic [7:0] rx;
  int checks = 0, failures = 0, seen_mm = 0;

  bist_scan_in dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] e, m, got;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      e = $urandom; m = $urandom;
      d = e; ld_exp = 1; @(negedge clk); ld_exp = 0;
      d = m; ld_mask = 1; @(negedge clk); ld_mask = 0;
      for (int b = 0; b < 8; b++) begin
        got[b] = (t % 3 == 0) ? e[b] : 1'($urandom);
        tdo = got[b]; #1;
        checks++;
        if (mismatch !== 1'b0) begin failures++; $display("FAIL mismatch without sample"); end
        sample = 1; #1;
        checks++;
        if (mismatch !== (m[b] && (got[b] != e[b]))) begin
          failures++;
          $display("FAIL t=%0d bit %0d exp=%b mask=%b tdo=%b mm=%b", t, b, e[b], m[b], got[b], mismatch);
        end
        if (mismatch) seen_mm++;
        @(negedge clk); sample = 0;
      end
      checks++;
      if (rx !== got) begin failures++; $display("FAIL rx=%h exp %h", rx, got); end
    end
    checks++;
    if (seen_mm == 0) begin failures++; $display("FAIL no mismatch ever seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
