// tb_bist_scan_out: loads random bytes and checks that they leave on sdo
// least significant bit first, with ones following.
module tb_bist_scan_out;
  logic clk = 0, rst_n = 0;
  logic [7:0] d = '0;
  logic load = 0, shift = 0, sdo;
  int checks = 0, failures = 0;

  bist_scan_out dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] v;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (sdo !== 1'b1) begin failures++; $display("FAIL reset level"); end
    for (int t = 0; t < 100; t++) begin
      v = $urandom;
      d = v; load = 1; @(negedge clk); load = 0;
      for (int b = 0; b < 10; b++) begin
        checks++;
        if (sdo !== ((b < 8) ? v[b] : 1'b1)) begin
          failures++;
          $display("FAIL byte %h bit %0d: sdo=%b", v, b, sdo);
        end
        // an idle cycle must not move the register
        if ($urandom % 4 == 0) @(negedge clk);
        shift = 1; @(negedge clk); shift = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
