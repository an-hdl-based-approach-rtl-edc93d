// tb_bist_tap_sel: checks that the selected chain gets the driven signals,
// the other chain sits at TCK=0/TMS=1/TDI=1/TRST_n=1, and TDO comes from
// the selected chain.
module tb_bist_tap_sel;
  import jtag_pkg::*;
  logic clk = 0, rst_n = 0;
  logic sel_we = 0, sel_val = 0, tdo0 = 0, tdo1 = 0, tdo, seltap;
  jtag_drv_t drv, tap0, tap1;
  int checks = 0, failures = 0;
  localparam jtag_drv_t IDLE_EXP = 4'b0111;

  bist_tap_sel dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic s;
    drv = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    s = 0;
    for (int t = 0; t < 300; t++) begin
      sel_we = ($urandom % 4) == 0;
      sel_val = $urandom;
      @(negedge clk);
      if (sel_we) s = sel_val;
      sel_we = 0;
      drv = 4'($urandom);
      tdo0 = $urandom; tdo1 = $urandom;
      #1;
      checks++;
      if (seltap !== s || tap0 !== (s ? IDLE_EXP : drv) || tap1 !== (s ? drv : IDLE_EXP)
          || tdo !== (s ? tdo1 : tdo0)) begin
        failures++;
        $display("FAIL t=%0d sel=%b seltap=%b tap0=%b tap1=%b drv=%b", t, s, seltap, tap0, tap1, drv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
