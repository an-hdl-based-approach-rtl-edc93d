// tb_bist_status_sync: checks the sticky error and end-of-test flags, the
// synchronism output write and the two-clock latency of the synchronism
// input, against a model in the testbench.
module tb_bist_status_sync;
  logic clk = 0, rst_n = 0;
  logic err_set = 0, halt_set = 0, ss_we = 0, ss_val = 0, sync_in = 0;
  logic error, end_of_test, sync_out, sync_in_s;
  int checks = 0, failures = 0;

  bist_status_sync dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic me, mh, ms;
    logic [1:0] pipe;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    me = 0; mh = 0; ms = 0; pipe = 0;
    for (int t = 0; t < 400; t++) begin
      err_set  = (t > 100) && (($urandom % 50) == 0);
      halt_set = (t > 200) && (($urandom % 80) == 0);
      ss_we    = ($urandom % 5) == 0;
      ss_val   = $urandom;
      sync_in  = $urandom;
      @(negedge clk);
      if (err_set) me = 1;
      if (halt_set) mh = 1;
      if (ss_we) ms = ss_val;
      pipe = {pipe[0], sync_in};
      checks++;
      if (error !== me || end_of_test !== mh || sync_out !== ms || sync_in_s !== pipe[1]) begin
        failures++;
        $display("FAIL t=%0d err=%b/%b eot=%b/%b so=%b/%b si=%b/%b", t, error, me,
                 end_of_test, mh, sync_out, ms, sync_in_s, pipe[1]);
      end
    end
    checks++;
    if (!me || !mh) begin failures++; $display("FAIL flags never set"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
