// bist_status_sync: status and synchronism block of the BIST processor.
// error is the sticky error flag: set by any compare mismatch (err_set),
// cleared only by reset; JPE/JPNE test it and it is brought out as the error
// pin. end_of_test is set by HALT. sync_out is written by SS0/SS1 (ss_we,
// ss_val). sync_in comes from another test resource with its own timing, so
// it passes two flip-flops before the control sees it as sync_in_s. That
// synchroniser, and clearing the error flag only at reset, are this design's
// choices. Synchronous to clk, asynchronous active-low reset.
module bist_status_sync (
  input  logic clk,
  input  logic rst_n,
  input  logic err_set,
  input  logic halt_set,
  input  logic ss_we,
  input  logic ss_val,
  input  logic sync_in,
  output logic error,
  output logic end_of_test,
  output logic sync_out,
  output logic sync_in_s
);

  logic sync_meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      error       <= 1'b0;
      end_of_test <= 1'b0;
      sync_out    <= 1'b0;
      sync_meta   <= 1'b0;
      sync_in_s   <= 1'b0;
    end else begin
      if (err_set)  error       <= 1'b1;
      if (halt_set) end_of_test <= 1'b1;
      if (ss_we)    sync_out    <= ss_val;
      sync_meta <= sync_in;
      sync_in_s <= sync_meta;
    end
  end

endmodule
