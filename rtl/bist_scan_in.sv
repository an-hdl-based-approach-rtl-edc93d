// bist_scan_in: compares the bits coming back from a BST chain.
// For NSHFCP the program holds, per 8 bits, a data byte, an expected byte and
// a mask byte. This block holds the expected (ld_exp) and mask (ld_mask)
// bytes and, on each sample, compares the chain's TDO with the current
// expected bit. A mask bit of 1 means the bit is checked, 0 that it is a
// don't care; the published program's masks (0F on the last, half-used byte
// of a 36-bit chain, 03 on that of an 82-bit chain) show this polarity.
// mismatch is combinational and valid while sample is high; the
// registers then move to the next bit (LSB first, like bist_scan_out). The
// last eight sampled bits are kept in rx for observation.
module bist_scan_in (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] d,
  input  logic       ld_exp,
  input  logic       ld_mask,
  input  logic       sample,
  input  logic       tdo,
  output logic       mismatch,
  output logic [7:0] rx
);

  logic [7:0] exp_r, mask_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      exp_r  <= '0;
      mask_r <= '0;
      rx     <= '0;
    end else begin
      if (ld_exp)       exp_r  <= d;
      else if (sample)  exp_r  <= {1'b0, exp_r[7:1]};
      if (ld_mask)      mask_r <= d;
      else if (sample)  mask_r <= {1'b0, mask_r[7:1]};
      if (sample)       rx     <= {tdo, rx[7:1]};
    end
  end

  assign mismatch = sample && mask_r[0] && (tdo != exp_r[0]);

endmodule
