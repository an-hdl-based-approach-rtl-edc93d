// bist_counters: the 16-bit and 24-bit counters of the BIST processor.
// C16 holds N, the number of bits an NSHF/NSHFCP instruction shifts; C24
// holds N, the number of TCK cycles of an NTCK instruction. Each is loaded
// by LD C16 / LD C24 from the data bus, one byte per clock, most significant
// byte first (ld16 / ld24 shift a byte in). The processor counts them down
// while it executes (dec16 / dec24), so a count is spent by the instruction
// that uses it; the published program reloads C16 before every shift, which
// agrees with this reading. Flags tell the control when a count is zero or is
// at its last unit (c16_one: the bit now being shifted is the last one, so
// TMS must be 1). Synchronous to clk, asynchronous active-low reset to 0.
module bist_counters #(
  parameter int unsigned W16 = 16,
  parameter int unsigned W24 = 24
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [7:0]     d,
  input  logic           ld16,
  input  logic           ld24,
  input  logic           dec16,
  input  logic           dec24,
  output logic [W16-1:0] c16,
  output logic [W24-1:0] c24,
  output logic           c16_zero,
  output logic           c16_one,
  output logic           c24_zero,
  output logic           c24_one
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c16 <= '0;
      c24 <= '0;
    end else begin
      if (ld16)                  c16 <= {c16[W16-9:0], d};
      else if (dec16 && !c16_zero) c16 <= c16 - 1'b1;
      if (ld24)                  c24 <= {c24[W24-9:0], d};
      else if (dec24 && !c24_zero) c24 <= c24 - 1'b1;
    end
  end

  assign c16_zero = (c16 == '0);
  assign c16_one  = (c16 == W16'(1));
  assign c24_zero = (c24 == '0);
  assign c24_one  = (c24 == W24'(1));

endmodule
