// bist_scan_out: serialiser for the data shifted into a BST chain.
// The processor loads one program byte (load) and then sends its bits to the
// selected chain's TDI, least significant bit first (shift moves the next bit
// to sdo). Bit order within a byte is not stated in the document and is this
// design's choice. Bits shifted in from the top are 1, so TDI idles high.
// Synchronous to clk, asynchronous active-low reset to all ones.
module bist_scan_out (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] d,
  input  logic       load,
  input  logic       shift,
  output logic       sdo
);

  logic [7:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     sr <= '1;
    else if (load)  sr <= d;
    else if (shift) sr <= {1'b1, sr[7:1]};
  end

  assign sdo = sr[0];

endmodule
