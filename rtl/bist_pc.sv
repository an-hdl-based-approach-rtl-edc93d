// bist_pc: program counter of the board-level BIST processor.
// A 20-bit counter addresses up to 1 Mbyte of test program, as the document
// gives. It increments once per byte fetched (inc). A jump target arrives on
// the 8-bit data bus as three bytes, most significant first; each byte is
// shifted into a staging register (stage_en) so that the counter can keep
// addressing the operand bytes, and load copies the low 20 bits of the
// staging register into the counter in one clock. The staging register is
// this design's choice; the document shows only the data bus entering the
// counter. Synchronous to clk, asynchronous active-low reset to address 0.
module bist_pc #(
  parameter int unsigned AW = 20
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [7:0]    d,
  input  logic          inc,
  input  logic          stage_en,
  input  logic          load,
  output logic [AW-1:0] pc
);

  logic [23:0] stage;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc    <= '0;
      stage <= '0;
    end else begin
      if (stage_en) stage <= {stage[15:0], d};
      if (load)     pc    <= stage[AW-1:0];
      else if (inc) pc    <= pc + 1'b1;
    end
  end

endmodule
