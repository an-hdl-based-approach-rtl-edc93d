// prog_lfsr: next-state logic of a programmable-length LFSR.
// The register is W bits long (20, one bit per output pin of the LFSR
// component). The control value cr says how many of the top bits are not part
// of the pseudo-random pattern generator: the LFSR is q[L-1:0] with
// L = W - cr, and bits q[W-1:L] keep their value, so guarding values loaded
// there stay on their pins. That rule is the document's; cr may be 0..15.
// The LFSR is a Fibonacci type: q[i] takes q[i-1], q[0] takes the XOR of the
// tap bits of a primitive polynomial of degree L, so every non-zero start
// state runs through all 2^L - 1 non-zero states (all-zero stays zero). The
// polynomials are not in the document; the standard table of primitive
// trinomials/pentanomials is used (taps listed per degree below).
// With mix = 1 the step also XORs in[] into the next state, which turns the
// register into a multiple-input signature register for signature analysis.
// Purely combinational.
module prog_lfsr #(
  parameter int unsigned W = 20
) (
  input  logic [W-1:0] q,
  input  logic [3:0]   cr,
  input  logic         mix,
  input  logic [W-1:0] in,
  output logic [W-1:0] nxt
);

  // Bit t-1 set for every tap t of a primitive polynomial of degree len.
  function automatic logic [19:0] taps(input int unsigned len);
    unique case (len)
      5:  taps = 20'b1 << 4  | 20'b1 << 2;
      6:  taps = 20'b1 << 5  | 20'b1 << 4;
      7:  taps = 20'b1 << 6  | 20'b1 << 5;
      8:  taps = 20'b1 << 7  | 20'b1 << 5  | 20'b1 << 4 | 20'b1 << 3;
      9:  taps = 20'b1 << 8  | 20'b1 << 4;
      10: taps = 20'b1 << 9  | 20'b1 << 6;
      11: taps = 20'b1 << 10 | 20'b1 << 8;
      12: taps = 20'b1 << 11 | 20'b1 << 5  | 20'b1 << 3 | 20'b1 << 0;
      13: taps = 20'b1 << 12 | 20'b1 << 3  | 20'b1 << 2 | 20'b1 << 0;
      14: taps = 20'b1 << 13 | 20'b1 << 4  | 20'b1 << 2 | 20'b1 << 0;
      15: taps = 20'b1 << 14 | 20'b1 << 13;
      16: taps = 20'b1 << 15 | 20'b1 << 14 | 20'b1 << 12 | 20'b1 << 3;
      17: taps = 20'b1 << 16 | 20'b1 << 13;
      18: taps = 20'b1 << 17 | 20'b1 << 10;
      19: taps = 20'b1 << 18 | 20'b1 << 5  | 20'b1 << 1 | 20'b1 << 0;
      20: taps = 20'b1 << 19 | 20'b1 << 16;
      default: taps = '0;
    endcase
  endfunction

  int unsigned len;
  logic [W-1:0] tmask;
  logic         fb;

  always_comb begin
    len   = W - int'(cr);
    tmask = W'(taps(len));
    fb    = ^(q & tmask);
    nxt   = q;
    for (int i = 0; i < W; i++) begin
      if (i == 0)        nxt[i] = fb;
      else if (i < len)  nxt[i] = q[i-1];
    end
    if (mix) nxt = nxt ^ in;
  end

endmodule
