// tb_prog_lfsr: for every control value 0..15 steps the programmable-length
// LFSR from a seed and checks that (a) the CR top bits never change, (b) the
// low 20-CR bits come back to the seed after exactly 2^(20-CR)-1 steps and
// not before (maximal length), and (c) with mix=1 the result is the plain
// step XOR the input.
module tb_prog_lfsr;
  localparam int W = 20;
  logic [W-1:0] q, in, nxt;
  logic [3:0] cr;
  logic mix;
  int checks = 0, failures = 0;
  logic clk = 0;

  prog_lfsr dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] seed, lowmask, plain;
    int len, period;
    mix = 0; in = '0;
    for (int c = 15; c >= 0; c--) begin
      cr = 4'(c);
      len = W - c;
      lowmask = (W'(1) << len) - 1;
      seed = W'($urandom);
      if ((seed & lowmask) == 0) seed[0] = 1'b1;
      q = seed;
      period = 0;
      do begin
        #1;
        if ((nxt & ~lowmask) != (seed & ~lowmask)) begin
          failures++; checks++;
          $display("FAIL cr=%0d guard bits changed", c);
          break;
        end
        q = nxt;
        period++;
      end while ((q & lowmask) != (seed & lowmask) && period <= (1 << len));
      checks++;
      if (period != (1 << len) - 1) begin
        failures++;
        $display("FAIL cr=%0d period=%0d exp=%0d", c, period, (1 << len) - 1);
      end
    end
    // signature mode: nxt = step(q) ^ in
    for (int t = 0; t < 200; t++) begin
      cr = 4'($urandom); q = W'($urandom); mix = 0; in = W'($urandom); #1;
      plain = nxt;
      mix = 1; #1;
      checks++;
      if (nxt !== (plain ^ in)) begin failures++; $display("FAIL mix"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
