// tb_listing_segment: runs the published open-fault test program segment
// (addresses 0x69..0xD4: chain 0 of 36 bits, chain 1 of 82 bits, two
// vectors, shift-and-compare with byte-interleaved data/expected/mask and
// "jpe theend") on the BIST processor. The segment's bytes are placed at
// their printed addresses; a short prologue at address 0 brings chain 0 to
// Shift-DR and chain 1 to Run-Test/Idle, as the segment expects, and jumps
// to 0x69. Two copies run side by side: one with fault-free chains (the
// segment must end with the error flag clear), one whose chain 0 has a bit
// stuck at 1 in a checked position (the segment must take the JPE to
// 0x5A7). The chains are behavioural models whose Capture-DR returns the
// last updated vector, which is what an open-fault test reads back from a
// fault-free interconnect in this model.
module tb_listing_segment;
  import jtag_pkg::*;
  import bist_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [7:0] rom [0:2047];
  int checks = 0, failures = 0, deser_g = 0;

  logic [19:0] addr_g, addr_f;
  jtag_drv_t t0_g, t1_g, t0_f, t1_f;
  logic tdo0_g, tdo1_g, tdo0_f, tdo1_f;
  logic de_g, err_g, eot_g, sel_g, so_g, de_f, err_f, eot_f, sel_f, so_f;

  bist_processor good (.clk, .rst_n, .addr(addr_g), .data(rom[addr_g[10:0]]),
    .tap0(t0_g), .tap0_tdo(tdo0_g), .tap1(t1_g), .tap1_tdo(tdo1_g),
    .deser_en(de_g), .error(err_g), .end_of_test(eot_g), .seltap(sel_g),
    .sync_out(so_g), .sync_in(1'b0));
  chain_model #(.L(36)) c0_g (.tck(t0_g.tck), .tms(t0_g.tms), .tdi(t0_g.tdi), .trst_n(t0_g.trst_n), .tdo(tdo0_g));
  chain_model #(.L(82)) c1_g (.tck(t1_g.tck), .tms(t1_g.tms), .tdi(t1_g.tdi), .trst_n(t1_g.trst_n), .tdo(tdo1_g));

  bist_processor bad (.clk, .rst_n, .addr(addr_f), .data(rom[addr_f[10:0]]),
    .tap0(t0_f), .tap0_tdo(tdo0_f), .tap1(t1_f), .tap1_tdo(tdo1_f),
    .deser_en(de_f), .error(err_f), .end_of_test(eot_f), .seltap(sel_f),
    .sync_out(so_f), .sync_in(1'b0));
  chain_model #(.L(36), .STUCK(17)) c0_f (.tck(t0_f.tck), .tms(t0_f.tms), .tdi(t0_f.tdi), .trst_n(t0_f.trst_n), .tdo(tdo0_f));
  chain_model #(.L(82)) c1_f (.tck(t1_f.tck), .tms(t1_f.tms), .tdi(t1_f.tdi), .trst_n(t1_f.trst_n), .tdo(tdo1_f));

  always #5 clk = ~clk;
  always @(posedge clk) if (de_g) deser_g++;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic put(input int a, input logic [7:0] bytes[$]);
    foreach (bytes[i]) rom[a + i] = bytes[i];
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2048; i++) rom[i] = OP_HALT;
    // prologue: chain 0 to Shift-DR, chain 1 to Run-Test/Idle, jump to 0x69
    put(0, '{8'h09, 8'h00, 8'h01, 8'h00, 8'h00, 8'h1B, 8'h09, 8'h00, 8'h1A,
             8'h07, 8'h00, 8'h00, 8'h69});
    // segment as published, 0x69..0xD4
    put('h69, '{8'h02, 8'h00, 8'h24, 8'h04, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h01});
    put('h73, '{8'h1B, 8'h01, 8'h00, 8'h00, 8'h02, 8'h00, 8'h52, 8'h04});
    put('h7B, '{8'hFE, 8'h01, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00});
    put('h86, '{8'h01, 8'h01, 8'h00, 8'h00, 8'h1A, 8'h01, 8'h00, 8'h00, 8'h02, 8'h00, 8'h24, 8'h05});
    put('h92, '{8'h00, 8'hFF, 8'h00, 8'h00, 8'hFF, 8'h00, 8'h0C, 8'hFC, 8'h03,
                8'h00, 8'h03, 8'hFC, 8'h00, 8'h00, 8'h0F});
    put('hA1, '{8'h06, 8'h00, 8'h05, 8'hA7, 8'h01, 8'h1B, 8'h02, 8'h00, 8'h52, 8'h05});
    put('hAB, '{8'hFE, 8'hFF, 8'h00, 8'h01, 8'hFF, 8'h00, 8'h00, 8'hFF, 8'h00,
                8'hF8, 8'hFF, 8'h00, 8'h07, 8'hFF, 8'h00, 8'h00, 8'hFF, 8'h00,
                8'h00, 8'h7F, 8'h80, 8'h00, 8'h80, 8'h7F, 8'hFF, 8'hFF, 8'h00,
                8'h00, 8'hFC, 8'h03, 8'h00, 8'h00, 8'h03});
    put('hCC, '{8'h06, 8'h00, 8'h05, 8'hA7, 8'h01, 8'h01, 8'h00, 8'h00, 8'h1A});
    rom['hD5] = OP_HALT;   // end of the segment
    rom['h5A7] = OP_HALT;  // "theend"

    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    wait (eot_g && eot_f);
    repeat (4) @(posedge clk);
    #1;
    check(err_g == 0, "fault-free board passes the segment");
    check(addr_g == 20'hD6, $sformatf("fault-free run ends after 0xD5 (addr %h)", addr_g));
    check(c0_g.upd == 36'h0000C0000, $sformatf("chain 0 holds vector 2 (%h)", c0_g.upd));
    // vector 2 bytes, first byte in the low bits: FE 01 00 F8 07 00 00 00 FF 00 00
    check(c1_g.upd == 82'({8'h00, 8'h00, 8'hFF, 8'h00, 8'h00, 8'h00, 8'h07, 8'hF8, 8'h00, 8'h01, 8'hFE}),
          "chain 1 holds vector 2");
    check(c0_g.last_scan == 36 && c1_g.last_scan == 82, "scan lengths 36 and 82");
    check(c0_g.scans == 2 && c1_g.scans == 2, "two vectors per chain");
    check(deser_g == 2 * (36 + 82), $sformatf("DeserEn for every compared TCK (%0d)", deser_g));
    check(err_f == 1, "stuck bit detected");
    check(addr_f == 20'h5A8, $sformatf("faulty run stops at theend (addr %h)", addr_f));
    check(c1_f.scans == 1, "faulty run stops before chain 1 vector 2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
