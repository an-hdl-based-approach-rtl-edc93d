// chain_model: behavioural stand-in for one board BST chain, used by the
// processor testbench. It follows the 1149.1 TAP state diagram on its own
// (states numbered in diagram order), has an L-bit data register that
// captures its own update latch in Capture-DR, shifts in Shift-DR (bit 0 to
// TDO, changed on falling TCK) and updates in Update-DR. It counts TCK
// cycles, Run-Test/Idle cycles, /TRST pulses, and records the length of the
// last scan, so a testbench can check what the tester did. STUCK >= 0
// makes that register bit capture 1 whatever was loaded (a board fault).
module chain_model #(
  parameter int L = 16,
  parameter int STUCK = -1
) (
  input  logic tck,
  input  logic tms,
  input  logic tdi,
  input  logic trst_n,
  output logic tdo
);
  int st = 0;
  logic [L-1:0] sr = '0, upd = '0;
  int tcks = 0, rti_cycles = 0, trsts = 0, bits = 0, last_scan = 0, scans = 0;

  function automatic int nxt(int s, logic m);
    int t1[16] = '{0, 2, 9, 5, 5, 8, 7, 8, 2, 0, 12, 12, 15, 14, 15, 2};
    int t0[16] = '{1, 1, 3, 4, 4, 6, 6, 4, 1, 10, 11, 11, 13, 13, 11, 1};
    return m ? t1[s] : t0[s];
  endfunction

  always @(negedge trst_n) begin
    trsts++;
    st = 0;
  end

  always @(posedge tck) begin
    tcks++;
    if (st == 1) rti_cycles++;
    if (st == 3) begin sr = upd; if (STUCK >= 0) sr[STUCK] = 1'b1; bits = 0; end
    else if (st == 4) begin sr = {tdi, sr[L-1:1]}; bits++; end
    st = nxt(st, tms);
    if (st == 5 && bits > 0) begin last_scan = bits; scans++; bits = 0; end
  end

  always @(negedge tck) begin
    if (st == 8) upd = sr;
    tdo = (st == 4) ? sr[0] : 1'b1;
  end

  initial tdo = 1'b1;
endmodule
