// tb_prim_io_bst: drives the primary I/O test component through its TAP.
// Checks the IR capture value, BYPASS (one-bit path), SAMPLE capture of all
// 10 input and 26 bidirectional pins in the documented cell order, PRELOAD
// followed by EXTEST driving io_out/io_oe with individual enables, drivers
// off outside EXTEST, control cells capturing their update stage, and
// /TRST. Expected values are built here from the cell layout.
module tb_prim_io_bst;
  localparam int N_IN = 10, N_IO = 26, L = N_IN + 2 * N_IO;
  logic tck = 0, tms = 1, tdi = 1, trst_n = 1;
  logic tdo, tdo_oe;
  logic [N_IN-1:0] in;
  logic [N_IO-1:0] io_in, io_out, io_oe;
  int checks = 0, failures = 0;

  prim_io_bst dut (.*);

  `include "jtag_tb_tasks.svh"

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) #10;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] cap, v, expv;
    logic [N_IO-1:0] dat, ctl;
    in = '0; io_in = '0;
    #1 trst_n = 0; #2 trst_n = 1;
    check(io_oe == '0, "drivers off after reset");
    tap_reset_to_rti();

    // IR capture is 01; instruction after reset is BYPASS
    shift_ir(2, 128'b11, cap);
    check(cap[1:0] == 2'b01, "IR capture 01");
    v = 128'($urandom) << 64 | 128'($urandom);
    shift_dr(40, v, cap);
    check(cap[0] == 1'b0 && cap[39:1] == v[38:0], "BYPASS one-bit delay");

    for (int t = 0; t < 10; t++) begin
      // SAMPLE
      in = N_IN'($urandom); io_in = N_IO'($urandom);
      shift_ir(2, 128'b01, cap);
      dat = N_IO'($urandom); ctl = N_IO'($urandom);
      v = '0;
      for (int k = 0; k < N_IO; k++) begin
        v[N_IN + 2*k] = dat[k];
        v[N_IN + 2*k + 1] = ctl[k];
      end
      shift_dr(L, v, cap);  // captures pins, preloads dat/ctl
      expv = '0;
      for (int i = 0; i < N_IN; i++) expv[i] = in[i];
      for (int k = 0; k < N_IO; k++) expv[N_IN + 2*k] = io_in[k];
      for (int i = 0; i < L; i++)
        if (i < N_IN || ((i - N_IN) % 2 == 0))
          check(cap[i] == expv[i], $sformatf("SAMPLE bit %0d", i));
      check(io_oe == '0, "no drive in SAMPLE after preload");
      // EXTEST: the preloaded values appear at once
      shift_ir(2, 128'b00, cap);
      check(io_out == dat, "EXTEST data from preload");
      check(io_oe == ctl, "EXTEST individual enables");
      // control cells capture their update stage
      shift_dr(L, v, cap);
      for (int k = 0; k < N_IO; k++)
        check(cap[N_IN + 2*k + 1] == ctl[k], "control cell capture");
      // new EXTEST vector
      dat = N_IO'($urandom); ctl = N_IO'($urandom);
      for (int k = 0; k < N_IO; k++) begin
        v[N_IN + 2*k] = dat[k];
        v[N_IN + 2*k + 1] = ctl[k];
      end
      shift_dr(L, v, cap);
      check(io_out == dat && io_oe == ctl, "EXTEST update");
    end
    // /TRST turns drivers off and returns to BYPASS
    trst_n = 0; #1;
    check(io_oe == '0, "TRST drivers off");
    trst_n = 1;
    tck_only(1'b0);
    shift_dr(8, 128'hA5, cap);
    check(cap[0] == 1'b0 && cap[7:1] == 7'h25, "BYPASS after TRST");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
