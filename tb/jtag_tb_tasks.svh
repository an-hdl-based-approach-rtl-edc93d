// jtag_tb_tasks.svh: tester-side TAP tasks shared by the component
// testbenches. Included inside a module that declares logic tck, tms, tdi
// and a tdo input from the device. TMS/TDI change while TCK is low; TDO is
// sampled just before TCK rises. Scans start and end in Run-Test/Idle and
// send bit 0 first.

task automatic tck_cycle(input logic m, input logic d, output logic o);
  tms = m;
  tdi = d;
  #5;
  o = tdo;
  tck = 1;
  #5;
  tck = 0;
  #1;  // let falling-edge logic settle before the caller looks
endtask

task automatic tck_only(input logic m);
  logic o;
  tck_cycle(m, 1'b1, o);
endtask

// Five TMS=1 cycles to Test-Logic-Reset, then to Run-Test/Idle.
task automatic tap_reset_to_rti;
  repeat (5) tck_only(1'b1);
  tck_only(1'b0);
endtask

task automatic shift_ir(input int len, input logic [127:0] v, output logic [127:0] cap);
  logic o;
  cap = '0;
  tck_only(1'b1);  // Select-DR
  tck_only(1'b1);  // Select-IR
  tck_only(1'b0);  // Capture-IR
  tck_only(1'b0);  // Shift-IR
  for (int i = 0; i < len; i++) begin
    tck_cycle(i == len - 1, v[i], o);
    cap[i] = o;
  end
  tck_only(1'b1);  // Update-IR
  tck_only(1'b0);  // Run-Test/Idle
endtask

task automatic shift_dr(input int len, input logic [127:0] v, output logic [127:0] cap);
  logic o;
  cap = '0;
  tck_only(1'b1);  // Select-DR
  tck_only(1'b0);  // Capture-DR
  tck_only(1'b0);  // Shift-DR
  for (int i = 0; i < len; i++) begin
    tck_cycle(i == len - 1, v[i], o);
    cap[i] = o;
  end
  tck_only(1'b1);  // Update-DR
  tck_only(1'b0);  // Run-Test/Idle
endtask
