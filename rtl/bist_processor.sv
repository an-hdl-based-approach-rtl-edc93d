// bist_processor: board-level BIST processor for two IEEE 1149.1 chains.
//
// A small controller that reads a test program from an external byte-wide
// memory (A[19:0] out, D[7:0] in, asynchronous read within one clock) and
// turns it into the low-level TAP operations of a board test: TMS state
// steps, bursts of TCK with TMS low (to run component BIST), and scans of N
// bits in which TMS is 0 except on the last bit, so the chain leaves Shift
// for Exit1. Scans can compare the returned bits with expected values under
// a mask; a mismatch sets a sticky error flag that conditional jumps test.
// SS/WS instructions give a simple handshake with other test resources.
//
// Structure follows the processor block diagram: instruction decode and
// control (the FSM in this file), program counter (bist_pc), 16- and 24-bit
// counters (bist_counters), scan out (bist_scan_out), TAP selector
// (bist_tap_sel), scan in (bist_scan_in), status and sync (bist_status_sync).
//
// Timing (this design's choice): TCK is generated from clk, one TCK period
// takes two clk cycles (low, then high), and runs only while an instruction
// needs it. TMS and TDI change while TCK is low; TDO is sampled at the end of
// the high phase, before TCK falls, where a 1149.1 device holds it stable.
// Every program byte costs one clk cycle to read. Cycle counts: TMS0/TMS1
// take 4 clk, SELTAP/SS 2, LD C16 4, LD C24 5, JPE/JPNE 6, NTCK 2+2N,
// NSHF 2 + ceil(N/8) + 2N, NSHFCP 2 + 3*ceil(N/8) + 2N, TRST 2 + TRST_CYCLES.
// deser_en is high during every TCK cycle of a shift-and-compare scan.
// Unknown opcodes are skipped as one-byte no-operations.
module bist_processor
  import jtag_pkg::*;
  import bist_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // program memory
  output logic [ADDR_W-1:0] addr,
  input  logic [7:0]        data,
  // two board BST chains
  output jtag_drv_t         tap0,
  input  logic              tap0_tdo,
  output jtag_drv_t         tap1,
  input  logic              tap1_tdo,
  // status and handshake pins
  output logic              deser_en,
  output logic              error,
  output logic              end_of_test,
  output logic              seltap,
  output logic              sync_out,
  input  logic              sync_in
);

  typedef enum logic [3:0] {
    S_FETCH, S_EXEC, S_OPND, S_JMP, S_LD_DATA, S_LD_EXP, S_LD_MASK,
    S_TCK_LO, S_TCK_HI, S_TRST, S_WAIT, S_HALT
  } state_e;

  typedef enum logic [1:0] { K_TMS, K_SHIFT, K_NTCK } tck_kind_e;

  state_e    state;
  tck_kind_e kind;
  opcode_e   op;
  logic [1:0] nbytes;
  logic [2:0] bitcnt;
  logic [1:0] trst_cnt;
  logic       cp;
  logic       tck_r, tms_r, trst_n_r;

  // control outputs to the datapath blocks
  logic pc_inc, pc_stage, pc_load;
  logic ld16, ld24, dec16, dec24;
  logic so_load, so_shift;
  logic si_ld_exp, si_ld_mask, si_sample;
  logic sel_we, ss_we, halt_set, err_set;

  // status inputs from the datapath blocks
  logic c16_zero, c16_one, c24_zero, c24_one;
  logic [15:0] c16;
  logic [23:0] c24;
  logic sdo, mismatch, sel_tdo, sync_in_s;
  logic [7:0] rx;
  jtag_drv_t drv;

  wire in_tck_cycle = (state == S_TCK_LO) || (state == S_TCK_HI);
  wire is_jump      = (op == OP_JPE) || (op == OP_JPNE);

  // ---------------------------------------------------------------- control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_FETCH;
      kind     <= K_TMS;
      op       <= OP_TMS0;
      nbytes   <= '0;
      bitcnt   <= '0;
      trst_cnt <= '0;
      cp       <= 1'b0;
      tck_r    <= 1'b0;
      tms_r    <= 1'b1;
      trst_n_r <= 1'b1;
    end else begin
      unique case (state)
        S_FETCH: begin
          op    <= opcode_e'(data);
          state <= S_EXEC;
        end
        S_EXEC: begin
          state <= S_FETCH;
          case (op)
            OP_TMS0, OP_TMS1: begin
              tms_r <= op[0];
              kind  <= K_TMS;
              state <= S_TCK_LO;
            end
            OP_LDC16: begin nbytes <= 2'd2; state <= S_OPND; end
            OP_LDC24, OP_JPE, OP_JPNE: begin nbytes <= 2'd3; state <= S_OPND; end
            OP_NSHF, OP_NSHFCP: begin
              cp <= op[0];
              if (!c16_zero) state <= S_LD_DATA;
            end
            OP_NTCK: begin
              tms_r <= 1'b0;
              kind  <= K_NTCK;
              if (!c24_zero) state <= S_TCK_LO;
            end
            OP_TRST: begin
              trst_n_r <= 1'b0;
              trst_cnt <= 2'(TRST_CYCLES - 1);
              state    <= S_TRST;
            end
            OP_WS0, OP_WS1: state <= S_WAIT;
            OP_HALT:        state <= S_HALT;
            default: ;
          endcase
        end
        S_OPND: begin
          nbytes <= nbytes - 1'b1;
          if (nbytes == 2'd1) state <= is_jump ? S_JMP : S_FETCH;
        end
        S_JMP:     state <= S_FETCH;
        S_LD_DATA: begin
          bitcnt <= '0;
          kind   <= K_SHIFT;
          state  <= cp ? S_LD_EXP : S_TCK_LO;
        end
        S_LD_EXP:  state <= S_LD_MASK;
        S_LD_MASK: state <= S_TCK_LO;
        S_TCK_LO: begin
          tck_r <= 1'b1;
          state <= S_TCK_HI;
        end
        S_TCK_HI: begin
          tck_r <= 1'b0;
          unique case (kind)
            K_TMS:   state <= S_FETCH;
            K_NTCK:  state <= c24_one ? S_FETCH : S_TCK_LO;
            K_SHIFT: begin
              bitcnt <= bitcnt + 1'b1;
              if (c16_one)             state <= S_FETCH;
              else if (bitcnt == 3'd7) state <= S_LD_DATA;
              else                     state <= S_TCK_LO;
            end
            default: state <= S_FETCH;
          endcase
        end
        S_TRST: begin
          trst_cnt <= trst_cnt - 1'b1;
          if (trst_cnt == '0) begin
            trst_n_r <= 1'b1;
            state    <= S_FETCH;
          end
        end
        S_WAIT: if (sync_in_s == op[0]) state <= S_FETCH;
        S_HALT: ;
        default: state <= S_FETCH;
      endcase
    end
  end

  always_comb begin
    pc_inc     = (state == S_FETCH) || (state == S_OPND) || (state == S_LD_DATA)
              || (state == S_LD_EXP) || (state == S_LD_MASK);
    pc_stage   = (state == S_OPND) && is_jump;
    pc_load    = (state == S_JMP) && ((op == OP_JPE) ? error : !error);
    ld16       = (state == S_OPND) && (op == OP_LDC16);
    ld24       = (state == S_OPND) && (op == OP_LDC24);
    si_sample  = (state == S_TCK_HI) && (kind == K_SHIFT);
    dec16      = si_sample;
    dec24      = (state == S_TCK_HI) && (kind == K_NTCK);
    so_load    = (state == S_LD_DATA);
    so_shift   = si_sample;
    si_ld_exp  = (state == S_LD_EXP);
    si_ld_mask = (state == S_LD_MASK);
    sel_we     = (state == S_EXEC) && ((op == OP_SELTAP0) || (op == OP_SELTAP1));
    ss_we      = (state == S_EXEC) && ((op == OP_SS0) || (op == OP_SS1));
    halt_set   = (state == S_EXEC) && (op == OP_HALT);
    err_set    = mismatch && cp;
    deser_en   = in_tck_cycle && (kind == K_SHIFT) && cp;

    drv.tck    = tck_r;
    drv.tms    = (kind == K_SHIFT) ? c16_one : tms_r;
    drv.tdi    = sdo;
    drv.trst_n = trst_n_r;
  end

  // --------------------------------------------------------------- datapath
  bist_pc #(.AW(ADDR_W)) u_pc (
    .clk, .rst_n, .d(data), .inc(pc_inc), .stage_en(pc_stage), .load(pc_load),
    .pc(addr)
  );

  bist_counters #(.W16(C16_W), .W24(C24_W)) u_cnt (
    .clk, .rst_n, .d(data), .ld16, .ld24, .dec16, .dec24,
    .c16, .c24, .c16_zero, .c16_one, .c24_zero, .c24_one
  );

  bist_scan_out u_so (
    .clk, .rst_n, .d(data), .load(so_load), .shift(so_shift), .sdo
  );

  bist_tap_sel u_sel (
    .clk, .rst_n, .sel_we, .sel_val(op[0]), .drv,
    .tdo0(tap0_tdo), .tdo1(tap1_tdo), .tap0, .tap1, .tdo(sel_tdo), .seltap
  );

  bist_scan_in u_si (
    .clk, .rst_n, .d(data), .ld_exp(si_ld_exp), .ld_mask(si_ld_mask),
    .sample(si_sample), .tdo(sel_tdo), .mismatch, .rx
  );

  bist_status_sync u_st (
    .clk, .rst_n, .err_set, .halt_set, .ss_we, .ss_val(op[0]), .sync_in,
    .error, .end_of_test, .sync_out, .sync_in_s
  );

  // ------------------------------------------------------------- assertions
  // Once halted, the processor stays halted until reset.
  a_halt_sticky: assert property (@(posedge clk) disable iff (!rst_n)
    state == S_HALT |=> state == S_HALT);
  // TCK is high only in the high phase of a TCK cycle.
  a_tck_phase: assert property (@(posedge clk) disable iff (!rst_n)
    tck_r |-> state == S_TCK_HI);
  // /TRST is never asserted while TCK pulses.
  a_trst_quiet: assert property (@(posedge clk) disable iff (!rst_n)
    !trst_n_r |-> !tck_r);

endmodule
