# Board-level BIST for IEEE 1149.1 boards

A board whose chips have boundary scan (IEEE 1149.1, "JTAG") can be tested through its scan
chains. Two things usually stop that test from running on the board itself. First, scan
reaches only the pins of BST chips, so primary I/O pins, non-BST clusters and analog nodes
stay out of reach. Second, somebody has to drive the TAP. This RTL fills both gaps with a
small kit of board-level testability chips:

| block | module | what it is |
|---|---|---|
| BIST processor | `bist_processor` | Runs a stored test program. It drives two scan chains with TAP operations, compares the responses and keeps an error flag. |
| primary I/O test component | `prim_io_bst` | A 1149.1 chip with no core logic. Its boundary cells cover 10 input pins and 26 bidirectional pins, each with its own tristate control. |
| LFSR component | `lfsr_pld` | A 1149.1 chip for testing non-BST combinational clusters. It has 20 outputs that generate pseudo-random patterns (PRPG) and 20 inputs that form a signature (SA). The generator length is set by a 4-bit control register. |
| analog I/O interface controller | `analog_io_ctrl` | A 1149.1 chip between the scan chain and one A/D and one D/A converter, serving 16 analog inputs and 16 analog outputs. A/D results are Gray-coded, so the tester can check a tolerance window with a plain bit mask. |

The design follows the architecture, instruction set and component features of the
publication *An HDL-Based Approach to BIST of 1149.1-Compatible Boards*. That publication
was written for medium-size PLDs. It publishes the instruction set and part of the opcode
map, but no register-level detail. Everything below that level is this design's own choice:
encodings, cell layouts, timing and handshakes. The section "What is fixed and what was
chosen" lists these choices. Each RTL file also says in its opening comment what it follows
and what it chooses.

## System view (`board_bist_top`)

```
            A[19:0] / D[7:0]                        program memory (outside)
                  |
          +-------+--------+  TAP 0   +------------------+   +-----------+
 clk ---->|    BIST        |--------->| analog_io_ctrl   |-->| lfsr_pld  |--+
 rst_n -->|  processor     |<----------------------------------------------+ TDO
          |                |  TAP 1   +------------------+
          |                |--------->| prim_io_bst      |--+
          |                |<-----------------------------+ TDO
          +----------------+
   sync_out ---> analog soc_req        analog eoc_out (| ext_sync_in) ---> sync_in
```

- All chain devices are clocked by the TCK that the processor generates.
- Chain 1 holds the primary I/O component. On a real board, this is the chain that is
  extended across the edge connector.
- The placement of the other two chips on chain 0 is an example. On a real board, more
  1149.1 devices share both chains.
- The processor's synchronism output is the A/D start request. The controller's
  end-of-conversion output is the processor's synchronism input. A test program starts a
  conversion and waits for it with `SS1; WS1; SS0; WS0`.
- The program memory, converters, analog multiplexers and pad tristate buffers are outside
  the top. Their signals are ports.
- Every bidirectional pin is split into `*_in`, `*_out` and `*_oe` signals.

## The BIST processor

### Why this instruction set

Board tests through scan break down into three low-level TAP operations:

- TMS steps that move every TAP in a chain to another state.
- Bursts of TCK with TMS held low, which let component self-tests run in Run-Test/Idle.
- Scans of N bits. TMS stays low except on the last bit, which takes the chain from
  Shift-xR to Exit1-xR.

The processor has one instruction for each of these operations. It adds loop counters,
conditional jumps on an error flag, a two-chain selector and a one-wire handshake.

### Instructions

Operands follow the opcode. Multi-byte operands are stored most significant byte first.

| opcode | mnemonic | operands | action | clk cycles |
|---|---|---|---|---|
| 00 / 01 | `TMS0` / `TMS1` | - | one TCK with TMS = 0 / 1 | 4 |
| 02 | `LD C16,n` | 2 bytes | load the 16-bit scan-length counter | 4 |
| 03 | `LD C24,n` | 3 bytes | load the 24-bit clock counter | 5 |
| 04 | `NSHF` | ceil(N/8) data bytes | shift N = C16 bits in; nothing is compared | 2 + ceil(N/8) + 2N |
| 05 | `NSHFCP` | ceil(N/8) × (data, expected, mask) | shift N bits in and compare the bits coming out | 2 + 3·ceil(N/8) + 2N |
| 06 / 07 | `JPE a` / `JPNE a` | 3-byte address (20 bits used) | jump if the error flag is set / clear | 6 |
| 08 | `NTCK` | - | N = C24 TCK cycles with TMS = 0 | 2 + 2N |
| 09 | `TRST` | - | pulse /TRST of the selected chain low for 2 clk cycles | 4 |
| 0A / 0B | `SS0` / `SS1` | - | set the synchronism output | 2 |
| 0C / 0D | `WS0` / `WS1` | - | wait until the synchronism input is 0 / 1 | 3 or more |
| 0F | `HALT` | - | set end-of-test and stop | 2 |
| 1A / 1B | `SELTAP0` / `SELTAP1` | - | select chain 0 / 1 | 2 |

- The codes 00, 01, 02, 04, 05, 06, 1A and 1B match published test code, so such code runs
  unchanged (`tb_listing_segment`).
- The other codes were chosen for this design. They are collected in `rtl/bist_pkg.sv`.
- Unknown opcodes are skipped as one-byte no-operations.

### How a scan works

- **Counting.** `NSHF` and `NSHFCP` count C16 down to zero. The count is used up by the
  scan, so load C16 before every scan. `NTCK` uses C24 in the same way. A count of 0 makes
  either instruction do nothing.
- **Bit order.** Data bytes are sent least significant bit first. Bit 0 of the first byte
  enters TDI first, so it ends up in the register cell nearest TDO.
- **Comparing.** In `NSHFCP`, every eight bits are described by three bytes in a row: data
  to shift in, expected response, mask.
  - A mask bit of 1 means "compare this bit"; 0 means "don't care".
  - Any compared bit that differs sets the error flag. The flag stays set until reset.
  - The unused high bits of the last byte must be masked off.
- **DeserEn.** `deser_en` is high during every TCK of an `NSHFCP`. An external deserialiser
  can use it to store the raw response for diagnosis.

### Timing

- The processor derives TCK from `clk`: one TCK period is two clk cycles, low then high.
  TCK runs only while an instruction needs it.
- TMS and TDI are set while TCK is low.
- TDO is sampled at the end of the high phase, just before TCK falls. A 1149.1 device holds
  TDO steady there, because it changes TDO on the falling edge.
- The chain that is not selected sees TCK = 0, TMS = 1, TDI = 1 and /TRST = 1. Its TAP keeps
  its state, so a program can switch chains in the middle of a scan sequence. Published test
  code does this.
- Program memory is read asynchronously. `addr` changes on a clk edge, and `data` must be
  valid by the next edge. Each program byte costs one clk cycle.

### Inside

The block diagram has seven parts:

- **Instruction decode and control:** the state machine in `bist_processor.sv`.
- **Program counter** (`bist_pc`): 20 bits. A jump address is staged byte by byte while the
  counter still points at the operand bytes, then loaded in one clock.
- **16- and 24-bit counters** (`bist_counters`).
- **Scan out** (`bist_scan_out`): the TDI serialiser.
- **TAP selector** (`bist_tap_sel`).
- **Scan in** (`bist_scan_in`): the expected and mask registers and the bit comparator.
- **Status and sync** (`bist_status_sync`): the error, end-of-test and sync flags. The sync
  input passes a two-flop synchroniser.

Assertions in `bist_processor` check three rules:

- HALT is final until reset.
- TCK is high only in the high phase of a TCK cycle.
- /TRST is never low while TCK pulses.

### Example program fragment

This fragment scans chain 0, a 36-bit chain standing in Shift-DR. It then checks the
response and stops on a fault:

```
02 00 24     LD C16,36
05 d e m ... NSHFCP          ; 5 triplets: data, expected, mask
06 00 05 A7  JPE  0x005A7    ; error flag set -> fault exit
01           TMS1            ; Exit1-DR -> Update-DR
```

## Primary I/O test component (`prim_io_bst`)

- **Purpose.** Primary I/O pins can only be tested from off the board. This component sits
  beside the edge connector on the processor's chain 1, so the on-board processor can drive
  and observe those pins. Cascade several for more pins.
- **Register.** The boundary scan register has 62 bits. Bit 0 is nearest TDO.
  - Bits 0–9 are input cells.
  - Each bidirectional pin k uses bit 10+2k as its data cell and bit 11+2k as its control
    cell.
  - The data cell captures the pin and drives the pin.
  - The control cell enables the pin's driver when it is 1, and captures its own update
    stage.
- **Instructions.** The IR is 2 bits: EXTEST = 00, SAMPLE/PRELOAD = 01, BYPASS = 11 and 10.
  The IR captures 01, and BYPASS is the instruction after reset.
- **Drivers.** They are enabled only in EXTEST. The chip has no core logic that could drive
  its pins in other modes.

## LFSR component (`lfsr_pld`)

**Purpose.** It tests a non-BST combinational cluster from the side, in parallel with the
normal signal path. Its outputs apply patterns to the cluster, and its inputs compress the
cluster's responses.

**Programmable length.** The 4-bit control register CR (0–15) shortens the pattern
generator to 20 − CR bits.

- The CR top output bits leave the generator and keep their preloaded values. These guarding
  values can hold control inputs of the cluster steady or keep buses quiet.
- Every output also has its own enable.

**Registers and instructions.**

- The boundary scan register has 60 bits, bit 0 nearest TDO: 20 input cells, then 20 output
  cells, then 20 control cells.
- The IR is 3 bits and captures 001.

| IR | instruction | effect |
|---|---|---|
| 000 | EXTEST | outputs driven from the output cells |
| 001 | SAMPLE/PRELOAD | outputs off |
| 010 | CTRLREG | selects the 4-bit control register |
| 011 | PRPG | pattern generation |
| 100 | SA | signature analysis |
| 101 | PRPG_SA | pattern generation and signature analysis at once |
| 110, 111 | BYPASS | bypass register |

**Test timing.** A test runs in Run-Test/Idle, so the processor's `NTCK` drives it.

- On each falling TCK edge, the output update stage (the pattern) steps.
- On each rising TCK edge, the input cells take `sig = step(sig) ^ in`.
- The cluster therefore has half a TCK period to settle.
- In SA and PRPG_SA, Capture-DR leaves the input cells alone, so the next DR scan reads out
  the signature.
- Entering Run-Test/Idle from an Update state gives one extra pattern step. Leaving it gives
  one extra compression. `NTCK n` between the two therefore applies n+1 patterns and
  compresses each of them once.

**Polynomials** (`prog_lfsr`). The generator is a Fibonacci LFSR. `q[0]` takes the XOR of
the tap bits.

| length | taps | length | taps | length | taps | length | taps |
|---|---|---|---|---|---|---|---|
| 5 | 5,3 | 9 | 9,5 | 13 | 13,4,3,1 | 17 | 17,14 |
| 6 | 6,5 | 10 | 10,7 | 14 | 14,5,3,1 | 18 | 18,11 |
| 7 | 7,6 | 11 | 11,9 | 15 | 15,14 | 19 | 19,6,2,1 |
| 8 | 8,6,5,4 | 12 | 12,6,4,1 | 16 | 16,15,13,4 | 20 | 20,17 |

- The table gives a primitive polynomial for each degree. `tb_prog_lfsr` checks every length
  for the full period of 2^L − 1.
- An all-zero seed stays at zero, so preload a non-zero seed.
- The signature register always uses the full 20 bits.

## Analog I/O interface controller (`analog_io_ctrl`)

**Where it sits.** Analog multiplexers are placed in the analog paths. One D/A converter can
then force a chosen output node, and one A/D converter can read a chosen input node. The
controller connects the converters to the scan chain.

**Instruction register.** 11 bits, three fields:

| bits | field | values |
|---|---|---|
| `ir[2:0]` | operation | EXTEST 000, SAMPLE/PRELOAD 001, ADC 010, DAC 011, ADDA 100 (both converters), BYPASS 101–111 |
| `ir[6:3]` | A/D channel | 0–15, driven on `ad_ch` |
| `ir[10:7]` | D/A channel | 0–15, driven on `da_ch` |

At Capture-IR, bits 1:0 take 01 and bit 2 takes the A/D end-of-conversion. A program can
therefore poll for conversion done with an IR scan.

**Data registers.**

- The scan-out register BSO drives `da_data`. `da_load` pulses for one TCK period after each
  Update-DR in EXTEST, DAC and ADDA.
- The scan-in register BSI captures the A/D result in Gray code.
- ADC selects BSI alone, and DAC selects BSO alone. EXTEST, SAMPLE and ADDA put both in
  series: TDI → BSO → BSI → TDO.
- `amux_ctl` switches the analog multiplexers to the D/A in DAC and ADDA.

**Handshakes.** In ADC and ADDA, `soc_req` is passed to the converter as `adc_soc`, and the
converter's `adc_eoc` is passed back as `eoc_out`. In other modes both are held low.

**Why Gray code.** The compare in `NSHFCP` is a per-bit mask. In binary, neighbouring codes
can differ in every bit (127/128), so no mask can express "expected ± a few codes". In Gray
code, neighbours differ in one bit. With g = b ^ (b >> 1):

- Let the expected Gray value be G.
- Form the mask as the complement of (G⁺ ⊕ G⁻), where G⁺ and G⁻ are the Gray codes of the
  two neighbouring values.
- That mask accepts a window of four adjacent codes.

Example: G = 00011100 gives mask = ~(00011101 ⊕ 00010100) = 11110110. This accepts the binary
codes 22–25, which `tb_analog_io_ctrl` checks by sweeping all 256 codes. The conversion is
one XOR per bit at the capture input of the BSI cells.

## Common 1149.1 parts

- `tap_controller` implements the standard 16-state machine. It has an asynchronous /TRST.
  State codes are in `jtag_pkg`.
- `jtag_ir` is the instruction register with its capture value and update stage.
- All three chips follow the same edge rules:
  - Capture and shift happen on rising TCK.
  - Update stages and TDO change on falling TCK.
  - TDO is 1 outside Shift-xR, and `tdo_oe` marks the shift states.
- In Test-Logic-Reset, update stages go to safe values: drivers off, D/A data 0, CR 0.

## What is fixed and what was chosen

Taken from the publication:

- The processor instruction set and its meaning.
- The 20-bit program counter, the 8-bit data bus, and the 16- and 24-bit counters.
- Two TAPs.
- The DeserEn, error, end-of-test and SelTAP pins, and the synchronism handshake.
- The opcodes and operand layout of published test code, and the byte-interleaved
  data/expected/mask operand.
- The primary I/O pin counts: 10 inputs, 26 bidirectional pins, individual enables.
- The LFSR component's 20 outputs, the 4-bit CR for 0–15 non-PRPG outputs, the length
  20 − CR, and guard bits that keep their value.
- The analog controller's 11-bit IR with end-of-conversion status at Capture-IR, 16 + 16
  channels, the Gray-code capture and the four-code mask rule.
- The multiplexer control pin.

Chosen here:

- All other opcodes.
- LSB-first bit order.
- TCK = clk/2, gated.
- Asynchronous program memory with one-cycle access.
- C16 and C24 counting down, so each instruction uses up its count.
- The /TRST pulse length and the idle levels on the unselected chain.
- The sync-input synchroniser.
- All IR lengths and codes except the analog controller's IR length.
- Boundary cell layouts: 2 cells per bidirectional pin; 3 cells per LFSR pin.
- The LFSR polynomials and the PRPG/SA timing in Run-Test/Idle.
- Separate PRPG, SA and PRPG_SA instructions.
- The analog IR field layout and the register selection per instruction.
- Gray conversion at the capture input.
- The `da_load` strobe, and passing start and end of conversion straight through.
- The converter resolution of 8 bits. It is the `NB` parameter, and 12 bits is the obvious
  extension.

Not included:

- The A/D and D/A converters, the analog multiplexers and the program memory, which are
  bought parts.
- The external deserialiser.
- The test-program generator, which is software.

## Verification

Each testbench is self-checking and prints `TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_bist_pc`, `tb_bist_counters`, `tb_bist_scan_out`, `tb_bist_scan_in`, `tb_bist_tap_sel`, `tb_bist_status_sync` | each processor sub-block against a model in the testbench |
| `tb_tap_controller` | random TMS walks against an independent state table, /TRST, five-TMS-high reset |
| `tb_prog_lfsr` | full period for all 16 lengths, guard bits held, signature mode |
| `tb_prim_io_bst`, `tb_lfsr_pld`, `tb_analog_io_ctrl` | each chip driven through its TAP by tester tasks (`tb/jtag_tb_tasks.svh`); register layouts, instructions, PRPG/SA signature against a reference, Gray code and the mask window |
| `tb_bist_processor` | a program using every instruction, on two behavioural chains (`tb/chain_model.sv`); data delivered, scan lengths, error/jump behaviour, DeserEn count, and the exact clk count from the cycle table above |
| `tb_listing_segment` | published open-fault test code with chains of 36 and 82 bits; a good board passes, a board with a stuck bit takes the fault exit |
| `tb_board_bist_top` | the whole kit at its default sizes, running a complete test program on a fault-free board and on a board with an open pin (see below) |

The full-system test, `tb_board_bist_top`, runs one complete board test program and models
the board around the chips: the A/D converter with its handshake, the cluster logic and the
pin loop-backs. The program takes these steps:

1. Reset both chains.
2. Check the IR capture values.
3. Program CR.
4. Preload the seed.
5. Run an A/D conversion through the sync handshake and compare the Gray code.
6. Run PRPG + SA with `NTCK` and compare the signature.
7. Write the D/A.
8. Run an EXTEST interconnect test on the primary I/O pins.

The testbench counts every mechanism and fails if any never happened. The mechanisms are:
TRST, chain switch, NSHF, NSHFCP, NTCK, handshake waits, conversions, D/A loads, PRPG steps,
fault detection and the JPE exit.

To run one testbench with Verilator from the project root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/jtag_pkg.sv rtl/bist_pkg.sv tb/tb_board_bist_top.sv --top-module tb_board_bist_top
./obj_dir/Vtb_board_bist_top
```

Replace `tb_board_bist_top` with any other testbench name. Each testbench finishes within a few
seconds.

## Changing the design

- Pin counts are parameters: `N_IN` and `N_IO` of `prim_io_bst`, `N` of `lfsr_pld` and `NB`
  of `analog_io_ctrl`. All four are brought up to `board_bist_top`.
  - `prog_lfsr` has polynomials for lengths 5–20 only. A wider LFSR component needs more
    table entries.
  - The primary I/O register length is `N_IN + 2*N_IO`. Test programs must use that length.
- Opcodes live in `bist_pkg`. Keep 00/01/02/04/05/06/1A/1B if existing test code must run.
- The processor timing lives in the control state machine of `bist_processor`. To slow TCK
  down, add wait states in `S_TCK_LO` and `S_TCK_HI`.
