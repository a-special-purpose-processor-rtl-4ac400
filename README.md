# TACP: a small test processor for at-speed testing of a chip

Testing a chip at its real operating speed normally needs an expensive
tester that can drive every pin at hundreds of MHz. This design avoids that.
A cheap, slow tester (here a 50 MHz processor on an FPGA board) talks to
test support circuitry on the chip through a few serial wires.

The expensive part of a test is moved onto the chip:

- Test vectors are shifted in slowly, one bit per tester clock.
- The chip applies a vector and captures the response with two pulses of
  its own tunable high-frequency oscillator.
- The response is shifted out slowly again.

Repeat this at a series of oscillator settings and the fastest frequency at
which the circuit still answers correctly is its speed. The chip can also
count its own oscillator against the tester clock, so every setting is
measured rather than assumed.

This repository holds both halves:

- **TACP** (test and characterisation processor). A microcoded processor
  with three 64 KiB memories and a serial (UART) link to a host PC.
- **Prototype chip.** The test support circuitry (TSC) plus two small
  circuits under test: a 4-bit adder and an 8-bit two-stage pipelined adder.
  There are also ports for two scan-based sequential circuits. Those two
  circuits are not included; their pins are brought out of the top level.

```
 host PC ==UART==> tacp ----------- serial test bus ----------> prototype_chip
          (rx/tx)   |- uart                                      |- tsc
                    |- user_comm_unit (host protocol)            |   |- port_select (10 select bits)
                    |- tacp_mem_mux + 3 x tacp_dpram             |   |- tap_port / trp_port / scan_port
                    |- tacp_processor                            |   |- csaac (2-pulse clock)
                         |- tacp_sequencer                       |   |- ccg -> dco_model (HFCLK)
                         |- tacp_control_store                   |   |- fmc (frequency counter)
                         |- tacp_datapath                        |- iut_adder4, iut_padder8
```

The top module is `tacp_platform`. The processor clock and the chip's
tester clock TCLK are the same 50 MHz net.

## The serial test bus

Every transfer between processor and chip is one bit per TCLK rising edge,
qualified by a strobe. All strobes come straight from micro-operation bits of
the processor.

| Signal | Dir (from the processor's side) | Use |
|---|---|---|
| `PS_Mask_Data_in`, `Strobe_in_PMask` | out | shift one bit into the port-selection chain |
| `PS_Mask_Data_out` | in | bit falling out of the end of the chain (read back into SM) |
| `Test_Data_in`, `Strobe_in_TData` | out | shift a test bit into all selected application ports |
| `Test_Data_out` | in | loop-back: the bit leaving the selected application port |
| `Strobe_out_TR`, `TResult_out` | out / in | shift the selected result ports one place, read their low bit |
| `AaC` | out | apply and capture: one request = two test-clock pulses |
| `CLK_Sel` | out | 0: AaC pulses use TCLK; 1: they use the on-chip oscillator |
| `CLK_CW_in`, `Strobe_in_CLK_CR` | out | shift the 16-bit oscillator control word, MSB first |
| `HFCLK_Meas_Req` / `HFCLK_Meas_ACK` | out / in | frequency-measurement window and its handshake |
| `Strobe_out_CLK_FR`, `CLK_FR_out` | out / in | read the 16-bit count, LSB first |

## Inside the chip (TSC)

**Port selection.** Each test port has one select flip-flop, and the ten
flip-flops form a shift chain. The processor shifts a mask into the chain
and the old mask falls out at the far end. One application port and one
result port are normally selected together.

The port numbers are:

| Ports | Circuit | Application | Result | Scan |
|---|---|---|---|---|
| 0 / 1 | 4-bit adder | 9 bits: a[3:0], b[7:4], carry-in [8] | 5 bits: {cout, sum} | – |
| 2 / 3 | pipelined 8-bit adder | 17 bits: a[7:0], b[15:8], carry-in [16] | 9 bits | – |
| 4 / 5 / 6 | sequential circuit 3 (external) | 18 bits | 19 bits | 1 bit |
| 7 / 8 / 9 | sequential circuit 4 (external) | 18 bits | 19 bits | 1 bit |

**Application and result ports.** An application port (`tap_port`) is a
shift register clocked by TCLK in front of an apply register. The apply
register is clocked by the test clock and drives the circuit's inputs.

A result port (`trp_port`) is the mirror image. A capture register on the
test clock holds the circuit's outputs. A TCLK shift register reloads from
the capture register whenever it is not being strobed, and shifts towards
bit 0 when it is.

All selected ports share the serial lines. Outputs of unselected ports are
masked and the rest are ORed. Each circuit under test gets the test clock
only while one of its ports is selected.

A scan port (`scan_port`) serves a circuit with an internal scan chain. It
is two TCLK flip-flops, one feeding the chain's scan input and one taking
its scan output, and a scan enable that is high while the port is selected
and either strobe is active. The circuit's scan flip-flops must shift on TCLK
under that enable. Each strobed edge then moves test data in and results out
by one place; the path is the chain length plus two flip-flops long.

**Two-pulse clocking (`csaac`).** This is the heart of at-speed testing.

1. A multiplexer selects TCLK or the oscillator clock HFCLK.
2. The AaC level is synchronised into that clock by three flip-flops and
   delayed by two more. Together they give an enable exactly two cycles
   long.
3. The enable is retimed on the falling clock edge.
4. The output is `CLK_Out = clock & enable`, which has no partial pulses.

The first pulse applies the vector. The second captures the response one
clock period later, so the circuit must settle within one period of the
selected frequency.

Timing rules:

- AaC must be high for at least two cycles of the selected clock. The
  processor holds it for four TCLK cycles.
- AaC must be low for two cycles before the next request.
- `CLK_Sel` must not change while a pulse pair is in progress.

**Clock generator.** `ccg` is a 16-bit control-word shift register. Its low
six bits select one of 40 oscillator frequencies, from 325 MHz down to
11.25 MHz. Count codes from `0x38` upwards, wrapping at 64, so that
`0x38` is step 0 and `0x1F` is step 39. Then:

- the step modulo 8 picks a base frequency: 325, 300, 280, 260, 240, 220,
  200 or 180 MHz;
- the step divided by 8 halves that frequency 0 to 4 times.

For example, `0x38` gives 325 MHz, `0x00` gives 162.5 MHz, `0x10` gives
40.625 MHz and `0x1F` gives 11.25 MHz. Codes `0x20` to `0x37` are not
used and run at the slowest frequency. This table is the measured
frequency table of the prototype's oscillator. `dco_model` reproduces it
with delays; in silicon the oscillator is an analogue circuit, and on an
FPGA it would be clock managers followed by dividers.

**Frequency measurement (`fmc`).** The processor raises `HFCLK_Meas_Req`
for N TCLK cycles. In the HFCLK domain the request is synchronised by two
flip-flops, and a 16-bit counter counts HFCLK edges while it is high. When
the request falls, a done flag crosses back into the TCLK domain. The count
is then copied into the readout shift register and `HFCLK_Meas_ACK` rises.
ACK stays high until the next request.

With N = 1024, the frequency is f = count × 50 MHz / 1024. For example, a
count of 832 means 40.625 MHz.

## The processor

### Microcode

The processor is microcoded, in three parts:

- **Sequencer.** The micro-address register is `{opcode[5:0], step[3:0]}`.
  Each control-store word holds:
  - a 4-bit condition select,
  - a branch micro-address,
  - one bit per micro-operation.

  Select 0 means "dispatch": the next micro-address is `{IR, 0}`.
  Otherwise the next address is the branch address if the selected
  condition is true, and the current address + 1 if not. The conditions
  are: never, always, not next_instruction, CR≠0, WC≠0, UC≠0, UC=0, CF,
  not CF, and not ACK. Undefined micro-addresses go back to fetch.
- **Control store.** A combinational ROM (`tacp_control_store`). Fetch is
  micro-addresses 0–3: it waits for `next_instruction`, loads IR from the
  program memory and dispatches.
- **Data path.** The registers are:

  | Register | Width | Use |
  |---|---|---|
  | IR | 6 | instruction register |
  | CR | 32 | general down-counter |
  | WC | 4 | bits left in the current byte |
  | TD | 8 | test data |
  | TR | 8 | test result |
  | SM | 8 | selection mask read back from the chip |
  | FR | 16 | frequency count |
  | CW | 16 | oscillator control word |
  | UC | 32 | user counter |
  | SP | 16 | stack pointer |
  | CF | 1 | compare flag: a mismatch was found |
  | SF | 1 | drives `CLK_Sel` |
  | Busy | 1 | processor busy |

  A register changes only in a cycle where its micro-operation bit is set.

### Parameters and memory timing

Parameters follow the opcode byte in the program, and 16- and 32-bit
values are little-endian. A "previous parameter" byte register joins two
consecutive program bytes into a 16-bit value. This is how CR and the
16-bit operands are loaded.

The memories read synchronously. Each address register's next value goes
to the memory port, so the data output always shows the byte at the
register's current address. As a result, a write lands at the address the
register moves to in that cycle. When a program writes results "from
address A", load the write register with A−1.

### Loop counts

All loops test a zero flag of the current register value, so a loop with
count parameter C runs C+1 times:

- **SendSelectionMask `cr32, port16`.** Shifts CR+1 bits. The bit is 1 only
  while CR equals `port`. So `SendSelectionMask 9, 0` loads the mask with
  port 0 only. A following `SendSelectionMask 0, 0` shifts one more 1 in,
  which selects ports 0 and 1. SM collects the bits that fall out.
- **SendTestData `cr32, p8`.** Sends CR+1 bytes from test-data memory, P+3
  bits from each, LSB first. So P=1 sends 4 bits, P=2 sends 5 and P=5
  sends 8.
- **ReadResult `cr32, p8`.**
  - For each of CR+1 result bytes, it issues P+3 shift strobes to the
    result port.
  - It stores TR, which shifts in from the top, after P+2 of them.
  - With P=6 and several words, this gives one contiguous stream of 8-bit
    bytes.
  - With P=6 a byte collects exactly 8 bits, so a 5-bit result arrives
    as its plain value with the upper bits zero.
- **MeasureFrequency `cr32`.** Holds the request for CR+1 TCLK cycles, then
  waits for ACK.
- **Compare `cr32`.** Compares CR+1 bytes of expected data (test-data
  memory at DCRead) with the result memory (at RCRead), and sets CF on any
  difference.

### Instruction set

The table gives opcodes in hex.

| Op | Instruction | Parameters | Op | Instruction | Parameters |
|---|---|---|---|---|---|
| 01 | ApplyAndCapture | – | 12 | Load_UC_value | 32-bit |
| 02 | Call | addr16 | 14 | MeasureFrequency | count32 |
| 03 | Compare | count32 | 15 | Nop | – |
| 04 | DEC_CW | – | 16 | ReadFrequencyRegister | bits−1 (16) |
| 05 | DEC_UC | – | 17 | ReadResult | count32, p8 |
| 06 | INC_CW | – | 18 | ResetCompareFlag | – |
| 07 | INC_UC | – | 19 | ResetHFClock (SF=0) | – |
| 08 | JCompareCorrect | addr16 | 1A | Return | – |
| 09 | JCompareError | addr16 | 1B | SendFrequencyControlWord | bits−1 (16) |
| 0A | JNZ (UC≠0) | addr16 | 1C | SendSelectionMask | count32, port16 |
| 0B | Jump | addr16 | 1D | SendTestData | count32, p8 |
| 0C | JZ (UC=0) | addr16 | 1E | SetFrequencyControlWord | 16-bit |
| 0D | Load_DCRead | addr16 | 1F | SetHFClock (SF=1) | – |
| 0F | Load_RCRead | addr16 | 20 | Stop | – |
| 10 | Load_RCWrite | addr16 | 21 | Store_UC | – |
| 11 | Load_UC_Mem | – | 23 | ClearTestDataRegister | – |

**Stack.** SP starts at 0 and counts down. Call therefore pushes the return
address high byte at FFFF and low byte at FFFE of instruction memory.

**User counter.** `Store_UC` writes UC to the result memory, 4 bytes after
the current RCWrite. `Load_UC_Mem` reads it back from the next four result
bytes. So `Load_RCWrite 0900; Store_UC` and later `Load_RCWrite 0901;
Load_UC_Mem` restore it.

### Example

A complete 4-bit adder test is 58 bytes. It is the first program of
`tb_tacp_platform`:

```
Load_DCRead 0; Load_RCWrite FFFF; Load_UC_value 10
SendSelectionMask 9,0; SendSelectionMask 0,0        ; ports 0 and 1
loop: SendTestData 0,1; SendTestData 0,2            ; 4 + 5 bits
      ApplyAndCapture; ReadResult 0,6; DEC_UC; JNZ loop
ResetCompareFlag; Load_RCRead 0; Compare 9; Stop
```

Each vector is stored as two bytes in test-data memory: `a` in the low
four bits of the first, `b` and the carry-in in the low five bits of the
second. The pipelined adder is tested the same way, with each 17-bit
vector sent as 8 + 4 + 5 bits from three bytes (`SendTestData` with P = 5,
1, 2) and two `ApplyAndCapture` per vector. The ten expected
sums follow the vectors. CF at the end tells whether any sum was wrong.
Raise the oscillator, run the program again, and repeat until CF sets.

## Host protocol

`user_comm_unit` serves the host over a UART. The link runs at
50 MHz / (4 × `CLOCK_DIVIDE`): 57,600 baud at the default 217. Frames are
8N1. Each packet starts with a type byte:

| Code | Command | Following bytes |
|---|---|---|
| 18–1F | load rx counter, tx counter, PCRead, PCWrite, DCRead, DCWrite, RCRead, RCWrite | 2 (low, high) |
| 9F | load break point | 2 |
| 20 / 21 | receive instructions / test data | rx-counter bytes, written at PCWrite+1… / DCWrite+1… |
| 40 / 41 / 42 | send instruction / test-data / test-result memory | none: sends tx-counter bytes, from PCWrite / DCWrite / RCRead |
| 53 | send register dump | none: sends tx-counter bytes |
| 90 / 91 / 92 / 93 | single step / run / reset processor / stop | none |

The register dump is sent from index = tx counter down to 1. Index 29 goes
first and index 1 last:

| Index | Contents |
|---|---|
| 1 | flags {ErrF, RunF, BreakF, CF, SF, UC=0, Busy, 0} |
| 2 | IR |
| 3–14 | PCRead, PCWrite, DCRead, DCWrite, RCRead, RCWrite (low, high each) |
| 15–16 | SP |
| 17–20 | UC |
| 21–22 | CW |
| 23–24 | FR |
| 25 | SM |
| 26 | TD |
| 27 | TR |
| 28–29 | break point |

**Run control.**

- The processor fetches while a single step is pending, or while Run is set
  and PCRead differs from the break-point register.
- The break-point register resets to FFFF.
- While the processor is busy and not at Stop, it owns the memories. At
  other times the protocol does.

## Where this design makes its own choices

These points are not fixed by the original description, or the description
is inconsistent on them:

- **Encodings.** The micro-address format and control-word encoding are
  this design's own.
- **Compare-jump opcodes.** One source table swaps JCompareCorrect (08) and
  JCompareError (09); the per-instruction descriptions were followed.
- **FR width.** FR is 16 bits rather than 8, because measured counts need
  more than 8 bits.
- **Register dump.** It has 29 entries, not 24, so that everything listed
  for it fits.
- **Stack direction.** The stack grows downward from the top of instruction
  memory.
- **Number of ports.** The chip has ten ports. A test example elsewhere
  mentions twelve.
- **Bit counts.** The P+3 / P+2 counts were chosen so that the adder
  programs return correct sums.
- **Chip internals.** The oscillator frequency table, the port numbering
  within each circuit, the operand bit order of the adders and the split
  point of the pipelined adder are all assumptions.
- **Not included.**
  - The two sequential circuits under test (an ISCAS-89 benchmark with a
    scan chain) are external. Their ports exist on the chip and at the top
    level.
  - The host software (GUI and assembler) is not part of the RTL.

## Simulating

Every testbench in `tb/` is self-checking. Each ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog. They use only
`$urandom` for stimulus and rely on no x/z values. With Verilator 5:

```
verilator --binary --timing -Wno-fatal --top-module tb_tacp_platform \
  rtl/tacp_pkg.sv $(ls rtl/*.sv | grep -v tacp_pkg) tb/tb_tacp_platform.sv
./obj_dir/Vtb_tacp_platform
```

Substitute any `tb_<module>` name for a unit test. The package file must
come first.

`tb_tacp_platform` runs the whole system at its default parameters: a
50 MHz clock and 57,600 baud. It acts purely as the host over the serial
line, and takes about half a minute. It runs eight programs:

- the adder test: ten random vectors, then a rerun with one wrong expected
  value, which must set CF;
- the pipelined adder (two AaC per vector);
- user-counter store/load, Call/Return, break point and single step;
- loop-back through an 18-bit port;
- selection-mask read-back;
- oscillator programming, frequency measurement (832 counts at
  40.625 MHz; about 6656 at 325 MHz) and an at-speed AaC;
- two bytes through a five-flip-flop scan chain model attached to the
  scan port of the third circuit;
- both adder tests again with the published example vectors (twenty bytes
  for the 4-bit adder, thirty for the pipelined one) and their published
  expected results.

It counts each of these mechanisms and fails if one never happens.
`tb_tacp` runs a short program with a fast UART. `tb_prototype_chip` and
`tb_tsc` drive the chip's serial bus directly.

Files in `rtl/` are synthesizable except `dco_model.sv`, which is a delay
model of the oscillator. For silicon or an FPGA, replace it with a real
oscillator, or with a PLL output for the FPGA case.
