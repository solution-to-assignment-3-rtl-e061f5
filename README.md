# A single-cycle 8-bit accumulator computer

This is a very small stored-program computer. It has one 8-bit register, the accumulator, a 32-word
instruction ROM, a 32-word data RAM and eight instructions. Every instruction finishes in one clock
cycle. The design is a teaching example of how to build a processor at register-transfer level. It
splits into five blocks: a program counter, a ROM, a RAM, an accumulator datapath (the "ALU") and a
combinational controller. The ROM holds a short sample program that counts up from -3 to 0.

## Instruction set

An instruction is one 8-bit word, `{opcode[2:0], field[4:0]}`. The 5-bit field is the RAM address,
the immediate value or the jump target, depending on the opcode.

| opcode | mnemonic | effect                              |
|--------|----------|-------------------------------------|
| 000    | LOAD a   | acc ← mem[a]                        |
| 001    | STORE a  | mem[a] ← acc                        |
| 010    | LOADI n  | acc ← n (zero-extended, 0..31)      |
| 011    | ADD a    | acc ← acc + mem[a] (mod 256)        |
| 100    | NOT      | acc ← ~acc (field ignored)          |
| 101    | AND a    | acc ← acc & mem[a]                  |
| 110    | JZ t     | if acc == 0: pc ← t                 |
| 111    | JN t     | if acc[7] == 1: pc ← t              |

Every instruction other than a taken jump advances the PC by one. The PC wraps from 31 to 0. There is
no halt instruction: a program ends by jumping to itself (for example `8: JZ 8` with acc = 0).

## How one cycle works

Between two rising clock edges, everything is combinational:

1. The PC register addresses the ROM (`rom`), whose output is the current instruction.
2. The decoder (`decoder`) takes the opcode and the accumulator's flags and produces three outputs.
   - `aluop` is the opcode unchanged.
   - `write` is 1 for STORE.
   - `pcop` is *jump* for JZ when `zero` is set, or for JN when `negative` is set, and *increment*
     otherwise.
3. The field bits go at the same time to the RAM address, the ALU immediate input and the PC jump
   input. The RAM (`ram`) reads the addressed word combinationally.
4. The ALU (`alu`) selects the accumulator's next value from the RAM word, the immediate value and
   the accumulator itself.

On the rising edge, the PC, the accumulator and (for STORE) the RAM word all update together. The
`zero` and `negative` flags are not stored separately. They are decoded from the accumulator
register, so a JZ or JN tests the result of the instruction before it. STORE writes the accumulator
as it stood before the edge.

The critical path therefore runs PC → ROM → RAM read → 8-bit adder → accumulator. The control path
runs through the decoder to the PC, which is short.

### Reset

`reset` is synchronous and active high. It clears only the PC. While reset is held, the datapath
keeps running: whatever instruction the PC points to still acts on the accumulator and the RAM. After
power-up the PC holds an undefined value. The first reset edge brings it to 0. A second edge runs the
instruction at address 0, which in the sample program (`LOADI 0`) defines the accumulator. Hold reset
for at least two edges if the accumulator must be defined when reset is released. The accumulator and
the RAM have no reset.

## Blocks

| file               | block       | what it is |
|--------------------|-------------|------------|
| `rtl/cputypes.sv`  | package     | widths (8-bit data, 5-bit address), the `opcode_t` and `pc_op_t` enums, the ROM image type, and `sample_program()` |
| `rtl/pc.sv`        | `pc`        | 5-bit register. Next value: 0 on reset, otherwise pc+1 / ia / pc for incr / jump / hold (code 11 holds) |
| `rtl/rom.sv`       | `rom`       | 32×8 ROM, combinational, contents set by parameter `PROGRAM` |
| `rtl/ram.sv`       | `ram`       | 32×8 RAM with combinational read and a write on the rising edge when `write` is 1 |
| `rtl/alu.sv`       | `alu`       | accumulator register, next-value multiplexer, adder, NOT, AND, and the `zero` and `negative` flags |
| `rtl/decoder.sv`   | `decoder`   | combinational controller described above |
| `rtl/cpu.sv`       | `cpu` (top) | wires the five blocks together; ports `reset`, `clk`, and the observation outputs `pc_out`, `instr_out`, `acc_out` |

After coarse synthesis the whole machine is 13 flip-flop bits (PC and accumulator) plus two 256-bit
memories and about 40 word-level cells.

## The sample program

The default ROM contents are `40 20 41 21 42 80 61 E6 C8`, followed by zeros:

```
0: LOADI 0    1: STORE 0    2: LOADI 1    3: STORE 1    4: LOADI 2
5: NOT        6: ADD 1      7: JN 6       8: JZ 8
```

The program stores 0 and 1 in RAM words 0 and 1. It forms −3 as NOT 2 and then adds 1 until the
accumulator stops being negative. After each clock edge following reset, the machine shows:

```
pc    00 01 02 03 04 05 06 07 06 07 06 07 08 08 ...
instr 40 20 41 21 42 80 61 E6 61 E6 61 E6 C8 C8 ...
acc   00 00 00 01 01 02 FD FE FE FF FF 00 00 00 ...
```

It reaches its final self-loop at address 8 on the twelfth edge after reset. The 32-word ROM and RAM
hold the program's 9 instructions and 2 data words with room to spare.

## Where this RTL departs from the original design, or fills it in

- **The ROM contents are a parameter.** Both `rom` and `cpu` take `PROGRAM`, whose default is the
  sample program. The original ROM is hard-wired. The parameter lets the tests run other programs.
  Leaving it alone gives the original machine.
- **The RAM write.** The original RAM writes the addressed word back to itself on every edge when
  `write` is 0. Here the RAM uses an ordinary write enable, which behaves the same.
- **The STORE decode.** The original decoder's rule for `write` is not written out. It is taken from
  the decoder's simulation waveform, where `write` is high only for opcode 001.
- **The observation outputs.** The original top level names `pc_out`, `instr_out` and `acc_out` as
  test outputs but does not show how they are driven. Here they are the PC, the ROM output and the
  accumulator, which matches the original's simulation of the sample program.
- **The accumulator at power-up.** The original waveforms show it starting at 00. The hardware has
  no reset there, so in a two-state simulator it starts at a random value until an instruction loads
  it.
- Encodings, widths, the single-cycle timing, the synchronous PC reset and the 5-bit wrap of the
  PC all follow the original design.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` at the end and stops after a fixed number of cycles if it hangs.

- `rom_tb`: all 32 words against the sample program.
- `ram_tb`: the original RAM waveform (write 01/FF/EE to 00/01/1F, then read them back). Then
  800 random reads and writes against a reference array, including checks that `write` = 0 leaves
  the word unchanged.
- `alu_tb`: the original accumulator waveform (EE EE 05 06 F9 F0 F0). Then 1000 random operations
  against a reference model, checking the accumulator and both flags after every edge.
- `pc_tb`: the original PC waveform (reset → 00, jump → 0E, incr → 0F, hold). Then the wrap from 1F
  to 00, and 1000 random operations and resets against a model.
- `decoder_tb`: exhaustive over all 256 instructions and all 4 flag combinations.
- `cpu_tb` (end to end): runs two computers against an instruction-level reference model, comparing
  PC, instruction and accumulator after every edge for 3000 cycles.
  - The first runs a directed program. It executes every opcode, takes and falls through both
    conditional jumps, overflows an ADD, wraps the PC from 31 to 0 and is reset periodically.
  - The second runs a pseudo-random 32-word program, made by a 16-bit LFSR (x¹⁶+x¹⁴+x¹³+x¹¹+1),
    and gets random reset pulses.
  - The model copies the undefined power-up RAM contents from the design hierarchy.
  - Each of those events is counted. One that never happens counts as a failure.
- `cpu_full_tb`: the `cpu` top with default parameters (the sample program). It checks the trace
  above edge by edge, the arrival at address 8 on edge 12, and RAM words 0 and 1 (00 and 01) at the
  end.

All of them pass. Each one was also run against a deliberately broken copy of its block, and each
failed as it should:

| block   | broken as                                   |
|---------|---------------------------------------------|
| `rom`   | address bit 4 ignored                       |
| `ram`   | write enable ignored                        |
| `alu`   | AND computed as OR                          |
| `pc`    | jump target bit 0 cleared                   |
| `decoder` | JN tested the zero flag                   |
| `cpu`   | RAM data taken from the field instead of acc |

## Simulating

The package must be compiled first. With Verilator 5:

```
verilator --binary --timing --assert -Irtl \
    rtl/cputypes.sv rtl/pc.sv rtl/rom.sv rtl/ram.sv rtl/alu.sv rtl/decoder.sv rtl/cpu.sv \
    tb/cpu_full_tb.sv --top-module cpu_full_tb -Mdir obj_full
./obj_full/Vcpu_full_tb +verilator+rand+reset+2
```

Substitute another testbench and its top module to run a different test. The unit testbenches need
only `cputypes.sv` and their own block. `+verilator+rand+reset+2` randomises the uninitialised
state (the PC, the accumulator and the RAM), and the tests are written to pass under it.
`verilator --lint-only -Wall` reports one warning: the decoder does not use instruction bits 4:0.
That is intended, because the field goes to the datapath directly.

## Changing it

- **A different program.** Override `PROGRAM` on `cpu` with a `cputypes::rom_image_t` value. The
  helper `cputypes::mk_instr(opcode, field)` builds instruction words. `tb/cpu_tb.sv` shows two
  ways to build an image in a constant function.
- **Wider data.** Change `DWIDTH` in `cputypes`. The negative flag follows the top bit. The
  instruction word is the same type, so the opcode would then sit in its top three bits and the
  decoder's `instr[7:5]` slice would need to follow.
- **A larger address space.** `AWIDTH` sets both memories and the PC, but the 8-bit instruction
  leaves only 5 bits for the field. Growing it means widening the instruction format.
