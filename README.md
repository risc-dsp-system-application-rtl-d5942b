# An 8-bit RISC microcontroller with built-in DSP operations

This is a small Harvard-architecture RISC processor that has signal-processing
operations in its instruction set. An 8-bit integer core runs a compact
two-operand instruction set. A FIR / multiply-accumulate unit sits beside its
ALU, so one instruction pushes a sample through a 4-tap filter and writes back
the filtered value. The processor comes in two forms:

- a five-stage pipelined core (`risc_core`), the main one;
- a single-cycle core (`single_cycle_core`) with the same instruction set.

An 8-point radix-2 decimation-in-time FFT engine (`fft8`) completes the system.

The design follows a published description of a "RISC & DSP system" written in
VHDL. That description gives the overall structure:

- Harvard buses;
- the five pipeline stages IF, ID, EX, MEM and WB;
- the instruction list;
- two-cycle branches;
- a data memory written when `we` = 1;
- a coefficients → multiplication → addition chain from x(n) to y(n);
- the radix-2 DIT FFT of 8 points.

It gives no encodings, widths beyond "8-bit", hazard handling or DSP number
formats. Everything of that kind here is this design's own choice, and the
sections below say which is which.

## Parts

| module | role |
|---|---|
| `risc_pkg` | opcodes, ALU functions, decoded-control struct `ctrl_t`, assembler helpers `enc_rr` / `enc_ri` |
| `program_counter` | fetch address; +1 per cycle, load on jump, hold on stall / halt |
| `instruction_memory` | 256 × 16-bit program memory, asynchronous fetch, write port for loading |
| `register_set` | 8 × 8-bit registers, read ports Ra / Rb, write port Rc, optional write-through |
| `decoder` | instruction word → `ctrl_t` |
| `alu` | add, sub, and, or, xor, not, shift-left, multiply, pass; zero and carry flags |
| `data_memory` | 256 × 8-bit, written on the clock edge when `we` = 1, read asynchronously |
| `dsp_coefficients`, `dsp_multiplication`, `dsp_addition` | the three stages of the filter: coefficient bank, parallel signed multipliers, adder |
| `dsp_unit` | FIR / MAC: delay line and the three stages above, Q1.7 scaling and saturation |
| `risc_core` | five-stage pipelined processor with the DSP unit in EX |
| `single_cycle_core` | the same processor, one instruction per clock, no pipeline |
| `fft_butterfly` | radix-2 DIT butterfly with per-stage halving |
| `fft8` | 8-point FFT engine, one butterfly per clock |
| `risc_dsp_top` | the pipelined core, the single-cycle core and the FFT engine side by side |

The three parts of `risc_dsp_top` share only the clock and reset. The source
description defines no connection between the FFT and the processor. The two
processors are alternatives that the description presents side by side. Each
processor has its own program and data memories, and all ports are brought out.
The single-cycle core's ports have the prefix `sc_`, and the FFT's ports have
the prefix `fft_`.

## Instruction set

Instructions are 16 bits wide. Register forms are two-operand (`rd <= rd op
rs`), which matches the instruction table of the source. There are 8 registers
of 8 bits each.

```
register form   [15:11] opcode  [10:8] rd  [7:5] rs   [4:0] 0
immediate form  [15:11] opcode  [10:8] rd  [7:0] imm8
jump form       [15:11] opcode  [10:8] 0   [7:0] disp8 (signed)
```

| op | mnemonic | effect | flags |
|---|---|---|---|
| 0 | `nop` | – | – |
| 1 / 2 | `add` / `sub rd,rs` | rd ← rd ± rs | Z, C (carry / borrow) |
| 3 / 4 | `addi` / `subi rd,imm` | rd ← rd ± imm8 | Z, C |
| 5 / 6 / 7 | `and` / `or` / `xor rd,rs` | bitwise | Z, C←0 |
| 8 | `not rd` | rd ← ~rd | Z, C←0 |
| 9 / 10 | `sll rd,rs` / `slli rd,imm` | rd ← rd << (rs or imm)[2:0] | Z, C = last bit out |
| 11 | `mult rd,rs` | rd ← low byte of rd × rs (unsigned) | Z, C = high byte ≠ 0 |
| 12 | `mov rd,rs` | rd ← rs | – |
| 13 | `movr rd,rs` | rs ← rd (the table's "mov rs,rd") | – |
| 14 | `lb rd,rs` | rd ← M[rs] | – |
| 15 | `sb rd,rs` | M[rd] ← rs | – |
| 16 | `j disp` | pc ← pc + disp | – |
| 17 | `jal disp` | if Z: pc ← pc + disp (conditional jump) | – |
| 18 | `wait` | stop fetching until reset | – |
| 19 | `coef k,rs` | filter coefficient k (= rd[1:0]) ← rs | – |
| 20 | `fir rd,rs` | x(n) ← rs; rd ← y(n) | – |

Opcodes 21–31 decode as no-ops. In the jump forms, `pc` is the address of the
jump itself.

The source lists `jal` as "jump conditional", so here it is a conditional jump
on the zero flag, not a jump-and-link. The source only names `wait`; here it
halts the core. `coef` and `fir` are this design's way of reaching the DSP
chain from the instruction stream.

## The pipeline (`risc_core`)

```
IF   PC -> program memory (async read) ----------------> IF/ID
ID   decoder; read Ra = R[rd], Rb = R[rs]; resolve jumps -> ID/EX
EX   forwarding muxes -> ALU, flags, DSP unit ------------> EX/MEM
MEM  data memory, address = ALU result -----------------> MEM/WB
WB   write Rc (register set passes it through to ID)
```

One instruction enters per clock. The following rules decide the timing.

**Jumps cost two cycles.** `j` and `jal` are resolved in ID. When a jump is
taken, the PC loads the target and the instruction fetched behind the jump
becomes a bubble. `jal` reads the zero flag as it stands after every older
instruction. If the instruction in EX sets the flags, its fresh ALU zero output
is used; otherwise the flag register is used. A `subi` directly followed by a
`jal` therefore works without a gap.

The source is inconsistent about branch timing. One passage treats branches as
one-cycle operations, and another gives them two cycles in the pipelined
execution. This design follows the second passage.

**Forwarding.** EX takes its operands from EX/MEM if the instruction there
writes the register and is not a load. Otherwise it takes them from MEM/WB.
Otherwise it uses the value read in ID. The register set returns a value being
written in the same cycle, so WB → ID needs no extra path.

**Load-use stall.** When the instruction in ID reads the destination of a
load that is in EX, the PC and IF/ID hold for one cycle and a bubble enters
EX. The loaded value then reaches the dependent instruction from MEM/WB.

**Halt.** When `wait` reaches ID, fetching stops, `halted` rises at the next
edge, and the older instructions drain within three more cycles.

**Side effects.** Flag updates, coefficient writes, filter sample shifts and
stores all happen in EX or MEM. By then nothing can be squashed, because only
IF/ID is ever flushed.

Cycle count of a program, from the first edge after reset to `halted`:
1 + (instructions executed, `wait` included) + (taken jumps) + (load-use
pairs).

Debug and status ports:

- `dbg_reg_*` and `dbg_mem_*` read a register or a data byte at any time.
- `stat_stall`, `stat_fwd`, `stat_jump` and `stat_retire` pulse on the
  corresponding events.
- An assertion checks that a taken jump never coincides with a stall.

## The single-cycle core

`single_cycle_core` connects the same parts combinationally:

- PC → program memory → decoder → register set → ALU / DSP unit → data memory;
- the register write, store, flag and PC updates all happen at the next edge.

Jumps take one cycle, and a program takes exactly one cycle per instruction. Its
register set runs with `BYPASS = 0`, because write-through would close a
combinational loop when there is no pipeline.

## The DSP unit (`dsp_unit`)

The unit computes y(n) = Σ c_k · x(n−k) for k = 0 … 3.

- **Number formats:** samples are signed 8-bit; coefficients are signed Q1.7
  (value / 128).
- **Current sample:** x(n) is tap 0 and is used combinationally, so `fir`
  produces y(n) in its own EX cycle.
- **Delay line:** x(n−1) … x(n−3) live in a delay line that shifts when the
  instruction is in EX.
- **Arithmetic:** the multiplication stage forms the four 16-bit products in
  parallel. The addition stage sums them at full precision (18 bits).
- **Result:** the sum is shifted right by 7 and saturated to −128 … 127. This is
  what `fir` writes to `rd`. The full-precision sum is also an output of the
  unit.

Reset clears the coefficients and the delay line. The three-stage structure is
from the source; the tap count, formats, delay line and saturation are not.

## The FFT engine (`fft8`)

The engine computes X(k) = Σ x(n) e^(−j2πnk/8) / 8 on signed 16-bit complex
samples.

- **Start:** a `start` pulse while idle loads the 8 inputs into a working store
  in bit-reversed order.
- **Butterflies:** a single butterfly unit then works in place. It runs three
  stages of four butterflies, one per clock. In stage s (span h = 2^s),
  butterfly b pairs index i = ⌊b/h⌋·2h + (b mod h) with i + h, using twiddle
  W8^((b mod h)·4/h).
- **Twiddles:** the twiddles W8^k = cos(2πk/8) − j·sin(2πk/8) are constants in
  Q1.14: 16384 and 11585 ≈ 16384/√2.
- **Scaling:** each butterfly computes (a ± W·b)/2, so the result is the DFT
  divided by 8 and never overflows, provided that |re| and |im| stay below
  2^15/√2.
- **Timing:** `busy` is high while computing. `done` pulses 13 clock edges after
  the start edge, and X holds until the next start.

Truncation error is a few LSB. The radix-2 DIT algorithm and N = 8 are from the
source; the sequential schedule, widths and scaling are this design's.

## How far to trust it

Every module has a self-checking testbench against an independent model in the
bench:

- **Processor cores:** an instruction-level interpreter runs 150 random programs
  plus directed ones. The programs contain loads, stores, forward jumps, `fir`
  and `coef`. The interpreter predicts registers, memory, flags and the exact
  cycle count.
- **FFT:** real-arithmetic DFTs.
- **Filter:** a reference FIR with saturation.

Each testbench was also run against a deliberately broken copy of its module,
and it failed.

What the source does not pin down and this design fills in:

- encodings;
- register count;
- memory sizes (256 words / 256 bytes);
- flag rules;
- forwarding and the load-use stall;
- `wait` semantics;
- the DSP instructions and number formats;
- FFT word widths;
- synchronous active-high reset.

The PC adds 1 because instructions are addressed in words. A byte-addressed
32-bit MIPS datapath, which the source also sketches, would add 4. `mult` keeps
only the low byte of the product.

Not built, because the source only names them:

- a DCT / inverse DCT unit;
- VLIW issue of several arithmetic units per instruction;
- the microcontroller's input/output ports.

## Simulating

All files are SystemVerilog-2017. The package must be read first. With
Verilator 5, for example the end-to-end test:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/risc_pkg.sv tb/tb_risc_dsp_top.sv --top-module tb_risc_dsp_top -o sim
./obj_dir/sim
```

Every testbench ends with a line `TB_RESULT checks=N failures=M` and has a
watchdog.

| testbench | what it runs |
|---|---|
| `tb_risc_dsp_top` | full system at default parameters. A 16-sample filtering loop on both cores checks outputs, checksum and cycle counts (210 pipelined, 177 single-cycle). Four FFTs run concurrently. Requires at least one stall, forward, taken and untaken jump, saturation, halt and FFT. |
| `tb_risc_core`, `tb_single_cycle_core` | directed and 150 random programs against the interpreter |
| `tb_fft8`, `tb_fft_butterfly` | transforms and butterflies against real arithmetic, latency |
| `tb_dsp_unit` and the three stage benches | filter against a reference, saturation |
| `tb_alu`, `tb_decoder`, `tb_register_set`, `tb_data_memory`, `tb_instruction_memory`, `tb_program_counter` | unit checks |

To write programs, use `risc_pkg::enc_rr(op, rd, rs)` and
`risc_pkg::enc_ri(op, rd, imm)`. Load the words through `prog_we`,
`prog_addr` and `prog_data` while `rst` is high, then release reset. Reset
does not clear the data memory.
