# EE183: a 12-bit pipelined RISC microcontroller, and the fractal pipeline it replaces

A pipeline built for one job has a problem: keeping it busy takes control logic
that is specific to that job. This can get complicated. The EE183 processor
avoids that by making the pipeline generic. One four-stage pipeline runs any
program. Each instruction word carries its own control, and that control moves
down the pipe beside the data. Every stage acts only on the fields it is
handed. So the control logic is small, and the pipe can take one instruction
per clock with no stalls. Three things handle hazards:

- forwarding paths for data dependences;
- an always-executed delay slot after each jump;
- a bypass of the condition codes.

This repository holds SystemVerilog for two designs:

- **`ee183_system`**: the processor core with its instruction ROM, data RAM,
  memory-mapped DIP switches and LEDs, and a free-running timer.
- **`fractal_pipe`**: a fixed five-stage Mandelbrot/Julia iteration data path.
  It is the kind of single-purpose pipeline that motivates the processor. It
  is included as a design of its own.

`lecture9_top` places the two side by side. They share only the clock and
reset.

## The machine at a glance

| property | value |
|---|---|
| data word | 12 bits |
| registers | 8 general purpose (R0..R7). R0 is an ordinary register. |
| instruction word | 16 bits, three register operands |
| instructions | 43 in total: 28 ALU, 12 jumps, LOAD, STORE, LOADLIT |
| addressing | register-indirect loads and stores |
| pipeline | 4 stages: I (fetch), R (decode/read), E (execute), W (write) |
| throughput | 1 instruction per clock, never stalls |
| instruction ROM | 256 x 16 (the 8-bit jump target) |
| data RAM | 4096 x 12 (the whole 12-bit address space) |

## Instruction words

Bits [15:14] select the class of instruction.

```
 15 14 | 13 12 11 | 10  9  8  7  6 |  5  4  3 |  2  1  0
  0  1 |    WC    |       OP       |    RA    |    RB        ALU: WC = f(RA, RB)
  1  0 |    WC    |      literal [10:0], sign-extended       LOADLIT
  1  1 |    WC    | S  0  0  0  0  |    RA    |    RB        S=0 LOAD  WC = mem[RA]
       |          |                |          |              S=1 STORE mem[RA] = RB
  0  0 |  0  T  c3 c2 c1 c0 | target [7:0]                   jump
```

- **ALU opcodes.** Ops 0 to 11 are arithmetic and shifts:
  - 0 ADD, 1 ADDINC (A+B+1), 2 SUB, 3 SUBDEC (A-B-1), 4 INCA, 5 NEGA, 6 DECA;
  - 7 SHL, 8 SHR, 9 ASR, 10 ROL, 11 ROR (all by one bit).

  Ops 16 to 31 are the sixteen two-input boolean functions. The low four
  opcode bits are the truth table: result bit *i* = `OP[{A[i], B[i]}]`. So
  ZEROS = 16, AND = 24, XOR = 22, OR = 30, ONES = 31. Ops 12 to 15 are unused
  and give 0.
- **Condition codes.** Only ALU instructions set them:
  - N = bit 11 of the result;
  - Z = result is zero;
  - C = carry out of the adder. For a subtraction this means "no borrow". For
    a shift it is the bit shifted out. Boolean ops clear it.
- **Jumps.** The jump is taken when the condition equals T. JT (T=1) jumps if
  the condition is true; JF (T=0) jumps if it is false. The conditions are:
  TRUE 0, NEG 1, ZERO 2, CARRY 3, EXT 4 (the external input) and NEGZERO 7.
  Six conditions with two senses give the 12 jump instructions.
- **NOP.** The all-zero word is `JF.TRUE`: it never jumps and writes nothing.
  A pipeline register cleared to zero therefore holds a bubble.

The following words are fixed by the lecture's assembler example:

| word | instruction |
|---|---|
| `4400` | ZEROS R0 |
| `8810` | LOADLIT R1,16 |
| `4001` | ADD R0,R0,R1 |
| `4988` | DECA R1,R1 |
| `0702` | JF.NEGZERO 02 |
| `1005` | JT.TRUE 05 |
| `0000` | NOP |

The rest of the encoding was chosen to fit around these words. The package
`ee183_pkg` has encoder functions (`enc_alu`, `enc_lit`, `enc_load`,
`enc_store`, `enc_jump`). The testbenches use them as a small assembler.

## The pipeline, stage by stage

```
   I            R                       E                          W              (write-back)
 PC -> IROM -> [I/R] -> CNTRL ------> [R/E ctrl] -> FWD muxes -> ALU --> [E/W] -> W mux -> [WB] --> register file
                        reg file A,B -> [R/E A,B]       |          \-> RAM ---------^
                        jump? -> PC                      +-- mem_addr = A, mem_wdata = B
```

- **I.** The PC addresses the instruction ROM. The ROM reads synchronously, so
  its output register is the I/R pipeline register.
- **R.** `ee183_control` (CNTRL) decodes the word into a `ctrl_t` bundle. The
  bundle holds:
  - the destination WC and the sources RA and RB;
  - the opcode and the literal;
  - flags for ALU, literal, load and store.

  The register file is read at RA and RB. The bundle and both operands go
  into the R/E register together. The jump decision is also made here, and
  loads the PC.
- **E.** `ee183_fwd` picks each operand (see below). `ee183_alu` computes the
  result and the condition codes. A LOADLIT takes its literal instead. Loads
  and stores put register A on the address bus and register B on the
  write-data bus.
- **W.** A multiplexer picks the ALU result or the word read from memory,
  which arrives in this cycle. Its output is latched into the write-back
  register.
- **Write-back.** The write-back register writes register WC of the register
  file in the following clock.

A result is thus written to the register file four clocks after the
instruction left the ROM. The next three instructions are already in the pipe
by then. The following sections cover the three mechanisms that keep those
instructions correct. This is the subtle part of the design.

### Data hazards: three ways to get a fresh operand

Take instruction *n* in E. The instructions ahead of it may have results that
are not yet in the register file:

| writer | where its result is when *n* is in E | how *n* gets it |
|---|---|---|
| *n-1* | leaving the W multiplexer | forwarded from W (`sel = 1`) |
| *n-2* | in the write-back register | forwarded from the write-back register (`sel = 2`) |
| *n-3* | being written to the register file while *n* was in R | write-through in the register file |

The forwarding unit gives the nearest writer priority. For example, when both
*n-1* and *n-2* write R3, *n* must see *n-1*'s value. A word loaded from
memory reaches W at the same time as an ALU result would. So it is forwarded
in the same way, and a loaded value can be used by the very next instruction
without a stall. The cost is a longer path: RAM output, W multiplexer, operand
multiplexer and ALU all lie in one cycle.

### Control hazards: the delay slot

A jump is decided in R. By then the next word has already been fetched. That
word, the *delay slot*, always executes whether the jump is taken or not. If
there is nothing useful for the slot, put a NOP there. Nothing is annulled or
flushed. Do not put a jump in the delay slot of a taken jump; an assertion in
the core reports it.

The lecture's sample listing has no NOP after its `JF.NEGZERO` loop-back. As
printed, the following `JT.TRUE` would run in the delay slot of every taken
jump. The testbenches therefore use that program with a NOP added after the
jump.

### Condition codes: the jump sees the instruction just before it

A jump tests the condition codes of the last ALU instruction before it in
program order. When the jump is in R, that instruction may still be in E, with
its flags just computed. The jump then takes the flags straight from the ALU.
Otherwise it uses the condition-code register, which is updated at the end of
E by every ALU instruction. So the common pattern `DECA R1,R1` followed
immediately by `JF.NEGZERO loop` needs no NOP between the two instructions.

## System and memory map (`ee183_system`)

The core, the ROM, the RAM and `ee183_io` share one data bus. The bus
addresses 12-bit words.

| address | read | write |
|---|---|---|
| `0x000`..`0xFFD` | RAM | RAM |
| `0xFFE` | free-running timer (counts one per clock from reset, wraps) | ignored |
| `0xFFF` | DIP switches | LED register |

A LOADLIT of `0x7FF` sign-extends to `0xFFF`, so one instruction sets up the
I/O address. I/O reads have the same one-clock timing as RAM reads.
`ext_cond` is an external input that the EXT condition tests. The ROM has a
load port (`prog_we`, `prog_addr`, `prog_data`). A program can also be given
as a hex file through the `IROM_INIT` parameter.

Bus timing at the core (`ee183_cpu`): `mem_addr`, `mem_wdata`, `mem_we` and
`mem_re` are valid in the E cycle. `mem_rdata` must hold the addressed word in
the next cycle. The reset is synchronous and active high. It sets the PC to 0,
fills the pipe with NOPs and clears the registers.

## The fractal iteration pipeline (`fractal_pipe`)

The pipeline computes one step of `z <- z^2 + c` together with an escape test:

```
x' = x^2 - y^2 + cx      y' = 2xy + cy      escape = x^2 + y^2 > 4
```

| stages | work |
|---|---|
| 1 to 3 | Three 3-stage multipliers form x*x, x*y and y*y. A multiplexer picks c: the pixel's coordinate (Mandelbrot mode) or a fixed constant (Julia mode). c travels along in pipeline registers. |
| 4 | x^2 - y^2, a shift left by one for 2xy, and x^2 + y^2 |
| 5 | The two additions of c and the compare against 4 |

- **Throughput.** A point can enter on every clock. `out_valid` rises five
  clocks later.
- **Feedback.** The outputs carry the c that was used, so a caller can feed a
  result straight back in.
- **Utilisation.** A single pixel leaves the pipe idle four clocks out of
  five. With five pixels in flight every stage is busy. The top-level test
  runs the pipeline this way and checks for 100 % utilisation.
- **Number format.** Words are signed fixed point: `W` = 16 bits, of which
  `FRAC` = 12 are fraction bits (range ±8). Squares are kept at full
  precision. x' and y' are truncated to 16 bits and may wrap once a point has
  escaped. The escape flag reports that case.

## How far to trust it, and what is this design's own

The following come from the lecture:

- the 12-bit word, 8 registers, 16-bit words with three operands, 43
  instructions (28/12/2 plus the literal load), and the four stages I, R, E, W;
- forwarding from the previous instruction, and the jump delay slot;
- the field layout of ALU words and every encoding listed above;
- the system's blocks (ROM, RAM, I/O on the data bus, external condition,
  reset), memory-mapped switches and LEDs, and a free-running timer;
- the fractal data path's structure (multiplexers, three 3-stage multipliers,
  subtract / shift / add, final adds, compare with 4).

The following are choices made here:

- the opcode numbers other than ADD, DECA and ZEROS, and the condition
  numbers other than TRUE and NEGZERO;
- the load/store word layout and the sign-extension of literals;
- forwarding from two instructions back, and the register-file write-through;
- the condition-code bypass from E;
- synchronous ROM and RAM, and the memory sizes;
- the I/O addresses, the timer's width and rate, and the ROM load port;
- separate read and write data buses in place of one bidirectional bus;
- the fractal number format and its valid signal.

Not built: the memory-mapped VGA display that the processor is meant to drive.
Nothing about its resolution, timing or frame-buffer layout is known.

Verification: every module has a self-checking testbench. The processor is
compared, register by register and word by word, against an
instruction-level model (`tb/ee183_ref_pkg.sv`). The model is run on random
programs that use every opcode, every condition, loads and stores, I/O and
forward jumps with filled delay slots. The directed tests check the
following:

- the sample loop's result (R0 = 136) and its timing (one instruction per
  clock);
- timer reads three clocks apart that differ by exactly 3;
- forwarding of a loaded word;
- both values of the external condition.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops. With plain
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ee183_pkg.sv tb/ee183_ref_pkg.sv tb/tb_lecture9_top.sv \
    --top-module tb_lecture9_top -o sim && obj_dir/sim
```

Use the same command with another testbench to test a single block:
`tb_ee183_alu`, `tb_ee183_regfile`, `tb_ee183_control`, `tb_ee183_fwd`,
`tb_ee183_irom`, `tb_ee183_dram`, `tb_ee183_timer`, `tb_ee183_io`,
`tb_ee183_cpu`, `tb_ee183_system` or `tb_fractal_pipe`. `tb_lecture9_top` runs
both designs at their default sizes. It counts how often each mechanism fired:

- forwarding from W and from write-back, forwarding of a loaded word, and the
  register-file write-through;
- taken and not-taken jumps, the condition-code bypass and register, and the
  external-condition jump;
- each kind of memory and I/O access;
- both fractal modes, escapes and a full pipe.

A mechanism that never fired counts as a failure.

## Files

| file | contents |
|---|---|
| `rtl/ee183_pkg.sv` | widths, opcode/condition enums, the `ctrl_t` bundle, encoders |
| `rtl/ee183_cpu.sv` | the four-stage core |
| `rtl/ee183_control.sv` | R-stage decode and jump decision |
| `rtl/ee183_fwd.sv` | forwarding selection |
| `rtl/ee183_alu.sv` | ALU and condition codes |
| `rtl/ee183_regfile.sv` | 8 x 12 register file with write-through |
| `rtl/ee183_irom.sv` | instruction ROM |
| `rtl/ee183_dram.sv` | data RAM |
| `rtl/ee183_io.sv` | memory-mapped switches, LEDs, timer |
| `rtl/ee183_timer.sv` | free-running timer |
| `rtl/ee183_system.sv` | the microcontroller |
| `rtl/pipe_mult.sv` | pipelined signed multiplier |
| `rtl/fractal_pipe.sv` | fractal iteration pipeline |
| `rtl/lecture9_top.sv` | both designs side by side |
| `tb/ee183_ref_pkg.sv` | instruction-level model, sample, directed and random programs |
| `tb/ee183_sample.hex` | the summing loop, assembled, for the ROM's `INIT_FILE` test |
| `tb/tb_*.sv` | one testbench per module |
