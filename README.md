# FPFA tile: a coarse-grain reconfigurable DSP tile and its control path

A Field Programmable Function Array (FPFA) is a reconfigurable accelerator for
digital signal processing built from word-level ALUs instead of the bit-level
logic blocks of an FPGA. The device is a grid of identical *processor tiles*;
this RTL implements one tile. A tile has five *processing parts*, each with a
three-level ALU, two local memories, input register banks and output registers,
all joined by a crossbar.

The interesting part is the control. A processing part has well over a hundred
control bits, and a tile five times that. Driving them all every cycle from a
program would need very wide instructions. This design cuts them down twice:

1. **Configuration registers.** Each data-path entity (the ALU, the register
   banks, the crossbar taps, each memory) has a small register file of complete
   32-bit configurations. The host loads these once, before a program runs.
   While it runs, a short select picks one of them per cycle. A processing
   part then needs only 10 select bits instead of its 160 configuration bits.
2. **Vertical microprogramming.** The 5 x 10 = 50 select bits of a tile are
   themselves stored in a 64-entry decoder table. The tile's sequencer issues
   a 6-bit *tile instruction code* per cycle, and the decoder expands it.

So a running program is a sequence of 6-bit codes. The configuration registers
act as a *temporal instruction set* that the host defines for each algorithm.
Loading them is "configuring the device". Loading other values between two
programs is dynamic reconfiguration.

```
 host port ──► program memory ─► tile control ──6──► decoder ──50──► 25 configuration registers ──► data path
                                 (sequencer)          (64 x 50)      (5 per processing part)         (5 parts + crossbar)
```

## Files

| file | what it is |
|---|---|
| `rtl/fpfa_pkg.sv` | widths, encodings, configuration word layouts (structs) |
| `rtl/fpfa_tile.sv` | **top**: five processing parts, crossbar, sequencer, decoder, host port |
| `rtl/fpfa_tilectl.sv` | tile control sequencer with a loop counter |
| `rtl/fpfa_decoder.sv` | 64 x 50 decoder table |
| `rtl/fpfa_pp.sv` | processing part: ALU, 2 memories, 4 register banks, 2 output registers, CR1..CR5 |
| `rtl/fpfa_cfgreg.sv` | configuration register (DEPTH x 32) |
| `rtl/fpfa_alu.sv` | three-level ALU |
| `rtl/fpfa_fblock.sv` | level-one function block (add, sub, abs, min, max) |
| `rtl/fpfa_regbank.sv` | 4 x 20-bit input register bank |
| `rtl/fpfa_outreg.sv` | bypassable output register |
| `rtl/fpfa_mem.sv` | 256 x 16 local memory with address register |
| `rtl/fpfa_crossbar.sv` | tile crossbar (10 shared buses) |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_fpfa_fir_transposed.sv`, `tb/tb_fpfa_fft.sv` | whole algorithms on a tile |

## The ALU

Each ALU takes four 20-bit inputs `a b c d` (one from each register bank) and
produces two 20-bit outputs `out1 out2`. It has three levels:

* **Level 1** computes `Z1 = f3(f1(a,b), f2(c,d))`. Each `f` is add, subtract,
  absolute difference `|x-y|`, minimum or maximum, so for example
  `abs((a+b) - max(c,d))` takes one pass. It works on 20 bits and wraps.
* **Level 2** multiplies and adds. `X` comes from `a|b|c|d` (`selmx`), `Y` from
  `a|b|c|d|Z1` (`selmy`), and `E` from `0 | d_fp | d_se | east` (`selme`). It
  computes `MAC = X*Y ± E` (`cta` = 1 subtracts). The multiplier is
  sign-magnitude: the two 19-bit magnitudes are multiplied unsigned, and the
  product takes the XOR of the signs. `Z2` is `Z1` or `MAC` (`selmz`). `Z2`
  also leaves the ALU as `west`, 40 bits.
* **Level 3** is a butterfly. It computes `o1 = B + Z2` and `o2 = B - Z2`, with
  `B` from `0 | c_se | {c,d} | c_fp` (`selmb`). Then `out1` is one of
  `o1_fp | o1_low | o1_high | o2_low`, and `out2` is one of
  `o2_fp | o2_low | o2_high | o1_high`.

Subscripts: `_se` means sign-extended to 40 bits. `_fp` means fixed point:
operands are Q1.15 held in 16 bits, so `x_fp = x << 15` and `o_fp = o >> 15`.
`_low` and `_high` are bits 19:0 and 39:20. So level 3 gives a rounded-down
Q1.15 result, or either half of a 40-bit integer.

The ALUs are chained: ALU *i*'s `east` input is ALU *i+1*'s `west` output. This
lets neighbouring ALUs add their products without going through the crossbar.
A 4-tap FIR, or the real and imaginary halves of a complex multiply, fits in
one cycle this way. ALU 4's `east` input and ALU 0's `west` output are ports of
the tile.

The 24 function bits (`ctf1..3`, `selmx`, `selmy`, `selme`, `cta`, `selmz`,
`selmb`, `selmo1`, `selmo2`) and the four 2-bit register read addresses make up
the 32-bit CR1 word (`cr1_t`).

## A processing part and its five configuration registers

| CR | entries | select bits | controls | layout |
|---|---|---|---|---|
| CR1 | 4 x 32 | 2 | ALU function, register bank read addresses | `cr1_t` |
| CR2 | 8 x 32 | 3 | register bank write enables and addresses; output register load and bypass | `cr2_t` |
| CR3 | 8 x 32 | 3 | bus feeding each register bank; bus driven by each output register | `cr3_t` |
| CR4 | 4 x 32 | 2 (shared) | mem1: write, write-data bus, read-port driver, address update | `memcfg_t` |
| CR5 | 4 x 32 | 2 (shared) | mem2: same | `memcfg_t` |

CR4 and CR5 share one 2-bit select, so a part has 2+3+3+2 = 10 select bits
(`ppsel_t`). **A consequence to plan around:** the two memories of a part always
switch configuration together. The testbench programs show how to share the
four CR4/CR5 entries between the phases of an algorithm.

Data moves in three widths. Memories hold 16-bit words, and their read port
sign-extends them to 20 bits. Register banks, output registers and the
crossbar carry 20 bits. ALU levels 2 and 3 and the East-West chain carry 40.

### Local memory addressing

Each memory has an 8-bit address register. Reads are asynchronous from it, and
writes go to it. In every running cycle the memory configuration picks one
address update:

| `aop` | next address |
|---|---|
| `AOP_HOLD` | unchanged |
| `AOP_BASE` | `base` |
| `AOP_STRIDE` | address + `stride` |
| `AOP_INDEX` | `base` + low 8 bits of the bus chosen by `wsel` (table lookup) |

The write data and the `AOP_INDEX` index both come from the bus chosen by
`wsel`. So in one cycle a memory cannot store one bus value and take its next
address from another. Programs spend an extra cycle on that (step 7 of the FFT
loop below).

## Crossbar

A tile has 10 shared 20-bit buses. There are 20 sources: per part, the two
output registers and the two memory read ports. Each source has a driver with
an enable and a 4-bit bus number. The drivers would be tri-state in silicon;
here they are an OR of the enabled sources, so an undriven bus reads 0. Every
register bank and memory write port picks one bus with a 4-bit select. A bus
number of 10 or more picks nothing. Two drivers on one bus is a programming
error. The crossbar raises `conflict`, and an assertion in `fpfa_tile` fires
if that happens while the reset is released.

## Tile control and timing

The sequencer's program memory holds 64 words of 16 bits:
`{spare[1:0], op[1:0], target[5:0], code[5:0]}`.

| `op` | effect (the word's `code` is always issued) |
|---|---|
| `SQ_NEXT` | go to the next word |
| `SQ_SETC` | loop counter ← `target`, then go to the next word |
| `SQ_LOOP` | if counter ≠ 0: decrement it and jump to `target`, else go on |
| `SQ_HALT` | stop |

A body closed by `SQ_LOOP` after `SQ_SETC n` runs n+1 times. There is one loop
counter and no nesting.

Timing from a `start` pulse:

* cycle 1: the sequencer fetches the first word;
* each following cycle: the code fetched in the cycle before is *valid*. The
  decoder and the configuration registers are combinational, so that code's
  configuration drives the data path in that cycle, and registers, memories
  and address registers update at its end;
* `done` is high during the cycle of the last (`SQ_HALT`) instruction. Results
  can be read through the host port from the next cycle.

`busy` is therefore high for 1 + (number of issued instructions) cycles. While
no code is valid the data path holds still: nothing is written and nothing
drives the crossbar.

Inside one cycle, a memory read can reach a register bank through the crossbar.
An ALU reads its register banks, and its result can reach the crossbar through
a bypassed output register and be written into a memory. So a software
pipeline of "read sample → compute previous sample → store previous result"
runs at one instruction per cycle.

## Host port

The port stands in for the tile's communication unit, which is not specified
here. With `host_we` high, at the clock edge:

| `host_tgt` | writes |
|---|---|
| `H_CR` | part `host_pp`, CR `host_sub` (1..5), entry `host_addr[2:0]` ← `host_wdata[31:0]` |
| `H_DEC` | decoder entry `host_addr[5:0]` ← `host_wdata[49:0]` (part *i* in bits 10i+9 : 10i) |
| `H_PROG` | program word `host_addr[5:0]` ← `host_wdata[15:0]` |
| `H_MEM` | part `host_pp`, memory `host_sub[0]` (0 = mem1), word `host_addr` ← `host_wdata[15:0]` |

`host_rdata` shows the memory word selected by `host_pp`, `host_sub[0]` and
`host_addr` combinationally. A host memory write has priority over a write from
the data path. Reset (`rst_n` low, synchronous) clears the configuration
registers, register banks, output registers, address registers and the
sequencer. It does not clear the memories, the decoder table or the program.

## Mapping the algorithms

`tb/tb_fpfa_tile.sv` runs four programs on one tile at its default size,
reconfiguring between them. It checks every result against a model:

* **4-tap FIR, direct form.** Part *k* holds coefficient `h[3-k]` and a copy of
  the sample stream shifted by *k*. Parts 0..3 chain their products through
  East-West, and part 0 bypasses the sum straight into its mem2. The loop body
  is one instruction: 41 outputs take 42 instructions (43 busy cycles).
* **Linear interpolation** `F(x) = F(x0) + xf * (F(x1) - F(x0))` on part 4.
  First the index sets the mem1 address (`AOP_INDEX`). Then the two table
  values are read into banks `c` and `a`. The constant fraction is in banks
  `b` and `d`. One ALU pass computes `Z1 = (a-b)-(c-d) = F1-F0`,
  `Z2 = d*Z1` and `out1 = (c_fp + Z2)_fp`. The result is captured in the
  output register and written over the index. This takes 5 instructions per
  point.
* **Both at once.** Several data streams can share a tile. One program runs
  the interpolation loop on part 4. The first of its five instructions also
  carries the FIR loop body for parts 0..3, and in the other four the FIR
  parts are idle. The two streams use different buses, so they do not
  disturb each other. The decoder entries combine the selects of both.
* **Radix-2 FFT butterfly.** Part 1 forms `W_im*b_im` and part 0 forms
  `W_re*b_re - east`, plus and minus `a_re`. Parts 3 and 2 do the same for the
  imaginary half. Results are in Q1.15.

Two more testbenches run whole algorithms on a tile at its default size:

* **`tb/tb_fpfa_fir_transposed.sv` — 4-tap FIR, transposed form.** Part 0's
  mem1 broadcasts each input sample to register bank `b` of parts 0..3. Part
  *k* adds its product to the partial sum of part *k-1*. That partial sum
  arrived through a bypassed output register, the crossbar and bank `d`,
  which together make the one register delay between taps. Part 3 writes the
  outputs. One loop instruction per output; 61 outputs are checked.
* **`tb/tb_fpfa_fft.sv` — radix-2 FFT, in place, 8 and then 16 points.**
  `x_re` is in part 0's mem1 and `x_im` in part 1's mem1, both in
  bit-reversed order. The twiddles are in parts 2 and 3. Part 4's mem1 holds
  an address table with `{ib, iw, ia, ib}` for each butterfly. One
  8-instruction loop body runs every butterfly of all stages:
  1. load the address `ib` from the table (over bus 9, `AOP_INDEX`);
  2. broadcast `b` into the register banks, load the address `iw`;
  3. broadcast `W`, load the address `ia`;
  4. broadcast `a`;
  5. compute `A` and `B` into the output registers;
  6. write `A` at `ia`;
  7. load the address `ib` again;
  8. write `B` at `ib`.

  The address table replaces the stage-dependent address arithmetic, so the
  program does not change from stage to stage or from size to size; only the
  loop count does. An N-point FFT has (N/2)·log2 N butterflies and takes
  8 per butterfly + 3 busy cycles (99 for N = 8, 259 for N = 16). 16 points
  is the largest size this program supports: N = 32 would need a 320-word
  table (a memory has 256 words) and 80 loop passes (the loop count is 6
  bits). The results are checked bit-exactly against a model of the same
  fixed-point arithmetic. They are also checked against a floating-point DFT,
  to within N + 1 LSB, the bound for flooring at every stage.

## Where this design is its own

The division into tiles, processing parts, ALU levels, configuration registers,
decoder and sequencer follows the FPFA architecture. So do the ALU's operations
and multiplexer choices, and the sizes: 5 parts, 4 x 4 x 20-bit register banks,
2 x 256 x 16-bit memories, CR depths 4/8/8/4/4 of 32 bits, 10 selects per part,
a 64-entry decoder and a 6-bit code. The following are choices of this RTL:

* **Configuration word layouts.** The architecture counts 159 control signals
  per part (795 per tile). This layout uses 130 of its 160 configuration bits.
  The rest are marked `spare`. Register read addresses sit in CR1, and the
  split of fields between CR2 and CR3 is also this design's.
* **Memory address generation.** The original memory control is wider than
  this simple address register (hold / base / stride / index). Its exact
  function is unknown.
* **Crossbar.** The bus count (10) and the driver scheme (enable + 4-bit bus
  number; the original drivers appear to have 3 control bits) are assumptions.
* **Numbers.** Q1.15 fixed-point position; wrap-around at 20 and 40 bits;
  `|x-y|` as the "absolute value" of a two-input block; `{c,d}` for `c & d`.
  Multiplier magnitudes are truncated to 19 bits, so -2^19 multiplies as 0.
* **ALU input width.** The ALU inputs are 20 bits (the register width). The
  architecture calls its operands 16-bit; 16-bit memory words arrive
  sign-extended.
* **East-West.** The whole 40-bit `Z2` is passed. Multiple-precision
  arithmetic across ALUs is possible, but any shift it needs is not built in.
* **Sequencer, decoder, host port.** The program format, the single loop
  counter, combinational decoding and the host port are this design's. So is
  suppressing all state changes while no code is valid.
* **Not built:** the grid of 25 tiles and the links between tiles, the
  communication unit, and the general-purpose processor that would sit beside
  the array. None of them is specified in enough detail.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. For
example, the whole tile:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/fpfa_pkg.sv tb/tb_fpfa_tile.sv --top-module tb_fpfa_tile -Mdir obj_tile
./obj_tile/Vtb_fpfa_tile
```

Use the same command with any other testbench in `tb/`. The tile testbench
also prints how often each mechanism was used (loop jumps, bypass, output
register loads, East-West chaining, table lookups, stride steps,
reconfiguration writes). It fails if any of them never happened. It uses
hierarchical references into `fpfa_tile` for those counts, so renaming
internal signals means updating it.

Verilator's `-Wall` lint reports only unused signals and parameters: the spare
configuration bits, the top program-word bits, the memory address outputs (read
only by the memory's own testbench) and some package constants.
