# A small application-specific processor for Mandelbrot-set arithmetic

The Mandelbrot set is computed by iterating z ← z² + c over complex numbers
and watching whether |z| stays below 2. On a plain 32-bit RISC core every
complex add, subtract, multiply or square becomes a routine of several integer
instructions. This processor instead adds complex numbers as a native data
type: a register file of complex values and single instructions that add,
subtract, multiply and square them, plus loads, stores and moves at 16, 32 and
64 bits. One Mandelbrot iteration is two instructions: `CSQU z, z` then
`CADD z, z, c`.

The processor is a five-stage in-order pipeline in the style of a small
configurable RISC core (fetch, register read, execute, memory, write back)
with separate instruction and data memories. To save area, related
instructions share one datapath: CADD and CSUB run on a single
adder/subtractor, and CSQU runs on the CMUL multiplier.

## Complex numbers and register files

| Register file | Entries | Width | Contents |
|---|---|---|---|
| AR | 16 | 32 | integers and addresses |
| CR | 16 | 64 | one complex number: real part in bits 63:32, imaginary part in bits 31:0, each a 32-bit two's-complement integer |

The arithmetic is plain integer arithmetic on each component. Results wrap
modulo 2³² with no saturation and no rounding. A product keeps the low 32 bits
of each component. Any fixed-point scaling is left to software. The checked
example (8965 + 4523j) × (3578 + 7412j) = −1447706 + 82631874j fits without
wrapping.

## Instruction set

Every instruction is 24 bits wide and has the layout of the base core's `ADD`:

```
 23      16 15  12 11   8 7    4 3    0
+----------+------+------+------+------+
|  opcode  |  r   |  s   |  t   | 0000 |
+----------+------+------+------+------+
```

`r` is the destination, except in stores, where it names the register whose
value is stored. `s` and `t` are sources. Bits 3:0 must be zero; a word with
another value there, or with an unknown opcode, does nothing. Only `ADD`'s
opcode comes from the base core. All other opcodes are this design's own
assignment, kept in `asip_pkg.sv`.

| Opcode | Mnemonic | Effect |
|---|---|---|
| 0x80 | `ADD ar, as, at` | AR[r] ← AR[s] + AR[t] |
| 0x81 | `MOVI ar, imm8` | AR[r] ← sign-extended 8-bit immediate, stored in the s,t fields |
| 0x60 | `CADD cr, cs, ct` | CR[r] ← CR[s] + CR[t] |
| 0x61 | `CSUB cr, cs, ct` | CR[r] ← CR[s] − CR[t] |
| 0x62 | `CMUL cr, cs, ct` | CR[r] ← CR[s] × CR[t] |
| 0x63 | `CSQU cr, cs` | CR[r] ← CR[s]² |
| 0x64 | `LDA16 cr, as, t` | CR[r] ← (sext mem16, 0) |
| 0x65 | `LDA32 cr, as, t` | CR[r] ← (sext mem32[31:16], sext mem32[15:0]) |
| 0x66 | `LDA64 cr, as, t` | CR[r] ← mem64 |
| 0x67 | `STA16 cr, as, t` | mem16 ← CR[r].re[15:0] |
| 0x68 | `STA32 cr, as, t` | mem32 ← {CR[r].re[15:0], CR[r].im[15:0]} |
| 0x69 | `STA64 cr, as, t` | mem64 ← {CR[r].re, CR[r].im} |
| 0x6A | `MOV cr, as, at` | CR[r] ← (AR[s], AR[t]) |
| 0x6B | `MOVE cr, cs` | CR[r] ← CR[s] |

Loads and stores address AR[s] + t × (access size in bytes). Accesses are
naturally aligned: the low address bits are ignored. Memory is little-endian.
The 32-bit transfers move a complex value packed as two 16-bit halves, which
is a compact form for operands. The 64-bit transfers move a full CR register.

## The pipeline

```
      I            R              E               M              W
 PC -> imem -> decode,      -> tie_exec     -> dmem access -> AR / CR
                AR/CR read     (addsub, mul,   (loads are      write
                               moves, address) formatted)
```

- **I (fetch).** The PC is a word index into the instruction memory. The
  memory reads combinationally, so the instruction is latched at the end of the
  same cycle. There are no branches: while `run` is high the PC counts up by
  one per cycle, unless the pipeline is stalled.
- **R (register read).** `instr_decoder` turns the word into a control
  struct (`ctrl_t`). Both register files are read here. The CR file has only
  two read ports: the second one reads CR[t], or CR[r] for a store, because no
  instruction needs both.
- **E (execute).** `tie_exec` holds the shared `cplx_addsub` and `cplx_mul`
  and selects the result. It also forms the memory address and right-aligns
  the store data.
- **M (memory).** Stores write at the end of the cycle. Loads read
  combinationally, and the data is sign-extended into a complex value in this
  stage.
- **W (write back).** The result is written into AR or CR, and `retire`
  pulses.

Each instruction spends exactly one cycle in each stage. Without stalls, one
instruction retires per cycle, and an instruction fetched in cycle n is
written back in cycle n + 4. So a program of N instructions takes
(N − 1) + stalls + 4 cycles from its first fetch to its last write-back.

### Hazards

An instruction in E can read a register that an older instruction has not yet
written back. The design handles this in three ways:

1. **Bypass from M.** An ALU or move result that sits in the E/M register is
   forwarded into the operand multiplexers of E.
2. **Bypass from W.** A result that sits in the M/W register, including load
   data, is forwarded the same way. The M bypass has priority because it holds
   the younger value.
3. **Write-through register files.** A register read in R during the cycle in
   which W writes that register returns the new value.

Load data does not exist until the end of M. So when the instruction right
after a load reads the loaded CR register (as a source or as store data), it
waits one cycle in R. A bubble goes into E, and the value then comes through
the W bypass. This is the only stall. Assertions in `asip_core` check that a
stall always has a load in E as its cause, and that it never lasts two cycles.
The outputs `evt_stall`, `evt_bypass_m` and `evt_bypass_w` report each event.

## Memories and the host port

`asip_top` connects the core to `imem` (256 × 24 bits, that is 768 bytes of
code) and `dmem` (2 KiB, 64-bit words with 16/32/64-bit access).
Both sizes are parameters (`IMEM_DEPTH`, `DMEM_BYTES`). The host side works
like this:

1. Hold `run` low. Write the program from word 0 through `prog_we`,
   `prog_addr` and `prog_data`. Write the data as 64-bit words through
   `host_we`, `host_addr` and `host_wdata`.
2. Raise `run`. Count cycles with `run && !evt_stall` as fetches, and lower
   `run` once the whole program has been fetched. Fetching past the end is
   harmless if the next word is zero, because a zero word does nothing.
3. Wait for `busy` to fall. The core owns the data memory while `busy` is
   high, so stores still in the pipeline are not lost.
4. Read the results through `host_addr` and `host_rdata`. The read is
   combinational.

An assertion flags any host write made while the core is busy. Reset (`rst_n`,
active low, asynchronous) clears the PC, the pipeline and both register files.
It does not clear the memories.

## What is verified

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- `tb_cplx_addsub`, `tb_cplx_mul`: the published examples CADD → 12543 +
  11935j, CSUB → 5387 − 2889j, CMUL → −1447706 + 82631874j and
  CSQU(8965 + 4523j) → 59913696 + 81097390j, plus random operands against
  64-bit reference arithmetic.
- `tb_instr_decoder`, `tb_tie_exec`, `tb_regfile`, `tb_imem`, `tb_dmem`:
  field by field and operation by operation, against shadow models.
- `tb_asip_core`: twelve random programs of about 220 instructions, written
  to produce many back-to-back dependences. The final memory image, which
  includes a dump of every register, is compared with an instruction-level
  model (`tb_asm_pkg::iss_model`). This testbench also checks the retire count
  and the exact cycle count. Across all the programs it sees over a hundred
  stalls and hundreds of bypasses of each kind.
- `tb_asip_top`: the whole design at its default sizes. It runs the published
  examples through the pipeline at all three transfer widths, and ten unrolled
  Mandelbrot iterations for c = 1 (giving 1, 2, 5, 26, 677, …), c = −1 (−1, 0,
  −1, …), c = j and c = −1 + j. It checks that a lone instruction writes back 4
  cycles after fetch and that every program takes (N − 1) + stalls + 4
  cycles. It also requires at least one stall, one bypass of each kind, and
  one use of every opcode.

- `tb_mandel_grid`: a small Mandelbrot workload. One fixed program of eight
  unrolled iterations runs for each Gaussian-integer c = a + bj with a in −3..1
  and b in −2..2. The host checks every stored iterate against the model and
  classifies each point by whether an iterate reaches |z|² > 4. The bounded
  points must be exactly 0, −1, −2, j and −j. The testbench prints the grid as
  a character map.

To run one testbench with plain Verilator, from the directory that holds
`rtl/` and `tb/`:

```
verilator --binary --timing --assert --top-module tb_asip_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/asip_pkg.sv tb/tb_asm_pkg.sv tb/tb_asip_top.sv
./obj_dir/Vtb_asip_top
```

To write programs, use `enc()` and `enc_movi()` in `tb/tb_asm_pkg.sv`, which
assemble instructions, and the `iss_model` class there, which predicts results.

## Where this design stops, and what is its own

- **Base core.** Only the instructions listed above exist. The base core that
  this kind of extension is normally attached to is not reproduced. Its full
  instruction set, branches, calls, interrupts, exceptions, caches, 16-bit
  density instructions and the 7-stage pipeline option (an extra fetch stage
  and an extra memory stage) are all absent. As a result, a complete
  Mandelbrot program with an escape test (|z| < 2) and a loop cannot run. The
  iterations must be unrolled, and the escape test must be done outside.
- **Opcodes and instruction semantics.** The opcodes of the new instructions,
  the `MOVI` instruction, the exact meaning of the 16- and 32-bit transfers
  and `MOV`, and the scaled-offset addressing are all choices made for this
  design.
- **Data widths.** The complex register is 64 bits (two 32-bit parts), so
  that products of 16-bit operands are kept exactly. Wider results wrap.
- **Timing and hazards.** Single-cycle combinational multiply in E, the
  bypass network, the load-use stall, and the combinational memory reads are
  this design's choices. No clock target is built in. The reference
  configuration ran at a 1.26 ns clock period; a single-cycle 32 × 32 complex
  multiply is unlikely to meet that without pipelining.
- **Approximation.** The only approximation in the arithmetic is the
  truncation and wrap-around of results. No other approximate circuit is
  included.
- **Performance figures not reproduced.** The reference implementation
  reports cycle counts of whole software routines on its base core: 11, 11,
  12 and 7 cycles for CADD, CSUB, CMUL and CSQU routines, against 34, 35, 50
  and 46 cycles without the extension. It also reports gate-count area
  shares, with the register file as the largest part, and a saving of about
  1.5× from sharing one adder/subtractor between CADD and CSUB. None of these
  can be compared with this RTL. Here each of the four instructions issues in
  one cycle.

## Files

| File | Role |
|---|---|
| `rtl/asip_pkg.sv` | widths, `cplx_t`, opcodes, control struct |
| `rtl/asip_top.sv` | core + memories + host port |
| `rtl/asip_core.sv` | five-stage pipeline, bypass and stall logic |
| `rtl/instr_decoder.sv` | instruction word → `ctrl_t` |
| `rtl/tie_exec.sv` | execute-stage result selection, address, store data |
| `rtl/cplx_addsub.sv` | shared CADD/CSUB datapath |
| `rtl/cplx_mul.sv` | shared CMUL/CSQU datapath |
| `rtl/regfile.sv` | 2-read/1-write register file (AR and CR) |
| `rtl/imem.sv`, `rtl/dmem.sv` | instruction and data memories |
| `tb/tb_asm_pkg.sv` | assembler helpers and the instruction-level reference model |
| `tb/tb_*.sv` | one self-checking testbench per module |
