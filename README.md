# SlimSRP-style three-issue VLIW DSP for audio

This is a small digital signal processor meant to sit next to a mobile
application processor and take over always-on audio work such as decoding
music or listening for a voice trigger. It issues up to three 32-bit
operations per cycle to three functional units that are not all alike. Three
ideas keep its power and code size down:

* **A separate immediate register file (IRF).** Filter coefficients and the
  addresses of global variables are often large constants. They are built in
  a four-entry, 21-bit register file instead of the 32-entry data register
  file. A 32-bit constant costs two instructions: one fills an IRF entry with
  the upper 21 bits, and the instruction that uses the constant adds the low
  11 bits itself.
* **Compound DSP instructions.** A dual multiply-add does two 32x16
  multiplies, a 48-bit add and a right shift in one operation. A
  bi-directional shift either rounds to the right or saturates to the left,
  depending on the sign of the shift amount.
* **NOP-free bundles.** Each sub-instruction carries two bits that let the
  hardware put back the NOPs the compiler left out. A bundle therefore takes
  one to three words of program memory instead of always three.

The RTL is written in synthesizable SystemVerilog. It includes the core, an
instruction cache refilled over AXI4, a data scratch-pad with three ports,
and an AXI4-Lite slave through which a host loads data and starts the core.

## Block diagram

```
            AXI4 read (refill)                      AXI4-Lite slave (host)
                   |                                         |
             +-----------+                          +----------------+
             |  icache   |                          | axi_lite_slave |--- start / status
             +-----------+                          +----------------+
                   | 3-word window                           | port 2
             +-----------+   bundle   +------------------+   |
             |  ifetch   |----------->| idecode x3       |   |
             | (bundle_  |            +------------------+   |
             |  expander)|<-- taken/  | drf 32x32  irf 4x21 | |
             +-----------+    target  +------------------+   |
                                      | fu0: Ctrl ALU LSU |--port 0--+
                                      | fu1: MAC  ALU LSU |--port 1--+--> spm (3 ports)
                                      | fu2: MAC  ALU     |          |
                                      +-------------------+  <-------+ load data (MEM stage)
```

## Bundle compression and expansion

This is the least obvious part of the design. Bits `[31:30]` of every
sub-instruction hold the compression field:

| bit | name       | meaning |
|-----|------------|---------|
| 31  | end        | this word is the last of its bundle |
| 30  | NOP-before | one slot before this word holds a NOP that was left out |

`bundle_expander` walks the three words at the PC. It keeps a slot pointer
`p` that starts at 0. For each word, it first adds one to `p` if bit 30 is
set. It then places the word in slot `p` and adds one to `p` again. It stops
after the first word with bit 31 set. Slots that receive no word are NOPs.
The PC then moves on by the number of words used. Examples (`E` = end bit,
`N` = NOP-before bit):

| used slots  | words in memory                      | length |
|-------------|--------------------------------------|--------|
| 0, 1, 2     | `op0` `op1` `op2(E)`                 | 3 |
| 0           | `op0(E)`                             | 1 |
| 1           | `op1(N,E)`                           | 1 |
| 0, 2        | `op0` `op2(N,E)`                     | 2 |
| 2           | `NOP` `op2(N,E)`                     | 2 |
| none        | `NOP(E)`                             | 1 |

Each word has only one NOP-before bit, so it can stand in for only one left-out
slot. A bundle that uses FU2 alone therefore still needs one explicit NOP word.
If no end bit appears within three words, the bundle ends after three words.
If a word would land beyond slot 2, it is dropped. Both cases pulse the
top-level `fault` output.

Because bundles can start at any word, the instruction cache returns a
three-word *window* rather than an aligned line fragment. The window may cross
into the next cache line. `hit` is raised only when every line it touches is
present.

## Instruction set and encoding

The operation classes come from the architecture. The bit layouts and opcode
numbers are this design's own. They are defined in `rtl/slimsrp_pkg.sv`, and
`tb/slimsrp_asm_pkg.sv` has matching encoder functions. Bits `[29:24]` always
hold the opcode.

| layout | fields |
|--------|--------|
| R      | `rd[23:19] ra[18:14] rb[13:9] rc[8:4] sh[3:0]` |
| I      | `rd[23:19] ra[18:14] ir[13] irx[12:11] imm[10:0]` |
| S      | `rb[23:19]` (store data) `ra[18:14]` and then the same fields as I |
| B      | `rb[23:19] ra[18:14] off[13:0]` (signed word offset from the bundle address) |
| JAL    | `rd[23:19] off[18:0]` |
| SETIR  | `irx[23:22] imm[20:0]` |

**Constant operand.** When `ir` is 1, the constant is `{IRF[irx], imm}`.
Otherwise it is `imm` sign-extended. ALU, MAC and LSU operations can all use
it, which is what makes a 32-bit constant cost two instructions:
`SETIR irx, hi` followed by, for example, `ADDI rd, ra, irx:lo`.

| class | opcodes | FUs |
|-------|---------|-----|
| ALU   | ADD SUB AND OR XOR SLL SRL SRA SLT SLTU SEQ MIN MAX (1-13). Their register-constant forms are the same opcodes + 16 (17-29). LDC (31) loads a constant. | all |
| IRF   | SETIR (30) | all |
| MAC   | MUL MULH MULHU DMAC BSH (32-36), MULI (37), BSHI (38) | FU1, FU2 |
| LSU   | LW LH LHU LB LBU (40-44), SW SH SB (45-47) | FU0, FU1 |
| Ctrl  | BEQ BNE BLT BGE BLTU BGEU (48-53), JAL (54), JR (55), HALT (63) | FU0 |

* `DMAC rd, ra, rb, rc, sh` computes
  `rd = low32((ra * rc[15:0] + rb * rc[31:16]) >>> sh)`. Both products are
  signed 32x16, the sum is 48 bits and `sh` is 0..15. Two 16-bit
  coefficients are packed in one register, so one DMAC covers two filter taps.
* `BSH rd, ra, rb` shifts left with saturation to the signed 32-bit range when
  `rb >= 0`. When `rb < 0` it shifts right by `-rb`, rounding half up. The
  amount is clamped to ±31.
* JAL and JR write the byte address of the next bundle to `rd`. JR jumps to
  the byte address in `ra`.
* An operation sent to an FU that lacks its unit, for example a load in slot
  2 or a branch in slot 1, does nothing and pulses `fault`.

## Pipeline and timing

| stage | work |
|-------|------|
| IF  | cache lookup of the window, bundle expansion, `PC += length`, bundle registered |
| EX  | decode ×3, DRF/IRF read, FU execution, write-back of every result except loads at the end of the cycle |
| MEM | the scratch-pad returns load words; these are aligned, extended and written back |

* One bundle can issue every cycle. Every operation except a load finishes in
  one cycle, so the next bundle reads the result from the register file. No
  ALU-to-ALU forwarding is needed.
* **Load bypass.** Load data arrives one cycle after the load. If the very
  next bundle reads that register, it gets the value straight from the memory
  output. There is no load-use stall.
* All slots of a bundle read their operands before any slot writes. If two
  slots write the same register, the higher slot wins. An EX-stage write also
  wins over a load write-back landing in the same cycle, because the EX write
  is the younger one.
* A taken branch or jump is resolved in EX. It costs one bubble, because the
  bundle fetched behind it is dropped. There are no delay slots.
* An instruction-cache miss inserts bubbles until the line is refilled. With
  an AXI slave that answers at once, that is an 8-beat burst plus about two
  cycles.
* After `HALT` executes, fetching stops. The other slots of the HALT bundle
  still execute, and outstanding loads still complete.

The testbench measures this timing. An FIR loop of nine bundles with a
backward branch runs in exactly 10 cycles per iteration.

## Memories and host interface

* **Data scratch-pad (`spm`).** 64 KiB by default (`SPM_WORDS`). It has three
  ports: FU0's LSU, FU1's LSU and the system bus. All three can access it in
  the same cycle. Reads are synchronous with one cycle of latency. If two
  ports write the same word in one cycle, the higher port wins for each byte.
* **Instruction cache (`icache`).** Direct-mapped, 256 lines of 8 words
  (8 KiB). Misses are refilled with AXI4 INCR bursts from byte address
  `IBASE + 4*PC`. Starting the core invalidates the whole cache. The read
  response code is ignored.
* **AXI4-Lite slave.** It handles one transaction at a time. A write needs
  AWVALID and WVALID together and wins over a simultaneous read.

| byte address | register |
|--------------|----------|
| `0x0000_0000 .. 4*SPM_WORDS-1` | scratch-pad |
| `0x8000_0000` | CTRL: writing bit 0 = 1 invalidates the cache and starts the core at START_PC |
| `0x8000_0004` | START_PC: byte address of the first bundle |
| `0x8000_0008` | STATUS: bit 0 running, bit 1 halted since the last start |
| `0x8000_000C` | CYCLES: cycles spent running since the last start |

Host accesses use the scratch-pad's own third port, so a host can read
results while the core runs without stalling it.

## How this relates to the published architecture

The following come from the architecture description:

* three issue slots and the unit mix per FU (FU0: Ctrl, ALU0, LSU; FU1: MAC,
  ALU1, LSU; FU2: MAC, ALU1);
* a 32 × 32-bit data register file and a four-entry immediate register file;
* two-instruction generation of large constants;
* single-cycle execution of everything except loads;
* a data memory with two FU ports and one bus port;
* DMAC and the bi-directional shift;
* the two-bit compression field;
* an instruction cache and a data scratch-pad on an AXI system bus.

The following are this design's own choices:

* the encoding and opcode numbers;
* the 21/11 split of a constant between the IRF and the instruction;
* the three-stage pipeline and load bypass;
* the cache organisation and size;
* the scratch-pad size and its true three-port organisation;
* the AXI4-Lite subset, address map and control registers;
* which bit of the compression field is which, and what happens on malformed
  bundles;
* the exact DMAC operand mapping, its 4-bit shift field, and the shift sign
  convention.

What is not reproduced:

* The compiler and its instruction encoding. Cycle counts of real codecs
  therefore cannot be compared with published numbers.
* ALU0 and ALU1 are named as different units, but how they differ is not
  known. Both use the same `alu` module here.
* Clock frequency, gate count and power. These are results of a particular
  28 nm implementation. No timing constraints come with this RTL.

## Size and fit of the intended workloads

At default parameters, an MP3, AAC or FLAC decoder should fit. These
figures are estimates, not measurements. The data state of such a decoder is
roughly 20-50 KB, which fits in the 64 KiB scratch-pad. Code is fetched
through the cache from external memory, so its size is not bounded by the
core.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends with a
`TB_RESULT checks=N failures=M` line and has a watchdog. Highlights:

* `tb_bundle_expander`: directed bundles, then 5000 random windows compared
  with an independent placement rule.
* `tb_alu` and `tb_mac`: random and corner operands against 64-bit reference
  arithmetic, including saturation and rounding.
* `tb_icache`: a random walk over a program held in a behavioural AXI memory
  (`axi_rd_mem_model`), with conflict misses, windows that cross lines, and
  invalidation.
* `tb_ifetch`: random compression bits, random misses, redirects and halt.
* `tb_axi_lite_slave`: scratch-pad round trips with byte strobes, and the
  control registers.
* `tb_slimsrp_top`: runs the whole design at its default sizes. A host loads
  samples and Q15 coefficients, then the core runs an 8-tap FIR (4 DMACs per
  output) followed by shift, multiply, jump and byte/half-word tests. The
  results are read back over AXI and checked. The testbench also checks the
  10-cycle loop iteration. It counts every mechanism named above and fails if
  one never happens: compressed bundles, the NOP-before bit, cache refills,
  load bypass, taken branches, IRF constants, DMAC, both shift directions, bus
  access during a run, and halt.
* `tb_slimsrp_kernels`: also runs at the default sizes. It runs three
  benchmark-style kernels back to back: a 64-byte sum of absolute
  differences, a 3-tap running median over 32 outputs, and a [1 2 1]/4
  smoothing filter with a rounding shift over 32 outputs. It checks the
  results and the cycles per iteration: 7 for the median and 8 for the
  smoothing filter, which is one cycle per bundle plus the branch bubble.

Each testbench was also run against a deliberately broken copy of its module,
and each one failed as it should.

## Simulating

Any testbench runs with plain Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_slimsrp_top rtl/slimsrp_pkg.sv tb/slimsrp_asm_pkg.sv \
    tb/tb_slimsrp_top.sv
./obj_dir/Vtb_slimsrp_top
```

Replace the top module and the last file to run another testbench. Packages
must be listed explicitly, in dependency order. `tb/slimsrp_asm_pkg.sv` is
needed only by testbenches that assemble programs.

To write a new program, build bundles with the `slimsrp_asm_pkg` encoders
and store them in the behavioural program memory. Then write START_PC and
CTRL over AXI4-Lite and poll STATUS bit 1.

## Files

| file | content |
|------|---------|
| `rtl/slimsrp_pkg.sv` | widths, opcodes, decoded-instruction and memory-request types, load formatting |
| `rtl/slimsrp_top.sv` | top level: pipeline glue, load bypass, write-back ordering |
| `rtl/ifetch.sv`, `rtl/bundle_expander.sv` | fetch stage and NOP re-insertion |
| `rtl/icache.sv` | instruction cache with AXI4 refill |
| `rtl/idecode.sv` | sub-instruction decoder |
| `rtl/drf.sv`, `rtl/irf.sv` | data and immediate register files |
| `rtl/fu.sv` | functional unit (parameterised as FU0/FU1/FU2) |
| `rtl/alu.sv`, `rtl/mac.sv`, `rtl/lsu.sv`, `rtl/branch_unit.sv` | the units inside an FU |
| `rtl/spm.sv` | three-port data scratch-pad |
| `rtl/axi_lite_slave.sv` | host port and control registers |
| `tb/*.sv`, `tb/axil_master.svh` | testbenches, assembler package, AXI models and tasks |
