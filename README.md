# T0 vector coprocessor in SystemVerilog

T0 is a single-chip vector microprocessor: a MIPS-II scalar core is paired
with a fixed-point vector unit that produces up to sixteen 32-bit results per
cycle. Its central idea is the **reconfigurable arithmetic pipeline**. There is
no separate adder, shifter and saturator. Each lane is a cascade of
functional units: logic, left shift, (multiply), add, compare, right shift with
rounding, and clip. Every instruction carries a 32-bit configuration word that
sets what each stage does. One pass through the pipeline therefore does a
whole fixed-point step such as "multiply, shift right 15 with
round-to-nearest-even, saturate to 16 bits". The same pass can also do
composites such as absolute value or bit-field extract.

This repository holds synthesizable RTL for the vector side of the chip:
- the arithmetic pipelines and the two arithmetic units built from them;
- the vector register file;
- the vector memory unit;
- the issue interlock;
- the instruction cache and the external memory interface.

It also holds a self-checking testbench for each block and one for the whole
design. The scalar core, the serial host interface and the physical parts
(pads, clock driver) are not included.

## Organisation

```
            decoded vector instructions             instruction fetch
                       |                                   |
                    vissue  (interlock, 1 instr/cycle)   icache (1 KB + prefetch buffer)
           +-----------+-----------+                       |
           |           |           |                       |
          vmp        vp_unit     vp_unit                    |
   (memory unit)    VP0 (x8 lanes, VP1 (x8 lanes,           |
           |         with multiplier) no multiplier)        |
           |           |           |                       |
           +------ vreg_file: 16 regs x 32 elem x 32 b ----+
           |       8 slices, 5 read / 3 write ports        |
           +----------------- mem_if ----------------------+
                 128-bit data, 28-bit line address
```

`t0_top` wires these together. The three vector units run concurrently. They
exchange data only through the register file. The register-file ports are
assigned as follows:

| port          | user |
|---------------|------|
| read 0, 1     | VP0 operands A, B |
| read 2, 3     | VP1 operands A, B |
| read 4        | VMP (store data, indices, extract source) |
| write 0, 1, 2 | VP0, VP1, VMP |

### Element striping

Each vector register holds 32 elements. Element `i` lives in slice `i % 8` of
element group `i / 8`. Every register-file access moves one group: 8
elements, 256 bits. An arithmetic unit therefore takes `ceil(vl/8)` cycles per
instruction, which is four cycles at the maximum vector length of 32. With
three units, the issue stage can keep all of them busy by giving each a new
instruction on successive cycles.

## The reconfigurable pipeline (`vp_lane`)

```
 A,B --reg--> logic unit -> left shift ---------------+      (stage 1)
                          16x16 multiply (+ shifted, mac) -+-> X (33 b)
                          B | A | 0 -----------------------+-> Y (33 b)
        --reg--> X op Y (33 b) -> condition -> right shift + round -> output mux   (stage 2)
        --reg--> clipper -> result, write enable                                   (output)
```

Operands are registered. Results leave **three cycles** after their operands
arrive, one element per cycle per lane. Internally the datapath is 33 bits
wide. The sum or difference of two 32-bit values therefore never overflows
before the clipper decides what to keep.

### Configuration word (`t0_pkg::vpcfg_t`)

| bits  | field      | meaning |
|-------|------------|---------|
| 31:30 | `lop`      | logic unit: pass A, A&B, A\|B, A^B |
| 29    | `lsh_srcb` | left-shift amount from B[4:0] instead of `lsh_amt` |
| 28:24 | `lsh_amt`  | left-shift amount |
| 23    | `use_mul`  | X = 16x16 product of A[15:0], B[15:0] (VP0 only; ignored in VP1) |
| 22    | `sgn`      | signed arithmetic: sign extension to 33 bits, signed multiply, arithmetic right shift, signed clip input |
| 21:20 | `ysel`     | Y = B, A or 0 |
| 19:18 | `aop`      | X+Y, X-Y, Y-X, -X |
| 17:15 | `cond`     | condition on the 33-bit adder result: always, ==0, !=0, <0, <=0, >0, >=0, never |
| 14    | `rsh_srcb` | right-shift amount from B[4:0] instead of `rsh_amt` |
| 13:9  | `rsh_amt`  | right-shift amount |
| 8:7   | `rnd`      | rounding of the right shift: floor, toward zero, nearest (ties up), nearest even |
| 6:5   | `osel`     | value sent to the clipper: shifted sum, Y, (cond ? shifted sum : Y), cond as 0/1 |
| 4:3   | `clip`     | none (low 32 bits), saturate to 8, 16 or 32 bits |
| 2     | `clip_uns` | saturate to the unsigned range instead of the signed one |
| 1     | `cmov`     | write the element only where the condition holds |
| 0     | `mac`      | with `use_mul`: X = product + left-shift output (multiply-add) |

### Examples

- **Q15 multiply:** `use_mul sgn ysel=0 rsh_amt=15 rnd=even clip=16`.
  `0x4000 * 0x4000` gives `0x2000`, and `-1 * -1` saturates to `0x7FFF`.
- **Absolute value:** `sgn ysel=A aop=-X cond=>0 osel=sel`. The adder forms
  `-A`. If that is positive, it is kept; otherwise the bypassed `Y = A` is
  taken.
- **Maximum:** `vd = max(vd, B)` is `sgn aop=X-Y cond=<0 osel=Y cmov`, with
  A = vd. B is written only where `vd - B < 0`.
- **Bit-field extract** of `len` bits at position `pos`: left shift by
  `32-pos-len`, then logical right shift by `32-len`.
- **Boolean compare:** `osel=bool` writes 0 or 1.

### Rounding

The rounding is computed from the bits the right shifter drops. `floor`
truncates. `toward zero` adds one to negative results that dropped non-zero
bits. `nearest` adds one when the dropped part is at least one half.
`nearest even` adds one when the dropped part is above one half, or exactly
one half and the result is odd.

## Vector register file (`vreg_file`)

- The file has 5 read ports and 3 write ports, each 256 bits wide.
- Every write port has one enable per slice. The enables mask elements at or
  past the vector length, and elements whose conditional move failed.
- Reads are combinational and see data written in the same cycle.
- If two write ports write the same slice of the same group in one cycle, the
  higher-numbered port wins.

The chip time-multiplexes bit lines between a write phase and a read phase.
Here the storage is flip-flops with a bypass mux in front of the read ports.
The behaviour visible at the ports is the same.

## Issue and interlock (`vissue`)

A decoded instruction (`t0_pkg::vinst_t`) goes to its unit when two
conditions hold:
1. The unit is ready.
2. No register hazard exists against any running unit:
   - a source register is still to be written (RAW);
   - a destination register is still to be read or written (WAR, WAW).

Each unit exports two 16-bit masks: the registers it still reads, and the
registers it still writes. The check is a few AND/OR gates, with no scoreboard.
Instructions issue in order, one per cycle.

An arithmetic unit stops reporting a destination two cycles before that
register's last element group is written. A dependent instruction issued then
reads its first group one cycle later, in the same cycle the producer's last
write lands or after it. It picks that write up through the register file's
same-cycle bypass. Beyond this, there is no element-wise chaining.

## Vector memory unit (`vmp`)

| operation | `mop` | effect |
|-----------|-------|--------|
| unit-stride load / store | `M_LD` / `M_ST` | consecutive 8/16/32-bit elements from byte address `rs`; the scalar port returns `rs + vl*size` (post-increment) |
| strided | `M_LDS` / `M_STS` | element i at `rs + i*rt` |
| indexed (gather / scatter) | `M_LDX` / `M_STX` | element i at `rs + vs2[i]` (byte offsets) |
| scalar insert / extract | `M_INS` / `M_EXT` | `vd[rt] = rs` / scalar result = `vs1[rt]` |
| vector extract | `M_VEXT` | `vd[i] = vs1[rt+i]` for i < vl, 0 past element 31; used for reductions |
| scalar load / store | `M_SLD` / `M_SST` | one access at `rs` for the scalar core |

Loads can sign-extend 8- and 16-bit elements (`sext`).

**Unit stride.** A 144-byte stream buffer holds nine 16-byte lines: 32 words
plus a misaligned head.
- A load requests one line per cycle. It writes a chunk of elements to the
  register file as soon as the lines under the chunk have arrived. A chunk is
  eight 8-bit or 16-bit elements, or four 32-bit elements, so one chunk goes
  per cycle.
- A store reads one chunk per cycle into the buffer. It writes each memory
  line, with byte enables, once that line's bytes are all present.
- When the first element is not 16-byte aligned, one more line is touched,
  which costs exactly one more cycle.

**Strided and indexed.** These move one element per cycle over the single
address port. The VMP has one register-file read port. At the start of each
group of 8 elements it therefore spends one cycle reading the index group, and
for stores one more cycle reading the data group. Elements must be naturally
aligned, so that none crosses a 16-byte line.

The VMP runs one operation at a time.

## Instruction cache and memory interface

**`icache`.** The cache is 1 KB, direct mapped, with 64 lines of 16 bytes. A
hit returns the instruction in the same cycle. A miss stalls the core:
- 3 cycles when the line comes from memory;
- 2 cycles when the line is already in the one-line prefetch buffer.

While fetches hit, the cache requests the next sequential line whenever
neither the cache nor the buffer holds it.

**`mem_if`.** The VMP and the cache share one 128-bit memory port. The VMP
always wins, so prefetches use only cycles the VMP leaves idle. Requests carry
a 28-bit line address (byte address bits 31:4) and 16 byte enables. Read data
returns on the next cycle.

## Timing summary

| what | cycles |
|------|--------|
| arithmetic latency, operand read to write | 3 |
| arithmetic issue interval at vl = 32 | 4 |
| unit-stride load of 32 words, aligned / misaligned | 8 / 9 line transfers, 4 elements per register write |
| unit-stride load of 32 bytes or halfwords | 4 register writes (8 elements each) |
| strided / indexed | 1 element per cycle, plus 1–2 register-read cycles per 8 elements |
| instruction-cache miss, from memory / from the prefetch buffer | 3 / 2 |

## Where this RTL departs from the chip, or fills gaps

- **Encodings are this design's own.** The real chip decodes vector
  instructions from the MIPS coprocessor-2 space, and its configuration
  register has its own bit layout. Neither is reproduced. Instructions enter
  already decoded (`vinst_t`), and the configuration word follows
  `vpcfg_t` above.
- **Rounding and conditions.** The set of rounding modes and conditions, and
  the output-select mux used for composites such as absolute value, are
  choices made here. Rounding happens only in the right shifter.
- **Pipeline registers.** The pipeline uses edge-triggered registers instead
  of two-phase latches. The multiplier is a behavioural product, not a
  Baugh-Wooley array.
- **Stage boundaries.** The VP0 pipeline diagram has a register between the
  adder and the zero-detect / right-shift stage. Here the adder, condition
  and right shift share stage 2, so the three-cycle latency holds with three
  registers. The diagram feeds the multiplier output and the left-shift
  output into a carry-save adder. Here that is read as a multiply-add, chosen
  by the `mac` bit: X = A[15:0]*B[15:0] + (logic(A,B) << k). It is written as
  a plain sum in front of the stage-1 register, not as a carry-save pair.
- **Issue.** The chip shares one issue stream between the scalar core and
  the vector units, leaving the core a slot every four cycles. Here the
  vector instruction port accepts one instruction per cycle. The scalar core
  is outside the design.
- **Memory unit.** These are choices made here:
  - the stream-buffer organisation;
  - the one-cycle memory read timing;
  - the extra register-read cycles for strided and indexed transfers;
  - byte-offset indices;
  - the natural-alignment rule for strided and indexed elements;
  - the vector-extract semantics;
  - one memory operation at a time.
- **Instruction cache.** The organisation (direct mapped, 16-byte lines,
  next-line prefetch) is chosen here. Only the size and the miss penalties are
  fixed.
- **Not included:**
  - the MIPS-II core;
  - the 8-bit serial host interface (DMA and scan-chain access);
  - the SRAM itself (the testbenches use `tb/sram_model.sv`);
  - clocking, decoupling and pads.
- **Clock rate.** 45 MHz is a property of the original silicon. The RTL is
  not timed against it.

## Simulating

All files use plain SystemVerilog 2017. Each testbench prints
`TB_RESULT checks=N failures=M` and finishes. For example, the end-to-end
test:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/t0_pkg.sv tb/t0_ref_pkg.sv tb/tb_t0_top.sv --top-module tb_t0_top
./obj_dir/Vtb_t0_top
```

Replace `tb_t0_top` with any of these:
- `tb_vp_lane`: random and directed configurations against an integer model;
- `tb_vp_unit`: both units with a register file, plus issue-interval and
  latency checks;
- `tb_vreg_file`: all ports, with same-cycle bypass;
- `tb_vmp`: every memory operation, plus rate and misalignment checks;
- `tb_vissue`: the interlock decision;
- `tb_icache`: data and miss penalties;
- `tb_mem_if`: priority;
- `tb_t0_peak`: the peak rate. It issues vector length 32 instructions to
  the two units back to back, with a vector load running in parallel. It
  measures 16 results per cycle (8 per unit), a new arithmetic instruction
  every 4 cycles per unit, and four read ports in use at once. It also checks
  some of the results.

`tb_t0_top` runs the full-size design.
1. It loads all registers from memory.
2. It runs a Q15 dot product: a 16-bit load (one of them misaligned), a
   multiply-round-saturate pass, and a reduction by repeated vector extract
   and add. It checks the result against a direct computation.
3. It runs 10,000 random dependent instructions while fetching instructions
   in parallel.
4. It stores every register back through the design and compares memory with
   a shadow model.

It also counts hazard stalls, busy stalls, bypass reads, misaligned accesses,
saturations, suppressed conditional moves, cache misses, prefetch hits and
deferred cache requests. It requires each count to be non-zero.

## Files

- `rtl/t0_pkg.sv`: shared constants, configuration word, instruction format.
- `rtl/vp_lane.sv`: one reconfigurable pipeline slice.
- `rtl/vp_unit.sv`: an arithmetic unit, eight lanes and group sequencing.
- `rtl/vreg_file.sv`: the vector register file.
- `rtl/vmp.sv`: the vector memory unit.
- `rtl/vissue.sv`: issue and interlock.
- `rtl/icache.sv`: the instruction cache.
- `rtl/mem_if.sv`: the memory interface.
- `rtl/t0_top.sv`: the top level.
- `tb/`: the testbenches, the pipeline reference model (`t0_ref_pkg.sv`) and
  the SRAM model.
