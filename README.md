# Thermal-aware value-aware register file (VARF)

The integer register file is often the hottest unit on a high-performance
processor die: it is heavily multiported and accessed many times per cycle.
However, most integer results are small. Typically well over 90% of them fit
in 34 bits as a sign-extended number. This design uses that fact twice:

1. **Power.** The register file is split into two 34-bit partitions
   ("halves"). A *narrow* value (one that fits in 34 bits) is written into
   and read from only one half. The other half's data wordline stays off,
   which roughly halves the access energy for most accesses. A *regular*
   64-bit value uses both halves.
2. **Temperature.** If every narrow value went to the same half, that half
   would become a new hot spot. A placement controller therefore spreads the
   narrow values evenly over both halves. The default controller uses the
   parity of the physical register number. It needs no state at all, and
   with renamed registers it splits the traffic almost exactly in half.

The RTL is a complete, synthesizable register file with 512 64-bit physical
registers, 8 write ports and 16 read ports, for an 8-wide out-of-order core.
It includes the narrow-width detection, the write-side value augmentation,
the two partitions with their flag columns, the read-side reconstruction
multiplexers and three interchangeable placement controllers.

## How a value is stored

Each register has, in each half, 34 data bits and one *narrow flag* bit. The
two flags of a register, written `{left,right}`, say where its value lives:

| flags | meaning | left half holds | right half holds |
|-------|---------|-----------------|------------------|
| `11`  | regular 64-bit value | `{0000, v[63:34]}` | `v[33:0]` |
| `01`  | narrow value in the right half | (not accessed) | `v[33:0]` |
| `10`  | narrow value in the left half | `v[33:0]` | (not accessed) |
| `00`  | never written since reset | (not accessed) | (not accessed) |

A write goes through these steps:

* **Narrow detection** (`varf_narrow_detect`, Execute stage). The result is
  narrow when bits `[63:33]` are all zeros or all ones. In a real core this
  signal can be taken from the leading-zero/one logic already inside the
  ALU. Here it is a standalone 31-input check.
* **Augmentation** (`varf_write_augment`, Register Write stage). The 64-bit
  value becomes two 34-bit halves. The lower half is always `v[33:0]`. The
  upper half depends on the narrow flag:
  * narrow: it is a copy of `v[33:0]`, so the value can be placed in either
    half;
  * regular: it is `v[63:34]` under four zero padding bits.
* **Placement** (`varf_ctrl_*`, Register Write stage). The controller picks
  the halves to write. That choice is also the new flag pair.
* **Array write** (`varf_half`, two instances). Every write updates both flag
  columns. A half that does not take the value gets its flag cleared. Only
  the halves that take the value write their data columns. A stale copy in
  the other half is harmless, because its flag is now 0.

## How a value is read back

A read (`varf_half`, Register Read stage) first reads the two flags. Each
flag gates its own half's data output through an AND, standing in for the
wordline gating of a custom array. A half whose flag is 0 is not accessed
and outputs zero. The two 34-bit outputs and the flags are latched into the
Execute stage. There, two multiplexers per read port (`varf_read_steer`)
rebuild the operand:

* bits `[33:0]` come from the right half, or from the left half when the
  flags are `10`;
* bits `[63:34]` come from the left half's low 30 bits when the flags are
  `11`, and otherwise from the sign bit (bit 33) of the half that holds the
  narrow value.

The multiplexers sit in Execute rather than in Register Read. This keeps
them off the register-read critical path; in a real core they can be merged
with the ALU's operand sign-extension logic.

## Placement schemes

`varf_regfile` takes a `SCHEME` parameter of type `varf_pkg::scheme_e`.
Regular values always write both halves, and idle ports write nothing. The
schemes differ only in where a narrow value goes:

* **`SCHEME_ID` (default), register id.** An even physical register number
  goes to the right half, an odd one to the left. This takes one gate per
  port, with no state and no feedback. The register renamer hands out
  registers without regard to parity, so the two halves see nearly equal
  traffic.
* **`SCHEME_AC`, access counters (`varf_ctrl_ac`).** Each half has a 32-bit
  counter of its accesses. Counted accesses are data writes, plus reads whose
  data wordline fired.
  * A narrow value goes to the half with the lower count; a tie goes to the
    right.
  * The write ports of one cycle are served in port order. Each port sees the
    counts as already raised by the lower-numbered ports, so a burst of narrow
    writes is split across both halves.
  * When either counter would overflow, both are halved. This keeps their
    order, so saturation never distorts the decision.
* **`SCHEME_TS`, thermal sensors (`varf_ctrl_ts`).** A narrow value goes to
  the half whose sensor reports the lower temperature; a tie goes to the
  right. The sensors are analog parts outside this RTL. Their readings enter
  on `temp_left` and `temp_right` as unsigned codes (larger means hotter),
  already synchronised to `clk`. All narrow writes in one cycle go to the
  same half.

Only the chosen controller is elaborated. With `SCHEME_ID` and `SCHEME_TS`,
`cnt_left` and `cnt_right` are tied to zero. The temperature inputs are used
only by `SCHEME_TS`.

## Pipeline and timing

| cycle | write side (per write port) | read side (per read port) |
|-------|-----------------------------|---------------------------|
| t     | `wb_*` presented; narrow check | `rd_en`/`rd_addr` presented; halves read; `rd_halves` valid |
| t+1   | latched values augmented; placement decided, `wr_halves` valid; arrays written at the end of t+1 | `rd_valid`, `rd_data` valid |
| t+2   | the value can be read | |

* A result presented in cycle t can be read by a read issued in cycle t+2
  (data in t+3).
* A read and a write of the same register in the same cycle return the old
  value. The core's bypass network is expected to forward results until they
  are in the array.
* Two write ports must not write the same register in one cycle; register
  renaming guarantees this. An assertion in `varf_half` checks it.
* Reset (`rst_n`, asynchronous, active low) clears the flags and valid bits,
  so every register reads as zero until it is written.

## Parameters and ports of `varf_regfile`

| parameter | default | meaning |
|-----------|---------|---------|
| `SCHEME` | `SCHEME_ID` | placement scheme |
| `N_ENTRIES` | 512 | physical integer registers |
| `NUM_RD` | 16 | read ports |
| `NUM_WR` | 8 | write ports |
| `CNT_W` | 32 | access counter width (`SCHEME_AC`) |
| `TEMP_W` | 10 | sensor reading width (`SCHEME_TS`) |

Ports (the per-port signals are unpacked arrays):

* `wb_valid`, `wb_preg`, `wb_result`: results from the functional units.
* `rd_en`, `rd_addr`, then `rd_valid`, `rd_data` one cycle later: operand
  reads.
* `temp_left`, `temp_right`: sensor readings.
* `wr_halves`, `rd_halves`: which halves each write and read touches, as a
  `varf_pkg::halves_t {left,right}`. Use them for power and thermal
  accounting.
* `cnt_left`, `cnt_right`: the access counters.

## Files

| file | content |
|------|---------|
| `rtl/varf_pkg.sv` | widths (64/34/30/4), register count, scheme enum, `halves_t` |
| `rtl/varf_narrow_detect.sv` | narrow-width detection |
| `rtl/varf_write_augment.sv` | 64-to-2x34 write augmentation |
| `rtl/varf_ctrl_id.sv`, `varf_ctrl_ac.sv`, `varf_ctrl_ts.sv` | placement controllers |
| `rtl/varf_half.sv` | one partition: data array, flag column, read gating |
| `rtl/varf_read_steer.sv` | Execute-stage reconstruction muxes |
| `rtl/varf_regfile.sv` | top level |
| `tb/tb_<module>.sv` | a self-checking testbench for each module |
| `tb/tb_varf_regfile_full.sv` | the top at its default size, 97% narrow traffic |
| `tb/tb_varf_balance.sv` | access balance of the three schemes at full size |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog ends a run that hangs. For example:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/varf_pkg.sv tb/tb_varf_regfile.sv --top-module tb_varf_regfile
./obj_dir/Vtb_varf_regfile
```

Use the same command with another testbench name for the others. Each one
finishes in well under a second of simulation time.

* `tb_varf_regfile` runs all three schemes side by side at a reduced size
  (64 registers, 4 read and 2 write ports, 8-bit counters, so the counters
  halve often). A reference model checks:
  * every operand, its latency, every placement decision, every partition
    access and the counters;
  * that each mechanism occurs: narrow writes to each half, regular writes,
    reads of all four flag pairs, counter halving, both sensor orderings, and
    a narrow value overwriting a regular one and the reverse.
* `tb_varf_regfile_full` uses the default configuration (ID scheme, 512
  registers, 16R/8W). It runs three phases:
  * writes all 512 registers;
  * reads them all back;
  * runs 2000 cycles of random traffic in which 97% of the values are
    narrow.

  It then checks that the left half's share of data-half accesses is between
  45% and 55%; a typical run gives 50.2%.
* `tb_varf_balance` runs one full-size instance of each scheme on the same
  97%-narrow traffic. For the sensor scheme it closes the loop with a
  first-order heating model per half. The model is only illustrative; it is
  not calibrated to any process. The testbench checks that:
  * every read returns the last value written;
  * each scheme sends 40-60% of data-half accesses to the left half;
  * the two modelled sensor temperatures end within 1 K of each other.

  A typical run gives these shares of all data-half accesses:

  | scheme | write left | write right | read left | read right |
  |--------|-----------:|------------:|----------:|-----------:|
  | ID     | 0.168 | 0.169 | 0.332 | 0.331 |
  | AC     | 0.168 | 0.169 | 0.332 | 0.331 |
  | TS     | 0.167 | 0.170 | 0.329 | 0.334 |

  The AC and ID counts differ in their raw numbers. They round to the same
  shares because both schemes are close to an exact split.

## What to trust, and where this design chose

The following come from the source description and are implemented as
described:

* the 34-bit narrow/regular split and the 4 padding bits;
* duplication of narrow values in the write path;
* one flag per half, the meaning of the flag pairs, and flag gating of reads;
* the two reconstruction multiplexers in Execute;
* the three placement rules;
* the 512-entry size.

The following are choices made here, because the source does not give them:

* **Port counts.** 16 read and 8 write ports, for an 8-wide core.
* **Pipeline latches.** A latch between Register Read and Execute; reads
  return the old value on a same-cycle write.
* **Reset.** Flags reset to 0, and a never-written register reads as zero.
* **Flag order.** The flag pair is ordered `{left,right}`.
* **Ties and port order.** Ties go to the right half in the AC and TS
  schemes; the AC scheme serves write ports in order within a cycle.
* **Counters.** The access counters are 32 bits and both are halved near
  overflow. The source only says that real counters must be reset from time
  to time.
* **Sensor readings.** They are unsigned 10-bit codes.
* **Storage.** The array is a flip-flop array with combinational read ports.
  A real implementation would be a custom multiported array. Bitline
  precharge and the sensing circuit are not modelled; the AND on the data
  output stands in for the wordline gate.
* **Narrow detection.** It is a standalone comparator rather than a tap on
  the ALU's leading-zero logic.

Not included:

* the thermal sensors themselves (analog);
* the chip-level voltage/frequency scaling used as thermal protection in the
  evaluated processor;
* the core's bypass network and ALUs, which consume `rd_data`;
* the basic, non-balancing scheme, in which all narrow values go to the right
  half. It is only a point of comparison. Setting `SCHEME_ID` and using only
  even register numbers reproduces its behaviour.

The thermal and power results that motivate the design are not reproduced by
RTL simulation. The testbenches only show the access balance that those
results depend on.
