# HISTO: a histogram, mean and range engine that works inside a block RAM

HISTO summarises a block of 4096 fixed-point measurements held in an on-chip
block RAM. Working only through that RAM's single port, it builds a histogram
of the values' integer parts in a second region of the same RAM. It computes
the mean of the values at full precision. It also finds the *range*: the
number of histogram bins between the point where 6.25 % of the values lie
below and the point where 6.25 % lie above. The results are written back into
the RAM, where the processor that loaded the data reads them.

Here is what the engine reports for a typical data set: integer parts from
173 to 478, a histogram of 306 bins, mean 312.8750, and a range of 147 bins
from bin 68 to bin 214.

## Memory map and number formats

The RAM holds 8192 words of 16 bits:

| addresses   | contents |
|-------------|----------|
| 0 – 2047    | not used by HISTO (reserved) |
| 2048 – 4095 | histogram: one 16-bit count per integer bin |
| 4096 – 8191 | the 4096 data values |
| 4094        | after a run: the mean |
| 4095        | after a run: the range, in bins |

* **Data values** are signed 16-bit numbers with 12 integer bits and 4
  fraction bits (value = word / 16).
* **Bin n** (address 2048 + n) counts the values whose integer part is
  `int(smallest) + n`. Integer parts are taken by signed division by 16, which
  truncates toward zero. So −0.5 and +0.5 both fall in the bin of integer 0.
* **Mean** is the sum of all raw words divided by 4096, truncated toward
  zero, so it has the same 12.4 format as the data. For example, 5006 means
  312.8750.
* **Range** is `HV − LV + 1`, zero-extended from 12 bits. LV is the first bin
  at which the running count reaches 256 (4096/16). HV is the last bin at
  which the running count is still at most 3840 (4096 − 256).

The mean and range are written over the last two histogram words. A data set
that fills bins 2046 or 2047 therefore loses those two counts.

## How a run proceeds

The engine is one finite-state machine with a datapath (`rtl/histo.sv`). A
one-cycle `start` pulse while `ready` is high begins a run. `ready` drops, the
engine works through the phases below, and `ready` rises again at the end.

| phase | states | cycles (default sizes) |
|-------|--------|------------------------|
| clear the histogram | `ST_CLEAR_MEM` (first write is issued in the start cycle) | 2048 |
| find the smallest value | `ST_FIND_SMALLEST` | 4096 |
| build the histogram and sum the values | `ST_COMPUTE_ADDR`, `ST_INC_CELL`, `ST_GET_NEXT_PN` | 3 × 4096 |
| sweep the histogram for LV and HV | `ST_INIT_DIST`, `ST_SWEEP_BRAM` | 1 + 2048 |
| check and write the results | `ST_CHECK_HISTO_ERROR`, `ST_WRITE_RANGE` | 2 |
| back in idle, `ready` rises | `ST_IDLE` | 1 |

A run takes **20484 clock edges**, counted from the edge that samples
`start` to the edge after which `ready` is high. A run that ends with the
tail-bound error takes 20483, because it skips `ST_WRITE_RANGE`.

### The memory schedule

The RAM has a one-cycle read latency, and the engine is built around it. The
address output is **combinational**: it carries the address that the *next*
state will work on, namely the next value of the engine's histogram-address or
data-address register. The RAM samples that address at the clock edge, so in
the next state the word is already on `bram_dout`. A write uses the same path:
the state that issues the write drives the target address, the data and `we`
together, and the RAM stores the word at the edge.

The histogram loop is the core of the design. Each data value takes three
states:

1. `ST_COMPUTE_ADDR`: `bram_dout` holds the value (its read was issued by the
   previous state). The engine computes the bin address,
   `int(value) − int(smallest) + 2048`, and issues a read of that bin. It also
   adds the value to the 28-bit running sum and sets the error flag if the bin
   lies above address 4095.
2. `ST_INC_CELL`: `bram_dout` holds the bin's count. The engine writes
   count + 1 back to the same address.
3. `ST_GET_NEXT_PN`: the engine issues the read of the next value. After the
   last value it moves on to the sweep.

The sweep reads the bins one per cycle. It adds each count to a 13-bit running
total, and compares the total *including* the current bin with the two
bounds. The first bin that reaches the lower bound is latched as LV. Every bin
that stays at or below the upper bound overwrites HV, so HV ends up as the
last such bin.

### Errors

`histo_err` is cleared at start. It is set for either of two reasons:

* **Overflow.** A value's bin lies above the histogram region: the integer
  parts span more than 2048 numbers. The engine still increments the word at
  that address, which lies in the data region above 4095. Later values can
  then be read corrupted, so after this error the histogram, the mean and the
  range are not meaningful. The overflow error alone does not stop the
  results from being written.
* **Tail bound.** LV or HV was never found. In practice this means the first
  bin alone holds more than 3840 values. The run then ends without writing
  the mean or the range.

## Top level and the host port

`rtl/histo_top.sv` connects the engine to the RAM (`rtl/pnl_bram.sv`) and adds
a host port (`host_addr`, `host_din`, `host_we`, `host_dout`). A processor
uses it through a memory access controller, which is not included here. The
RAM has one port:

* The **engine** owns it from the cycle in which `start` is high until
  `ready` rises again.
* The **host** owns it at all other times.

Host writes while the engine owns the RAM are dropped. `host_dout` always
shows the RAM output, one cycle after the address. To use the top:

1. Write the 4096 values to addresses 4096–8191.
2. Pulse `start` for one cycle, with the host port idle in that cycle.
3. Wait for `ready`.
4. Check `histo_err`.
5. Read the mean from address 4094, the range from 4095, and the histogram
   from 2048 onwards.

Reset (`rst`) is asynchronous and active high. It puts the engine in idle
with `ready` high. The RAM has no reset: the engine clears the histogram
itself, and the data region must be loaded before a run.

## Parameters

All sizes come from `rtl/histo_pkg.sv`, and `histo` exposes them as
parameters. The defaults are the design's intended sizes:

| parameter | default | meaning |
|-----------|---------|---------|
| `ADDR_NB` | 13 | RAM address width (8192 words) |
| `DATA_NB` | 16 | word width |
| `NUM_NB` | 12 | log2 of the number of values (4096) |
| `FRAC_NB` | 4 | fraction bits of a value |
| `HISTO_BASE`, `HISTO_LIMIT` | 2048, 4096 | histogram region (limit is exclusive) |
| `PN_BASE`, `PN_LIMIT` | 4096, 8192 | data region (limit is exclusive) |
| `BOUND_SHIFT` | 4 | each tail holds 2^NUM_NB >> 4 values (6.25 %) |
| `RANGE_NB` | 12 | width of the stored range |

The run length scales with these sizes: `1 + H + N + 3N + 1 + H + 2` edges for
H histogram words and N values. The mean divides by 2^NUM_NB, so the region
sizes must stay consistent with `NUM_NB`.

## What is original and what is chosen here

The following come from the original design: the phases, the per-state
actions, the memory map, the bounds, the truncating integer division, the mean
and range formats, and the error conditions. That includes writing to an
out-of-range bin after flagging it.

The following are this implementation's own choices:

* the 12-bit width of the stored range (the smallest width that holds 2048);
* the RAM's read-first behaviour on a write cycle (the engine never reads the
  word it writes, so the mode does not matter to it);
* the sharing of the single RAM port between host and engine in the top.

The memory access controller and the processor software that load the data
are outside this design. The original system also runs the same algorithm in
software for comparison. Here that algorithm serves as the testbenches'
reference model (`tb/histo_ref_pkg.sv`).

## Verification

| testbench | what it checks |
|-----------|----------------|
| `tb/tb_pnl_bram.sv` | every RAM word written and read back; read-first on writes; one-cycle latency |
| `tb/tb_histo.sv` | engine alone, on a memory model in the testbench (see below) |
| `tb/tb_histo_top.sv` | the same six runs end to end through the host port, at default sizes (see below) |
| `tb/tb_histo_fig01.sv` | a reference-like data set built to exact statistics (see below) |

**`tb/tb_histo.sv`** makes six back-to-back runs:

* bell-shaped data;
* data with negative values;
* data over 2000 bins;
* a constant data set, which gives the tail-bound error;
* data that overflows the histogram;
* bell-shaped data again.

For each run it compares every bin, the mean, the range, the error flag and
the cycle count with the reference model. It also checks that the data region
is left unchanged.

**`tb/tb_histo_top.sv`** makes the same runs through the host port. It also
tries a host write during a run, and fails unless each mechanism was
exercised at least once:

* a dirty histogram cleared;
* results written;
* both errors;
* negative data;
* a blocked host write.

**`tb/tb_histo_fig01.sv`** runs a data set constructed to have:

* integer parts 173..478;
* LV at bin 68 and HV at bin 214 (range 147);
* mean 312.8750.

It checks all of these, the histogram and the run length through the top.

Every testbench prints `TB_RESULT checks=N failures=M` and has a cycle
watchdog. To run one with Verilator (run from the directory that holds
`rtl/` and `tb/`):

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/histo_pkg.sv tb/histo_ref_pkg.sv tb/tb_histo_top.sv \
    --top-module tb_histo_top -Mdir obj_top
./obj_top/Vtb_histo_top
```

Replace `tb_histo_top` with `tb_histo` or `tb_histo_fig01` to run the other
engine tests. `tb_pnl_bram` needs only `rtl/histo_pkg.sv`. Each run finishes
in well under a second.

`histo` also carries a concurrent assertion: no write goes below the
histogram base, because bin offsets are never negative. Run with `--assert`
to check it.

## Known limits

* The last two histogram bins are overwritten by the results (see above).
* After an overflow error, the engine has written into the data region.
  Reload the data before the next run.
* `start` is ignored while a run is in progress. Host accesses during a run
  are dropped, not queued.
