# EEG delay unit: a 100 MHz to 240 Hz clock divider for EEG acquisition

An FPGA accelerator for EEG-based seizure detection runs on a 100 MHz clock.
The EEG front end delivers one 10-bit sample about every 4 ms (240 Hz). To
compare live samples with a seizure record held in on-chip memory, the fabric
needs a timing reference at the EEG rate, derived from its own clock. The
*delay unit* provides it: a 20-bit counter that divides the system clock down
to a 50 % duty-cycle EEG clock. This repository holds that divider, plus the
small acquisition path it paces:

- a sample counter that takes one live sample per EEG period,
- an on-chip record memory,
- the logic that presents each live sample next to the recorded sample with
  the same index.

```
            +------------+  eegclk (to the EEG front end / ADC)
 sysclk --->| delay_unit |------------------------------+-------> eegclk
            +------------+                              |
                                                        v
 adc_data[9:0] --------------------------------> +--------------+ --> sample_valid
 start ----------------------------------------> | eeg_sync_acq | --> live_sample, ref_sample
                                                  |   (count2)   | --> sample_index, window_done
            +---------------+  rd_en/rd_addr      |              | --> running
 load_* --->| sample_memory |<-------------------- |              |
            | 15000 x 10 bit|--------------------> |              |
            +---------------+  rd_data            +--------------+
```

All logic is synchronous to `sysclk`. `rst` is a synchronous, active-high
reset. `eegclk` is a flip-flop output, so inside the chip it is used as a
data signal and never as a clock.

## The divider and its arithmetic

The terminal count comes from the ratio of the two clocks:

    full period  = f_sys / f_eeg       = 100 MHz / 240 Hz = 416666.67 clocks
    half period  = f_sys / (2 * f_eeg)                    = 208333 clocks (truncated)

208333 needs 18 bits. The counter is 20 bits wide (five hex digits), which
leaves room for longer periods: at most 2^20 clocks, about 10.5 ms, per half
period.

The datapath has these parts:

- an incrementer;
- an equality comparator against the terminal count `HALF_COUNT`;
- a multiplexer that loads either 0 or count+1 into the counter register;
- a toggle flip-flop `p`, inverted each time the comparator fires;
- an output register that copies `p` to `eegclk` on every clock.

Together that is 20 + 1 + 1 = 22 flip-flops.

**Off-by-one to be aware of.** At the terminal count the counter goes back to 0.
It then needs HALF_COUNT+1 clocks to reach the terminal count again, so:

| `HALF_COUNT` | half period (clocks) | eegclk period | frequency |
|---|---|---|---|
| 208333 (default) | 208334 | 4.16668 ms | 239.999 Hz |
| 200000 | 200001 | 4.00002 ms | 249.999 Hz |

To get an exact half period of N clocks, set `HALF_COUNT = N-1`. The default
keeps the rule "compare with the computed value itself". After reset,
`eegclk` is low. It first rises HALF_COUNT+2 clocks after `rst` is released:
HALF_COUNT+1 clocks for the counter, plus one for the output register.

`HALF_COUNT` is a parameter, not a run-time register. The package
`eeg_delay_pkg` computes the default from `SYS_CLK_HZ` and `EEG_CLK_HZ`, and
an elaboration-time assertion rejects a terminal count that does not fit in
`CNT_W` bits.

## Lining up live and recorded samples (`eeg_sync_acq`)

Acquisition is idle until `start` is seen; `running` then stays high until
reset. While it runs, the block watches `eegclk` and acts once per period, on
the falling edge. The ADC is assumed to present a new word on the rising
edge, so half a period later the word is stable. The timing, in `sysclk`
cycles from the edge at which the fall is detected:

| cycle | action |
|---|---|
| 0 | `adc_data` is registered, the memory is read at `count2`, `count2` advances |
| 1 | the memory returns the recorded word |
| 2 | `sample_valid` pulses for one clock with `live_sample`, `ref_sample` and `sample_index`; `window_done` pulses with it on the last index |

`count2` counts 0 … N_SAMPLES-1 and then wraps. Each pass through the record
is therefore one comparison window: 60 s at the default 15,000 samples and
4.17 ms per sample. The outputs hold between pulses. The design delivers one
sample pair per EEG period and leaves the comparison itself, the seizure
detection, to logic outside.

## Record memory (`sample_memory`)

A simple dual-port RAM with 15,000 words of 10 bits (150 kbit), written as an
array that maps onto block RAM. The write port (`load_en`, `load_addr`,
`load_data` at the top) loads the recorded EEG data; in a processor-based
system it would be fed from the processor side. The read port returns data
one clock after `rd_en` and holds it otherwise. A read and a write to the same
address in one clock return the old word. The contents have no reset: load
the record before starting. The record may be rewritten while acquisition
runs; each word is used from its next read on.

## Files

| file | contents |
|---|---|
| `rtl/eeg_delay_pkg.sv` | clock rates, widths, record length, terminal-count function |
| `rtl/delay_unit.sv` | the counter-based divider |
| `rtl/sample_memory.sv` | record RAM |
| `rtl/eeg_sync_acq.sv` | sample counter `count2` and sample alignment |
| `rtl/eeg_delay_top.sv` | top level wiring the three together |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_eeg_delay_top_full` |

Top-level parameters: `CNT_W` = 20, `HALF_COUNT` = 208333, `SAMPLE_W` = 10,
`N_SAMPLES` = 15000 and `ADDR_W` = 14, which is derived from `N_SAMPLES`.

## Verification

Every testbench computes its expectations on its own, from the clock rates and
from a copy of the data it drives. Each one prints
`TB_RESULT checks=N failures=M`, and a watchdog ends a run that hangs.

- `tb_delay_unit` runs three dividers. The first uses the defaults. The second
  uses `HALF_COUNT` = 200000. The third uses `HALF_COUNT` = 3 and is reset in
  mid-run. The testbench checks every edge interval, the first rise after
  reset, and the absolute periods of 4.16668 ms and 4.00002 ms.
- `tb_sample_memory` runs at the full 15,000 × 10 size. It loads and reads back
  every word, then checks the read latency, that `rd_data` holds while
  `rd_en` is low, the read-first collision and random traffic.
- `tb_eeg_sync_acq` drives the EEG clock with random half periods of 3 to 9
  clocks and plays a random ADC against a memory model. It checks every
  pair's contents and its exact cycle, the index wrap, `window_done`, that
  nothing comes out before `start`, and a mid-run reset.
- `tb_eeg_delay_top` runs end to end with `HALF_COUNT` = 6 and an 8-word
  record. It checks the divider timing, one pair per 14 clocks, pair contents
  and wrap, and a record reload while acquisition runs. It also checks a reset
  followed by a restart. Each mechanism is counted, and a failure is recorded
  if it never occurred.
- `tb_eeg_delay_top_full` runs the top with all parameters at their defaults.
  It loads the full record and runs the first three EEG periods, about 1.27
  million clocks. It checks that `eegclk` rises after 208335 clocks and then
  toggles every 208334 clocks, and that pairs come 416668 clocks apart with
  the right contents.

A complete 15,000-sample window at full size is 6.25 × 10^9 clocks, too long
to simulate routinely. The full-size run covers the first periods, and the wrap of
`count2` is covered at reduced size.

Running a testbench with Verilator (5.x):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/eeg_delay_pkg.sv tb/tb_eeg_delay_top.sv --top-module tb_eeg_delay_top
./obj_dir/Vtb_eeg_delay_top
```

Use the same command with any other `tb/tb_*.sv` and its module name. The
modules carry SystemVerilog assertions: the counter never passes the terminal
count, memory addresses stay in range, and the sample index stays in range.
`--assert` turns them on.

## Where this RTL goes beyond or departs from the original delay unit

- **Reset.** The original divider has only two pins, the system clock in and
  the EEG clock out, and relies on the counter starting at 0. The synchronous
  `rst` input is added here.
- **Terminal count.** The default is the half-period value 208333, as in the
  original design. It sometimes quotes the full-period value instead
  (416666, 0x65B9A); 0x65B9A as a terminal count would give a period near
  8.3 ms, not 4.17 ms.
- **Resolution.** The step of the delay is one system clock, 10 ns at 100 MHz.
- **Acquisition path.** The original gives only the outline: a sample counter
  (`count2`), 10-bit samples, a 15,000-sample record in on-chip memory and a
  start of acquisition. Everything else in `eeg_sync_acq` is this design's
  own: capture on the falling edge, the two-clock output timing, the wrap of
  the index and the `start`/`running` handshake.
- **Record loading.** The plain load port stands in for the processor-side
  path (DMA and AXI into on-chip memory), which is not part of this RTL.
- **Not included:** the processor system, DMA and AXI interconnect, the analog
  front end and ADC (modelled in the testbenches by a random word per EEG
  clock), and the seizure-detection comparison, whose algorithm is not
  specified.
