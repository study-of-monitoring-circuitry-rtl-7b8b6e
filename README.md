# Ring-oscillator PV map for FPGA ageing monitoring

As an FPGA ages (BTI, HCI and interconnect wear), its LUTs, carry chains and
routing get slower. This design measures that slowdown in the field. Many
small ring oscillators (ROs) are spread over the fabric. Each is built from
hand-placed LUTs and carry chains. A controller switches them on one at a time
and measures their frequencies. The frequencies are stored in block RAM, where
a host reads them over JTAG. The result is a **performance-variation (PV)
map**, one frequency per fabric location. Comparing maps taken over the life
of a product shows where the device has aged and by how much. The slow-corner
frequency from timing simulation is the floor: a sensor whose measured
frequency approaches it has used up its margin.

The design is the monitoring bitstream itself: 1400 sensors, a global
controller, an AXI4-Lite interconnect and a record memory. It targets a 7-series
device (Artix-7 XC7A100T) with a 50 MHz controller clock and a 20 MHz reference
clock, both from one PLL.
The 1400 sensors sit in a 100 x 14 grid: ROs in SLICEL sites, and counters in
SLICEM sites, because only those can hold shift registers.

```
                 sensor_id, ro_select[N], counter_select[N], addr[14:0], counter_init
  +-------------------+ ------------------------------------------> +---------------------+
  | global_controller |                                            | sensor_array        |
  |  (FSM)            | <------------- residues[2:0] ------------- |  0: ref_sensor      |
  +-------------------+                                            |  1..N-1: ro_sensor  |
        | AXI4-Lite (m0)                                           +---------------------+
  +------------------+     AXI4-Lite     +-----------------------+
  | axi_interconnect | ----------------> | bram_ctrl (records)   |
  +------------------+                   +-----------------------+
        | AXI4-Lite (m1) = top ports jtag_axi_req / jtag_axi_rsp  (JTAG-to-AXI bridge, host)
```

## One sensor, one measurement

A sensor is an RO next to a frequency counter. The controller measures
sensor `i` as follows (cycle counts are at 50 MHz):

| phase  | what happens | length |
|--------|--------------|--------|
| SELECT | `sensor_id = i` points the residue multiplexer at the sensor | 1 cycle |
| SETTLE | `ro_select[i] = 1`: the RO starts and settles | 512 cycles = 10.24 us |
| COUNT  | `counter_select[i] = 1`: the counter counts RO rising edges | 2048 cycles = 40.96 us (Tm) |
| DRAIN  | `counter_select` drops, but the RO keeps running so the fall can cross the synchroniser | 16 cycles |
| SWEEP  | `ro_select` drops; the three 5-bit tap addresses are swept 0..31 together and the residues are captured | 32 cycles |
| WRITE  | a 16-bit record goes to memory over AXI4-Lite, and the controller waits for the response | 2 or more cycles |

Settling plus counting is 51.2 us. This keeps each RO's on-time near a 50 us
budget that limits self-heating. The gaps between sensors have no RO running.
With 1400 sensors, one run takes about 73 ms.

## The RNS ring counter

This counter is the least familiar part of the design. A binary counter that
holds the range needed costs about one LUT per bit. This one costs three
SRLC32E shift-register LUTs. It counts in a residue number system with moduli
29, 31 and 32, so it has 29 x 31 x 32 = 28,768 distinct states.

**Counting.** Each `srl32` holds one `1`, loaded at configuration by its INIT
word: `0x10000000`, `0x40000000` or `0x80000000`, a single one at bit 28, 30
or 31. While counting, the tap addresses are 28, 30 and 31. Each register's
tapped output `q` feeds its own input `d`, which turns the registers into
one-hot rings of length 29, 31 and 32. All three advance on every RO edge while
the enable is high. After `k` edges, the one in ring `m` sits at position
`(k - 1) mod m`.

**Reading.** With the enable low, the controller sweeps the three address
fields from 0 to 31 together and watches the three ring outputs. For each
ring, the first address that shows a `1` is stored. The sweep must be
ascending and must keep the *first* hit. An SRL is always 32 bits long, so the
bits above a shorter ring's tap hold delayed copies of the one (bit 29 of the
29-ring repeats bit 28, and so on). Only positions below the tap are genuine.

**Record.** The three positions are stored as one 16-bit word:

```
 15   14..10    9..5     4..0
 0    r29       r31      r32
```

**Decoding.** The host does the decoding, not the hardware. It looks for
`M = 29 n + r29` with `M mod 31 = r31` and `M mod 32 = r32`. That `M` is the
number of counted edges minus one, modulo 28,768. The frequency is
`(M + 1) / Tm`.

**Range.** More than 28,767 edges in one window wrap around. With Tm = 40.96 us,
that limits the design to frequencies below about 702 MHz. A longer window
improves resolution but lowers this ceiling.

The counter can age too. If one shift register misses or gains a step, the
three residues no longer belong to a nearby count, and the decoded value
jumps to somewhere far off in the range. A sensor that suddenly reads
extremely high or low points to a fault in its counter rather than in its RO.

## Crossing into the oscillator's clock domain

The counter runs on the RO output, which is asynchronous to the controller.
`counter_select` passes through `select_sync`. This is one flip-flop on the
controller clock (it filters glitches), followed by two flip-flops on the RO
clock (they stop metastability). The counter therefore sees a clean enable
that starts and stops on RO edges.

The counting window seen by the counter (T'm) is not exactly the controller's
Tm. It depends on the RO's phase. The number of counted edges is therefore
`floor(Tm/P)` or `ceil(Tm/P)` for an RO of period `P`. The measurement error
is at most `1/Tm`, which is 24.414 kHz at 40.96 us. Every testbench checks
exactly this bound.

For the same reason, the controller keeps the RO running for `DRAIN_CYCLES`
after dropping `counter_select`. The fall needs about `2 x Fc/Fro` controller
cycles to reach the counter, which is 5.6 cycles for the slowest RO type.

The **reference sensor** (index 0) has no RO. Its counter counts the 20 MHz
reference clock. Because that clock shares a PLL with the controller, its
enable is used directly, without synchronising flip-flops. A count of 819 or 820
edges (19.995 MHz) confirms that the whole measurement and decoding chain
works.

## Oscillator types

| `RO_TYPE` | resources | nominal (slow corner) | role |
|---|---|---|---|
| `RO_8_CC2_8_CC2` (default) | 2 CLBs, 32 LUT5, 4 carry chains | 24.38073 MHz | PV-map sensor |
| `RO_16_8_CC2` | 2 CLBs, 24 LUT5, 2 carry chains | 17.93014 MHz | PV-map sensor |
| `RO_HIGH` | 1 CLB, 8 LUT6 | 56.657224 MHz | LUT-path study |
| `RO_LOW` | 1 CLB, 8 LUT6 | 56.657224 MHz | LUT-path study |

In every type, one LUT is an AND gate that gates the ring with `ro_select`.
The other LUTs are inverters. In the carry-chain types, A6 of every LUT is tied
to 1, so each LUT6 splits into two LUT5s. O5 is in the ring, and O6 drives the
carry chain's S inputs. S is held at `1110`, which makes the chain a buffer
along its longest path.

`RO_HIGH` and `RO_LOW` drive the inverter on A1 and the enable on A2, and tie
all other inputs to 1 or to 0. The two variants thus send the signal along
different paths through the LUT's internal multiplexer tree. Comparing them shows how much one measured
LUT path says about the others.

`ring_oscillator.sv` is a **behavioural simulation model**, not synthesizable
logic. It toggles every half period while enabled and sits at 0 otherwise. Its
period is the nominal value above. `VARIATION_PPM`, set per sensor from
`PV_SPREAD_PPM` in `sensor_array`, can shift the period to imitate process
variation or ageing. On the FPGA, each RO must instead be built from
instantiated LUT6/CARRY4 primitives. The LUT inputs must be wired explicitly and
the placement locked. Otherwise the tools would rebuild the ring between
synthesis runs, and measurements taken before and after a new run could no
longer be compared.

## Memory and read-out

`bram_ctrl` is an AXI4-Lite slave over a RAM of 32-bit words with byte write
enables. Measurement `s` of pass `p` goes to byte address `2 x (p x N + s)` as
one 16-bit halfword lane (`wstrb = 0011` or `1100`). The memory size follows
16 bits x sensors x passes. At the defaults this is 2,800 bytes, rounded up to
4,096.

`axi_interconnect` lets the controller (master 0) and the JTAG-to-AXI bridge
(master 1, ports `jtag_axi_req`/`jtag_axi_rsp`) share the memory. Write and read
paths are arbitrated separately, round robin. A grant is held until the
response handshake, so the host may read while a run is in progress. The host
then decodes the records as described above.

## Repeated measurements

An SRL has no reset. Its one-hot pattern is loaded once, at configuration, so a
sensor can be measured only once per configuration. That is the main mode.

The precision experiment measures 140 sensors 100 times each. It needs the
rings reloaded before every measurement. With `REINIT = 1`, the controller
raises `counter_init` during the first half of SETTLE. The signal crosses into
the RO domain through a second synchroniser and reloads the INIT words.

The reload logic costs fabric that would otherwise hold sensors. It is
therefore a build option, used together with `N_REPEAT`. Typical settings are
`N_SENSORS = 140`, `N_REPEAT = 100`, `REINIT = 1` and `MEM_BYTES = 32768`.

## Parameters of `pv_map_top`

| parameter | default | meaning |
|---|---|---|
| `N_SENSORS` | 1400 | sensors, including the reference at index 0 |
| `RO_TYPE` | `RO_8_CC2_8_CC2` | oscillator structure of sensors 1..N-1 |
| `N_REPEAT` | 1 | passes over all sensors |
| `REINIT` | 0 | reload the rings before each measurement |
| `SETTLE_CYCLES` | 512 | RO settling time (10.24 us at 50 MHz) |
| `COUNT_CYCLES` | 2048 | counting window Tm (40.96 us) |
| `PV_SPREAD_PPM` | 0 | simulation only: spread of RO periods over the array |
| `MEM_BYTES` | 4096 | record memory (2^ceil(log2(2 x N x N_REPEAT))) |

Ports: `ctrl_clk` (50 MHz), `ref_clk` (20 MHz), `rst_n` (asynchronous, active
low), `start` (one-cycle pulse), `busy`, `done`, `error` (a write response was
not OKAY), and the host's AXI4-Lite port as two structs (`pvmap_pkg::axil_req_t`
and `axil_rsp_t`).

## Files

| file | content |
|---|---|
| `rtl/pvmap_pkg.sv` | moduli, INIT words, RO types and periods, timing defaults, AXI4-Lite structs, record struct |
| `rtl/srl32.sv` | SRLC32E-like addressable shift register (+ INIT reload) |
| `rtl/rns_ring_counter.sv` | three rings of 29/31/32 |
| `rtl/select_sync.sv` | FF#0 (controller clock) + FF#1/FF#2 (RO clock) |
| `rtl/ring_oscillator.sv` | behavioural RO model, four types |
| `rtl/ro_sensor.sv`, `rtl/ref_sensor.sv` | one RO sensor, the reference sensor |
| `rtl/sensor_array.sv` | N sensors and the residue multiplexer |
| `rtl/global_controller.sv` | measurement state machine and AXI4-Lite write master |
| `rtl/axi_interconnect.sv` | 2 masters to 1 slave, AXI4-Lite |
| `rtl/bram_ctrl.sv` | AXI4-Lite record memory |
| `rtl/pv_map_top.sv` | the whole monitor |
| `tb/tb_*.sv` | self-checking testbenches; `tb/tb_util_pkg.sv` holds the RNS decoder |

## Simulating

All files are SystemVerilog 2017. The RO model needs Verilator's timing
support. For example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/pvmap_pkg.sv tb/tb_util_pkg.sv tb/tb_pv_map_top.sv --top-module tb_pv_map_top
./obj_dir/Vtb_pv_map_top
```

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

- **Block tests** (`tb_srl32` … `tb_bram_ctrl`): each block against a reference
  model or an expected value, including the controller's exact phase lengths in
  cycles and the first-one capture past the delayed copies.
- **`tb_pv_map_top`**: the whole monitor with 8 sensors, two passes with
  reinitialisation and a shortened window, while a host model hammers the
  second AXI port. It checks every decoded count against `floor/ceil(Tm/P)`,
  with `P` timed from the RO output. It also counts that the reference
  measurement, RO measurements, reinitialisation, interconnect contention and
  host accesses all took place.
- **`tb_workload_ro_types`**: the default timing with each RO type on a
  100-sensor array. Every sensor counts 999 edges (24.389648 MHz) for
  `ro_8_cc2_8_cc2`, 734 (17.919922 MHz) for `ro_16_8_cc2` and 2321
  (56.665039 MHz) for `ro_high`/`ro_low`. The reference counts 819
  (19.995117 MHz). Published slow-corner simulation readings are 998/999, 733,
  2320 and 819. Each model count is therefore equal to the published reading or
  one above it, within the 24.414 kHz resolution.
- **`tb_workload_repeat`**: the precision configuration (140 sensors, 32 KB,
  reinitialisation), with 3 of the 100 passes. Repeated counts agree within one
  edge.

The largest array simulated end to end is 140 sensors. The simulation cost
grows with the square of `N_SENSORS`, because every sensor's logic is evaluated
on every clock edge of a run that is itself proportional to `N`. A 1400-sensor
run would take about 20 minutes of Verilator time, so it has not been run.
Nothing in the design changes with `N` except vector widths and the memory size.

## Where this implementation makes its own choices

- The controller interface (`start`, `busy`, `done`, `error`) is this
  implementation's choice, as are the 16-cycle drain, the record's field order,
  the record address map and the pass-major repetition order.
- `sensor_id` is a binary index. `ro_select` and `counter_select` are one bit
  per sensor.
- The AXI4-Lite interconnect (round robin, grant held until the response) and
  the memory controller (single-cycle accept, SLVERR beyond the RAM) are the
  simplest designs that do the job.
- The ring reload mechanism for repeated measurements (a level through a
  synchroniser, reloading INIT while high) is an assumption. Only its purpose
  is known.
- The decoded value is the number of counted edges minus one. This follows from
  the INIT words and the tap positions, so the host adds one before dividing by
  Tm.
- The ROs are timed models at their nominal slow-corner frequency. Real
  oscillators need primitive instantiation and placement constraints, which
  RTL cannot express.
- The JTAG-to-AXI bridge, the JTAG port, the host software and the PLL are
  outside this RTL.

## Synthesis notes

`srl32` infers an SRLC32E: a shift register with a variable tap and an initial
value. The initial values of `srl32` and `select_sync` are configuration-time
values, written as declaration initialisers. `ring_oscillator` must be replaced
by a structural netlist of placed primitives, and a synthesis run on the model
reports the oscillator's loop. In the main configuration nothing drives
`counter_init`. Tie it low and the reload logic disappears.
