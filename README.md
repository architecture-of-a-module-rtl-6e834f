# A front end that finds high-pT tracks on the detector module

A charged particle in a solenoid bends with a radius proportional to its
transverse momentum (pT). If a detector module has two sensor planes a few
millimetres apart, a stiff (high-pT) track crosses both at almost the same
phi, while a soft one arrives noticeably displaced. Pairing hits of the two
planes on the module itself therefore rejects most low-pT tracks before any
data leaves the detector. This lets the module send a compact trigger
summary at every 40 MHz bunch crossing.

This repository holds synthesizable SystemVerilog for the digital part of
such a module: the per-pixel trigger logic, the front-end chip, the link
between the two planes, and the module that ties 2 x 18 chips together.

## Geometry

| item | value |
|---|---|
| pixel | 100 um (phi) x ~2 mm (Z) |
| chip | 160 phi rows x 4 Z columns = 640 pixels |
| module | two planes, each 3 rows of 6 chips (18 chips) |
| bunch clock | 40 MHz (`ck`) |
| link clock | 160 MHz (`ck160`), rising edges aligned with `ck` |

Pixel (z, phi) of a chip has index `z*160 + phi`. Every packed pixel vector
in the RTL is `[z][phi]`, so its flat bit number is that index.

## The trigger algorithm, step by step

The same chip is mounted in both planes. Its `master_slave` pin picks the role:
upper-plane chips are **slaves** and lower-plane chips are **masters**.

1. **Cluster rejection (upper plane).** Wide clusters come from low-pT
   tracks at a shallow angle, or from noise. They must not reach the
   coincidence. Each pixel raises a *reject* flag when it is hit and at
   least two of its eight neighbours are hit. A hit survives as *clean*
   only if neither it nor any neighbour raised the flag. The result:
   - isolated pixels and pairs pass;
   - every cluster of three or more pixels disappears completely, the
     pixels at its edges included.
2. **Transfer to the lower plane.** Each slave chip drives 160 lines
   through the substrate, one per phi row. On every line the four Z pixels
   of that row follow one another at 160 MHz, so the whole clean pattern
   crosses once per bunch crossing.
3. **Z and phi alignment (lower plane).** A track at a polar angle lands
   further along Z in the upper plane: up to about 6 pixels at the far end
   of the barrel. Each master therefore listens to the upper chip facing
   it and to the next two along Z. Together they form a strip of 12 Z
   columns, and the master picks the upper pixel (z + `zshift`,
   phi + `phishift`) for each of its own pixels. Along a row of six chips,
   the first four masters have three sources, the fifth two and the sixth
   one. A small phi shift corrects mounting offsets electronically, which
   saves mechanical precision.
4. **Coincidence (lower plane).** Each master pixel looks at the aligned
   upper bits in the 3x3 window around it. A hit there together with its
   own hit of the same crossing makes a *stub* (`trigger_out`).
5. **Trigger word.** Each master sends 15 bits per crossing:
   - valid flag;
   - number of stubs, saturating at 15;
   - address of the lowest-numbered stub pixel.

   The module frame for the optical link is an 8-bit header (the
   bunch counter) followed by the 18 master words: 278 bits per crossing.

Both tests in steps 1 and 4 go through the same per-pixel **512 x 1 lookup
memory**, addressed by the 9-bit 3x3 pattern:
- in a slave, the pattern is the local hits and the answer is the reject flag;
- in a master, it is the aligned upper bits and the answer is "compatible".

The tables are loaded at configuration, so the rules can be changed without
changing the logic. `pt_pkg::lut_cluster_default` and
`pt_pkg::lut_coinc_default` give the default contents:
- cluster: `a[8] && popcount(a[7:0]) >= 2`;
- coincidence: `|a`.

## Pipeline and timing

Hits are sampled on the rising edge t of `ck`.

| where | valid after |
|---|---|
| slave `local_hit_out` | t |
| slave `cluster_reject_out` | t+1 |
| slave `clean_pixel_out` (= `pixel_up_out`) | t+2 |
| link: loaded one `ck160` cycle after edge t+2, Z pixels 0..3 on the line | t+2 1/4 ... t+3 1/4 |
| master receiver register (`plane_link_rx.data`) | t+3 1/4 |
| master `pixel_up` register | t+4 |
| master `trigger_out` | t+5 |
| chip `trig_word` | t+6 |
| module `trig_frame` / `trig_hdr` | t+7 |

The master delays its own hit by the same amount (`MASTER_HIT_DLY` = 4
stages after the hit register), so both planes' hits of one crossing meet.
If the link is changed, that constant must follow.

The link has no framing bits. Each chip flips a toggle on every `ck` edge
and detects the change in the `ck160` domain. This gives a `load` strobe one
fast cycle after each bunch edge, when the bunch-clock data is stable. The
transmitter and all receivers derive the same phase, which assumes
edge-aligned clocks and negligible wire delay.

## Level-1 path

Every pixel writes its hit into a **256-deep event memory** every crossing,
which covers a 6 us trigger latency. All pixels of a chip share the write
address, the chip's bunch counter. When `l1a` is sampled at edge u, the
memories return crossing u - `l1_latency`. The **read-out logic** then
sends, one per clock:
- the address of each hit pixel, lowest first;
- a trailer word with the event number.

An `l1a` that arrives while an event is still being sent is dropped and
flagged on `l1_lost`, because there is no event buffer. `l1_latency` must be
between 3 and 255.

## Configuration

Each chip has one serial chain, clocked by `conf_ck`. It runs through pixels
0..639 in order, 513 bits per pixel:
- the 512 lookup-table bits;
- a mask bit that silences the pixel.

Send the bits of pixel 639 first. For each pixel send its table from
address 511 down to 0, then its mask bit. A chip takes 328,320 clocks to load.
The Z and phi shifts and the Level-1 latency are static input pins.

## Files

| file | contents |
|---|---|
| `rtl/pt_pkg.sv` | sizes, trigger and read-out word types, default table functions |
| `rtl/lookup_sram.sv` | 512 x 1 lookup memory on the configuration chain |
| `rtl/event_memory.sv` | 256 x 1 latency buffer |
| `rtl/pixel.sv` | per-pixel logic, both roles |
| `rtl/plane_link_tx.sv`, `rtl/plane_link_rx.sv` | 4:1 serializer and deserializer of the inter-plane lines |
| `rtl/zphi_align.sv` | Z/phi alignment selector |
| `rtl/trigger_encoder.sv` | 15-bit trigger word |
| `rtl/readout_logic.sv` | sparse Level-1 read-out |
| `rtl/fe_chip.sv` | 640-pixel chip: array, neighbour wiring, link, alignment, encoder, read-out |
| `rtl/pt_module.sv` | top: 18 upper + 18 lower chips, inter-plane wiring, trigger frame |
| `tb/tb_*.sv` | one self-checking testbench per module (listed below) |

Every module's parameters default to the full-size design.

## Simulating

The testbenches are self-checking. Each prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/pt_pkg.sv tb/tb_pt_module.sv --top-module tb_pt_module
./obj_dir/Vtb_pt_module
```

| testbench | what it covers |
|---|---|
| `tb_lookup_sram`, `tb_event_memory`, `tb_plane_link`, `tb_plane_link_rx`, `tb_zphi_align`, `tb_trigger_encoder`, `tb_readout_logic` | one module each, against a reference |
| `tb_pixel` | a slave and a master pixel configured by their chains; random hits; cycle-exact reject, clean, trigger and event memory; masking |
| `tb_fe_chip` | three slave chips feeding one master, 16 phi rows per chip; two alignment settings; reference model of the whole chain; read-out; lost accepts |
| `tb_pt_module` | the module with 2 rows x 6 chip pairs of 16 phi rows; a different alignment per chip; the trigger frame checked every crossing. It counts cluster rejections, stubs, matches through the next and second-next upper chip, end-of-row chips, masked pixels, read-out events and lost accepts, and fails if any count stays zero. |
| `tb_fe_chip_full` | the `tb_fe_chip` test with the chips at their default size: four 640-pixel chips, 700 crossings |

The module has not been simulated at full size, 2 x 18 chips of 640 pixels.
Verilator flattens the design, and at that size building the model alone
takes far longer than the test. The largest configurations simulated are:
- four full-size chips as they sit in a row: three upper chips feeding one lower chip (`tb_fe_chip_full`, about 2 minutes);
- the complete module wiring with 2 x 6 chip pairs of 16 phi rows each (`tb_pt_module`).

## How far to trust it

All testbenches pass. The logic has been simulated, not taped out. These
parts are this design's own choices, filled in where the source description
is silent:
- the pipeline depths and the link phase;
- the meaning of the 5 extra trigger bits;
- the read-out format and its lack of buffering;
- the mask bit and the order of the configuration chain;
- the alignment ranges (Z 0..7, phi -3..+3);
- static pins for the shifts and the latency;
- no cluster rejection in the lower plane. Its lookup memory is used for the coincidence, and only the upper plane's pattern is cleaned before transfer.

Where it departs from the described system, or leaves things out:
- **The lookup memory is a register word.** It is written as a shift register so that it can sit on the configuration chain. The intended part is a full-custom 512 x 1 SRAM, 2.52 x 0.84 um cells, about 13 uW at 40 MHz in 90 nm. A real SRAM would need an addressed write port instead.
- **The link follows the high-granularity scheme:** one line per phi row, 4 Z pixels per line. An alternative of one 12-bit word per chip row, with upper chips 1, 2, 3 talking to lower chips 6, 5, 4 in successive 160 MHz slots, is not built.
- **Neighbours stop at chip edges.** No data crosses a chip boundary in phi, and none in Z except through the alignment strip.
- **Not modelled:** the analog front end (charge amplifier, discriminator, bias DACs), the optical link, and the bump-bond/TSV interconnect. The discriminator outputs enter as `hit_up`/`hit_lo`, and the trigger frame leaves on `trig_frame`/`trig_hdr`.
- **Track efficiencies were not measured with this RTL.** The original behavioural model of the algorithm found 96.6 %, 100 % and 98.2 % for 2, 5 and 50 GeV/c Monte Carlo tracks, on about 120 events each. Those event samples are not part of this code.
