# Defect-tolerant cluster for a Mesh-of-Clusters FPGA: Upward Redundant Multiplexers

As process geometries shrink, more chips leave the fab with physical defects.
In an SRAM-based FPGA most of the silicon is routing: programmable
multiplexers. A single multiplexer whose output is stuck open can make a
mapped application unroutable. This RTL models one *cluster* of a
Mesh-of-Clusters FPGA. It adds hardware redundancy to the crossbar up, the
part of the cluster's local interconnect where one bad multiplexer hurts most.

In a Mesh-of-Clusters FPGA, logic blocks are grouped into clusters. Each
cluster has its own local interconnect: crossbars *down* carry signals into
the logic blocks, and a crossbar *up* carries their results out. Every
cluster output leaves through the crossbar up, and the feedback paths into
the cluster's own logic do too. So a defective crossbar-up multiplexer loses
an output and may also lose a feedback. The redundancy scheme here is
**Upward Redundant Multiplexers (URM)**. These are spare multiplexers placed
in parallel with the crossbar up. A 2:1 multiplexer on each cluster output
picks either the normal crossbar-up path or a spare. You can fit as many
spares as the number of defects you want to tolerate, so area and defect
tolerance trade off one spare at a time.

## The cluster

```
 cin[23:0] ──┬─ 6 ─► crossbar down 0 ─(10)─► pin 0 of CLB 0..9
             ├─ 6 ─► crossbar down 1 ─(10)─► pin 1 of CLB 0..9
             ├─ 6 ─► crossbar down 2 ─(10)─► pin 2 of CLB 0..9
             └─ 6 ─► crossbar down 3 ─(10)─► pin 3 of CLB 0..9
                        ▲ 3 feedbacks each                │ 10 CLB outputs
                        │                    ┌────────────┴────────────┐
                        │                    ▼                         ▼
                        │        crossbar up: 12 × 10:1      URMs: N_URM × 10:1
                        │                    │                         │
                        │                    └──► 12 × 2:1 (use_urm) ◄─┘
                        └──────────────────────────────┤
                                                       ▼
                                                  cout[11:0]
```

Default sizes (package `moc_pkg`):

| item | value |
|---|---|
| CLBs per cluster | 10, each with 4 inputs |
| crossbars down | 4, one per CLB input pin |
| multiplexers per crossbar down | ten 9:1 (6 cluster inputs + 3 feedbacks) |
| cluster inputs | 24 (6 per crossbar down) |
| crossbar up | twelve 10:1 multiplexers |
| cluster outputs / feedbacks | 12 / 12 (3 per crossbar down) |
| URMs | 12 (one per output; 1..12 allowed) |

- **Crossbar down (`xbar_down`).** Each of its ten multiplexers can select
  any of the crossbar's 9 signals, so the crossbar is fully populated.
  Multiplexer `j` of crossbar `d` drives input pin `d` of CLB `j`.
  Select values 0..5 pick `cin[6d+0..5]`, and 6..8 pick feedbacks
  `cout[3d+0..2]`.
- **CLB (`clb`).** A 4-input look-up table, a flip-flop, and a configuration
  bit that picks a combinational or a registered output.
- **Crossbar up (`xbar_up`).** Twelve multiplexers, each able to select any
  CLB output.
- **URM (`urm`).** `N_URM` spare 10:1 multiplexers with the same inputs as
  the crossbar up, plus one 2:1 multiplexer on each output.
- **Feedbacks.** They are taken *after* the 2:1 output multiplexers. A
  repaired output therefore also repairs the feedback it carries.

## Defects and how a URM bypasses one

The defect model is a stuck-open multiplexer. Its output is undefined, so
the multiplexer is unusable whatever its configuration. Every crossbar
multiplexer has a fault-injection pin for this. With `defect_*` high, the
output follows `defect_val_*`. A two-state simulator has no undefined
value, so testbenches drive these pins with random bits. In a real device
the `defect_*` pins are tied low.

The spare multiplexers, the 2:1 output multiplexers and the cluster inputs
are treated as fault-free. They have no defect pins.

To bypass a defective crossbar-up multiplexer `k` with select `s`:

1. Find the URM paired with output `k`, which is `u = k mod N_URM`.
2. Write `cfg_urm_sel[u] = s`.
3. Set `cfg_use_urm[k] = 1`.

Output `k`, and the feedback it drives, then carries the same CLB output as
before. The defective multiplexer's own select no longer matters.

With the default `N_URM = 12` each output has a private spare, so all twelve
crossbar-up multiplexers can be defective at the same time. Counted in 2:1
multiplexer equivalents (a 10:1 multiplexer is 9 of them), that is 108
tolerated defects. With `N_URM = 1` a single spare is shared by all outputs
and tolerates 9 (one multiplexer). The published evaluation of this scheme
reports exactly this range, 9 to 108 bypassed 2:1 elements. It puts the
maximal version at about +10.4 % 2:1 multiplexers and +1 % average critical
path delay across the FPGA.

URMs do not protect the crossbars down. A stuck-open crossbar-down
multiplexer corrupts one CLB input pin, and the testbench shows that.

When `N_URM` is less than 12, outputs share spares by the rule
`k mod N_URM`. Two defective multiplexers whose outputs map to the same
spare cannot both be bypassed. This sharing rule is a choice of this RTL.

## Configuration interface

The SRAM configuration memory is not modelled. Its contents come in on
plain input ports of `cluster`:

| port | shape | meaning |
|---|---|---|
| `cfg_dn_sel` | `[4][10][3:0]` | select of multiplexer `[crossbar][CLB]` (0..8; 9..15 give 0) |
| `cfg_up_sel` | `[12][3:0]` | CLB index of each crossbar-up multiplexer (0..9; 10..15 give 0) |
| `cfg_urm_sel` | `[N_URM][3:0]` | CLB index of each spare |
| `cfg_use_urm` | `[12]` | output `k` takes its spare instead of the crossbar up |
| `cfg_clb` | `clb_cfg_t [10]` | `lut[15:0]` (bit `i` is the output for input value `i`, pin 0 = LSB) and `registered` |
| `defect_dn`, `defect_val_dn` | `[4][10]` | fault injection, crossbar down |
| `defect_up`, `defect_val_up` | `[12]` | fault injection, crossbar up |

## Timing and the feedback loop

The cluster is combinational from `cin` to `cout` through combinational
CLBs. A path through a registered CLB takes one `clk` cycle. The CLB
flip-flops clear asynchronously on `rst_n` low.

The feedbacks form a structural loop: CLB, crossbar up, feedback, crossbar
down, CLB. Every FPGA routing fabric has loops like this. A valid
configuration breaks the loop with a registered CLB. Lint tools report it
as circular combinational logic (`UNOPTFLAT` in Verilator), and the warning
is expected.

## What is modelled and what is not

These parts follow the published cluster:
- the sizes in the table above;
- the 9:1 and 10:1 multiplexer counts;
- the stuck-open defect model;
- URMs in parallel with the crossbar up, with one 2:1 multiplexer per
  output;
- the assumption that spares are fault-free.

These are choices of this RTL:
- the CLB contents (a LUT4 plus a flip-flop);
- binary select encoding, with out-of-range selects giving 0;
- the multiplexer input order;
- which cluster outputs feed which crossbar down (`3d..3d+2`);
- how outputs share spares when `N_URM` is less than 12;
- the reset style;
- configuration arriving on ports.

Not included:
- The other redundancy schemes evaluated for this cluster: fine-grain
  redundancy (FGR), improved FGR, adapted FGR and distributed feedbacks.
- The configuration memory and its error-correcting code.
- The switch boxes between clusters (channel width 36) and the 36×36 array.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/moc_pkg.sv rtl/cfg_mux.sv \
  rtl/xbar_down.sv rtl/xbar_up.sv rtl/urm.sv rtl/clb.sv rtl/cluster.sv \
  tb/cluster_tb.sv --top-module cluster_tb -o sim && obj_dir/sim
```

To run a unit test, swap in `tb/<block>_tb.sv` and `--top-module <block>_tb`.
The testbenches:

- `cluster_tb` runs the cluster at its default size. It places a random
  application and checks every cycle against an independent cycle model. It
  passes through five phases:
  - fault-free;
  - two crossbar-up defects left unrepaired, which must show;
  - the same defects bypassed by spares;
  - all twelve crossbar-up multiplexers defective and bypassed;
  - crossbar-down defects.

  It also counts each mechanism and fails if one never occurs. The
  mechanisms are combinational and registered CLBs, feedback routes, visible
  defects, URM repairs and a repaired feedback.
- `cluster_defect_sweep_tb` injects random crossbar-up defect sets of every
  size from 1 to 12, bypasses each set with spares, and checks that the
  application still behaves exactly as it did fault-free.
- `cfg_mux_tb`, `xbar_down_tb`, `xbar_up_tb`, `urm_tb` and `clb_tb` are unit
  tests against reference decodes. `urm_tb` also covers a single shared
  spare.

## Files

- `rtl/moc_pkg.sv`: sizes and the CLB configuration type.
- `rtl/cfg_mux.sv`: the configurable multiplexer with the defect pin.
- `rtl/xbar_down.sv`, `rtl/xbar_up.sv`, `rtl/urm.sv`, `rtl/clb.sv`: the
  blocks described above.
- `rtl/cluster.sv`: the top.
- `tb/`: the testbenches listed above.
