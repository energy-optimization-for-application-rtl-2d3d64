# Multi-mode switch network-on-chip

In an application-specific system-on-chip, the traffic between cores is often known before the
chip runs: a profile of the application shows which core talks to which, and when. A packet
router spends power in two ways: in every cycle it is switched on (leakage), and in every flit it
arbitrates and switches through its crossbar (dynamic power). Neither cost is needed while
a switch carries a single, fixed stream, or nothing at all. The mesh network here exploits that
knowledge. Each switch has three operating modes:

* **normal**: an ordinary wormhole router with input buffers, an arbiter and a crossbar;
* **lease-line**: the switch forwards flits along fixed input-to-output *lease lines*. There
  is no route computation and no arbitration, and the crossbar is not used;
* **off**: the switch carries nothing, and in silicon its clock and supply can be cut to stop
  leakage.

A **global controller** holds a *switch-mode table*, loaded before the application runs. The
table lists, per switch, time periods and the mode, plus lease lines, for each. While the
application runs, the controller counts cycles and sets every switch's mode from the table.
Outside the listed periods, switches are in normal mode. With an empty table, or a controller
that is never started, the network is a plain wormhole mesh.

The scheme follows K.-C. Chang, *Energy Optimization for Application-Specific NOC with
Multi-Mode Switches*. That work defines the modes, the table and the controller and evaluates
them on an MPEG-4 decoder mapped onto a 3x3 mesh. It does not give their logic. Microarchitecture,
encodings, link protocol and timing here are this design's own. The section *Where this
design takes its own decisions* lists them.

## The three modes inside one switch

A switch (`multi_mode_switch`) has five ports: the local port `I` of its core and `E`, `W`,
`N`, `S` towards its neighbours. Every port has a 4-flit input buffer (`flit_buffer`).

**Normal mode.** The oldest flit of each buffer is examined. If it is a packet head, its output
is computed by XY routing: first along x, then along y, with y growing northwards. The
arbiter (`switch_arbiter`) runs one round-robin arbiter (`rr_arbiter`) per output. It locks a free
output to one requesting input. The lock is a register, so a head flit spends one cycle in
arbitration. After that, the packet's flits cross the crossbar (`crossbar`) one per cycle,
whenever the neighbour's buffer has room. The tail flit releases the lock. This is wormhole
switching: packets never interleave on an output.

**Lease-line mode.** The configuration names, for each output `d`, whether a lease line feeds
it and from which input (`lease_en[d]`, `lease_src[d]`). Several lines may be active at once,
for example `W->N` and `E->S`, as long as no two share an input or an output. The buffer of each
source input stays in use. Its oldest flit goes straight to its line's output, with no route
computation, no arbitration and no crossbar. Inputs that feed no line refuse flits. A head
flit therefore spends one cycle per hop instead of two. Body flits move one per cycle in both
modes.

**Off mode.** All inputs refuse flits and no output sends any. The RTL has no power switch. Off
mode is the logical state in which the gating can be applied.

### Changing mode without cutting packets

The controller can ask for a new configuration at any cycle. A switch only adopts it at a packet
boundary:

| new mode | adopted when |
|---|---|
| normal | no packet is part-way along a lease line |
| off | no output is locked, no packet is on a lease line, and all five buffers are empty |
| lease-line | as for off, except that a buffer feeding one of the new lease lines may hold packets whose head routes to that line's output |

In the cycle a configuration is adopted, the switch moves no flit. The switch keeps working in
its old mode until the condition holds, and `mode_pending` shows the wait. A lease line does not look
at where a flit is going. The last rule therefore ensures that, when lease-line mode begins, no
buffered packet is bound for another output. Packets that arrive later are trusted to match the
table. An assertion in the switch flags any packet head that reaches a lease line's output while
its route names another output. That can only happen if the table lets other traffic into a
lease period.

### Timing summary

| event | cycles |
|---|---|
| head flit, one hop, normal mode | 2 (buffer, then arbitration + crossbar) |
| head flit, one hop, lease-line mode | 1 |
| body flits, either mode | 1 per flit per hop |
| table period start to `mode_cmd` at the switch | 1 cycle after the period's first cycle |
| `mode_cmd` to adopted configuration | 1 cycle, or longer while waiting for a packet boundary |

## The switch-mode table and the global controller

`global_controller` stores, for each switch, up to `SMT_DEPTH` (default 16) records, each with:

```
t_start, t_end : 20-bit cycle numbers, both inclusive, counted from the start pulse
cfg.mode       : LEASE or OFF
cfg.lease_en   : 5 bits, one per output
cfg.lease_src  : 5 x 3 bits, the input feeding each enabled output
```

A switch's records must be in time order and must not overlap. Where a profile asks for
overlapping lease periods in one switch (say `W->N` during cycles 4-5 and `E->S` during 4-9),
split them into non-overlapping records, each with all the lines active in it: here cycles 4-5
with both lines, then 6-9 with `E->S` only.

Load records with `tbl_we`, `tbl_sw`, `tbl_idx` and `tbl_entry`, one per cycle. A reset empties
the table. Pulse `start` to set time to zero and begin. Per switch, a pointer walks the list. The
record under the pointer sets `mode_cmd` while `t_start <= now <= t_end`, and the pointer advances
in the cycle that reaches `t_end`. `mode_cmd` is registered: the configuration for time `t` is
seen by the switch while `now == t+1`.

### Building a table

A table is computed offline from a profile of the application. For every switch, record each
packet with its input port, output port, and the cycles it entered and left the switch. Then:

* A period in which no packet passes can be an **off** period.
* A period in which the packets present use (input, output) pairs that share no input and no
  output can be a **lease-line** period, with one lease line per pair.
* Any period in which two packets that overlap in time share an input or an output must stay
  **normal**. The arbiter is needed there.

Merge equal neighbouring periods, drop those shorter than a threshold, and fit the result into
the table. Leaving a period out is always safe: the switch simply stays in normal mode. Put
guard time around the packets you saw, since packets move faster once lease lines are in. A
packet that arrives early at a switch that is still off waits; it is not lost.

`tb/tb_noc_mpeg4.sv` contains a complete table generator in SystemVerilog. It uses 200-cycle
time slots, 60 cycles of guard and a 400-cycle threshold, and keeps the 16 longest periods per
switch.

## The mesh (`noc_top`)

`noc_top` builds an `MESH_X x MESH_Y` mesh (default 3x3, nine switches) and one global
controller. Switch `(x, y)` has index `n = y*MESH_X + x`. Its east port meets the west port of
`(x+1, y)`, and its north port meets the south port of `(x, y+1)`. Each switch's local port is
brought out as the network interface of the core at that node:

| port | direction | meaning |
|---|---|---|
| `local_in_flit[n]`, `local_in_valid[n]` / `local_in_ready[n]` | in / out | flits from core `n` into the network |
| `local_out_flit[n]`, `local_out_valid[n]` / `local_out_ready[n]` | out / in | flits from the network to core `n` |
| `tbl_we`, `tbl_sw`, `tbl_idx`, `tbl_entry` | in | table load port |
| `start` | in | begin execution of the table |
| `running`, `now` | out | controller state and time |
| `sw_cfg[n]`, `sw_pending[n]` | out | adopted configuration of each switch, and whether a change is waiting |

Links use valid/ready: a flit moves in a cycle where both are high. Inside the network, `ready`
comes from registers only (buffer not full, and port enabled by the mode), so no combinational
path runs from one switch to the next. Each switch raises `out_valid` only when its neighbour is
ready. Links at the mesh edge are tied off.

**Flit format** (`noc_pkg::flit_t`, 42 bits): 2-bit type (`HEAD`, `BODY`, `TAIL`, or `SINGLE`
for a one-flit packet), 4-bit destination x, 4-bit destination y, and 32-bit payload. The
destination matters only in head flits.

## Files

| file | content |
|---|---|
| `rtl/noc_pkg.sv` | port, mode and flit types; mode configuration and table record; XY routing function |
| `rtl/flit_buffer.sv` | input buffer (FIFO) |
| `rtl/rr_arbiter.sv` | round-robin arbiter |
| `rtl/switch_arbiter.sv` | per-output wormhole locks, request/grant, crossbar select |
| `rtl/crossbar.sv` | 5x5 crossbar |
| `rtl/multi_mode_switch.sv` | the switch: buffers, arbiter, crossbar, lease lines, mode changes |
| `rtl/global_controller.sv` | switch-mode table and run-time mode control |
| `rtl/noc_top.sv` | the mesh |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus `tb_noc_period_sets` and `tb_noc_mpeg4` |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/noc_pkg.sv tb/tb_noc_top.sv --top tb_noc_top
./obj_dir/Vtb_noc_top
```

Replace `tb_noc_top` with any other testbench name. `-y rtl` lets Verilator find the modules.

* `tb_flit_buffer`, `tb_crossbar`, `tb_switch_arbiter`, `tb_global_controller` test the parts.
  They cover FIFO order and flags, crossbar selection, the one-cycle arbitration, round-robin
  order, wormhole locks under random back-pressure, and table replay cycle by cycle.
* `tb_multi_mode_switch`: random traffic in normal mode; head latency of 2 cycles in normal mode
  and 1 in lease mode; two simultaneous lease lines; off mode. It also checks that every mode
  change waits for its packet boundary.
* `tb_noc_top`: the whole network at its default size. MPEG-4 decoder cores sit on the mesh:
  iq (0,2), transfer (1,2), mc (2,2), predict_acdc (0,1), idct (1,1) and decoder_mbintra (2,1).
  The run has three phases: mc->transfer alone, then iq->transfer with transfer->mc, then all
  eleven decoder flows. The testbench derives a table from the flows' routes: 8 lease-line
  records and 16 off records. It checks delivery and the two-hop head latency, 4 cycles in normal
  mode and 2 on lease lines. It also checks that lease transfers, off periods, crossbar
  transfers, arbitration between contending heads, mode changes and back-pressure all occur.
  It runs in seconds.
* `tb_noc_period_sets`: a three-message example on the centre switch. `W->N` and `E->N`
  overlap first, which is a normal period with contention for `N`. Next come lease lines
  `{W->N, E->S}`, then `{E->S}` alone, then an off period. The switch must take each
  configuration, and all flits must arrive.
* `tb_noc_mpeg4`: 10000 four-flit packets of the decoder's flows, chosen at random in proportion
  to the flows' volumes. One packet enters the network every 5, 10, 15 or 20 cycles. For each
  period, a normal-mode run serves as the profile. The table generated from it is then used in
  lease-only, off-only and lease+off runs. It takes about 15 s.

Results of `tb_noc_mpeg4` (all 40000 flits delivered in every run):

| period | mean head latency, normal / lease+off (cycles) | switch-cycles off | flit-hops on lease lines |
|---|---|---|---|
| 5  | 4.02 / 3.17 | 43 % | 49 % |
| 10 | 4.02 / 3.29 | 46 % | 36 % |
| 15 | 4.02 / 3.56 | 46 % | 23 % |
| 20 | 4.02 / 3.64 | 44 % | 19 % |

In these runs, between 19 % and 49 % of all flit-hops avoid the arbiter and crossbar, and over
40 % of switch-cycles could be power-gated. Converting these counts into power requires energy
figures for a process, which this RTL does not contain. The random packet order produces many
short periods: 59 to 248 per switch, against the 16 table records. Structured, phase-wise traffic,
as in `tb_noc_top`, needs far fewer.

## Where this design takes its own decisions

These points are not fixed by the scheme this design follows. They are reasonable choices, and
each can be changed:

* **No virtual channels.** The switch is a simple wormhole router with one buffer per port. The
  evaluation of the original scheme used a virtual-channel router model.
* **Routing** is XY dimension-order. Any deterministic routing works with the scheme, but a lease
  line ignores routing, so the table must be computed for the routes actually used.
* **Lease lines keep the source buffer.** The original design describes replacing the crossbar
  and the unused buffers with bus lines, but does not say whether a lease line stores a flit.
  Keeping the source input's buffer gives the line full-rate flow control. It also avoids a
  combinational ready path across switches.
* **Mode changes wait for packet boundaries**, with the rules above. The original scheme
  does not say how a switch changes mode while traffic is in flight.
* **Off mode is logical.** Clock gating and power switches belong to physical design. An
  implementation would gate the off switch's clock and supply, keeping isolation on its outputs.
* **Table size.** After synthesis, the controller's logic is about 5 % of the network's cells
  (438 of 9204). Its table memory, however, is 9 x 16 x 62 = 15872 bits, against 5544 bits of
  input buffers (buffers on unused edge ports are optimized away). Lower `SMT_DEPTH` where the
  application needs fewer periods.
* **Sizes.** Buffers are 4 flits deep. The table has 16 records per switch with 20-bit times
  (up to 1,048,575 cycles), and flits have a 32-bit payload. The 3x3 mesh of nine switches is
  the size the original evaluation used.
* **Table format.** One time-ordered, non-overlapping list per switch, with several lease lines
  per record. The controller adds one cycle of latency.
* **Reset** is asynchronous and active-low. It puts every switch in normal mode and empties the
  table.
* **Not included:** the cores and their network interfaces, the profiling and table-generation
  step (done offline; one version is in `tb_noc_mpeg4`), and any power model.
