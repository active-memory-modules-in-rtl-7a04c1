# Triangle MIN: a fault-tolerant irregular multistage interconnection network

This is a 16 x 16 multistage interconnection network (MIN) that connects 16
processors to 16 memory modules. It is *irregular*: its stages do not all hold
the same number of switching elements (SEs), and requests do not all travel the
same distance. A request whose destination lies "straight ahead" takes a short
two-SE path; every other request takes a longer secondary path through the
middle stages. Pairs of SEs in the same stage are joined by *auxiliary links*,
so a request that meets a busy or faulty SE can step sideways to a partner that
reaches the same destinations by different hardware. A single faulty SE in
the last two stages, or a faulty output demux, cuts no connection; a fault in
both SEs of one pair is the critical case that cuts some source/destination
pairs off.

The network is built from 22 SEs (14 of size 3x3, 8 of size 2x2), 16 input
multiplexers and 16 output demultiplexers, in two identical halves called
groups G0 and G1. The RTL is plain synthesizable SystemVerilog; the network
itself is combinational and one transfer cycle is one clock.

## The two groups

The most significant destination bit D3 picks the group: G0 serves memory
modules 0-7, G1 modules 8-15. Inside a group, the local address L = D2 D1 D0 is
what matters.

Each group has eight input ports. Port p of group g is fed by a 2:1 input mux
that sees sources p and p+8 and passes the one whose D3 equals g (source p
first if both do). So every source reaches one stage-1 SE in each group, and
two sources that both want the same group in the same cycle collide at the mux.

Each group holds 11 SEs in four stages:

| stage | SEs        | size | role |
|-------|------------|------|------|
| 1     | A0 A1 A2 A3 | 3x3 | A_k takes group ports 2k and 2k+1 |
| 2     | B           | 3x3 | secondary path |
| 3     | C0 C1       | 3x3 | secondary path |
| 4     | E0 E1 E2 E3 | 2x2 | E_k drives group outputs 2k (D1 = 0) and 2k+1 (D1 = 1) |

Behind every stage-4 output sits a 1:2 demux that completes the route on D0.
Each memory module is therefore reachable through two demuxes of its group:
module L is behind output L1 of E_{L2} and of E_{L2+2}.

```
  ports 0,1 ─► A0 ──direct──────────────────────────► E0 ─► demux ─► modules L2=0
  ports 2,3 ─► A1 ──direct──────────────────────────► E1 ─► demux ─► modules L2=1
  ports 4,5 ─► A2 ──direct──────────────────────────► E2 ─► demux ─► modules L2=0
  ports 6,7 ─► A3 ──direct──────────────────────────► E3 ─► demux ─► modules L2=1
               │                                       ▲
               A0,A1,A2 ─secondary─► B ─► C0 ─► E0 (L2=0), E1 (L2=1)
               A3 ──────secondary───────► C0
                                     B ─► C1 ─► E2 (L2=0), E3 (L2=1)
                                     B ─aux─► C1
  auxiliary pairs:  A0 ◄─► A2    A1 ◄─► A3    C0 ◄─► C1
```

The links, in full:

| link | from | to |
|------|------|----|
| direct (shortest path) | A_k | E_k (E_k serves L2 = k mod 2) |
| secondary | A0, A1, A2 | B, inputs 0..2 |
| secondary | A3 | C0 |
| secondary | B | C0, C1 |
| auxiliary route of stage 2 | B | second input of C1 |
| secondary | C0 | E0 (L2 = 0), E1 (L2 = 1) |
| secondary | C1 | E2 (L2 = 0), E3 (L2 = 1) |
| auxiliary (both ways) | A0, A2 / A1, A3 / C0, C1 | partner in the same stage |

The auxiliary partners are chosen so that each pair reaches the same
destinations: A0 and A2 both feed stage-4 SEs serving L2 = 0, A1 and A3 those
serving L2 = 1, and C0 and C1 each reach all eight local addresses through
different stage-4 SEs.

## Routing, stage by stage

A request carries a routing tag: the destination address, a *secondary* bit
(the tag MSB, set when the request leaves the short path) and a hop count
incremented by every SE, which comes out with the delivered request as its path
length. Inside an SE, inputs are served in a fixed order (the group inputs
first, the auxiliary input last) and a link that has been given to one request
is busy for the others in that cycle. A request that finds all its permitted
links busy or faulty is dropped; nothing is buffered, and the source sees no
acknowledge and may retry in a later cycle.

**Stage 1 (A_k).** If D2 equals k mod 2 the destination lies behind this SE's
own stage-4 SE, and the direct link is used. If that stage-4 SE, or the demux
behind the output the request needs, is faulty, or the direct link is already
taken, the request goes over the auxiliary link to the partner, which tries its
own direct link. If the partner is faulty too, or already using its auxiliary
output, the request is dropped. Otherwise (D2 differs) the request takes the
secondary link with the tag's secondary bit set, again with the auxiliary link
as the fall-back. A request that arrived over the auxiliary link gets one try
on the link it wants and is never sent back.

**Stage 2 (B).** Both stage-3 SEs reach every destination, so B only spreads
the load: it prefers C0 when D0 = 0 and C1 when D0 = 1, falls back to the other
C, and then to its auxiliary link into C1's second input.

**Stage 3 (C_j).** The request goes to the stage-4 SE selected by D2. That SE
counts as busy when the link is taken, when the SE or the demux behind the
needed output is faulty, or when a direct-path request from stage 1 already
holds the needed output in this cycle. Stage 4 reports that last condition back
to stage 3 combinationally (`busy`), so stage 3 detours over the auxiliary link
to its partner instead of colliding. The partner then uses the other stage-4 SE
serving the same address.

**Stage 4 (E_k).** A 2x2 switch on D1, with the direct input first.

**Demux.** D0 picks one of the two memory modules. If both demuxes that serve
one module deliver in the same cycle (two sources addressing one module), the
one behind the lower-numbered stage-4 SE wins and the other request is dropped.

Path lengths, counted in SEs: 2 for the direct path, 3 when a stage-1 detour is
needed or for the A3 -> C0 secondary path, 4 for the other secondary paths, up
to 6 when a request detours in both stage 1 and stage 3.

No combinational loop is formed by the auxiliary pairs: each SE computes its
auxiliary output from its group inputs only, in a separate `always_comb` from
the logic that serves its auxiliary input.

## Faults

Every input mux, SE and demux has a fault mark (top-level ports
`fault_mux`, `fault_s1` .. `fault_s4`, `fault_demux`). A faulty part passes
nothing, and the parts feeding it see its mark in the same cycle and route
around it where the topology allows:

| single faulty part | effect on a lone request |
|--------------------|--------------------------|
| stage-4 SE or demux | none: the detour through the stage-1 or stage-3 partner reaches the same module |
| stage-3 SE | none: B uses the other C; A3 detours through A1 |
| stage-2 SE | secondary requests from A1 and A3 still pass (A1 detours to A3 -> C0); those of A0 and A2 are lost |
| stage-1 SE A_k | requests entering through A_k are lost (it is their only entry) |
| input mux | requests of its two sources for that group are lost |

A fault in both SEs of an auxiliary pair is the *critical* case: stage-1 pair
faults cut off the four sources that enter there, and a stage-3 pair fault
leaves only the direct path. Repair is by replacing the pair.

## Interface and timing (`tri_min_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; active-low synchronous reset of the output registers |
| `src_valid` | in | 16 | source s issues a request this cycle |
| `src_dst` | in | 16 x 4 | destination module of each request |
| `src_data` | in | 16 x 8 | payload |
| `fault_mux`, `fault_demux` | in | 2 x 8 | [group][port] fault marks |
| `fault_s1`, `fault_s4` | in | 2 x 4 | [group][SE] fault marks |
| `fault_s2` | in | 2 | [group] |
| `fault_s3` | in | 2 x 2 | [group][SE] |
| `src_ack` | out | 16 | the request of source s matured |
| `mem_valid` | out | 16 | module d received a request |
| `mem_src`, `mem_data` | out | 16 x 4, 16 x 8 | its source and payload |
| `mem_hops`, `mem_sec` | out | 16 x 3, 16 | its path length in SEs and its secondary bit |

The network is combinational from the source ports to a bank of output
registers. Requests presented during cycle t appear on the `mem_*` outputs and
`src_ack` after the rising edge that ends cycle t: one cycle of latency, and a
fresh set of up to 16 requests every cycle. There is no flow control beyond
`src_ack`; a source that sees no acknowledge retries.

## Behaviour under load

Measured with `tb_tri_workloads` (uniform random destinations, 2000 cycles per
point). Processor utilisation is acceptance times the mean memory access time
(taken as 2/7 of a transfer cycle), processing power is 16 times that, and
throughput is processing power times the request probability:

| request probability per source and cycle | 0.1 | 0.3 | 0.5 | 0.7 | 1.0 |
|---|---|---|---|---|---|
| memory modules busy per cycle (bandwidth) | 1.51 | 3.89 | 5.54 | 6.77 | 7.85 |
| acceptance (bandwidth / requests) | 0.94 | 0.81 | 0.69 | 0.60 | 0.49 |
| processor utilisation | 0.27 | 0.23 | 0.20 | 0.17 | 0.14 |
| processing power | 4.31 | 3.70 | 3.16 | 2.76 | 2.24 |
| throughput | 0.43 | 1.11 | 1.58 | 1.93 | 2.24 |

The incremental permutation (source i to module i+4 mod 16, all at once)
passes in full, 16 of 16 requests, with a mean path of 3.4 SEs. With one fault
per network part it keeps 10 to 15 of them: detoured requests then compete
with others for the same links.

The analytical bandwidth model usually quoted for this network (per-stage
request rates, `q = 1 - (1 - p/b)^a` applied stage by stage) predicts about
3.5 modules per cycle at p = 0.1 and 13.7 at p = 1.0, and a 50 % pass rate for
the permutation. Those figures come from a stage-rate formula that ignores the
actual link pattern; they are not expected to match this cycle-accurate RTL,
and the bandwidth at p = 0.1 (3.5 from 1.6 requests per cycle) is above what
any network could deliver.

## What follows the network description and what is this design's choice

Taken from the description of the network:

* 16 x 16 size, four stages, two identical groups selected by D3;
* 16 input multiplexers, 16 output demultiplexers, D0 selecting at the demux;
* 3x3 SEs in every stage but the last, 2x2 in the last; 14 + 8 = 22 SEs;
  twice as many SEs in stage 3 as in stage 2; stage 4 fed half from stage 1
  and half from stage 3;
* a short path used when the destination belongs to the current SE, a
  secondary path marked by setting the routing-tag MSB, auxiliary links in
  every stage but the last, used when the next SE is busy or faulty, dropping
  when the auxiliary route is busy too;
* single-fault tolerance within an auxiliary pair, loss of connectivity when
  both SEs of a pair are faulty.

This design's own choices, where the description gives no detail:

* the exact link pattern above (stage sizes 4, 1, 2, 4 per group, which
  partners form the auxiliary pairs, which stage-1 SEs feed B and C0, B's
  extra link into C1);
* "destination belongs to this SE" read as D2 = k mod 2;
* a request blocked on the direct path goes to the auxiliary partner and is
  dropped if that fails; it does not fall back to the secondary path;
* fixed-priority arbitration everywhere, B's D0-based preference, the stage-4
  `busy` look-ahead to stage 3;
* each module being reachable through two demuxes, and the lower-SE-wins rule
  when both deliver;
* the payload width (8 bits), the hop counter, the fault-mark inputs, the
  one-cycle registered output and the synchronous reset;
* only N = 16 is built; the link pattern does not generalise by a parameter.

Where the behaviour differs from what is claimed for the described network:

* a faulty input mux loses the requests of its two sources for that group
  (one of 16 in the permutation test), where the described network is said
  to lose none;
* a single faulty stage-1 SE loses the requests that enter through it, since
  it is their only way in;
* the permutation and bandwidth figures are higher than the analytical ones
  (see above), because each group routes every destination over several
  paths rather than half of them.

## Files

| file | contents |
|------|----------|
| `rtl/tri_pkg.sv` | sizes, the request struct `req_t`, the forwarding helper |
| `rtl/tri_in_mux.sv` | input mux, group selection on D3 |
| `rtl/tri_se_s1.sv` | stage-1 SE: direct / secondary / auxiliary |
| `rtl/tri_se_s2.sv` | stage-2 SE |
| `rtl/tri_se_s3.sv` | stage-3 SE with auxiliary detour |
| `rtl/tri_se_2x2.sv` | stage-4 SE and its busy look-ahead |
| `rtl/tri_out_demux.sv` | output demux on D0 |
| `rtl/tri_group.sv` | one group: 11 SEs and their links |
| `rtl/tri_min_top.sv` | the network: muxes, two groups, demuxes, output registers |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_tri_ref_pkg.sv` | independent path model of one group, used by the group and network testbenches |
| `tb/tb_tri_workloads.sv` | random-traffic bandwidth and permutation/fault experiments |

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself
with a watchdog if it hangs. `tb_tri_min_top` runs the full network at its only
size: every source to every module with no fault, with each of the 54 single
faults and with each critical pair fault, then random traffic; it also counts
that every routing mechanism (direct and secondary path, each auxiliary link,
the stage-4 busy detour, drops, fault detours, both demux outputs, mux and
memory-port conflicts) actually occurred.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/tri_pkg.sv tb/tb_tri_ref_pkg.sv tb/tb_tri_min_top.sv --top-module tb_tri_min_top
./obj_dir/Vtb_tri_min_top
```

Replace the testbench name for the others (`tb_tri_workloads`,
`tb_tri_group`, `tb_tri_se_s1`, ...); `tb/tb_tri_ref_pkg.sv` is only needed by
the group and network testbenches. Every run finishes in well under a second.

To change the payload width, edit `DATA_W` in `tri_pkg`. To try another link
pattern, edit `tri_group` and the routing tests in the SE that feeds the
changed link (`HALF` in stage 1, the D0 preference in stage 2, the D2
selection in stage 3), then mirror the change in `tb_tri_ref_pkg`, which is
the testbenches' independent statement of the topology.
