# Resource sharing interconnection networks

In a multiprocessor with pools of identical resources (accelerator chips for FFT,
sorting or matrix inversion, or idle processors taking extra load), a processor does
not want *a particular* resource: it wants *any* free one. A conventional address-mapped
network needs a central scheduler to pick a free resource's address before a request
can enter the network, and that scheduler serves requests one at a time.

A *resource sharing interconnection network* (RSIN) drops the destination address.
Processors send bare requests and the switching elements themselves steer each request
towards some free resource, so many requests are scheduled in parallel and no central
scheduler exists. This repository holds synthesizable SystemVerilog for four such
networks, for 16 processors and 32 identical resources:

| network | notation | module |
|---|---|---|
| cross-bar switch, one resource per column | 16/1x16x32 XBAR/1 | `xbar_switch` (cells: `xbar_cell`) |
| 16 x 16 Omega network, two resources per output port | 16/1x16x16 CUBE/2 | `omega_rsin` (boxes: `omega_xbox`) |
| one shared bus with all 32 resources | 16/1x1x1 UNIBUS/32 | `bus_rsin` |
| a private bus per processor with two resources | 16/16x1x1 UNIBUS/2 | 16 x `bus_rsin` (1 processor, 2 resources) |

The notation `p/i x j x k N/r` means p processors, i networks of kind N with j inputs
and k outputs each, and r resources sharing each output port. `rsin_top` places the
four networks side by side (they share only clock and reset) so they can be compared
under the same traffic. The cube network is the Omega network with its ports renamed
and behaves the same as an RSIN, so only the Omega form is built.

The processors and the resources are not part of the RTL. Their signals are ports,
and the testbenches contain models of both.

## Cross-bar switch (`xbar_cell`, `xbar_switch`)

Processor i drives a request along row i. Resource j drives a "free" signal down column
j. Cell C(i,j) sits at the crossing and holds one control latch L, meaning "processor
i is connected to resource j". A global MODE line selects one of two kinds of cycle:

* **Request cycle.** The first free column a request meets absorbs it. The first
  request a free signal meets absorbs it too. The cell where the two meet sets its
  latch. A free signal is also absorbed by a cell whose latch is already on, so an
  existing connection is never disturbed:

      X(i,j+1) = X & ~Y      Y(i+1,j) = ~X & Y & ~L      set L = X & Y

* **Reset cycle.** X and Y pass straight through, and X clears every latch of its row:
  a processor gives back all it holds.

Data of processor i is ORed onto column j while L(i,j) is on and arrives at resource j
at the top of the column (`res_data`).

Signals flow from the top-left corner towards the bottom-right corner as a diagonal
wave. The request path is at most about four gates per cell over n+m cells, and the
reset path one gate per cell. When requests collide, the lower-numbered processors win,
because they sit nearer the resources. The switch never blocks: in every request cycle
the number of new connections is min(requests, free resources).

**Protocol.** One clock is one cycle. The latches change on the rising edge that ends
the cycle.

* Processor i pulses `req[i]` for one clock of a request cycle. `unsat[i]`, valid in
  that same clock, says the request found nothing and must be raised again in a later
  request cycle.
* Resource j holds `free_in[j]` high while it is free. If `free_out[j]` reads 0 at the
  end of a request cycle in which `free_in[j]` was 1, the resource has been taken and
  must lower `free_in[j]` in the next clock.
  A latch shields only the rows *below* it. A resource that keeps its free line high
  longer than that can be taken a second time by a lower-numbered processor.
* To give its resources back, processor i pulses `req[i]` in a reset cycle
  (`mode = MODE_RESET`).

Which clocks are request cycles and which are reset cycles is up to the system.
Requests and resets cannot happen in the same cycle. That is the price of having a
single mode line.

## Omega network (`omega_xbox`, `omega_rsin`)

The network has log2 N stages of N/2 two-by-two exchange boxes. A perfect shuffle sits
in front of every stage: box b of each stage takes links b and b+N/2 and drives links
2b and 2b+1. Processor i is link i in front of stage 0. Output link j of the last stage
is resource port j. Each box can connect its inputs straight, crossed, or one input to
both outputs (broadcast, for a multi-resource request).

Five count-carrying signals run between neighbouring stages:

| signal | direction | meaning |
|---|---|---|
| Q (query) | towards resources | number of resources requested |
| L (release) | towards resources | tear the connection down |
| S (status) | towards processors | number of resources reachable through this link |
| J (reject) | towards processors | number of requested resources that were not found |
| C (completion) | towards processors | number of requested resources found |

Q, L, J and C are one-clock pulses (`*_v` plus `*_cnt`). S is a level.

**How one box decides.**

1. *Availability registers.* Each output port has a register A. A copies the port's
   status whenever that status changes. The box reports S = the sum of A over the
   output ports that are not in use, on both of its input ports.
2. *Routing a query.* A query becomes pending work of its input. Each clock the box
   serves one input: work returned by a reject comes first, then the larger count, then
   input 0. It sends a query for min(pending, A) on the free output with the larger A;
   a tie is broken by a pseudo-random bit. It then zeroes that A and marks the output
   as held by the input. If no output can take the work, the rest goes back upstream
   as a reject.
3. *Re-routing.* A reject coming back on an output returns its count to the input's
   pending work, and step 2 tries the other output. An output that was neither
   successful nor still waiting is given up. This is how a request blocked deep in the
   network backs up one stage and finds another path.
4. *Completions.* Completions from the outputs are added up. When nothing of the query
   is pending or in flight, the box sends one completion upstream with the total found.
   So for every query, the rejects plus the completion sent upstream add up to exactly
   the query's count. The testbenches check this rule everywhere.
5. *Release.* A release on an input is forwarded to every output the input holds, and
   frees them.
6. *Data.* The data of an input goes to every output it holds.

**Protocol at the edges.**

* A processor should query only when its status `p_s` shows enough reachable resources.
  It waits until the rejects and completion it receives add up to its query.
* If it received everything, it sends its task on `p_d` and then pulses `p_l`.
* If it received only part, it may keep that part or release it, and retry later. The
  testbenches release and retry after a random delay. Such a delay also stops all
  processors from firing at once when a status change reaches them all in the same
  clock.
* A resource port must report its free resources on `r_s` and answer each query
  `r_q_*` with a completion for what it grants and a reject for the rest.
* A port never receives a second query while its link is held. A release (`r_l`) ends
  the connection, but the resources may still be busy. The port's status rises only
  when they really become free.

**Timing.** All box outputs are registered. A query takes two clocks per stage on the
way down. Rejects and completions take about one clock per stage on the way back.
Status moves one stage per clock.

## Shared and private buses (`bus_rsin`)

The bus broadcasts `free_cnt`: the resources that are free and not already promised to
a transmission.

* A processor whose request (`req`, `req_cnt`) needs no more than `free_cnt` is
  eligible. Whenever the bus is idle, an arbitrator picks one eligible request at
  random: a round scan starting at a pseudo-random processor. The others simply keep
  their `req` high and wait.
* The winner gets `grant`, and the lowest-numbered free resources (as many as it asked
  for) are reserved for it.
* The winner transmits over the bus (`bus_data`, delivered to the resources flagged in
  `res_sel`) and pulses `done`.
* `done` pulses `res_start` to the reserved resources and frees the bus.
* A resource keeps `res_free` high while idle, and lowers it in the clock after
  `res_start`. Reserved resources stay out of `free_cnt` until then.

A private bus is the same block with one processor and its two resources. The shared
bus is a bottleneck whenever transmission takes long compared with service, because
only one task crosses it at a time. Private buses waste resources a busy processor
could have lent to others.

## How the four compare under load

`tb_rsin_perf` drives all four networks at full size with the same random task stream.
Tasks arrive at every processor as a Poisson stream. Transmission time Tn and service
time Ts are exponential, with a mean Ts of 400 clocks, so the network's own few clocks of
latency hardly count. Each task needs one resource. The load is
rho_x = (arrival rate) x (Tn + Ts) / 32: the resource utilisation a cross-bar would see.
The table gives the mean wait from a task's arrival to its allocation, in units of the
mean Ts. This is one run; other seeds move the numbers a little:

| Tn/Ts | rho_x | cross-bar | Omega | shared bus | private buses |
|---|---|---|---|---|---|
| 0.1 | 0.2 | 0.004 | 0.050 | 0.17 | 0.049 |
| 0.1 | 0.4 | 0.008 | 0.059 | 49 (saturated) | 0.23 |
| 0.1 | 0.6 | 0.013 | 0.067 | 131 (saturated) | 0.61 |
| 0.1 | 0.8 | 0.030 | 0.18 | 167 (saturated) | 1.64 |
| 1.0 | 0.2 | 0.25 | 0.34 | 197 (saturated) | 0.26 |
| 1.0 | 0.4 | 0.71 | 0.68 | 237 (saturated) | 0.99 |
| 0.5 | 0.8 | 0.62 | 1.99 | 256 (saturated) | 5.15 |
| 1.0 | 0.8 | 3.4 | 18.9 | 263 (saturated) | 17.0 |
| 2.0 | 0.8 | 32.8 | 46.6 | 272 (saturated) | 46.3 |

For the cross-bar the testbench also prints the Allen-Cunneen estimate for 32 servers:
the Erlang C probability of waiting times (Tn + Ts) / (32 (1 - rho_x)). At Tn/Ts = 0.1
and rho_x = 0.8 it gives 0.028 against 0.030 simulated, and the testbench checks that
the two stay within 0.05.

What this shows:

* The cross-bar never blocks, and the Omega network comes close to it while Tn is small.
* One bus carries one transfer at a time. It saturates once
  rho_x > (Tn + Ts) / (32 Tn): 0.34 for Tn/Ts = 0.1, and about 0.06 for Tn = Ts.
* Private buses match Omega at light load. They fall behind as the load grows, because
  a busy processor cannot borrow a neighbour's idle resource.

A processor transmits one task at a time, as the scheme assumes. Once Tn >= Ts, that
per-processor queue dominates every network, and even the cross-bar's delay grows (last
rows). The 32-server estimate leaves that queue out and stays below 0.08 there. The
published comparison reports the cross-bar unaffected in this corner, in line with the
estimate, and the private buses diverging while Omega levels off. Here Omega and
private buses come out about equal instead. The testbench prints these rows but does
not check them.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `xbar_switch` | `N_PROC`, `N_RES` | 16, 32 | rows, columns |
| `omega_rsin` | `N`, `R_PER_PORT` | 16, 2 | ports (power of 2), resources per output port |
| `omega_rsin`, `omega_xbox` | `CW` | 6 | width of every count (`$clog2(N*R_PER_PORT+1)`) |
| `bus_rsin` | `N_PROC`, `N_RES`, `CW` | 16, 32, 6 | processors, resources, count width |
| all | `DATA_W` | 1 | width of the data path |
| `rsin_top` | `N_PROC`, `N_RES`, `R_OMEGA`, `R_PRIV` | 16, 32, 2, 2 | as in the table at the top |

## Where this RTL goes beyond or departs from the published scheme

The scheme describes these networks behaviourally and, for the cross-bar, at gate level.
The following are this implementation's own choices:

* **Clocked cross-bar latches.** The original cross-bar is self-timed: set/reset
  latches and a wave that settles within the cycle. Here every latch is a flip-flop, and
  one clock is one request or reset cycle.
* **Free-signal equation.** For the request-mode free signal, the equation
  Y(i+1,j) = ~X & Y & ~L is used: a cell whose latch is on blocks the free signal.
* **Signal encoding.** The message encoding of the Omega box is this design's: valid
  pulses with counts, a level for status, and a release without a count that drops the
  whole connection. So are the one-action-per-clock service order and the registered
  two-clock stage latency.
* **Status a box reports.** The published rule reports the sum of the two statuses
  received from the outputs. Here a box reports the sum of its availability
  registers, and it leaves out outputs that are already in use. So an output that was
  just queried counts as zero until its status next changes, and a link that cannot
  carry a second connection is not advertised.
* **Multi-resource cross-bar requests.** Only the single-resource cell is given. A
  processor that needs k resources raises its request in k request cycles, since its
  earlier latches stay set. It gives all of them back in one reset cycle.
* **Random delay before Omega queries.** Waiting a random time after new status
  arrives, so that processors do not all query in the same clock, is processor
  behaviour and lives in the testbenches: they wait a random time after a reject.
* **Heavy load with long transmissions.** See the end of the comparison above.
* **Forward-only data.** Data goes only from processors to resources. Data lines in
  both directions are drawn for the exchange box, but their use is not described.
* **Bus details.** The shared bus's handshake, resource choice and random source are
  this design's.
* **Multiple resource types.** These would need a request code per type and one set of
  availability registers per type. They are not implemented: all resources are
  identical.
* **No cube network.** The cube network is not built separately.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints one line,
`TB_RESULT checks=N failures=M`:

* `tb_xbar_cell`: random drive compared with the cell's equations; every truth-table
  row is visited.
* `tb_xbar_switch`: an 8 x 6 switch against a reference model that serves processors in
  index order, with random requests, resets and resources that keep their free line up
  a clock too long.
* `tb_omega_xbox`: directed scenarios for one box. These cover the status sum, the
  choice of the larger output, split queries with an immediate reject, releases,
  largest-first service, data steering, re-routing after a reject, and random tie
  breaks.
* `tb_omega_rsin`: an 8 x 8 network. It first runs, 24 times from random start clocks,
  the example with resources behind ports 0, 1, 4 and 5 free and processors 0, 3, 4
  and 5 asking for one each. All four are served every time, and no processor sees a
  reject. In about half the rounds the stage-0 tie-breaks steer two requests into the
  same stage-1 box. Then one request backs up a stage and takes the other path: 5 box
  passes against 3, or 3.5 per request on average. Both kinds of round must occur.
  Then it runs 160 random one- and two-resource tasks, with partial grants, releases,
  retries and backtracking inside the network.
* `tb_fig2_omega`: a 4 x 4 network with processors 0, 1 and 2 asking and resources 0, 1
  and 2 free. A badly chosen central mapping would reach only two of the three
  resources; the network reaches all three in each of 40 rounds.
* `tb_bus_rsin`: six processors and five resources. It checks the broadcast count,
  eligibility, the reservations, the bus data and random (not fixed-priority)
  arbitration.
* `tb_rsin_perf`: the delay comparison above. It checks that every task is accounted
  for. While Tn < Ts, it checks that the cross-bar is lowest and near its estimate, and
  that Omega stays close to it. It checks when the shared bus copes and when it
  saturates, and that private buses trail Omega under load.
* `tb_rsin_top`: all four networks at full size (16 processors, 32 resources) running
  streams of tasks to completion. It checks that the cross-bar never blocks, conserves
  query counts in the Omega network, and checks that data reaches the granted
  resources. It also requires that contention, backtracking, partial grants, resets and
  requests held back each happen.

To run a testbench with Verilator (5.x):

    verilator --binary --timing --assert -Wno-fatal --top-module tb_rsin_top \
        -y rtl -y tb rtl/rsin_pkg.sv tb/tb_rsin_top.sv
    ./obj_dir/Vtb_rsin_top

Replace `tb_rsin_top` with any other testbench name. `rtl/rsin_pkg.sv` must come
first. To lint a module on its own:

    verilator --lint-only -Wall -y rtl rtl/rsin_pkg.sv rtl/rsin_top.sv

**Not covered:**

* The delay comparison runs only single-resource tasks. Only the cross-bar has an
  analytic estimate to compare with, and only at one point is the agreement checked.
* The lint warnings that remain are:
  * an LFSR of which the exchange box uses one bit;
  * the reset net feeding both flip-flops and assertion disables.
