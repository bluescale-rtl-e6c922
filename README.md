# BlueScale: a quadtree memory interconnect with compositional real-time scheduling

Many clients, such as processors, accelerators and DMA engines, share one memory port. A
plain arbiter, whether a round-robin tree or a fixed-priority mux, gives every client some
bandwidth, but it cannot promise that a particular task's memory requests will finish before
that task's deadline. This interconnect makes that promise. It is a tree of identical 4-to-1
switches called **Scale Elements (SEs)**. Each SE schedules its four inputs with a two-level
real-time scheduler, and it programs that scheduler itself. It reads the period and
worst-case demand of every task below it. From those it computes a *periodic resource
interface* for each input: a budget of Θ memory transactions guaranteed every Π cycles. It
then reports those interfaces upwards as its own tasks. The root SE finally checks that the
memory is not over-subscribed.

The tree therefore carries three kinds of traffic:

| path | direction | content |
|---|---|---|
| request | clients → memory | address, write flag, data, **absolute deadline**, tag, route |
| response | memory → clients | read data, tag, route |
| task parameters | clients → root | {task ID, period T, execution time C} per task |

Everything is synthesizable SystemVerilog-2017 and has no vendor primitives. Every block has
a self-checking testbench.

---

## 1. Tree structure and routing

`bluescale_top` builds `LEVELS` levels of SEs. The default `LEVELS = 2` gives 16 clients and
5 SEs. `LEVELS = 3` gives 64 clients and 21 SEs.

- SE(x, y) is the y-th SE at depth x, and SE(0,0) is the root.
- Port p of SE(x, y) connects to SE(x+1, 4y+p). The deepest level connects to system client
  4y+p.
- Per-SE status arrays are indexed by `(4^x − 1)/3 + y`.

There are no routing tables. A request climbs the tree, and each SE shifts its 2-bit input
port number into the request's `route` field (`route <= {route[5:0], port}`). The memory
must return `route` and `tag` unchanged with the response. On the way down, each SE reads
`route[1:0]`, steers the response to that port, and shifts `route` right by 2 bits. The
8-bit route field (`ROUTE_W` in `bs_pkg`) therefore limits the tree to 4 levels, or 256
clients. The top stops elaboration with an error beyond that. `tag` is never interpreted. The
client uses it to match responses.

## 2. Inside a Scale Element

```
 client port p ──► random_access_buffer[p] ──┐
   (x4)            (EDF over its 8 slots)     ├─► local_scheduler ─► output FIFO ─► provider port
                                              │   (4 server tasks,   (route push)
 task params ────► interface_selector ────────┘    P/B counters)
   (x4)              │  programs (Π,Θ) of the 4 servers
                     └─► 4 server tasks {X, Π, Θ} to the parent SE
 response ◄── 2-entry FIFO[p] ◄── demux on route[1:0] ◄──────────────── provider response
```

Scheduling happens at two levels, with one priority queue at each.

**Lower level: `random_access_buffer` (one per input).** This is an 8-slot buffer with a
valid bit per slot.

- A new request fills the lowest free slot.
- A combinational comparator tree always presents the valid request with the **smallest
  absolute deadline**. On equal deadlines the lower slot wins.
- Requests from one client are therefore issued earliest-deadline-first, not in arrival
  order.
- Deadlines are plain 32-bit unsigned numbers with no wraparound handling. The client must
  produce deadlines that stay ordered over the buffer's lifetime, for example a cycle count
  that does not wrap during operation.

**Upper level: `local_scheduler`.** Each input X has a *server task* made of two
`pb_counter`s:

- The **P counter** reloads to Π−1 and counts down every cycle. One cycle is one
  transaction time unit. When it reaches 0, it and the B counter both reload. This is the
  budget replenishment, and it happens exactly every Π cycles.
- The **B counter** reloads to Θ and counts down once for each request granted to input X.
  Input X has budget while B ≠ 0.
- **Selection.** Among the inputs that have budget *and* a request waiting, the grant goes to
  the one whose server period ends first, which is the smallest P value. The lower index wins
  a tie. This is EDF over server tasks.
- **Timing.** The decision is combinational, with at most one grant per cycle. A request
  accepted at clock edge n can be granted in cycle n+1 and leave the SE in cycle n+2.
- **Idle budget.** An input with no budget is not served, even when the memory is idle.
  Unused budget is not lent to other inputs.
- **Reprogramming.** When the interface selector writes new (Π, Θ) for a server, both of its
  counters restart one cycle later. A new interface therefore takes effect immediately, and a
  server that was disabled with Θ = 0 comes back to life.

**Output and response buffers.**

- The granted request waits in a 2-deep output FIFO until the provider (parent SE or memory)
  is ready. That stall is the only back-pressure.
- Responses take one extra cycle through the demux into a 2-entry FIFO per input.

## 3. Interface selection (the hard part)

`interface_selector` solves the following problem for each of the four inputs X. Its input
is the task set 𝒯_X = {(T_i, C_i)} that input X has declared. T_i is the period and also the
relative deadline. C_i is the number of transactions the task needs per period. The goal is
to find integers (Π, Θ) that minimise the bandwidth Θ/Π such that EDF meets every deadline of
𝒯_X on a resource that supplies Θ units every Π cycles.

### 3.1 The math it implements

The worst-case supply of a (Π, Θ) server over any interval of length t is the **supply bound
function**. Write t' = t − (Π − Θ). Then:

```
sbf(t) = 0                                                    if t' < 0
sbf(t) = floor(t'/Π)·Θ + max(t' − Π·floor(t'/Π) − (Π − Θ), 0)  otherwise
```

The largest demand the tasks can place in an interval of length t is the **demand bound
function**, dbf(t) = Σ floor(t/T_i)·C_i. The task set is schedulable if dbf(t) ≤ sbf(t) for
every t. Three facts make this finite:

1. **Necessary condition:** Θ/Π > U_X = Σ C_i/T_i.
2. **Test horizon.** dbf grows at most as U_X·t, and sbf grows at least as
   (Θ/Π)(t − 2(Π − Θ)). The test can therefore stop at
   β = 2Θ(Π − Θ) / (Θ − Π·U_X). Beyond that point the two linear bounds already guarantee
   the result.
3. **Range of Π.** The other inputs need bandwidth U − U_X, where U is the utilisation of all
   tasks in this SE. Also, sbf is zero up to 2(Π − Θ), so the shortest period must be at
   least that long. Together these give the necessary bound Π ≤ min T_i / (2(U − U_X)).
   This design also caps Π at min T_i. That cap is the only bound when no other input has
   tasks. The cap can exclude a valid pair, but only one with Π > min T_i. Any such pair
   needs 2(Π − Θ) ≤ min T_i < Π, so its bandwidth is above 1/2.

Also, for a fixed Π, schedulability can only improve as Θ grows. The minimum Θ can therefore
be found by binary search.

### 3.2 How the hardware walks it

The selector is a single FSM. Its datapath has adders, multipliers, comparators and one
64-bit restoring divider (`seq_divider`, one quotient bit per cycle). It also has a fetcher
over the task table and a 256 × 64-bit scratchpad. A run starts whenever the task table has
changed since the previous run started:

1. **Utilisations.** The FSM scans the table once. It divides C_i·2^24 by T_i and rounds up,
   so U_X and U are fixed point with 24 fractional bits and are never underestimated. It
   also records min T_i per input.
2. **For each input X that has tasks**, it computes Π_max from the bound above with one
   divide. Then, for Π = 1 … Π_max:
   - The lower end of the binary search is the smallest Θ with Θ/Π > U_X. The upper end is
     Θ = Π, which always passes when U_X < 1.
   - If even that lower Θ cannot beat the best bandwidth found so far, the whole Π is
     skipped. Bandwidths are compared by cross multiplication, with no division.
   - **Each probe of the binary search** runs the dbf/sbf test. dbf only steps at multiples
     of some T_i, so only those points are visited, in increasing order. The scratchpad
     keeps one "next deadline" word per table row. At each step the FSM takes the smallest
     next deadline t, adds the C_i of every row due at t to the running dbf, advances those
     rows by T_i, and computes sbf(t) with one divide by Π. The test fails as soon as
     dbf > sbf. It passes when t reaches β, and t ≥ β is also checked by cross
     multiplication.
   - The pair with the smallest Θ/Π wins. The smaller Π wins a tie.
3. **Results.** Each result is written to the local scheduler (`ve_valid/ve_id/ve_parm`) and
   to the scratchpad. It is then offered to the parent as a task {ID = X, T = Π, C = Θ}.
   - An input without tasks gets (0, 0), which disables it. Its task word reaches the parent
     with C = 0, which deletes it there.
   - An input for which no pair passes also gets (0, 0) and raises `infeasible[X]`.
4. **Overload check.** The sum of the four rounded-up bandwidths is compared with 1.
   `overload` is raised if the sum is larger. Only the root's `overload` bit matters for the
   system: it says whether the memory itself is over-subscribed by the level-1 servers.

A run takes from a few hundred to tens of thousands of cycles, depending on the periods.
While it runs, `busy` is high and the servers keep their previous (Π, Θ). A change in one
client's tasks only re-runs the SE above it and, if that SE's interfaces change, the SEs
above that. The other branches of the tree are not recomputed.

### 3.3 Task parameter table

`task_param_table` holds 16 rows of 74 bits: {client 2, task ID 8, period 32, execution time
32}. A round-robin loader takes one parameter word per cycle from the four inputs. It prefixes
the word with the input number, so the key is {client, task ID}.

- A word whose key matches a stored row updates that row.
- A word with T = 0 or C = 0 deletes the matching row.
- A new key takes the first free row.
- A new key that arrives when the table is full is dropped and sets the sticky
  `table_dropped` flag.

16 rows is enough for an inner SE, where each child sends exactly four server tasks. At a
leaf it allows four tasks per client on average.

## 4. Blocks and files

| file | block |
|---|---|
| `rtl/bs_pkg.sv` | widths and the structs `mem_req_t`, `mem_rsp_t`, `task_parm_t`, `task_entry_t`, `ve_parm_t` |
| `rtl/bluescale_top.sv` | the quadtree of SEs, with the client ports, the memory port and per-SE status |
| `rtl/scale_element.sv` | one SE: 4 buffers, scheduler, output FIFO, interface selector, response demux |
| `rtl/random_access_buffer.sv` | EDF request buffer |
| `rtl/local_scheduler.sv` | four server tasks and the grant logic |
| `rtl/pb_counter.sv` | programmable reload-and-count-down counter (the P and B counters) |
| `rtl/interface_selector.sv` | (Π, Θ) computation FSM, datapath and scratchpad |
| `rtl/task_param_table.sv` | task table and round-robin loader |
| `rtl/seq_divider.sv`, `rtl/sync_fifo.sv` | helpers |

Default parameters:

- `bluescale_top`: `LEVELS=2`, `RAB_DEPTH=8`, `TABLE_DEPTH=16`.
- `bs_pkg`: `ADDR_W=DATA_W=DL_W=32`, `TAG_W=ROUTE_W=8`.
- `interface_selector`: `UF=24` fractional bits.

All handshakes are valid/ready, and a transfer happens on a clock edge where both are high.
Reset is synchronous and active low (`rst_n`).

**Not included.** The memory controller and DRAM connect to `mem_*`. The clients
(processors, accelerators, traffic generators) connect to `cli_*`. The memory must accept one
request per cycle when ready and return each response with the request's `route` and `tag`.
It may reorder responses, because routing does not depend on order.

## 5. Where this RTL makes its own choices

The overall structure follows the published BlueScale architecture:

- the quadtree of 4-to-1 SEs;
- an EDF buffer per input and server tasks built from period and budget counters;
- an interface selector with a 74-bit × 16 task table, a 2 KB scratchpad and an FSM-driven
  datapath;
- the sbf/dbf test with the β horizon, the Π bound, the binary search on Θ and the final
  root utilisation check.

The following are choices of this implementation:

- **Route field and response path.** Responses are routed by bits pushed into the request,
  each SE buffers them in a 2-entry FIFO per port, and the output FIFO is 2 deep.
- **Which server wins.** Among servers that have budget, the published description can be
  read two ways: pick the *request* with the highest priority, or pick the *server* with the
  earliest deadline. This RTL follows the second reading, the earliest server deadline, which
  is the smallest P counter. The request deadline only orders requests inside each buffer.
- **P counter reload value.** The P counter reloads to Π−1 rather than Π. The counter passes
  through 0, so reloading to Π−1 makes the period exactly Π cycles.
- **Budget bits are not registered.** The "has budget" bits are combinational, not held in a
  register. A budget change is therefore visible in the next cycle, and the grant stays a
  one-cycle combinational decision.
- **Restart on reprogramming.** A server restarts its period as soon as it is reprogrammed.
- **The Π ≤ min T_i cap**, and the use of rounded-up 24-bit fixed-point utilisations for
  U, U_X and the overload check. Rounding up is conservative: a borderline task set can be
  declared infeasible even when it is exactly schedulable.
- **Tie-breaking.** Ties go to the lower buffer slot, the lower input and the smaller Π.
- **Per-row "next deadline" walk** of the dbf points, as the use of the scratchpad.
- **No work conservation.** An input with an empty budget waits, even when the memory is
  idle.
- **Known limits:**
  - Reads and writes to the same address from one client are not kept in order, because the
    buffer is EDF, not FIFO.
  - A client that declared no tasks is never served.
  - Deadlines are compared without wraparound.
  - Every level of the tree adds interface overhead, because a server needs more bandwidth
    than its tasks use. In the 16-client test, client tasks with about 35% total
    utilisation need 67% at the root. Heavily loaded task sets can therefore trip the root's
    overload check, depending on their periods. The tests cover light loads and one overload
    case, not a sweep of loads.
  - `seq_divider` keeps a 65-bit partial remainder whose top bit is never read, and lint
    reports it as unused.

## 6. Verification and simulation

Each testbench in `tb/` compares the design with an independent model and ends with
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| `tb_pb_counter` | program, reload, decrement and saturation against a model |
| `tb_random_access_buffer` | random loads and pops; every issued request has the minimum deadline among the stored ones |
| `tb_local_scheduler` | cycle-exact model of the counters, budgets, replenishment and EDF grant |
| `tb_task_param_table` | insert, update, delete, full table, round-robin fairness |
| `tb_interface_selector` | (Π, Θ), infeasible and overload results against `isel_ref_pkg`, a software model in exact integer arithmetic that searches every Π and, linearly, every Θ, testing dbf ≤ sbf at every integer t below β |
| `tb_scale_element` | EDF at every grant, budget windows never exceeded, routes, the one-cycle request latency, stalls (with `mem_model`, a latency and stall-probability memory model) |
| `tb_bluescale_top` | the 16-client tree at default parameters, end to end (details below) |
| `tb_bluescale_64` | the same checks for the 64-client tree (`LEVELS = 3`) |

`tb_bluescale_top` runs four phases:

1. The clients declare tasks, and the root's level-1 servers are compared with the reference.
2. Random traffic runs. The test checks that every response reaches its client with the
   correct data and that no server exceeds its budget.
3. One client deletes a task and another adds one. The affected interfaces must be
   recomputed.
4. Added load must raise the root `overload` bit.

It counts memory stalls, requests waiting on an empty budget, replenishments, responses
returned out of issue order (EDF reordering), interface recomputation and the overload flag.
It fails if any of these never happened.

To build and run one testbench with Verilator 5:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb \
    rtl/bs_pkg.sv tb/isel_ref_pkg.sv tb/tb_bluescale_top.sv \
    --top-module tb_bluescale_top -o sim
./obj_dir/sim
```

The same command works for the other testbenches: change the top and the file. The
block-level testbenches that do not use the reference package need only `rtl/bs_pkg.sv`
before their own file. The full-size end-to-end run takes about a second of simulation.

To build a 64-client system, set `LEVELS = 3` on `bluescale_top`. `tb_bluescale_64` runs that
size end to end in about 20 seconds. It compares the interfaces of all 21 SEs with the
reference model. It runs 20 transactions per client with the route checked at all three
levels, and it ends with an overload run.
