# Dynamic-priority arbiter and multiplexer for on-chip network switches

In a network-on-chip switch, each output has an arbiter that picks one of the
inputs competing for it, and a crossbar multiplexer that forwards the
winner's data. Arbitration and multiplexing usually sit one after the other
on the critical path. Simple round-robin arbiters are fast. Weight-based
policies such as first-come-first-served (FCFS) give better network
throughput, but are normally slower or need a completely different circuit.

This RTL implements one arbiter architecture that serves both kinds of policy.
The fixed-priority part of the arbiter is merged with the output multiplexer
into a single tree. Its parts:

1. **Reduce.** Each input's request and priority state are mapped to a small
   number, the *symbol*. Only the requests that carry the largest symbol are
   kept. This turns the cyclic round-robin search, or the "largest weight"
   search, into a plain "rightmost one wins" problem.
2. **Merged fixed-priority arbiter and multiplexer.** A binary tree of trivial
   comparison nodes finds the rightmost remaining request. The direction flag
   of each node also steers a 2:1 data multiplexer. The winning data word
   therefore reaches the output through the tree itself, and the grant comes
   out as a binary index, as a onehot vector and as a thermometer vector.
3. **Priority update.** This is the only part that depends on the policy. It
   runs in parallel with the multiplexing and loads the per-input priority
   state only when a grant was made.

## Files

| file | module | role |
|---|---|---|
| `rtl/dpa_pkg.sv` | package | `policy_e` (`POLICY_RR`, `POLICY_FCFS`), width helpers |
| `rtl/cmp_node.sv` | `cmp_node` | one comparison node: `max = s_l \| s_r`, `f = ~s_r` |
| `rtl/fpa_mux_tree.sv` | `fpa_mux_tree` | merged fixed-priority arbiter, data multiplexer and grant encoders |
| `rtl/dpa_reduce.sv` | `dpa_reduce` | symbols, maximum by OR gates, reduced request vector |
| `rtl/rr_priority.sv` | `rr_priority` | round-robin pointer register and update |
| `rtl/fcfs_priority.sv` | `fcfs_priority` | FCFS weight registers and update |
| `rtl/dpa_mux.sv` | `dpa_mux` | one complete arbiter + multiplexer for one output |
| `rtl/dpa_switch.sv` | `dpa_switch` | **top**: N x N switch, one `dpa_mux` per output |

## From cyclic search to a maximum: the reduce step

A round-robin arbiter keeps a pointer `k` and grants the first request found
when scanning `k, k+1, ..., N-1, 0, ..., k-1`. The pointer is stored as a
thermometer vector `P`, with `P[i] = 1` for `i >= k`. With `k = 3` and 8
inputs, `P = 11111000` (MSB first).

Read each input's request `R` and priority bit `P` together as the number
`2R + P`. An active request in the high-priority segment is then 3. An active
request in the low-priority segment is 2. An idle input is 0 (the value 1 is
folded into 0). The round-robin winner is the *rightmost input holding the
largest symbol*. No wrap-around is left.

Example, positions 7..0:

    requests  1 1 0 1 0 1 1 0
    P         1 1 1 1 1 0 0 0
    symbol    3 3 0 3 0 2 2 0
    reduced   1 1 0 1 0 0 0 0     -> the rightmost one, position 4, wins

Finding the maximum is cheap when symbols are thermometer-coded. Symbol 3 is
`11`, 2 is `01` and 0 is `00`, so the code is `{R & P, R}`. The maximum is
then the bitwise OR of all the codes: one N-input OR gate per code bit. Each
position compares its own code with the maximum. The matching positions form
the reduced request vector.

Weight-based policies use the same circuit with wider codes. `dpa_reduce`
takes a `PW`-bit thermometer weight per input and forms the code
`{weight & R, R}`, which has `PW+1` bits. Round-robin is the case `PW = 1`.
FCFS uses `PW = N`, so weights run from 0 to N.

`dpa_reduce` ANDs each comparator output with the input's own request. When
no input requests, the maximum is 0 and every idle position would otherwise
match it.

## The merged arbiter-multiplexer tree

This is the least obvious part of the design.

A fixed-priority arbiter, where position 0 is the highest priority, can be
seen as picking the maximum of N single-bit numbers, with ties going to the
right (lower position). A balanced binary tree of `N-1` comparison nodes
computes this maximum. In each node the left input comes from the
higher-numbered half and the right input from the lower half:

* `max = s_l | s_r`
* `f = 1` when the maximum comes from the left. Strictly, that is
  `s_l & ~s_r`. When both inputs are 0 the direction does not matter, so the
  node also flags left in that case, and `f` becomes simply `~s_r`. A node is
  therefore one OR gate and one inverter.

The flags trace a path from the winning leaf to the root. A 2:1 multiplexer
next to every node, selected by that node's `f`, carries the data words down
the same path. The root multiplexer outputs the winner's word. The root
maximum is `ag` ("any grant"): 0 means nothing was requested.

Three grant encodings are derived from the same flags, in parallel with the
data path:

* **binary index** (`gnt_idx`): the flag of a node at level `l` is bit `l-1`
  of the index. The lower bits are multiplexed up from the child it selected.
* **onehot** (`gnt_onehot`): each node ANDs `f` into the vector of its left
  subtree and `~f` into that of its right subtree.
* **thermometer** (`gnt_therm`): built like the onehot vector, except that the
  right half uses `f | child` instead of `~f & child`. The result has ones at
  every position up to and including the winner.

Because every flag is 1 when there are no requests, the encodings then point
at the highest position. They are only meaningful while `ag = 1`.

`N` need not be a power of two. The tree is built for the next power of two,
and the extra leaves never request. The tree is `ceil(log2 N)` nodes deep.

## Priority policies

The policy is chosen at elaboration by `POLICY`. Only the priority state and
its update rule change. Both update the state only on a clock edge that ends
a cycle with `ag = 1`.

**Round-robin** (`rr_priority`, one bit per input). After a grant at position
`g`, the next search must start at `g+1`, so `P` must have ones exactly above
`g`. That is the bitwise inverse of the thermometer grant vector, so the
update needs no decoder. After a grant at `N-1`, `P` becomes all zeros. Every
request then sits in the low-priority segment and the search restarts at 0.
Reset sets `P` to all ones (pointer at 0).

**First-come-first-served** (`fcfs_priority`, an `N`-bit thermometer weight
per input). On a grant:

* the winner's weight becomes 0;
* every other input that is requesting gains 1, saturating at `N`;
* inputs that are not requesting keep their weight.

The weight thus measures how long the request has waited, and the oldest
request wins. Ties go to the lower position. Reset clears all weights.

Other weight-based policies (backlog-aware, shortest packet first) fit the
same structure: they would need only another update module. No update rule
is defined for them here, so none is provided.

## The switch (`dpa_switch`)

`dpa_switch` is an N x N switch. Every output has its own `dpa_mux`, so the
switch allocator and the crossbar are the same circuit.

* **Input stage.** Each input has one register that holds valid, destination
  and data. An input offers a word with `in_valid`/`in_dest`/`in_data`. The
  word is taken when `in_ready = 1`, which happens when the register is empty
  or its current word is granted in this cycle. `in_ready` depends only on
  registers, never combinationally on `in_valid`. A word that loses
  arbitration stays in its register and is retried every cycle.
* **Arbitration and crossbar.** All outputs arbitrate in the same cycle.
  Output `o` sees the requests of the held words whose destination is `o`.
  An input asks for one output at a time, so it can win at most once.
* **Output stage.** `out_valid`, `out_data` and `out_src` (the input the word
  came from) are registered. Crossing the switch and driving the link
  therefore happen in different cycles. Outputs have no back-pressure.

Latency: a word accepted at clock edge `t` appears on the output registers
after edge `t+1` if it wins at once. A word that waits is served within
`N-1` further cycles under either policy. The testbench confirms the bound:
the maximum latency is `N+1` cycles.

Parameters of `dpa_switch`:

| parameter | default | meaning |
|---|---|---|
| `N` | 8 | ports (the evaluated sizes are 4, 8 and 16) |
| `DW` | 32 | data word width (own choice) |
| `POLICY` | `POLICY_RR` | `POLICY_RR` or `POLICY_FCFS` |
| `IW` | `clog2(N)` | port index width; leave at default |

Reset `rst_n` is synchronous and active low. It clears the valid bits and the
priority state.

## Where this RTL makes its own choices

These points are not fixed by the architecture and were chosen here:

* the valid/ready input handshake, the one-word input register and the
  absence of output back-pressure;
* the 32-bit data width and the reset values;
* gating the reduced vector with the request, so that an idle cycle gives no
  match;
* saturating FCFS weights at `N`, and treating "lowest priority" as weight 0;
* padding the tree for non-power-of-two `N`.

The original evaluation covers delay and energy of synthesized 4x4, 8x8 and
16x16 switches in a 65 nm process. Those figures come from a standard-cell
flow and are not reproduced by this RTL.

## Verification

Every module has a self-checking testbench in `tb/`, which compares the block
against an independent behavioural model:

* `tb_cmp_node`: all four input cases.
* `tb_dpa_reduce`: the worked example above, the idle case, and random
  round-robin and 8-bit-weight vectors against an integer maximum.
* `tb_fpa_mux_tree`: 8-, 5- and 16-input trees with random requests and
  data. It checks data, `ag` and all three grant encodings.
* `tb_rr_priority`, `tb_fcfs_priority`: random grant sequences against
  pointer and weight models, including FCFS saturation.
* `tb_dpa_mux`: round-robin and FCFS instances against cycle-level models. It
  checks that round-robin under full load serves every input once per round,
  and that FCFS does reorder grants.
* `tb_dpa_switch`: 4x4, 8x8 and 16x16 switches, each with both policies,
  driven by `switch_checker`. That module is a traffic generator plus a
  cycle-accurate model of the switch. It compares `in_ready` and every output
  each cycle. It checks that every accepted word leaves exactly once, with a
  latency between 2 and N+1 cycles. It fails if contention, input stalls,
  idle outputs, pointer wrap-around or FCFS reordering, or a minimum-latency
  transfer never occurred.
* `tb_dpa_switch_full`: the switch at its default parameters, same checks.

`dpa_mux` and `dpa_switch` also carry assertions: a grant always goes to a
requester and is onehot; a pending request is never left without a grant;
destinations are in range.

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and has a
watchdog. To run one with Verilator:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_dpa_switch \
        -y rtl -y tb +libext+.sv rtl/dpa_pkg.sv tb/tb_dpa_switch.sv
    ./obj_dir/Vtb_dpa_switch

For lint: `verilator --lint-only -Wall -y rtl rtl/dpa_pkg.sv rtl/dpa_switch.sv`.
The remaining lint warnings are unused-signal notes: the switch does not use
every grant encoding or the `max_sym` output.
