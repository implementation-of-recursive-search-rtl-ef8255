# Knapsack search as a recursive hierarchical FSM

This RTL solves the 0-1 knapsack problem in hardware with a recursive
backtracking search. There are n objects. Object i has a weight w_i and a
volume v_i. The search finds the 0/1 vector x with the largest total weight
whose total volume does not exceed the capacity V.

The main idea is to run a *recursive* algorithm on hardware that has no
recursion. The search is written as a procedure that calls itself, and it is
executed by a **recursive hierarchical finite state machine (RHFSM)**. This
is a state machine whose "call stack" is explicit:

- a **state stack** (`FSM_stack`) holds one state per active invocation;
- a **module stack** (`M_stack`) holds which procedure ("module") each
  invocation runs;
- a **combinational circuit (CC)** reads the two stack tops and decides
  what happens next: move to another state of the same module, call a
  module (push), or end the module (pop).

The knapsack-specific part is small: the list of states and a datapath
holding the current and best solutions. The stack mechanism is generic.

## The search algorithm

The search walks a binary tree depth-first. Level i of the tree decides x_i.
At each level the search first tries to put object i into the knapsack, and
then tries to leave it out. A branch is cut as soon as adding an object
would exceed V. Such a branch can never lead to a feasible solution, so its
whole subtree is skipped. Only the "object taken" branch needs a real
recursive call. The "object left out" branch is the procedure's last action,
so it becomes a loop (tail-call elimination).

The algorithm is expressed as a hierarchical graph-scheme with two modules.
Each node label is an RHFSM state. The same labels a0.. are reused in both
modules, so a state has meaning only together with the active module.

| module | state | action | next |
|---|---|---|---|
| z0 | a0 | x = opt_x = 0, opt_W = cur_V = cur_W = 0, level = -1; **call z1** | a1 (after z1 returns) |
| z0 | a1 | End: search finished | - |
| z1 | a0 | Begin | a1 |
| z1 | a1 | level++ | (level != n) and (cur_V + v_level <= V) ? a2 : (level != n) ? a1 : a5 |
| z1 | a2 | x_level = 1, cur_V += v_level, cur_W += w_level | a3 |
| z1 | a3 | if cur_W > opt_W: opt_W = cur_W, opt_x = x; **call z1** | a4 (after z1 returns) |
| z1 | a4 | undo the take of a2 (see below) | (level != n) ? a1 : a5 |
| z1 | a5 | End: return to the caller | - |

Every node takes exactly one clock cycle, Begin and End included. The test
in the column "next" is made on the values that the node's own action
produces, within the same cycle. In state a1, for example, the design tests
level + 1 and fetches object level + 1 while it increments the level.

In a1, an object that does not fit is skipped: the search goes on with the
next level. The module ends only when the level reaches n. This is what the
plain recursive formulation does ("leave x_level = 0, go to the next
level"). The other reading, ending the module as soon as an object does not
fit, would miss solutions.

## How a call and a return work

The two stacks always get the same operation in the same cycle (`STK_SET`,
`STK_PUSH` or `STK_POP`, see `rhfsm_pkg`):

- **Transition inside a module** (`STK_SET`): the next state overwrites the
  top of the state stack.
- **Call** (`STK_PUSH`): in one cycle, the return state (the caller's next
  state) is written into the current top. State a0 and the called module
  are written into the location above it, and the stack pointer goes up.
  This cycle writes two locations of each stack. No cycle writes more.
- **Return** (`STK_POP`): the stack pointer goes down. The caller's return
  state, stored at the call, is again on top, so the caller resumes there in
  the next cycle.

When the End of z0 is reached with the stack pointer at 0, there is nothing
to return to. The search is finished and `done` pulses.

## Resuming after a return: which level was I on?

Only states and module identities are stacked, not local variables. When a
z1 invocation at level L calls z1 in a3, the callee and its descendants move
`level` on until it reaches n. So when control comes back to a4, `level` no
longer tells which object to undo.

The design recovers L from x itself. Every deeper invocation clears, in its
own a4, the bit it set in a2. So when control returns to the invocation that
took object L, bit L is the **highest set bit of x**. A priority encoder in
the datapath finds this bit. In a4 the datapath then clears it, subtracts
v_L and w_L, and sets `level = L`. After that, a1 moves on to level L + 1
with object L left out. This keeps the machine to exactly the two stacks
above, with no third stack of levels.

## Stack depth and the stall

z0 takes stack location 0. Each z1 invocation that takes an object calls one
more, and the deepest invocation is the one that finds level = n. So the
deepest nesting is n + 2 entries (stack pointer n + 1). `MAX_LEVELS`, the
depth of both stacks, defaults to `N_MAX + 2`.

A call that finds the stacks full (pointer = `MAX_LEVELS - 1`) is refused
and waits. `stall` goes high, no register changes, and the call is retried
in the next cycle. With the default depth this cannot happen for
n <= N_MAX. With a smaller `MAX_LEVELS`, a search that needs more depth
waits forever. It does not corrupt the stacks.

## Datapath

`knapsack_datapath` holds these registers: x, cur_V, cur_W, a signed
`level` (range -1 .. n), opt_x and opt_W. `rhfsm_pkg::dp_op_t` selects one
action per cycle. The object table (`knapsack_item_mem`) has an asynchronous
read port, so the object a node needs arrives in the same cycle.

Three points about the datapath:

- The best solution is updated in a3, that is, whenever an object has just
  been taken. This is more often than at the leaves only. Weights are
  positive, so the optimum found is the same.
- The update uses a strict `>`. Among vectors of equal weight, the first one
  in search order (objects taken before objects left out, lower indices
  first) is kept.
- cur_V never exceeds V (asserted in the top).

Widths: weights and volumes are `W_W`/`V_W` bits. Sums (cur_W, opt_W,
cur_V, and the capacity input) have `clog2(N_MAX+1)` extra bits, so they
cannot overflow.

## Top-level interface (`knapsack_rhfsm`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `item_we`, `item_addr`, `item_weight`, `item_volume` | in | 1, clog2(N_MAX), W_W, V_W | write object `item_addr` (ignored while busy) |
| `n_items` | in | clog2(N_MAX+1) | n, number of objects used (0 .. N_MAX) |
| `capacity` | in | V_W + clog2(N_MAX+1) | V |
| `start` | in | 1 | start a search (ignored while busy) |
| `busy` | out | 1 | search running |
| `done` | out | 1 | one-cycle pulse when the search ends |
| `opt_x`, `opt_w` | out | N_MAX, W_W + clog2(N_MAX+1) | best vector (bit i = object i) and its weight; valid at `done`, held until the next start |
| `stall` | out | 1 | a call is waiting on full stacks |
| `call_evt`, `ret_evt`, `prune_evt` | out | 1 | per-cycle strobes: module call, module return, object rejected because it does not fit |

Sequence: write the objects, set `n_items` and `capacity`, then pulse
`start` for one cycle. `busy` rises at the next edge. The run takes one
cycle per graph-scheme node visited, and `done` follows the last one (the
End of z0). Examples at the default size (16 objects): a run in which every
object fits visits the whole tree in 458,750 cycles. Random runs with tighter
capacities took roughly 13,000 to 404,000 cycles.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N_MAX` | 16 | largest number of objects |
| `W_W` | 8 | weight width |
| `V_W` | 8 | volume width |
| `MAX_LEVELS` | N_MAX + 2 | stack depth |

The algorithm fixes none of these numbers. The defaults are this design's
choice. Nothing limits N_MAX except the search time, which grows as 2^n in
the worst case.

## Hierarchy and files

```
knapsack_rhfsm            top: run control, wiring, invariant assertions
  rhfsm_stack  u_fsm_stack   state stack (WIDTH 3)
  rhfsm_stack  u_m_stack     module stack (WIDTH 1)
  knapsack_cc               control part of the CC: node table above
  knapsack_datapath         solution registers, arithmetic, priority encoder
  knapsack_item_mem         weights and volumes
rhfsm_pkg                 state, module, stack-operation and datapath-action enums
```

The stack module is generic: a register array, a pointer, a combinational
top output, and a push that writes two locations. Any other algorithm
written as a graph-scheme could reuse the stacks with a different
`knapsack_cc`/datapath pair.

## Simulation

Each testbench in `tb/` checks itself. Each one ends by printing
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_knapsack_rhfsm rtl/rhfsm_pkg.sv tb/tb_knapsack_rhfsm.sv
./obj_dir/Vtb_knapsack_rhfsm
```

| testbench | what it checks |
|---|---|
| `tb_rhfsm_stack` | random set/push/pop/init against a model stack; refused push when full, ignored pop at 0 |
| `tb_knapsack_item_mem` | writes and same-cycle reads against a model table |
| `tb_knapsack_cc` | all input combinations against the node table |
| `tb_knapsack_datapath` | random legal action sequences against a model that keeps a list of taken levels (independent of the priority encoder) |
| `tb_knapsack_rhfsm` | about 150 instances (N_MAX = 8) plus corner cases: optimum against brute force, best vector and exact cycle/call/return/reject counts against a recursive software model (`tb/knapsack_ref_pkg.sv`); no stall at full depth; a second instance with a 4-level stack must make exactly three calls and then stall without finishing |
| `tb_knapsack_rhfsm_full` | default parameters, five 16-object instances, including the full 2^16-leaf tree that reaches the deepest stack level |

The reference model is an ordinary recursive SystemVerilog function.
Comparing against it checks that the explicit-stack hardware behaves like
real recursion, cycle for cycle.

## What is this design's own, and what is not built

Taken from the algorithm's description: the two-stack RHFSM structure, the
call sequence, the refusal of a push at `MAX_LEVELS - 1`, the graph-scheme
with its node actions, one clock cycle per node, level starting at -1, and
the strict `>` in the update of the best solution.

Chosen here, because the description leaves it open:
- all widths and sizes;
- the loading port and the start/busy/done handshake;
- asynchronous reset;
- one cycle each for Begin and End;
- how an object that does not fit continues in a1 (see above);
- recovering the level by priority encoding;
- clearing cur_W at initialisation.

Not built:
- a bounding function that would cut branches which cannot beat the current
  best weight (the search prunes only on volume);
- stacks in dual-port block RAM (the stacks here are register arrays, read
  combinationally).
