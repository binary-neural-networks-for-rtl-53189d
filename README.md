# Binary neural network hardware for the N-queens problem

The N-queens problem asks for N queens on an N x N board with no two sharing
a row, a column or a diagonal. A binary neural network solves it with one
neuron per square: neuron (i,j) has an integer input U and a one-bit output
V (V = 1 means "queen here"). Every iteration step, each neuron adds to U a
change computed from the outputs of the neurons that attack its square, then
recomputes V from U. The network stops once the outputs form a solution, or
once it comes to rest.

The costly part of such a network in hardware is the synapses. In principle
every neuron talks to every other one, which needs N^4 connections. This
repository holds SystemVerilog for three architectures that avoid that cost
in different ways:

| engine | prefix | update mode | how neurons exchange outputs | default size |
|---|---|---|---|---|
| bus-connected network | `bus_` | one round of broadcasts per step | active neurons take turns broadcasting their ID on a shared bus | 5 boards x 8 = 40 neurons (6 queens) |
| systolic array | `sa_` | all N^2 neurons at once | outputs circulate one square per clock along rows, columns and diagonals | 9 x 9 cells (9 queens) |
| logical-synapse maximum network | `mnn_` | one row at a time | each synapse is an OR gate | 31 x 31 neurons (31 queens) |

The top level `bnn_nqueens_top` places the three engines side by side. They
share only `clk` and the active-low asynchronous reset `rst_n`. Each engine
also works on its own through its `*_system` module.

## The neuron and its motion equation

The bus engine and the systolic engine use the same motion equation. For
neuron (i,j):

    dU = -(row_sum - 1) - (col_sum - 1) - (diag_sum + anti_sum)
         + C * ( h(row_sum) + h(col_sum) )

- `row_sum` and `col_sum` count the active outputs on the neuron's row and
  column, its own output included.
- `diag_sum` and `anti_sum` count the active outputs on its two diagonals,
  its own output excluded.
- `h(x)` is 1 when x = 0, else 0. It is the hill-climbing term: it pushes a
  neuron on an empty row or column towards firing.
- `C` is 4 during the first 5 of every 20 iteration steps (t mod 20 < 5, where
  t counts the updates applied so far). Otherwise C is 1.

U then becomes U + dU, saturated to its register width. The output rule is
where the engines differ:

- Bus engine: V = 1 when U > 0.
- Systolic engine: a hysteresis neuron with V = 1 when U > UTP, V = 0 when
  U < LTP, and V unchanged between the two. The thresholds default to
  UTP = LTP = 0, so V only holds its value while U = 0.

Initial inputs are small random negative numbers, so every run starts with
an empty board.

The maximum network uses a different model, described in its own section
below.

## Bus-connected network

### Idea

Only a few neurons are active at any time. The network therefore broadcasts
only the identities of the active neurons. Each neuron works out for itself
what a broadcast means to it. The work per step grows with the number of
queens on the board, not with the number of synapses.

### Parts of a neuron (`bus_neuron`)

- **Synaptic connection memory** (`bus_syn_mem`): one 8-bit word per
  possible master ID (2^9 = 512 words). Bit k of word m set means "a
  broadcast from neuron m feeds term unit k of this neuron". Bits 7..5 are
  unused.
- **Five term-generation units** (`bus_term_unit`). Each counts, over one
  round, the broadcasts whose connection bit is set. It turns the count into
  one term of the motion equation, in one of two forms:
  - linear: `coef * (count - offset)`
  - hill-climbing: `coef * h(count)`

  `coef` is `coef_hi` while the sequencer's `boost` is high, and `coef_lo`
  otherwise. The term saturates to 8 bits.
- **Output-generation unit** (`bus_output_unit`): U (8-bit signed,
  saturating) and V. On an update it adds the five terms to U and sets
  V = (U > 0). It also records whether the neuron is *stable*, meaning the
  change could not move V: V = 1 with dU >= 0, or V = 0 with dU <= 0.
- **Local arbiter** (`bus_local_arbiter`), described below.
- **Address decoder / controller** (`bus_neuron_ctrl`), which maps host
  cycles onto the parts.

A board (`bus_neuron_board`) carries 8 neurons. In slot s these are IDs s*8
to s*8+7. `bus_system` joins NB boards (5 by default) and the sequencer
(`bus_sequencer`).

### Arbitration

The arbitration bus has 9 open-collector lines, which are active low. An
idle bus reads all ones. A settled bus holds the inverse of the winner's ID.

Contention works as on Futurebus: the largest participating ID wins.

1. Each participating arbiter drives a 1 onto every line where its ID has a
   1, starting from the most significant bit.
2. An arbiter backs off from all lower lines as soon as a higher line shows
   a 1 where its own ID has a 0.

In the RTL the lines are the OR of all drives, `arb_bus_or`, and the
backplane signal `arb_bus_n` is its inverse. Bit k of an arbiter's drive
depends only on lines above k, so the lines settle to the winner within one
clock. Some tools see a whole-vector combinational loop through the bus, and
the loop is intended.

The right to participate follows a fixed cycle:

- At the start of a round, `grant` gives the right to every neuron with
  V = 1.
- Once the sequencer has latched the winner, `take` removes the winner's
  right.

So every active neuron becomes bus master exactly once per round.

### One iteration step

The sequencer runs these states:

| state | clocks | action |
|---|---|---|
| GRANT | 1 | rights given to active neurons; term counters cleared |
| ARB | 1 | arbiters settle; if anyone participates, the buffer latches `~arb_bus_n` into `master_id` (the address bus) |
| RD | 1 | every neuron reads its synaptic memory at `master_id` |
| ACC | 1 | every term unit counts the broadcast if its bit is set; back to ARB |
| UPD | 1 | (ARB found nobody) every neuron applies its five terms |
| CHECK | 1 | stop if every neuron is stable (`local_min`) or after `MAX_STEPS` steps, else GRANT |

With a active neurons, a step takes **3a + 4 clocks**. At 10 MHz, one
broadcast is 100 ns of arbitration plus 200 ns of computation.
The published 6-queens runtime, 27.6 us for 15.3 steps, is 18 clocks per
step. This schedule gives that with about 5 active neurons per step.

`steps` counts updates. `bcasts` counts broadcasts in the run. `boost` is
high for steps with t mod 20 < 5.

### Programming it for N queens

The host programs a neuron through three buses: the neuron address (its
ID), a 10-bit local address and 8-bit data. It may do this only while
`busy` is low. The local address map is:

| local address | contents |
|---|---|
| `0x000`-`0x1FF` | synaptic memory word for master ID = address (read/write) |
| `0x200` | U; writing also sets V = (U > 0) |
| `0x201` | status (read only): bit 0 = V, bit 1 = participation right |
| `0x210 + 4k + r` | term unit k, register r (write only) |

The term-unit registers are r = 0 `coef_lo`, r = 1 `coef_hi`, r = 2 `offset`,
and r = 3 `mode` (bit 0 set selects hill-climbing).

Read data appears one clock after the address. A neuron that is not
addressed returns 0, so read data from many neurons can be ORed together.

For the N-queens equation above, the testbench programs each neuron like
this:

| term unit | memory bit set for masters on | form | coef_lo / coef_hi | offset |
|---|---|---|---|---|
| 0 | same row (self included) | linear | -1 / -1 | 1 |
| 1 | same column (self included) | linear | -1 / -1 | 1 |
| 2 | same diagonal or anti-diagonal (self excluded) | linear | -1 / -1 | 0 |
| 3 | same row | hill-climbing | 1 / 4 | - |
| 4 | same column | hill-climbing | 1 / 4 | - |

Unused neurons get U = -128 and never fire.

### Departure from the original scheme

In the original scheme each broadcast is followed at once by an output
update. Here the update is deferred to the end of the round, so all neurons
update together once per step, after every active neuron has broadcast. The
reason is the row and column terms, which are `-(sum - 1)`: applied after
every broadcast they would be counted many times per step.

As a result the network behaves like a parallel-update network, not a
sequential one. In simulation of 6 queens it often settles in a local minimum
that is not a solution. About a third of random starts reach a solution.

The 9-bit ID addresses at most 512 neurons. A system with more neurons (the
VME rack holds 512 boards, 4,096 neurons) needs a wider `ID_W`.

## Systolic array

### Cells and rings

The array (`sa_array`) has one cell (`sa_cell`) per square. A cell holds:

- U (7 bits) and V;
- four one-bit token registers, one per line direction;
- four sum counters;
- the HYS block, which applies the motion equation and the hysteresis rule.

Neuron outputs travel one square per clock, each direction one way only:

- row tokens to the right;
- column tokens down;
- diagonal tokens down-right;
- anti-diagonal tokens down-left.

The last cell of every line feeds the first cell of that line, which closes
the line into a ring. After N moves, each row and column counter has seen
all N outputs of its line, its own included.

Diagonals are shorter than N and different for every cell. Each cell is
given the length L of its diagonal and of its anti-diagonal. After L-1 moves
it sets a stop flag. From then on, that token neither moves nor counts. So
the diagonal sums contain every other cell's output and never the cell's
own.

Each cell also raises `ok` when its row and column counts are both 1 and,
if it holds a queen, both diagonal counts are 0. `all_ok` is the AND of
every cell's `ok`, so it is high exactly when the board is a solution.

### Schedule (`sa_ctrl`)

Each step (**N + 2 clocks**) runs:

1. LOAD (1 clock): each cell copies V into its tokens and clears its
   counters.
2. MOVE (N clocks).
3. CHECK (1 clock): if `all_ok`, stop with `solved`. Otherwise every cell
   applies the update.

The engine gives up after 500 updates. At the prototype's 17.6 MHz, a 9 x 9
step takes 0.625 us.

### Loading and reading back

All cells also form one long shift register, row by row from (1,1) to
(N,N).

- Loading: hold `sa_init` high for N^2 clocks and present one U per clock on
  `sa_u_in`, square (N,N) first. The V registers fill with zeros at the same
  time.
- Reading back: holding `sa_init` again shifts the final U and V out at
  `sa_u_out` and `sa_v_out`.
- `sa_leds` shows all 81 outputs in parallel, for a 9 x 9 LED array.

## Logical-synapse maximum neural network

### Model

Each row of the board is a *maximum neuron* group: the neuron with the
largest U in a row has V = 1, and all others have V = 0. That keeps exactly
one queen per row. Each neuron also has a self-feedback gain T. One update
of neuron (i,j) is:

    U' = r*U + T*V - c
    T' = T - dT   if V = 1
       = omega    if V = 0

Here c is the **logical OR** of the outputs on the neuron's column and both
diagonals, its own output excluded. Any conflict subtracts exactly 1,
however many queens attack.

Because the update needs only that OR, each synapse is an OR gate. The
settings are:

- r = 0.125;
- dT = 1049/2^20, close to 0.001;
- omega = 0;
- at most 100 iteration steps.

A neuron that keeps its queen sees its gain drift negative. That slowly
pushes a queen off a square it has held too long, which is the mechanism
that escapes local minima.

### Hardware (`mnn_system`)

- **Neuron array** (`mnn_neuron_array`, `mnn_pe`): N x N processing
  elements. Each holds V in a flip-flop and passes OR cascades to its
  neighbours. Every column, diagonal and anti-diagonal is built as two
  cascades, one from each end, and each carries "my V or anything before
  me". A PE ORs what reaches it from both sides, so its own V never enters
  its conflict bit. The array returns the conflict bits of one selected row,
  and a `solved` flag: every row holds a queen and no queen is attacked.
- **Processing units** (`mnn_proc_unit`): N of them, one per column. They
  compute U' and T' in 24-bit fixed point with 20 fraction bits (Q3.20),
  saturating. r is an arithmetic right shift by 3.

  The fraction width matters more than it seems. A square without conflicts
  has its U divided by 8 at every step. With few fraction bits such values
  soon reach the last bit, and many squares of a row tie. The tie rule then
  picks the queen, not the random start. With 10 fraction bits, a model of
  this datapath solved about 72% of 31-queens runs. With 20 it solves about
  98%, as floating point does.
- **Maximum selector** (`mnn_max_select`): one-hot output at the largest new
  U of the row. On a tie, the lowest column wins.
- **RAM** (`mnn_ram`): one word per row, holding the row's N values of U and
  N values of T. The read is registered.
- **Controller** (`mnn_ctrl`): updates the rows in order, so each row sees
  the newest outputs of the rows above it.
  - Per row: READ (1 clock), then WRITE (1 clock, writing RAM and array
    together).
  - After each sweep: one CHECK clock.
  - A run begins with a check of the loaded state. It then costs
    **2 + steps * (2N + 1) clocks** from the start pulse until `done`.

### Loading

While `mnn_busy` is low, write each row once:

- set `mnn_init_we`, with the row number on `mnn_init_row`;
- present the row's N initial inputs on `mnn_init_u` (Q3.20, element j =
  column j).

T starts at omega, and V starts at the row maximum. Then pulse `mnn_start`.
At `mnn_done`, `mnn_success` and `mnn_steps` give the outcome, and
`mnn_board[i*N+j]` shows the board.

## Sizes and what they can hold

| case | needs | built (defaults) | fits |
|---|---|---|---|
| 6 queens on the bus engine | 36 neurons | 40 neurons | yes |
| bus system at its full rack (512 boards) | 4,096 neurons, 12-bit IDs | 40 neurons, 9-bit IDs | no |
| 2,000 queens on a bus system of large FPGAs | 4,000,000 neurons | 40 | no |
| 9 queens on the systolic array | 81 cells | 81 cells | yes |
| 200 queens on a systolic array of large FPGAs | 40,000 cells | 81 | no |
| 31 queens on the maximum network | 961 PEs, 31 processing units | the same | yes |
| maximum network studies at N = 100 to 10,000 | 10^4 to 10^8 neurons | 961 | no |

All three engines are parameterised by N (or by NB for the bus engine), so
larger sizes are a parameter change. They are limited only by the
implementation technology.

## How well the engines solve

These figures come from simulation of the RTL with random starts. They are
compared with the published figures for the same algorithms.

| engine and case | simulated | published |
|---|---|---|
| maximum network, 31 queens, 100-step limit | 100 of 100 solved, 28.6 sweeps on average | 99.9% solved, 30.2 steps |
| systolic (N^2-parallel) update, 8 queens, 500-step limit | 58 of 100 solved, 54 steps on average | 54%, 66 steps |
| systolic (N^2-parallel) update, 10 queens | 26 of 100 solved, 74 steps on average | 26%, 88 steps |
| bus engine, 6 queens | about one run in three solves; the rest stop in a local minimum or time out | 15.3 steps on average |

The 8- and 10-queens rows use the systolic array with `N` overridden. The
published values for those rows are software results for the same update
mode. The bus engine falls short because of the once-per-round update
described above.

## Parameters of the top level

| parameter | default | meaning |
|---|---|---|
| `BUS_NB` | 5 | neuron boards |
| `BUS_NPB` | 8 | neurons per board |
| `BUS_MAXS` | 500 | step limit of the bus engine |
| `SA_N` | 9 | board size of the systolic array |
| `SA_UW` | 7 | width of U in a systolic cell (range -64..63) |
| `SA_MAXS` | 500 | step limit of the systolic engine |
| `MNN_N` | 31 | board size of the maximum network |
| `MNN_W` | 24 | width of U and T (Q3.20) |
| `MNN_MAXS` | 100 | sweep limit of the maximum network |

Shared constants live in `bnn_pkg`:

- bus widths;
- the local address map;
- the hill-climbing schedule (period 20, 5 boosted steps);
- the sequencer's command struct `bus_cmd_t`.

## Where this design makes its own choices

These points are not fixed by the original description, and each was
chosen here:

- **Bus engine**:
  - the central sequencer and its six states;
  - the deferred once-per-round update;
  - the one-clock arbitration;
  - the local address map;
  - the term-unit scheme (linear or hill-climbing, two coefficients);
  - the stability test used to detect a local minimum;
  - 8-bit saturating U.
- **Systolic engine**:
  - the ring closure of every line;
  - the per-cell stop after L-1 moves;
  - the row-major load chain;
  - UTP = LTP = 0;
  - U saturation;
  - the N + 2 clock step.
- **Maximum network**:
  - the Q3.20 number format, so dT is 1049/2^20 rather than exactly 0.001;
  - the lowest-index tie rule;
  - the two-way OR cascades;
  - one RAM word per row;
  - the 2N + 1 clock sweep.

The reference models in the testbenches were written from these choices.
They confirm that the RTL does what is described here. They cannot confirm
that the original hardware made the same choices.

## Simulation

Each block has a self-checking testbench in `tb/`. Every testbench:

- ends with `TB_RESULT checks=N failures=M`;
- has a watchdog;
- checks cycle counts against the schedules above.

The end-to-end testbenches are:

- `tb_bus_system`: 6 queens on 40 neurons, compared step for step with a
  behavioural model.
- `tb_sa_system`: 9 x 9 array, compared with the model in `tb_sa_ref_pkg`.
- `tb_mnn_system`: 31 queens, 100 runs, compared with a fixed-point model.
  It requires at least 90% of the runs to converge.
- `tb_sa_table1`: the systolic array at 8 and 10 queens, 100 runs each,
  with a helper module `tb_sa_table1_run`. It prints the convergence figures
  quoted above.
- `tb_bnn_nqueens_top`: all three engines at their default sizes, running
  at the same time. It checks every reported solution, checks run times, and
  counts each mechanism: multi-way arbitration, empty rounds, boosted steps,
  local-minimum stops, diagonal stop events, time-outs and negative
  self-feedback gains.

To build and run one testbench with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_bnn_nqueens_top \
      -y rtl -y tb +libext+.sv rtl/bnn_pkg.sv tb/tb_sa_ref_pkg.sv tb/tb_bnn_nqueens_top.sv
    ./obj_dir/Vtb_bnn_nqueens_top

Replace the testbench name to run another one. `tb_sa_ref_pkg.sv` is only
needed by the systolic testbenches and the top-level one, but passing it
to the others does no harm. The top-level test
runs in well under a minute.
