# A SAT solver core with conflict-directed backtracking and clause learning

This is synthesizable SystemVerilog for the hardware half of a SAT solver
whose work is split between software and an FPGA. The circuit stays the
same for every problem. To solve a formula in conjunctive normal form you
download it as data and start the core. The core answers SAT, with a
satisfying partial assignment, or UNSAT. Software keeps anything too large
for the core and hands it sub-formulae that fit.

The search is a Davis–Putnam style search made cheaper in two ways:

* **Nonchronological backtracking.** An *implication matrix* records, for
  each assigned variable, which variables its value depends on. When a
  conflict arises, the core ORs these records together into a
  *conflict-induced clause*. The search then jumps straight back to the most
  recent decision that the clause names, and skips the decisions between.
* **Dynamic clause addition.** While the clause matrix has free rows, each
  conflict-induced clause is appended to the formula. The same conflict
  cannot then arise again.

## The formula as a ternary matrix

A formula with m clauses over n variables is an m × n matrix of ternary
cells. Row i is the *cube that falsifies clause i*:

| clause i contains | cell (i, j) | stored as `ones[j]`, `zeros[j]` |
|---|---|---|
| `x_j`  | 0 | 0, 1 |
| `~x_j` | 1 | 1, 0 |
| neither | – | 0, 0 |

A satisfying assignment is then a ternary vector that is *orthogonal* to
every row. Two ternary vectors are orthogonal when some position holds 1
in one and 0 in the other. So each clause has a literal that the
assignment makes true. The host writes rows in this two-plane form
(`host_wr_ones`, `host_wr_zeros`). Example: the clause `(x0 | ~x3)` is
`zeros = 0001`, `ones = 1000`.

The matrix is never changed during a search. Satisfied rows and assigned
columns are only *marked as deleted* in registers. Backtracking therefore
only has to restore registers.

## Blocks

```
                 host                              host
                  |                                 |
   +---------+   +v--------------------+   +--------v-----------+
   | control |<->| data matrices       |   | implication matrix |
   |  unit   |   | (rows + transpose)  |   | (n x n, IM)        |
   |         |   +---------+-----------+   +--------^-----------+
   |         |             |________________________|
   |         |   +-------+ +v----------+ +-----+
   |         |<->| stack |<>| registers |<>| ALU |
   +---------+   +-------+ +-----^-----+ +-----+
                                  | host
```

| module | role |
|---|---|
| `sat_solver` | Top level; wires the blocks and provides the host port. |
| `sat_control_unit` | The state machine that runs the search. |
| `sat_data_matrices` | The clause matrix and its transpose. Any row or column is read in one cycle. |
| `sat_implication_matrix` | n × n RAM. Word j is the set of variables behind x_j's value. |
| `sat_stack` | One snapshot of the search registers per open decision. |
| `sat_registers` | Deleted rows, assigned columns and values, open-decision mask, dimensions, conflict-clause register. |
| `sat_alu` | Combinational operations: orthogonality, counts of free literals, counts of positive and negative occurrences in a column, lowest set bit. |
| `sat_pkg` | Default sizes, result enum, statistics struct. |

The row copy of the matrix serves the unit clause rule, which works clause
by clause. The column copy serves the pure literal rule and the decision
heuristic, which work variable by variable. The column copy is also used
when a variable is assigned: one column read finds every row the new
value satisfies.

## The search

The control unit loops through the following steps.

1. **Unit clause rule.** Each existing, undeleted row is read (2 cycles)
   and the ALU evaluates it:
   * If a literal is already true, the row is deleted.
   * If no variable is free, there is a conflict (step 5).
   * If exactly one variable x_j is free, x_j is *implied*. The core
     builds `IM[j] = c^B | IM[k] | … | IM[r]`. Here `c^B` is the set of
     variables of the clause, and k … r are its other variables, whose IM
     words are read one every two cycles. Then x_j is assigned. Its column
     is read to delete the rows it satisfies.

   Passes repeat until one changes nothing.
2. **Empty matrix.** If every row is deleted, the current partial
   assignment is the answer (SAT). Unassigned variables are don't-cares.
3. **Pure literal rule and decision choice.** Every unassigned column is
   read. The ALU counts its positive and negative occurrences in
   undeleted rows. A variable that occurs with one polarity only is set to
   satisfy those occurrences, with an empty IM word. In the same pass, the
   variable with the most occurrences is noted. If no pure literal was
   found, that variable becomes the decision (*maximum occurrence in
   clauses*). Its value is 1 if most of its occurrences are positive, and
   0 otherwise. A tie in count goes to the lowest variable; a tie in
   polarity gives 1.
4. **Decision.** The registers are pushed onto the stack with the
   variable and its value. `IM[var]` is set to the variable itself. The
   variable is marked in `dec_mask`, the set of decisions whose other
   value is still untried.
5. **Conflict.** The conflict-induced clause is the OR of the IM words of
   the variables of the conflicting row, ANDed with `dec_mask`. It goes
   into the n-bit conflict register.
   * **Clause empty:** no backtrack is possible, so the answer is UNSAT.
   * **Top decision has an untried value:** restore the registers from the
     stack, take the other value, and mark the entry as tried
     (*inversion*).
   * **Both values of the top decision were tried:**
     1. The clause is appended to the matrix as a new row, if a row is
        free. Its cube is the current values of the clause's variables.
     2. The stack is popped down to the most recent decision that the
        clause names (a *backjump* when at least one level is skipped).
     3. That decision is restored and inverted.

     An inverted decision is no longer free. Its IM word becomes the
     conflict clause without itself. Later conflicts that run through it
     therefore name the decisions that forced it.

Removing the bit of an undone or inverted decision from every IM word
would take n writes. The `dec_mask` register does the same job instead.
Its zeros mark the *deleted columns* of the implication matrix.

### Why the answers are sound

* Every conflict-induced clause is a consequence of the formula. The
  testbenches check each appended clause against all models of the
  formula.
* An inverted decision carries the reason for its inversion. So the
  decisions that a backjump skips never appear in the conflict, and
  skipping them loses no solution.
* A pure literal never falsifies a live clause. It is therefore safe to
  give it an empty IM word.

## Interface and timing (`sat_solver`)

| port | use |
|---|---|
| `host_wr_en`, `host_wr_row`, `host_wr_ones`, `host_wr_zeros` | Write one clause row. Ignored while `busy`. |
| `host_dims_we`, `host_num_rows`, `host_num_cols` | Set the number of clauses and variables. Ignored while `busy`. |
| `start` | One-cycle pulse that starts the search. |
| `busy`, `done`, `result` | `done` rises at the end and holds until the next `start`. `result` is `RES_SAT` or `RES_UNSAT`. |
| `sol_assigned`, `sol_values` | The solution; a 0 in `sol_assigned` marks a don't-care. |
| `num_rows`, `conflict_clause`, `decision_level` | Rows in use (including appended clauses), the last conflict clause, and the number of open decisions. |
| `stats` | Counters for the last run: cycles, decisions, implications, pure literals, conflicts, inversions, backjumps, levels skipped, clauses added and clauses refused. |

Appended clauses stay in the matrix after a run. Write the dimensions
again before the next formula to discard them. The clock and the
synchronous reset `rst` are shared by all blocks. All memory reads are
synchronous with one cycle of latency. The stack top is read
asynchronously.

Costs in cycles:

| operation | cycles |
|---|---|
| Visiting a row | 2 |
| Implication, after the row visit | 3 + 2 per other literal of the clause |
| Conflict analysis, after the row visit | 3 + 2 per literal |
| Decision | 3 |
| Inversion of the top decision | 2 |
| Backtrack after both values were tried | 4 + 1 per level popped |
| Pure literal pass | 2 per unassigned column, 1 per assigned one |

For example, the single clause `(x0)` takes 7 cycles and `(x0)(~x0)`
takes 13.

## Parameters and size

`N` (variables, default 32) and `M` (clause rows, default 64) are
parameters of every block. They are this design's choice: the
architecture leaves m and n open. `PURE_LITERAL_RULE` (on `sat_solver`
and `sat_control_unit`, default 1) can switch the pure literal rule off.
With it off, step 3 only chooses the decision. The stack holds `N` entries of
`M + 3N + clog2(N) + 2` bits. At the defaults, synthesis gives about 820
word-level cells, 705 flip-flop bits and 14.5 kbit of memory.

The transpose is written one bit per column word. It therefore maps to
flip-flops (or distributed RAM) rather than to a single block RAM.

## Departures and open points

* The architecture keeps the current row and column addresses in the
  register block. Here they are counters inside the control unit.
* The flow chart tests for a conflict after the pure literal rule. Here
  the test comes right after the unit clause rule. A pure literal cannot
  remove a conflict, so the outcome is the same.
* Details not set by the architecture are this design's own choices:
  * the IM word given to an inverted decision;
  * what counts as "possible to backtrack" (the conflict clause names an
    open decision);
  * the host protocol;
  * the cell encoding.
* The architecture forms the conflict-induced clause only once both
  values of a decision have failed. Here it is formed at every conflict,
  because an empty clause is the test for "no backtrack possible". It is
  still appended to the matrix only in the both-values case.
* In the flow chart, the path with no rule applied and the path after a
  clause is added meet in one box: "select the next decision variable with
  the help of the conflict clause". Here that box does two things. After a
  conflict it picks the most recent open decision in the clause and
  inverts it. Otherwise the clause is not used, and the
  maximum-occurrence heuristic chooses.
* The tie rules of the decision heuristic come from the worked example
  below; the description of the heuristic only speaks of majorities.
* The worked example of nonchronological backtracking is a formula of
  13 variables and 17 clauses. It is solved with the unit clause rule
  and the decision heuristic, but without the pure literal rule.
  * With `PURE_LITERAL_RULE = 0` the core follows that example's decision
    tree node for node: x1=1, x4=1, x10=1, x10=0, then a backjump over x4
    to x1=0, then x4=0, x10=0, x2=1, x3=1. That is 9 nodes, one appended
    clause (~x1) and 617 cycles.
  * With the rule on (the default), the core needs only 3 decisions,
    no conflict and 333 cycles.
* The architecture also shows a host path into the implication matrix.
  It is not built. The core writes every IM word before it reads it, and
  the architecture does not say what the host would put there.
* The host software, the PCI link and the FPGA board of the intended
  prototype are not part of this RTL.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=… failures=…`.

* `tb_sat_solver` runs the whole core at its default size. It runs:
  * the two example formulas;
  * hand-made UNSAT cases;
  * 400 random 3-CNF formulas with 6–12 variables near the
    satisfiability threshold;
  * 20 dense formulas that fill the matrix.
  * 20 formulas over all 32 variables with a planted solution, and 5
    unsatisfiable ones that hide the eight clauses over three variables
    among random clauses.

  Every SAT answer must satisfy every clause. Every UNSAT answer must
  match an exhaustive search (up to 16 variables) or the known answer. The test also fails if any mechanism of the
  search never occurs in the run: decisions, implications, pure literals,
  conflicts, inversions, backjumps, clauses added, clauses refused, SAT
  answers and UNSAT answers.
* `tb_sat_fig1` solves the worked example with the pure literal rule
  off. It checks the sequence of decision-tree nodes, the backjump and
  the appended clause (~x1). It also solves the example in the default
  configuration.
* `tb_sat_control_unit` drives the control unit with the real datapath
  (N = 10, M = 48). It checks exact cycle counts on small formulas, runs
  2000 random formulas, and checks that each appended clause is implied
  by the formula.
* The memory, stack, register and ALU testbenches compare against
  reference models. They include the one-cycle read latency of the
  matrices.

To run one with Verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb rtl/sat_pkg.sv \
          tb/tb_sat_solver.sv --top-module tb_sat_solver
./obj_dir/Vtb_sat_solver
```

The full-size end-to-end test runs in well under a second.
