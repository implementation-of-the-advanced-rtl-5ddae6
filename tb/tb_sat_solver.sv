// tb_sat_solver: end-to-end test of the SAT solver core at its default size.
//
// Formulas are downloaded through the host port, solved, and the answer is
// judged independently: a SAT answer must satisfy every original clause
// with the variables it assigns (unassigned ones are don't-cares), and an
// UNSAT answer must agree with an exhaustive search over all assignments
// (or, above 16 variables, with the known answer of the formula).
// The formulas are the 13-variable, 17-clause example used to illustrate
// nonchronological backtracking, the 3-clause introductory example, small
// hand-made unsatisfiable cases, and random 3-CNF formulas around the
// satisfiability threshold (some dense enough to fill the matrix with
// conflict-induced clauses), plus formulas over all N variables: satisfiable
// ones with a planted solution and unsatisfiable ones that hide the eight
// clauses over three variables among random clauses. The test counts how often each mechanism of
// the search occurred over all runs (decisions, implications, pure
// literals, conflicts, in-place inversions, nonchronological backjumps,
// clauses added, clauses refused because the matrix was full, SAT and
// UNSAT answers) and fails if any of them never happened. The solver is
// used with its default parameters.
module tb_sat_solver;
  import sat_pkg::*;

  localparam int unsigned N  = N_VARS_DEFAULT;
  localparam int unsigned M  = M_CLAUSES_DEFAULT;
  localparam int unsigned RW = $clog2(M);
  localparam int unsigned NW = $clog2(N + 1);
  localparam int unsigned MW = $clog2(M + 1);
  localparam int NUM_RANDOM  = 400;

  logic          clk = 1'b0;
  logic          rst;
  logic          host_wr_en;
  logic [RW-1:0] host_wr_row;
  logic [N-1:0]  host_wr_ones, host_wr_zeros;
  logic          host_dims_we;
  logic [MW-1:0] host_num_rows;
  logic [NW-1:0] host_num_cols;
  logic          start, busy, done;
  result_e       result;
  logic [N-1:0]  sol_assigned, sol_values, conflict_clause;
  logic [MW-1:0] num_rows;
  logic [NW-1:0] decision_level;
  stats_t        stats;

  sat_solver dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // Formula under test, in the two-plane encoding (ones: ~x, zeros: x).
  logic [N-1:0] f_ones [M];
  logic [N-1:0] f_zeros[M];
  int           f_nv, f_nc;
  // Totals of the mechanisms seen.
  longint tot_dec, tot_imp, tot_pure, tot_conf, tot_inv, tot_bj, tot_add, tot_drop;
  int     n_sat, n_unsat;
  longint max_cycles;

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void clear_formula(int nv);
    f_nv = nv;
    f_nc = 0;
    for (int i = 0; i < M; i++) begin
      f_ones[i]  = '0;
      f_zeros[i] = '0;
    end
  endfunction

  // Appends one clause of up to three literals.
  function automatic void add_clause(int a, int b = 0, int c = 0, int na = 0, int nb = 0, int nc = 0);
    // a, b, c are variable numbers + 1 (0 = unused); na, nb, nc negate them.
    if (a != 0) if (na != 0) f_ones[f_nc][a-1] = 1'b1; else f_zeros[f_nc][a-1] = 1'b1;
    if (b != 0) if (nb != 0) f_ones[f_nc][b-1] = 1'b1; else f_zeros[f_nc][b-1] = 1'b1;
    if (c != 0) if (nc != 0) f_ones[f_nc][c-1] = 1'b1; else f_zeros[f_nc][c-1] = 1'b1;
    f_nc++;
  endfunction

  function automatic bit clause_sat(int i, logic [N-1:0] asg, logic [N-1:0] val);
    return |((f_zeros[i] & asg & val) | (f_ones[i] & asg & ~val));
  endfunction

  function automatic bit brute_sat();
    logic [N-1:0] all = '0;
    for (int v = 0; v < f_nv; v++) all[v] = 1'b1;
    for (longint a = 0; a < (64'd1 << f_nv); a++) begin
      bit ok = 1'b1;
      for (int i = 0; i < f_nc && ok; i++)
        if (!clause_sat(i, all, N'(a))) ok = 1'b0;
      if (ok) return 1'b1;
    end
    return 1'b0;
  endfunction

  task automatic download();
    for (int i = 0; i < f_nc; i++) begin
      @(negedge clk);
      host_wr_en    = 1'b1;
      host_wr_row   = RW'(i);
      host_wr_ones  = f_ones[i];
      host_wr_zeros = f_zeros[i];
    end
    @(negedge clk);
    host_wr_en    = 1'b0;
    host_dims_we  = 1'b1;
    host_num_rows = MW'(f_nc);
    host_num_cols = NW'(f_nv);
    @(negedge clk);
    host_dims_we  = 1'b0;
  endtask

  task automatic solve_and_check(string name, int expect_sat = -1);
    bit ref_sat;
    download();
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    wait (done);
    @(negedge clk);
    // Above 16 variables the exhaustive search is too slow; those formulas
    // are built with a known answer, given as expect_sat.
    if (f_nv <= 16) ref_sat = brute_sat();
    else            ref_sat = bit'(expect_sat);
    checks++;
    if (result == RES_SAT) begin
      bit ok = 1'b1;
      n_sat++;
      for (int i = 0; i < f_nc; i++)
        if (!clause_sat(i, sol_assigned, sol_values)) ok = 1'b0;
      if (!ok || !ref_sat) begin
        failures++;
        $display("FAIL %s: SAT answer %b/%b does not satisfy the formula", name,
                 sol_assigned, sol_values);
      end
    end else if (result == RES_UNSAT) begin
      n_unsat++;
      if (ref_sat) begin
        failures++;
        $display("FAIL %s: reported UNSAT but the formula is satisfiable", name);
      end
    end else begin
      failures++;
      $display("FAIL %s: no result", name);
    end
    if (expect_sat >= 0) begin
      checks++;
      if (ref_sat != bit'(expect_sat)) begin
        failures++;
        $display("FAIL %s: reference expectation wrong", name);
      end
    end
    // Appended clauses must be exactly the counted ones.
    checks++;
    if (int'(num_rows) != f_nc + int'(stats.clauses_added)) begin
      failures++;
      $display("FAIL %s: num_rows %0d, expected %0d", name, num_rows,
               f_nc + int'(stats.clauses_added));
    end
    tot_dec  += longint'(stats.decisions);
    tot_imp  += longint'(stats.implications);
    tot_pure += longint'(stats.pure_literals);
    tot_conf += longint'(stats.conflicts);
    tot_inv  += longint'(stats.inversions);
    tot_bj   += longint'(stats.backjumps);
    tot_add  += longint'(stats.clauses_added);
    tot_drop += longint'(stats.clauses_dropped);
    if (longint'(stats.cycles) > max_cycles) max_cycles = longint'(stats.cycles);
  endtask

  task automatic random_3cnf(int nv, int nc);
    clear_formula(nv);
    for (int i = 0; i < nc; i++) begin
      int a, b, c;
      a = $urandom_range(nv - 1);
      do b = $urandom_range(nv - 1); while (b == a);
      do c = $urandom_range(nv - 1); while (c == a || c == b);
      add_clause(a + 1, b + 1, c + 1, $urandom_range(1), $urandom_range(1), $urandom_range(1));
    end
  endtask

  // Random 3-CNF formula with a planted solution: any clause the hidden
  // assignment would falsify has the sign of its first literal flipped.
  task automatic planted_3cnf(int nv, int nc);
    logic [N-1:0] hidden;
    hidden = N'({$urandom, $urandom});
    random_3cnf(nv, nc);
    for (int i = 0; i < nc; i++) begin
      if (!clause_sat(i, '1, hidden)) begin
        int v;
        v = 0;
        while (f_ones[i][v] == 1'b0 && f_zeros[i][v] == 1'b0) v++;
        f_ones[i][v]  = ~f_ones[i][v];
        f_zeros[i][v] = ~f_zeros[i][v];
      end
    end
  endtask

  task automatic check_event(string name, longint count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", name);
    end else begin
      $display("  %-28s %0d", name, count);
    end
  endtask

  initial begin
    rst = 1'b1;
    host_wr_en = 1'b0; host_wr_row = '0; host_wr_ones = '0; host_wr_zeros = '0;
    host_dims_we = 1'b0; host_num_rows = '0; host_num_cols = '0; start = 1'b0;
    tot_dec = 0; tot_imp = 0; tot_pure = 0; tot_conf = 0; tot_inv = 0;
    tot_bj = 0; tot_add = 0; tot_drop = 0; n_sat = 0; n_unsat = 0; max_cycles = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;

    // Introductory example: (~x1 | ~x2)(~x2 | ~x3)(x1 | x2 | x3), variables x1..x3
    // stored as columns 0..2.
    clear_formula(3);
    add_clause(1, 2, 0, 1, 1);
    add_clause(2, 3, 0, 1, 1);
    add_clause(1, 2, 3);
    solve_and_check("intro", 1);

    // Formula (1) of the nonchronological backtracking example, x0..x12.
    clear_formula(13);
    add_clause(1, 2, 0, 1, 1);        // ~x0 ~x1
    add_clause(2, 3, 0, 1, 1);        // ~x1 ~x2
    add_clause(1, 2, 3);              // x0 x1 x2
    add_clause(2, 7);                 // x1 x6
    add_clause(2, 8);                 // x1 x7
    add_clause(2, 9);                 // x1 x8
    add_clause(4, 5, 0, 1, 1);        // ~x3 ~x4
    add_clause(5, 6, 0, 1, 1);        // ~x4 ~x5
    add_clause(4, 5, 6);              // x3 x4 x5
    add_clause(3, 13);                // x2 x12
    add_clause(5, 8);                 // x4 x7
    add_clause(5, 7);                 // x4 x6
    add_clause(5, 9);                 // x4 x8
    add_clause(11, 12, 0, 1, 1);      // ~x10 ~x11
    add_clause(11, 12, 0, 1, 0);      // ~x10 x11
    add_clause(11, 12, 0, 0, 1);      // x10 ~x11
    add_clause(2, 11, 12, 1, 0, 0);   // ~x1 x10 x11
    solve_and_check("formula1", 1);
    $display("formula (1): %0d decisions, %0d conflicts, %0d cycles, x1=%b x4=%b x10=%b",
             stats.decisions, stats.conflicts, stats.cycles,
             sol_values[1], sol_values[4], sol_values[10]);

    // Unsatisfiable without any decision: (x0)(~x0).
    clear_formula(1);
    add_clause(1);
    add_clause(1, 0, 0, 1);
    solve_and_check("unit_unsat", 0);

    // Unsatisfiable, needs decisions: all 8 clauses over x0..x2.
    clear_formula(3);
    for (int k = 0; k < 8; k++) add_clause(1, 2, 3, k & 1, (k >> 1) & 1, (k >> 2) & 1);
    solve_and_check("all8_unsat", 0);

    // Random 3-CNF formulas near the threshold.
    for (int t = 0; t < NUM_RANDOM; t++) begin
      int nv, nc;
      nv = 6 + (t % 7);                     // 6 .. 12 variables
      nc = (nv * 43 + 5) / 10;              // about 4.3 clauses per variable
      random_3cnf(nv, nc);
      solve_and_check($sformatf("rand%0d", t));
    end

    // Dense formulas that fill the matrix with conflict-induced clauses.
    for (int t = 0; t < 20; t++) begin
      random_3cnf(12, M - 1);
      solve_and_check($sformatf("dense%0d", t));
    end

    // Full width: all N variables, with a planted solution.
    for (int t = 0; t < 20; t++) begin
      planted_3cnf(N, (t % 2 == 0) ? M - 8 : M);
      solve_and_check($sformatf("wide_sat%0d", t), 1);
    end

    // Full width, unsatisfiable: all 8 clauses over the three highest
    // variables, hidden behind random clauses over the others.
    for (int t = 0; t < 5; t++) begin
      random_3cnf(N - 3, M - 16);
      f_nv = N;
      for (int k = 0; k < 8; k++)
        add_clause(N - 2, N - 1, N, k & 1, (k >> 1) & 1, (k >> 2) & 1);
      solve_and_check($sformatf("wide_unsat%0d", t), 0);
    end

    $display("mechanisms over all runs:");
    check_event("decisions",                tot_dec);
    check_event("implications",             tot_imp);
    check_event("pure literals",            tot_pure);
    check_event("conflicts",                tot_conf);
    check_event("in-place inversions",      tot_inv);
    check_event("nonchronological backjumps", tot_bj);
    check_event("clauses added",            tot_add);
    check_event("clauses refused (full)",   tot_drop);
    check_event("SAT answers",              longint'(n_sat));
    check_event("UNSAT answers",            longint'(n_unsat));
    $display("longest run: %0d cycles", max_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
