// tb_sat_fig1: the worked example of nonchronological backtracking.
//
// Formula (1) has 13 variables x0..x12 and 17 clauses. Solved with the
// unit clause rule and the maximum-occurrence decision heuristic only
// (pure literal rule off), the decision tree with nonchronological
// backtracking visits 9 nodes, in this order:
//   x1=1, x4=1, x10=1, x10=0, x1=0, x4=0, x10=0, x2=1, x3=1
// Both values of x10 fail under x1=1, x4=1. The conflict-induced clause
// then names only x1, so the search jumps over x4 straight back to x1.
// A node here is a value given by a decision or by inverting a decision.
// The testbench records every such assignment inside the solver and
// compares the sequence with the list above. It also checks for exactly
// one backjump over one level, one appended clause (~x1) and a SAT answer
// that satisfies the formula. It then solves the same formula with the
// pure literal rule on (the default configuration) and checks that answer.
module tb_sat_fig1;
  import sat_pkg::*;

  localparam int unsigned N  = N_VARS_DEFAULT;
  localparam int unsigned M  = M_CLAUSES_DEFAULT;
  localparam int unsigned RW = $clog2(M);
  localparam int unsigned NW = $clog2(N + 1);
  localparam int unsigned MW = $clog2(M + 1);

  logic          clk = 1'b0;
  logic          rst;
  logic          host_wr_en;
  logic [RW-1:0] host_wr_row;
  logic [N-1:0]  host_wr_ones, host_wr_zeros;
  logic          host_dims_we;
  logic [MW-1:0] host_num_rows;
  logic [NW-1:0] host_num_cols;
  logic          start;
  logic          busy  [2];
  logic          done  [2];
  result_e       result[2];
  logic [N-1:0]  sol_assigned[2], sol_values[2], conflict_clause[2];
  logic [MW-1:0] num_rows[2];
  logic [NW-1:0] decision_level[2];
  stats_t        stats[2];

  // [0]: algorithm of the example (no pure literal rule); [1]: default.
  sat_solver #(.PURE_LITERAL_RULE(1'b0)) dut0 (
    .clk, .rst, .host_wr_en, .host_wr_row, .host_wr_ones, .host_wr_zeros,
    .host_dims_we, .host_num_rows, .host_num_cols, .start,
    .busy(busy[0]), .done(done[0]), .result(result[0]), .sol_assigned(sol_assigned[0]),
    .sol_values(sol_values[0]), .num_rows(num_rows[0]), .conflict_clause(conflict_clause[0]),
    .decision_level(decision_level[0]), .stats(stats[0]));
  sat_solver dut1 (
    .clk, .rst, .host_wr_en, .host_wr_row, .host_wr_ones, .host_wr_zeros,
    .host_dims_we, .host_num_rows, .host_num_cols, .start,
    .busy(busy[1]), .done(done[1]), .result(result[1]), .sol_assigned(sol_assigned[1]),
    .sol_values(sol_values[1]), .num_rows(num_rows[1]), .conflict_clause(conflict_clause[1]),
    .decision_level(decision_level[1]), .stats(stats[1]));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [N-1:0] f_ones [17];
  logic [N-1:0] f_zeros[17];
  int node_var[$];
  int node_val[$];
  logic [N-1:0] added_ones, added_zeros;
  int n_added;

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Decision-tree nodes: decisions and inversions of decisions.
  always @(posedge clk) begin
    if (!rst && dut0.u_regs.assign_en && (dut0.u_regs.assign_dec || dut0.u_regs.restore)) begin
      node_var.push_back(int'(dut0.u_regs.assign_var));
      node_val.push_back(int'(dut0.u_regs.assign_val));
    end
    if (!rst && dut0.mat_wr_en && busy[0]) begin
      n_added++;
      added_ones  = dut0.mat_wr_ones;
      added_zeros = dut0.mat_wr_zeros;
    end
  end

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic void clause(int idx, int pos[$], int neg[$]);
    f_ones[idx] = '0;
    f_zeros[idx] = '0;
    foreach (pos[k]) f_zeros[idx][pos[k]] = 1'b1;
    foreach (neg[k]) f_ones[idx][neg[k]]  = 1'b1;
  endfunction

  function automatic bit satisfies(logic [N-1:0] asg, logic [N-1:0] val);
    for (int i = 0; i < 17; i++)
      if (!(|((f_zeros[i] & asg & val) | (f_ones[i] & asg & ~val)))) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    int exp_var[9] = '{1, 4, 10, 10, 1, 4, 10, 2, 3};
    int exp_val[9] = '{1, 1, 1, 0, 0, 0, 0, 1, 1};
    rst = 1'b1; host_wr_en = 1'b0; host_dims_we = 1'b0; start = 1'b0;
    host_wr_row = '0; host_wr_ones = '0; host_wr_zeros = '0;
    host_num_rows = '0; host_num_cols = '0; n_added = 0;
    clause(0,  '{},         '{0, 1});
    clause(1,  '{},         '{1, 2});
    clause(2,  '{0, 1, 2},  '{});
    clause(3,  '{1, 6},     '{});
    clause(4,  '{1, 7},     '{});
    clause(5,  '{1, 8},     '{});
    clause(6,  '{},         '{3, 4});
    clause(7,  '{},         '{4, 5});
    clause(8,  '{3, 4, 5},  '{});
    clause(9,  '{2, 12},    '{});
    clause(10, '{4, 7},     '{});
    clause(11, '{4, 6},     '{});
    clause(12, '{4, 8},     '{});
    clause(13, '{},         '{10, 11});
    clause(14, '{11},       '{10});
    clause(15, '{10},       '{11});
    clause(16, '{10, 11},   '{1});
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 17; i++) begin
      @(negedge clk);
      host_wr_en = 1'b1; host_wr_row = RW'(i);
      host_wr_ones = f_ones[i]; host_wr_zeros = f_zeros[i];
    end
    @(negedge clk);
    host_wr_en = 1'b0; host_dims_we = 1'b1; host_num_rows = MW'(17); host_num_cols = NW'(13);
    @(negedge clk);
    host_dims_we = 1'b0; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    wait (done[0] && done[1]);
    @(negedge clk);

    $write("decision tree:");
    foreach (node_var[k]) $write(" x%0d=%0d", node_var[k], node_val[k]);
    $display("");
    expect_eq("nodes visited", node_var.size(), 9);
    for (int k = 0; k < 9 && k < node_var.size(); k++) begin
      expect_eq($sformatf("node %0d variable", k), node_var[k], exp_var[k]);
      expect_eq($sformatf("node %0d value", k), node_val[k], exp_val[k]);
    end
    expect_eq("result", result[0], RES_SAT);
    expect_eq("solution satisfies formula", satisfies(sol_assigned[0], sol_values[0]), 1);
    expect_eq("conflicts", stats[0].conflicts, 2);
    expect_eq("backjumps", stats[0].backjumps, 1);
    expect_eq("levels skipped", stats[0].levels_skipped, 1);
    expect_eq("in-place inversions", stats[0].inversions, 1);
    expect_eq("clauses added", n_added, 1);
    expect_eq("added clause is (~x1)", (added_ones == N'(1 << 1)) && (added_zeros == '0), 1);
    expect_eq("pure literals (rule off)", stats[0].pure_literals, 0);
    $display("example algorithm: %0d cycles; default configuration: %0d cycles, %0d decisions",
             stats[0].cycles, stats[1].cycles, stats[1].decisions);
    expect_eq("default: result", result[1], RES_SAT);
    expect_eq("default: solution satisfies formula", satisfies(sol_assigned[1], sol_values[1]), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
