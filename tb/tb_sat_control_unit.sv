// tb_sat_control_unit: checks the search controller with the real datapath.
//
// The control unit is wired to a clause matrix, an implication matrix, a
// stack, the registers and the ALU (N = 10 variables, M = 48 rows). Small
// formulas with hand-derived traces check exact cycle counts and event
// counters: an empty formula (2 cycles), one unit clause (7 cycles, one
// implication) and the contradiction (x0)(~x0) (13 cycles, one conflict,
// UNSAT without a decision). Random 3-CNF formulas then check the answers
// against exhaustive search, and every conflict-induced clause the
// controller appends is checked to be a consequence of the original
// formula: no model of the formula may falsify it.
module tb_sat_control_unit;
  import sat_pkg::*;

  localparam int unsigned N  = 10;
  localparam int unsigned M  = 48;
  localparam int unsigned CW = $clog2(N);
  localparam int unsigned RW = $clog2(M);
  localparam int unsigned NW = $clog2(N + 1);
  localparam int unsigned MW = $clog2(M + 1);
  localparam int unsigned SW = M + 3 * N;
  localparam int unsigned EW = SW + CW + 2;

  logic          clk = 1'b0;
  logic          rst, start, busy, done;
  result_e       result;
  stats_t        stats;
  logic [SW-1:0] reg_state, reg_restore_state;
  logic [M-1:0]  reg_rows_del, reg_del_rows_mask, reg_active_rows;
  logic [N-1:0]  reg_assigned, reg_values, reg_dec_mask, reg_conflict, reg_clause_in;
  logic [MW-1:0] reg_num_rows;
  logic [NW-1:0] reg_num_cols;
  logic          reg_matrix_empty, reg_init, reg_restore, reg_assign_en, reg_assign_val;
  logic          reg_assign_dec, reg_del_rows_en, reg_add_row, reg_clause_we;
  logic [CW-1:0] reg_assign_var;
  logic          mat_rd_row_en, mat_rd_col_en, mat_wr_en;
  logic [RW-1:0] mat_rd_row, mat_wr_row;
  logic [CW-1:0] mat_rd_col;
  logic [N-1:0]  mat_wr_ones, mat_wr_zeros, row_ones, row_zeros;
  logic [M-1:0]  col_ones, col_zeros;
  logic          alu_row_sat, alu_row_free_val, alu_vec_any;
  logic [N-1:0]  alu_row_lits, alu_vec;
  logic [NW-1:0] alu_row_nfree;
  logic [CW-1:0] alu_row_free_idx, alu_vec_ffs;
  logic [MW-1:0] alu_col_npos, alu_col_nneg;
  logic [M-1:0]  alu_col_sat1, alu_col_sat0;
  logic          im_wr_en, im_rd_en;
  logic [CW-1:0] im_wr_addr, im_rd_addr;
  logic [N-1:0]  im_wr_data, im_rd_data;
  logic          stk_clear, stk_push, stk_pop, stk_wr_top, stk_empty;
  logic [EW-1:0] stk_din, stk_top;
  // host side of the testbench
  logic          h_wr_en, h_dims_we;
  logic [RW-1:0] h_wr_row;
  logic [N-1:0]  h_ones, h_zeros;
  logic [MW-1:0] h_rows;
  logic [NW-1:0] h_cols;

  sat_control_unit #(.N(N), .M(M)) dut (.*);

  sat_registers #(.N(N), .M(M)) u_regs (
    .clk, .rst, .dims_we(h_dims_we), .dims_rows(h_rows), .dims_cols(h_cols),
    .init(reg_init), .restore(reg_restore), .restore_state(reg_restore_state),
    .assign_en(reg_assign_en), .assign_var(reg_assign_var), .assign_val(reg_assign_val),
    .assign_dec(reg_assign_dec), .del_rows_en(reg_del_rows_en),
    .del_rows_mask(reg_del_rows_mask), .add_row(reg_add_row),
    .clause_we(reg_clause_we), .clause_in(reg_clause_in),
    .state(reg_state), .rows_del(reg_rows_del), .assigned(reg_assigned),
    .values(reg_values), .dec_mask(reg_dec_mask), .num_rows(reg_num_rows),
    .num_cols(reg_num_cols), .valid_rows(), .active_rows(reg_active_rows),
    .matrix_empty(reg_matrix_empty), .conflict(reg_conflict));

  sat_data_matrices #(.N(N), .M(M)) u_mat (
    .clk, .wr_en(mat_wr_en | h_wr_en), .wr_row(mat_wr_en ? mat_wr_row : h_wr_row),
    .wr_ones(mat_wr_en ? mat_wr_ones : h_ones), .wr_zeros(mat_wr_en ? mat_wr_zeros : h_zeros),
    .rd_row_en(mat_rd_row_en), .rd_row(mat_rd_row), .row_ones, .row_zeros,
    .rd_col_en(mat_rd_col_en), .rd_col(mat_rd_col), .col_ones, .col_zeros);

  sat_alu #(.N(N), .M(M)) u_alu (
    .assigned(reg_assigned), .values(reg_values), .row_ones, .row_zeros,
    .row_sat(alu_row_sat), .row_lits(alu_row_lits), .row_nfree(alu_row_nfree),
    .row_free_idx(alu_row_free_idx), .row_free_val(alu_row_free_val),
    .col_ones, .col_zeros, .active_rows(reg_active_rows),
    .col_npos(alu_col_npos), .col_nneg(alu_col_nneg),
    .col_sat1(alu_col_sat1), .col_sat0(alu_col_sat0),
    .vec(alu_vec), .vec_ffs(alu_vec_ffs), .vec_any(alu_vec_any));

  sat_implication_matrix #(.N(N)) u_im (
    .clk, .wr_en(im_wr_en), .wr_addr(im_wr_addr), .wr_data(im_wr_data),
    .rd_en(im_rd_en), .rd_addr(im_rd_addr), .rd_data(im_rd_data));

  sat_stack #(.W(EW), .DEPTH(N)) u_stk (
    .clk, .rst, .clear(stk_clear), .push(stk_push), .pop(stk_pop), .wr_top(stk_wr_top),
    .din(stk_din), .top(stk_top), .empty(stk_empty), .full(), .depth());

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [N-1:0] f_ones [M];
  logic [N-1:0] f_zeros[M];
  int           f_nv, f_nc;
  int           learned_seen, backjumps_seen;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit clause_true(logic [N-1:0] o, logic [N-1:0] z, logic [N-1:0] a);
    return |((z & a) | (o & ~a));
  endfunction

  function automatic bit is_model(logic [N-1:0] a);
    for (int i = 0; i < f_nc; i++)
      if (!clause_true(f_ones[i], f_zeros[i], a)) return 1'b0;
    return 1'b1;
  endfunction

  // Every appended clause must hold in every model of the original formula.
  always @(posedge clk) begin
    if (!rst && mat_wr_en) begin
      bit ok;
      ok = 1'b1;
      learned_seen++;
      for (int a = 0; a < (1 << f_nv); a++)
        if (is_model(N'(a)) && !clause_true(mat_wr_ones, mat_wr_zeros, N'(a))) ok = 1'b0;
      checks++;
      if (!ok || (mat_wr_ones | mat_wr_zeros) == '0) begin
        failures++;
        $display("FAIL appended clause %b/%b is not implied by the formula",
                 mat_wr_ones, mat_wr_zeros);
      end
    end
  end

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic run();
    for (int i = 0; i < f_nc; i++) begin
      @(negedge clk);
      h_wr_en = 1'b1; h_wr_row = RW'(i); h_ones = f_ones[i]; h_zeros = f_zeros[i];
    end
    @(negedge clk);
    h_wr_en = 1'b0; h_dims_we = 1'b1; h_rows = MW'(f_nc); h_cols = NW'(f_nv);
    @(negedge clk);
    h_dims_we = 1'b0; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    wait (done);
    @(negedge clk);
  endtask

  task automatic check_answer(string name);
    bit any = 1'b0;
    for (int a = 0; a < (1 << f_nv); a++) if (is_model(N'(a))) any = 1'b1;
    checks++;
    if (result == RES_SAT) begin
      bit ok = 1'b1;
      for (int i = 0; i < f_nc; i++)
        if (!(|((f_zeros[i] & reg_assigned & reg_values) |
                (f_ones[i] & reg_assigned & ~reg_values)))) ok = 1'b0;
      if (!ok) begin
        failures++;
        $display("FAIL %s: SAT answer does not satisfy the formula", name);
      end
    end else if (result != RES_UNSAT || any) begin
      failures++;
      $display("FAIL %s: result %s but satisfiable=%0d", name, result.name(), any);
    end
    backjumps_seen += int'(stats.backjumps);
  endtask

  task automatic clear_formula(int nv);
    f_nv = nv; f_nc = 0;
    for (int i = 0; i < M; i++) begin f_ones[i] = '0; f_zeros[i] = '0; end
  endtask

  initial begin
    rst = 1'b1; start = 1'b0; h_wr_en = 1'b0; h_dims_we = 1'b0; h_wr_row = '0;
    h_ones = '0; h_zeros = '0; h_rows = '0; h_cols = '0;
    learned_seen = 0; backjumps_seen = 0;
    clear_formula(1);
    repeat (3) @(negedge clk);
    rst = 1'b0;

    // Empty formula: U_START, U_ISSUE -> SAT.
    clear_formula(4);
    run();
    expect_eq("empty: result", result, RES_SAT);
    expect_eq("empty: cycles", stats.cycles, 2);

    // (x0): row visit, implication with no other literal, assignment.
    clear_formula(1);
    f_zeros[0][0] = 1'b1; f_nc = 1;
    run();
    expect_eq("unit: result", result, RES_SAT);
    expect_eq("unit: cycles", stats.cycles, 7);
    expect_eq("unit: implications", stats.implications, 1);
    expect_eq("unit: x0", reg_values[0], 1);

    // (x0)(~x0): implication, then conflict with an empty clause; no
    // decision is open, so the conflict-induced clause is empty -> UNSAT.
    clear_formula(1);
    f_zeros[0][0] = 1'b1; f_ones[1][0] = 1'b1; f_nc = 2;
    run();
    expect_eq("contra: result", result, RES_UNSAT);
    expect_eq("contra: cycles", stats.cycles, 13);
    expect_eq("contra: conflicts", stats.conflicts, 1);
    expect_eq("contra: decisions", stats.decisions, 0);

    // Random formulas.
    for (int t = 0; t < 2000; t++) begin
      int nv, nc;
      nv = 6 + (t % 5);
      nc = (t % 2) ? M - 2 : (nv * 43 + 5) / 10;
      clear_formula(nv);
      for (int i = 0; i < nc; i++) begin
        int a, b, c;
        a = $urandom_range(nv - 1);
        do b = $urandom_range(nv - 1); while (b == a);
        do c = $urandom_range(nv - 1); while (c == a || c == b);
        if ($urandom_range(1)) f_ones[i][a] = 1'b1; else f_zeros[i][a] = 1'b1;
        if ($urandom_range(1)) f_ones[i][b] = 1'b1; else f_zeros[i][b] = 1'b1;
        if ($urandom_range(1)) f_ones[i][c] = 1'b1; else f_zeros[i][c] = 1'b1;
      end
      f_nc = nc;
      run();
      check_answer($sformatf("rand%0d", t));
    end
    checks++;
    if (learned_seen == 0 || backjumps_seen == 0) begin
      failures++;
      $display("FAIL clause addition (%0d) or backjumping (%0d) never exercised",
               learned_seen, backjumps_seen);
    end
    $display("clauses appended %0d, backjumps %0d", learned_seen, backjumps_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
