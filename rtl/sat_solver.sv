// sat_solver: a SAT solver core for the hardware side of a software /
// reconfigurable-hardware partition.
//
// The circuit is independent of the problem instance: only the formula is
// downloaded. A formula of up to M clauses over up to N variables is written
// row by row as a ternary matrix (see sat_pkg for the cell encoding), its
// actual dimensions are written, and start launches the search. The core
// looks for a ternary vector orthogonal to every row (a satisfying partial
// assignment) using the unit clause rule, the pure literal rule, dynamic
// decisions by maximum occurrence, and, on conflicts, an implication matrix
// to build conflict-induced clauses, which drive nonchronological
// backtracking and are appended to the matrix while free rows remain.
//
// Blocks: sat_control_unit (the algorithm), sat_data_matrices (matrix and
// transpose), sat_implication_matrix, sat_stack, sat_registers and sat_alu.
//
// Host interface:
//   host_wr_en/row/ones/zeros - write one clause row; accepted when not busy
//   host_dims_we/rows/cols    - set the number of clauses and variables;
//                               accepted when not busy
//   start (one cycle)         - run; done then rises and stays high with
//                               result until the next start
//   sol_assigned/sol_values   - the solution when result is RES_SAT; a 0 in
//                               sol_assigned marks a don't-care variable
//   num_rows                  - rows in use, including added clauses
//   conflict_clause           - the last conflict-induced clause
//   decision_level            - stack depth (number of open decisions)
//   stats                     - event counters of the last run
// Rows added during a run stay in the matrix; rewrite the dimensions before
// the next run to drop them.
//
// PURE_LITERAL_RULE (default 1) switches the pure literal rule off for the
// simpler algorithm of the worked backtracking example.
//
// The block structure follows the source architecture; the host interface
// and its signalling are this design's choice.
module sat_solver
  import sat_pkg::*;
#(
  parameter int unsigned N  = sat_pkg::N_VARS_DEFAULT,
  parameter int unsigned M  = sat_pkg::M_CLAUSES_DEFAULT,
  parameter bit          PURE_LITERAL_RULE = 1'b1,
  parameter int unsigned CW = (N > 1) ? $clog2(N) : 1,
  parameter int unsigned RW = (M > 1) ? $clog2(M) : 1,
  parameter int unsigned NW = $clog2(N + 1),
  parameter int unsigned MW = $clog2(M + 1)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          host_wr_en,
  input  logic [RW-1:0] host_wr_row,
  input  logic [N-1:0]  host_wr_ones,
  input  logic [N-1:0]  host_wr_zeros,
  input  logic          host_dims_we,
  input  logic [MW-1:0] host_num_rows,
  input  logic [NW-1:0] host_num_cols,
  input  logic          start,
  output logic          busy,
  output logic          done,
  output result_e       result,
  output logic [N-1:0]  sol_assigned,
  output logic [N-1:0]  sol_values,
  output logic [MW-1:0] num_rows,
  output logic [N-1:0]  conflict_clause,
  output logic [NW-1:0] decision_level,
  output stats_t        stats
);

  localparam int unsigned SW = M + 3 * N;
  localparam int unsigned EW = SW + CW + 2;

  // registers
  logic          reg_init, reg_restore, reg_assign_en, reg_assign_val, reg_assign_dec;
  logic          reg_del_rows_en, reg_add_row, reg_clause_we, reg_matrix_empty;
  logic [SW-1:0] reg_state, reg_restore_state;
  logic [CW-1:0] reg_assign_var;
  logic [M-1:0]  reg_del_rows_mask, reg_rows_del, reg_active_rows;
  logic [N-1:0]  reg_clause_in, reg_assigned, reg_values, reg_dec_mask, reg_conflict;
  logic [MW-1:0] reg_num_rows;
  logic [NW-1:0] reg_num_cols;
  // matrices
  logic          cu_rd_row_en, cu_rd_col_en, cu_wr_en, mat_wr_en;
  logic [RW-1:0] cu_rd_row, cu_wr_row, mat_wr_row;
  logic [CW-1:0] cu_rd_col;
  logic [N-1:0]  cu_wr_ones, cu_wr_zeros, mat_wr_ones, mat_wr_zeros;
  logic [N-1:0]  row_ones, row_zeros;
  logic [M-1:0]  col_ones, col_zeros;
  // ALU
  logic          alu_row_sat, alu_row_free_val, alu_vec_any;
  logic [N-1:0]  alu_row_lits, alu_vec;
  logic [NW-1:0] alu_row_nfree;
  logic [CW-1:0] alu_row_free_idx, alu_vec_ffs;
  logic [MW-1:0] alu_col_npos, alu_col_nneg;
  logic [M-1:0]  alu_col_sat1, alu_col_sat0;
  // IM
  logic          im_wr_en, im_rd_en;
  logic [CW-1:0] im_wr_addr, im_rd_addr;
  logic [N-1:0]  im_wr_data, im_rd_data;
  // stack
  logic          stk_clear, stk_push, stk_pop, stk_wr_top, stk_empty;
  logic [EW-1:0] stk_din, stk_top;

  // The host writes the matrix only while the core is idle.
  assign mat_wr_en    = cu_wr_en | (host_wr_en & ~busy);
  assign mat_wr_row   = cu_wr_en ? cu_wr_row   : host_wr_row;
  assign mat_wr_ones  = cu_wr_en ? cu_wr_ones  : host_wr_ones;
  assign mat_wr_zeros = cu_wr_en ? cu_wr_zeros : host_wr_zeros;

  assign sol_assigned    = reg_assigned;
  assign sol_values      = reg_values & reg_assigned;
  assign num_rows        = reg_num_rows;
  assign conflict_clause = reg_conflict;

  sat_control_unit #(.N(N), .M(M), .PURE_LITERAL_RULE(PURE_LITERAL_RULE)) u_cu (
    .clk, .rst, .start, .busy, .done, .result, .stats,
    .reg_state, .reg_rows_del, .reg_assigned, .reg_values, .reg_dec_mask,
    .reg_num_rows, .reg_num_cols, .reg_matrix_empty, .reg_conflict,
    .reg_init, .reg_restore, .reg_restore_state, .reg_assign_en, .reg_assign_var,
    .reg_assign_val, .reg_assign_dec, .reg_del_rows_en, .reg_del_rows_mask,
    .reg_add_row, .reg_clause_we, .reg_clause_in,
    .mat_rd_row_en(cu_rd_row_en), .mat_rd_row(cu_rd_row),
    .mat_rd_col_en(cu_rd_col_en), .mat_rd_col(cu_rd_col),
    .mat_wr_en(cu_wr_en), .mat_wr_row(cu_wr_row),
    .mat_wr_ones(cu_wr_ones), .mat_wr_zeros(cu_wr_zeros),
    .alu_row_sat, .alu_row_lits, .alu_row_nfree, .alu_row_free_idx, .alu_row_free_val,
    .alu_col_npos, .alu_col_nneg, .alu_col_sat1, .alu_col_sat0,
    .alu_vec, .alu_vec_ffs, .alu_vec_any,
    .im_wr_en, .im_wr_addr, .im_wr_data, .im_rd_en, .im_rd_addr, .im_rd_data,
    .stk_clear, .stk_push, .stk_pop, .stk_wr_top, .stk_din, .stk_top, .stk_empty
  );

  sat_registers #(.N(N), .M(M)) u_regs (
    .clk, .rst,
    .dims_we(host_dims_we & ~busy), .dims_rows(host_num_rows), .dims_cols(host_num_cols),
    .init(reg_init), .restore(reg_restore), .restore_state(reg_restore_state),
    .assign_en(reg_assign_en), .assign_var(reg_assign_var), .assign_val(reg_assign_val),
    .assign_dec(reg_assign_dec), .del_rows_en(reg_del_rows_en),
    .del_rows_mask(reg_del_rows_mask), .add_row(reg_add_row),
    .clause_we(reg_clause_we), .clause_in(reg_clause_in),
    .state(reg_state), .rows_del(reg_rows_del), .assigned(reg_assigned),
    .values(reg_values), .dec_mask(reg_dec_mask), .num_rows(reg_num_rows),
    .num_cols(reg_num_cols), .valid_rows(), .active_rows(reg_active_rows),
    .matrix_empty(reg_matrix_empty), .conflict(reg_conflict)
  );

  sat_data_matrices #(.N(N), .M(M)) u_mat (
    .clk,
    .wr_en(mat_wr_en), .wr_row(mat_wr_row), .wr_ones(mat_wr_ones), .wr_zeros(mat_wr_zeros),
    .rd_row_en(cu_rd_row_en), .rd_row(cu_rd_row), .row_ones, .row_zeros,
    .rd_col_en(cu_rd_col_en), .rd_col(cu_rd_col), .col_ones, .col_zeros
  );

  sat_alu #(.N(N), .M(M)) u_alu (
    .assigned(reg_assigned), .values(reg_values),
    .row_ones, .row_zeros, .row_sat(alu_row_sat), .row_lits(alu_row_lits),
    .row_nfree(alu_row_nfree), .row_free_idx(alu_row_free_idx),
    .row_free_val(alu_row_free_val),
    .col_ones, .col_zeros, .active_rows(reg_active_rows),
    .col_npos(alu_col_npos), .col_nneg(alu_col_nneg),
    .col_sat1(alu_col_sat1), .col_sat0(alu_col_sat0),
    .vec(alu_vec), .vec_ffs(alu_vec_ffs), .vec_any(alu_vec_any)
  );

  sat_implication_matrix #(.N(N)) u_im (
    .clk, .wr_en(im_wr_en), .wr_addr(im_wr_addr), .wr_data(im_wr_data),
    .rd_en(im_rd_en), .rd_addr(im_rd_addr), .rd_data(im_rd_data)
  );

  sat_stack #(.W(EW), .DEPTH(N)) u_stk (
    .clk, .rst, .clear(stk_clear), .push(stk_push), .pop(stk_pop), .wr_top(stk_wr_top),
    .din(stk_din), .top(stk_top), .empty(stk_empty), .full(), .depth(decision_level)
  );

endmodule
