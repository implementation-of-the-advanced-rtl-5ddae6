// sat_registers: the search-state registers of the solver.
//
// The clause matrix itself is never modified during the search; every
// change is held here instead:
//   rows_del  - clauses deleted because they are satisfied
//   assigned  - columns deleted because the variable has a value
//   values    - the values; (assigned, values) is the ternary vector being
//               looked for
//   dec_mask  - decision variables that still have an untried value; its
//               complement marks the deleted columns of the implication
//               matrix, so a conflict-induced clause is the OR of IM words
//               masked with dec_mask
//   num_rows / num_cols - actual dimensions of the matrix; num_rows grows
//               when a conflict-induced clause is appended
//   conflict  - the n-bit conflict-induced clause register
// The first four form the snapshot (state, packed as {rows_del, assigned,
// values, dec_mask}) that is pushed on the stack at a decision and
// restored when backtracking.
//
// Updates, all taking effect at the next clock edge: init clears the
// search state; restore loads a snapshot; assign_en gives a variable a
// value (and, with assign_dec, marks it as a decision); del_rows_en deletes
// the rows in del_rows_mask (limited to existing rows); add_row counts one
// more row; clause_we loads the conflict register. Within one cycle a
// restore is applied first and an assignment and row deletion on top of it.
// Host writes of the dimensions are accepted at any time and are meant
// for when the solver is idle.
//
// Holding deleted rows and columns in registers follows the source
// architecture; dec_mask and the packing are this design's choices.
module sat_registers #(
  parameter int unsigned N  = sat_pkg::N_VARS_DEFAULT,
  parameter int unsigned M  = sat_pkg::M_CLAUSES_DEFAULT,
  parameter int unsigned CW = (N > 1) ? $clog2(N) : 1,
  parameter int unsigned NW = $clog2(N + 1),
  parameter int unsigned MW = $clog2(M + 1),
  parameter int unsigned SW = M + 3 * N
) (
  input  logic          clk,
  input  logic          rst,
  // host access to the dimensions
  input  logic          dims_we,
  input  logic [MW-1:0] dims_rows,
  input  logic [NW-1:0] dims_cols,
  // control
  input  logic          init,
  input  logic          restore,
  input  logic [SW-1:0] restore_state,
  input  logic          assign_en,
  input  logic [CW-1:0] assign_var,
  input  logic          assign_val,
  input  logic          assign_dec,
  input  logic          del_rows_en,
  input  logic [M-1:0]  del_rows_mask,
  input  logic          add_row,
  input  logic          clause_we,
  input  logic [N-1:0]  clause_in,
  // contents
  output logic [SW-1:0] state,
  output logic [M-1:0]  rows_del,
  output logic [N-1:0]  assigned,
  output logic [N-1:0]  values,
  output logic [N-1:0]  dec_mask,
  output logic [MW-1:0] num_rows,
  output logic [NW-1:0] num_cols,
  output logic [M-1:0]  valid_rows,
  output logic [M-1:0]  active_rows,
  output logic          matrix_empty,
  output logic [N-1:0]  conflict
);

  logic [M-1:0] rows_del_n;
  logic [N-1:0] assigned_n, values_n, dec_mask_n;

  assign state = {rows_del, assigned, values, dec_mask};

  always_comb begin
    for (int i = 0; i < M; i++) valid_rows[i] = (MW'(i) < num_rows);
  end
  assign active_rows  = valid_rows & ~rows_del;
  assign matrix_empty = (active_rows == '0);

  always_comb begin
    if (restore) {rows_del_n, assigned_n, values_n, dec_mask_n} = restore_state;
    else         {rows_del_n, assigned_n, values_n, dec_mask_n} = state;
    if (assign_en) begin
      assigned_n[assign_var] = 1'b1;
      values_n[assign_var]   = assign_val;
      dec_mask_n[assign_var] = assign_dec;
    end
    if (del_rows_en) rows_del_n = rows_del_n | (del_rows_mask & valid_rows);
  end

  always_ff @(posedge clk) begin
    if (rst || init) begin
      rows_del <= '0;
      assigned <= '0;
      values   <= '0;
      dec_mask <= '0;
      conflict <= '0;
    end else begin
      rows_del <= rows_del_n;
      assigned <= assigned_n;
      values   <= values_n;
      dec_mask <= dec_mask_n;
      if (clause_we) conflict <= clause_in;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      num_rows <= '0;
      num_cols <= '0;
    end else if (dims_we) begin
      num_rows <= dims_rows;
      num_cols <= dims_cols;
    end else if (add_row && num_rows < MW'(M)) begin
      num_rows <= num_rows + MW'(1);
    end
  end

endmodule
