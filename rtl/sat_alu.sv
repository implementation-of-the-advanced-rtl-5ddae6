// sat_alu: the combinational computations over ternary vectors.
//
// Row side (one clause row against the current assignment):
//   row_sat    - the assignment is orthogonal to the row, i.e. one of its
//                literals is already true, so the clause is satisfied
//   row_lits   - c^B, the set of variables that occur in the clause
//   row_nfree  - number of literals whose variable is still unassigned
//   row_free_idx / row_free_val - the lowest such variable, and the value
//                that makes its literal true (the implied value when
//                row_nfree == 1)
// Column side (one transpose column against the active rows):
//   col_npos / col_nneg - number of active clauses holding x_j / ~x_j
//   col_sat1 / col_sat0 - the rows that x_j = 1 / x_j = 0 satisfies
// Vector side:
//   vec_ffs / vec_any   - lowest set bit of an n-bit set (used to walk the
//                         variables of a clause and of a conflict clause)
//
// The current assignment is the ternary vector (assigned, values): bit j
// is defined when assigned[j] is 1 and then equals values[j].
//
// The kinds of operation (counting ones and zeros, testing orthogonality)
// follow the source architecture; the exact set of outputs is this
// design's choice. Purely combinational; no clock.
module sat_alu #(
  parameter int unsigned N  = sat_pkg::N_VARS_DEFAULT,
  parameter int unsigned M  = sat_pkg::M_CLAUSES_DEFAULT,
  parameter int unsigned CW = (N > 1) ? $clog2(N) : 1,
  parameter int unsigned NW = $clog2(N + 1),
  parameter int unsigned MW = $clog2(M + 1)
) (
  // current assignment
  input  logic [N-1:0]  assigned,
  input  logic [N-1:0]  values,
  // row side
  input  logic [N-1:0]  row_ones,
  input  logic [N-1:0]  row_zeros,
  output logic          row_sat,
  output logic [N-1:0]  row_lits,
  output logic [NW-1:0] row_nfree,
  output logic [CW-1:0] row_free_idx,
  output logic          row_free_val,
  // column side
  input  logic [M-1:0]  col_ones,
  input  logic [M-1:0]  col_zeros,
  input  logic [M-1:0]  active_rows,
  output logic [MW-1:0] col_npos,
  output logic [MW-1:0] col_nneg,
  output logic [M-1:0]  col_sat1,
  output logic [M-1:0]  col_sat0,
  // vector side
  input  logic [N-1:0]  vec,
  output logic [CW-1:0] vec_ffs,
  output logic          vec_any
);

  logic [N-1:0] asg_ones, asg_zeros, free;

  // The assignment as a ternary vector in the two-plane encoding.
  assign asg_ones  = assigned & values;
  assign asg_zeros = assigned & ~values;

  // Orthogonality of the row and the assignment.
  assign row_sat  = |((row_ones & asg_zeros) | (row_zeros & asg_ones));
  assign row_lits = row_ones | row_zeros;
  assign free     = row_lits & ~assigned;

  always_comb begin
    row_nfree    = '0;
    row_free_idx = '0;
    for (int j = N - 1; j >= 0; j--) begin
      if (free[j]) begin
        row_nfree    = row_nfree + NW'(1);
        row_free_idx = CW'(j);
      end
    end
    // A positive literal (cube value 0) is made true by x = 1.
    row_free_val = row_zeros[row_free_idx];
  end

  assign col_sat1 = col_zeros;
  assign col_sat0 = col_ones;

  always_comb begin
    col_npos = '0;
    col_nneg = '0;
    for (int i = 0; i < M; i++) begin
      col_npos = col_npos + MW'(col_zeros[i] & active_rows[i]);
      col_nneg = col_nneg + MW'(col_ones[i]  & active_rows[i]);
    end
  end

  always_comb begin
    vec_ffs = '0;
    for (int j = N - 1; j >= 0; j--)
      if (vec[j]) vec_ffs = CW'(j);
  end
  assign vec_any = |vec;

endmodule
