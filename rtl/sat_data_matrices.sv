// sat_data_matrices: the ternary clause matrix and its transpose.
//
// The formula is kept twice: as an M x N matrix (one word per clause row)
// and as its N x M transpose (one word per variable column), so that any
// whole row or any whole column can be read in a single clock cycle. Both
// copies are written together through one row-write port: writing clause
// row i stores the row word and sets bit i of every column word. The host
// uses this port to download a formula; the control unit uses it to append
// conflict-induced clauses. Cells use the two-plane encoding of sat_pkg.
//
// Timing: reads are synchronous. An address presented with rd_*_en in
// cycle t gives its word on the outputs in cycle t+1; the outputs hold their
// value while the enable is low. A read and a write of the same location in
// one cycle return the old contents.
//
// Keeping a row copy and a column copy follows the source architecture. The
// single shared write port and the per-column bit write of the transpose
// are this design's choices; the transpose write touches one bit of every
// column word, so a synthesis tool builds the transpose from flip-flops
// rather than from a block RAM.
module sat_data_matrices #(
  parameter int unsigned N  = sat_pkg::N_VARS_DEFAULT,
  parameter int unsigned M  = sat_pkg::M_CLAUSES_DEFAULT,
  parameter int unsigned RW = (M > 1) ? $clog2(M) : 1,
  parameter int unsigned CW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  // row write (host download or clause addition)
  input  logic          wr_en,
  input  logic [RW-1:0] wr_row,
  input  logic [N-1:0]  wr_ones,
  input  logic [N-1:0]  wr_zeros,
  // row read
  input  logic          rd_row_en,
  input  logic [RW-1:0] rd_row,
  output logic [N-1:0]  row_ones,
  output logic [N-1:0]  row_zeros,
  // column read (transpose)
  input  logic          rd_col_en,
  input  logic [CW-1:0] rd_col,
  output logic [M-1:0]  col_ones,
  output logic [M-1:0]  col_zeros
);

  logic [N-1:0] mat_ones  [M];
  logic [N-1:0] mat_zeros [M];
  logic [M-1:0] tr_ones   [N];
  logic [M-1:0] tr_zeros  [N];

  always_ff @(posedge clk) begin
    if (wr_en) begin
      mat_ones[wr_row]  <= wr_ones;
      mat_zeros[wr_row] <= wr_zeros;
    end
    if (rd_row_en) begin
      row_ones  <= mat_ones[rd_row];
      row_zeros <= mat_zeros[rd_row];
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) begin
      for (int j = 0; j < N; j++) begin
        tr_ones[j][wr_row]  <= wr_ones[j];
        tr_zeros[j][wr_row] <= wr_zeros[j];
      end
    end
    if (rd_col_en) begin
      col_ones  <= tr_ones[rd_col];
      col_zeros <= tr_zeros[rd_col];
    end
  end

  // A cell is either a positive literal, a negative literal or absent.
  always_ff @(posedge clk)
    if (wr_en) assert ((wr_ones & wr_zeros) == '0)
      else $error("sat_data_matrices: cell written as both 0 and 1");

endmodule
