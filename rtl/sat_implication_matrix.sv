// sat_implication_matrix: the n x n implication matrix (IM).
//
// Word j records, as an n-bit set of variables, the chain of implications
// that led to the current value of variable x_j. When x_j is implied by
// clause c_i the control unit writes IM[j] = c_i^B | IM[k] | ... | IM[r],
// where c_i^B marks the variables of c_i and k..r are the other variables
// of c_i. A conflict-induced clause is the OR of the words of the variables
// of the conflicting clause. The memory is a simple dual-port RAM: one write
// port and one synchronous read port that can work in the same cycle.
//
// Timing: rd_addr with rd_en in cycle t gives rd_data in cycle t+1. A read
// of the word being written in the same cycle returns the old word.
//
// The n x n dual-port organisation follows the source architecture; the
// port arrangement (one write, one read) is this design's choice.
module sat_implication_matrix #(
  parameter int unsigned N  = sat_pkg::N_VARS_DEFAULT,
  parameter int unsigned CW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [CW-1:0] wr_addr,
  input  logic [N-1:0]  wr_data,
  input  logic          rd_en,
  input  logic [CW-1:0] rd_addr,
  output logic [N-1:0]  rd_data
);

  logic [N-1:0] mem [N];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
