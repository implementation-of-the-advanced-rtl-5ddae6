// sat_pkg: constants shared by the SAT solver core.
//
// A formula in conjunctive normal form is held as a ternary matrix: one row
// per clause, one column per variable. Following the solver's ternary-matrix
// formulation, row i is the cube of assignments that falsifies clause i, so
// a satisfying assignment is a ternary vector orthogonal to every row (two
// ternary vectors are orthogonal when some position holds 1 in one and 0 in
// the other). Each cell is stored as two bit planes:
//   ones[j]  = 1 : the clause holds the negative literal ~x_j (x_j = 1 falsifies it)
//   zeros[j] = 1 : the clause holds the positive literal  x_j (x_j = 0 falsifies it)
//   both 0       : x_j does not occur in the clause ("-")
// The default sizes are this design's choice; the source architecture leaves
// m (clauses) and n (variables) open.
package sat_pkg;

  // Default maximum number of variables (matrix columns).
  parameter int unsigned N_VARS_DEFAULT    = 32;
  // Default maximum number of clauses (matrix rows), original plus added.
  parameter int unsigned M_CLAUSES_DEFAULT = 64;

  // Final outcome reported to the host.
  typedef enum logic [1:0] {
    RES_NONE  = 2'd0,
    RES_SAT   = 2'd1,
    RES_UNSAT = 2'd2
  } result_e;

  // Event counters kept by the control unit, one per mechanism of the
  // search, plus the number of clock cycles of the last run.
  typedef struct packed {
    logic [31:0] cycles;
    logic [31:0] decisions;     // dynamic decisions taken
    logic [31:0] implications;  // variables implied by the unit clause rule
    logic [31:0] pure_literals; // variables set by the pure literal rule
    logic [31:0] conflicts;     // conflicts found (empty clause)
    logic [31:0] inversions;    // decision values inverted in place
    logic [31:0] backjumps;     // backtracks that skipped at least one level
    logic [31:0] levels_skipped;// decision levels skipped by those backtracks
    logic [31:0] clauses_added; // conflict-induced clauses appended
    logic [31:0] clauses_dropped; // conflict-induced clauses not added (matrix full)
  } stats_t;

endpackage
