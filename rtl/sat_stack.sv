// sat_stack: the LIFO that supports backtracking.
//
// When a decision is taken the control unit pushes the current contents of
// the search registers together with the decision variable; during
// backtracking the entries are read back (top) and removed (pop). The
// word format is opaque to the stack. wr_top rewrites the top entry in
// place, which the control unit uses to mark that both values of the top
// decision variable have now been tried.
//
// Interface: push, pop and wr_top are mutually exclusive, one per cycle.
// top is the newest entry and is valid whenever empty is low (read is
// asynchronous, so a pop in cycle t shows the next entry in cycle t+1).
// depth counts the entries. Pushing when full or popping when empty is an
// error flagged by an assertion and ignored.
//
// Saving all search registers on a decision and restoring them when
// backtracking follows the source architecture; the depth (one entry per
// variable, the largest number of nested decisions) is this design's
// choice.
module sat_stack #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = sat_pkg::N_VARS_DEFAULT,
  parameter int unsigned DW    = $clog2(DEPTH + 1),
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          clear,
  input  logic          push,
  input  logic          pop,
  input  logic          wr_top,
  input  logic [W-1:0]  din,
  output logic [W-1:0]  top,
  output logic          empty,
  output logic          full,
  output logic [DW-1:0] depth
);

  logic [W-1:0]  mem [DEPTH];
  logic [DW-1:0] sp;
  logic [AW-1:0] wr_ptr, top_ptr;

  assign wr_ptr  = AW'(sp);
  assign top_ptr = AW'(sp - DW'(1));

  assign depth = sp;
  assign empty = (sp == '0);
  assign full  = (sp == DW'(DEPTH));
  assign top   = empty ? '0 : mem[top_ptr];

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      sp <= '0;
    end else if (push && !full) begin
      mem[wr_ptr] <= din;
      sp      <= sp + DW'(1);
    end else if (pop && !empty) begin
      sp <= sp - DW'(1);
    end else if (wr_top && !empty) begin
      mem[top_ptr] <= din;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst) begin
      assert (!(push && full))  else $error("sat_stack: push on full stack");
      assert (!(pop && empty))  else $error("sat_stack: pop on empty stack");
      assert ($countones({push, pop, wr_top}) <= 1)
        else $error("sat_stack: more than one operation in a cycle");
    end
  end

endmodule
