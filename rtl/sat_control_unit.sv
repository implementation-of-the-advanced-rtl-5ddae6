// sat_control_unit: the finite state machine that runs the search.
//
// It carries out a Davis-Putnam style search with nonchronological
// backtracking and dynamic clause addition over the ternary matrix:
//
//   1. Unit clause rule. Every existing, undeleted row is read and
//      evaluated: a satisfied row is deleted; a row with no unassigned
//      variable is a conflict; a row with one unassigned variable implies
//      it. For an implication of x_j by clause c the implication matrix
//      word IM[j] = c^B | IM[k] | ... | IM[r] is built by reading the words
//      of the other variables of c one by one, then x_j is assigned and
//      the column of x_j is read to delete the rows it satisfies. Passes
//      repeat until one changes nothing.
//   2. If every row is deleted, the assignment is a solution (SAT).
//   3. Pure literal rule, combined with the decision heuristic. Every
//      unassigned column is read and its positive and negative occurrences
//      in the undeleted rows are counted. A variable occurring with one
//      polarity only is set to satisfy it. While doing so the column with
//      the most occurrences is remembered; if no pure literal was found it
//      becomes the next decision, set to 1 when most of its literals are
//      positive and to 0 otherwise (maximum-occurrence-in-clauses); ties
//      in count go to the lowest column and a tie in polarity gives 1. If
//      a pure literal was found the search returns to step 1. With
//      PURE_LITERAL_RULE = 0 the pass only chooses the decision, which is
//      the variant of the algorithm used in the worked example of the
//      nonchronological-backtracking decision tree.
//   4. Decision: the search registers are pushed on the stack together
//      with the variable, IM[var] is set to the variable alone and the
//      variable is marked in dec_mask; then back to step 1.
//   5. Conflict: the conflict-induced clause is the OR of the IM words of
//      the variables of the conflicting row, masked with dec_mask (the
//      decisions whose other value is still untried). If it is empty no
//      backtrack is possible and the formula is unsatisfiable. If the
//      decision on top of the stack has an untried value, the registers are
//      restored from the stack and that value is taken. If both values of
//      the top decision were tried, the clause is appended to the matrix
//      (when a row is free) and the stack is popped down to the most recent
//      decision that appears in the clause, whose value is then inverted.
//      An inverted decision is no longer a decision: its IM word becomes
//      the conflict-induced clause without itself.
//
// Interface: pulse start for one cycle; done rises when the search ends
// and stays high, with result, until the next start. The matrix, IM,
// stack and registers are separate blocks driven through the ports below.
// Memory reads are synchronous (data one cycle after the address). Costs:
// a row visit takes 2 cycles; an implication 3 more plus 2 per other
// literal of the clause; a conflict analysis 3 plus 2 per literal; a
// decision 3; an inversion 2; a backtrack after both values were tried 4
// plus 1 per level popped; the pure literal pass 2 per unassigned and 1
// per assigned column.
//
// The order of the flow (unit rule, empty test, pure literal rule,
// conflict handling, decision) and the rule that clause construction and
// addition happen when both values of a decision have failed follow the
// source algorithm. Testing for a conflict straight after the unit rule
// (a pure literal cannot remove one), merging the pure literal pass with
// the decision heuristic, the IM word given to an inverted decision and
// the sequential one-word-per-cycle IM walk are this design's choices.
// The tie rules of the heuristic are read from the worked example, where
// x10 (two positive, two negative occurrences, tied with x11) is first
// set to 1.
module sat_control_unit
  import sat_pkg::*;
#(
  parameter int unsigned N  = sat_pkg::N_VARS_DEFAULT,
  parameter int unsigned M  = sat_pkg::M_CLAUSES_DEFAULT,
  parameter bit          PURE_LITERAL_RULE = 1'b1,
  parameter int unsigned CW = (N > 1) ? $clog2(N) : 1,
  parameter int unsigned RW = (M > 1) ? $clog2(M) : 1,
  parameter int unsigned NW = $clog2(N + 1),
  parameter int unsigned MW = $clog2(M + 1),
  parameter int unsigned SW = M + 3 * N,
  parameter int unsigned EW = SW + CW + 2
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  output logic          busy,
  output logic          done,
  output result_e       result,
  output stats_t        stats,
  // registers block
  input  logic [SW-1:0] reg_state,
  input  logic [M-1:0]  reg_rows_del,
  input  logic [N-1:0]  reg_assigned,
  input  logic [N-1:0]  reg_values,
  input  logic [N-1:0]  reg_dec_mask,
  input  logic [MW-1:0] reg_num_rows,
  input  logic [NW-1:0] reg_num_cols,
  input  logic          reg_matrix_empty,
  input  logic [N-1:0]  reg_conflict,
  output logic          reg_init,
  output logic          reg_restore,
  output logic [SW-1:0] reg_restore_state,
  output logic          reg_assign_en,
  output logic [CW-1:0] reg_assign_var,
  output logic          reg_assign_val,
  output logic          reg_assign_dec,
  output logic          reg_del_rows_en,
  output logic [M-1:0]  reg_del_rows_mask,
  output logic          reg_add_row,
  output logic          reg_clause_we,
  output logic [N-1:0]  reg_clause_in,
  // data matrices
  output logic          mat_rd_row_en,
  output logic [RW-1:0] mat_rd_row,
  output logic          mat_rd_col_en,
  output logic [CW-1:0] mat_rd_col,
  output logic          mat_wr_en,
  output logic [RW-1:0] mat_wr_row,
  output logic [N-1:0]  mat_wr_ones,
  output logic [N-1:0]  mat_wr_zeros,
  // ALU
  input  logic          alu_row_sat,
  input  logic [N-1:0]  alu_row_lits,
  input  logic [NW-1:0] alu_row_nfree,
  input  logic [CW-1:0] alu_row_free_idx,
  input  logic          alu_row_free_val,
  input  logic [MW-1:0] alu_col_npos,
  input  logic [MW-1:0] alu_col_nneg,
  input  logic [M-1:0]  alu_col_sat1,
  input  logic [M-1:0]  alu_col_sat0,
  output logic [N-1:0]  alu_vec,
  input  logic [CW-1:0] alu_vec_ffs,
  input  logic          alu_vec_any,
  // implication matrix
  output logic          im_wr_en,
  output logic [CW-1:0] im_wr_addr,
  output logic [N-1:0]  im_wr_data,
  output logic          im_rd_en,
  output logic [CW-1:0] im_rd_addr,
  input  logic [N-1:0]  im_rd_data,
  // stack
  output logic          stk_clear,
  output logic          stk_push,
  output logic          stk_pop,
  output logic          stk_wr_top,
  output logic [EW-1:0] stk_din,
  input  logic [EW-1:0] stk_top,
  input  logic          stk_empty
);

  typedef enum logic [4:0] {
    S_IDLE, S_U_START, S_U_ISSUE, S_U_EVAL,
    S_G_ISSUE, S_G_ACC,
    S_ASSIGN, S_ASSIGN_DEL,
    S_P_START, S_P_ISSUE, S_P_EVAL,
    S_DECIDE,
    S_C_START, S_C_DECIDE, S_C_ADD, S_BJ, S_FLIP,
    S_DONE
  } state_e;

  // Where to go once an assignment (and its row deletion) is complete.
  typedef enum logic { RET_UNIT_NEXT, RET_UNIT_START } ret_e;

  // Stack entry: snapshot of the registers, decision variable, its first
  // value, and whether its other value has been taken.
  typedef struct packed {
    logic [SW-1:0] snap;
    logic [CW-1:0] dvar;
    logic          dval;
    logic          tried;
  } entry_t;

  state_e        st;
  ret_e          ret;
  logic [RW:0]   ri;          // row pointer (one bit wider to reach M)
  logic [CW:0]   cj;          // column pointer
  logic          changed;     // unit pass changed something
  logic          applied;     // pure pass assigned something
  logic [N-1:0]  pending;     // variables whose IM words are still to read
  logic [N-1:0]  acc;         // OR of the IM words read so far
  logic          gather_conf; // the IM walk serves a conflict, not an implication
  logic [N-1:0]  cur_lits;    // variables of the conflicting row
  logic [CW-1:0] asg_var;
  logic          asg_val;
  logic          asg_dec;
  logic          best_found;
  logic [CW-1:0] best_var;
  logic          best_val;
  logic [MW:0]   best_cnt;
  logic [31:0]   popped;      // levels popped in the current backtrack
  entry_t        top_e;

  assign top_e = entry_t'(stk_top);
  assign busy  = (st != S_IDLE) && (st != S_DONE);
  assign done  = (st == S_DONE);

  function automatic logic [N-1:0] onehot(input logic [CW-1:0] v);
    onehot    = '0;
    onehot[v] = 1'b1;
  endfunction

  // ---------------------------------------------------------------- outputs
  always_comb begin
    reg_init          = 1'b0;
    reg_restore       = 1'b0;
    reg_restore_state = top_e.snap;
    reg_assign_en     = 1'b0;
    reg_assign_var    = asg_var;
    reg_assign_val    = asg_val;
    reg_assign_dec    = asg_dec;
    reg_del_rows_en   = 1'b0;
    reg_del_rows_mask = '0;
    reg_add_row       = 1'b0;
    reg_clause_we     = 1'b0;
    reg_clause_in     = acc & reg_dec_mask;
    mat_rd_row_en     = 1'b0;
    mat_rd_row        = ri[RW-1:0];
    mat_rd_col_en     = 1'b0;
    mat_rd_col        = cj[CW-1:0];
    mat_wr_en         = 1'b0;
    mat_wr_row        = reg_num_rows[RW-1:0];
    mat_wr_ones       = reg_conflict & reg_values;
    mat_wr_zeros      = reg_conflict & ~reg_values;
    alu_vec           = pending;
    im_wr_en          = 1'b0;
    im_wr_addr        = asg_var;
    im_wr_data        = acc;
    im_rd_en          = 1'b0;
    im_rd_addr        = alu_vec_ffs;
    stk_clear         = 1'b0;
    stk_push          = 1'b0;
    stk_pop           = 1'b0;
    stk_wr_top        = 1'b0;
    stk_din           = EW'({top_e.snap, top_e.dvar, top_e.dval, 1'b1});

    unique case (st)
      S_IDLE, S_DONE: begin
        if (start) begin
          reg_init  = 1'b1;
          stk_clear = 1'b1;
        end
      end
      S_U_ISSUE: begin
        if (ri < (RW+1)'(reg_num_rows) && !reg_rows_del[ri[RW-1:0]])
          mat_rd_row_en = 1'b1;
      end
      S_U_EVAL: begin
        if (alu_row_sat) begin
          reg_del_rows_en   = 1'b1;
          reg_del_rows_mask = M'(1) << ri[RW-1:0];
        end
      end
      S_G_ISSUE: begin
        if (alu_vec_any) begin
          im_rd_en = 1'b1;
        end else if (!gather_conf) begin
          im_wr_en = 1'b1;   // IM[j] = c^B | IM[k] | ... | IM[r]
        end else begin
          reg_clause_we = 1'b1;
        end
      end
      S_ASSIGN: begin
        reg_assign_en = 1'b1;
        mat_rd_col_en = 1'b1;
        mat_rd_col    = asg_var;
      end
      S_ASSIGN_DEL: begin
        reg_del_rows_en   = 1'b1;
        reg_del_rows_mask = asg_val ? alu_col_sat1 : alu_col_sat0;
      end
      S_P_ISSUE: begin
        if (cj < (CW+1)'(reg_num_cols) && !reg_assigned[cj[CW-1:0]])
          mat_rd_col_en = 1'b1;
      end
      S_P_EVAL: begin
        // A pure literal is assigned at once: its column is already read.
        if (PURE_LITERAL_RULE && ((alu_col_npos != '0) != (alu_col_nneg != '0))) begin
          reg_assign_en     = 1'b1;
          reg_assign_var    = cj[CW-1:0];
          reg_assign_val    = (alu_col_npos != '0);
          reg_assign_dec    = 1'b0;
          reg_del_rows_en   = 1'b1;
          reg_del_rows_mask = (alu_col_npos != '0) ? alu_col_sat1 : alu_col_sat0;
          im_wr_en          = 1'b1;
          im_wr_addr        = cj[CW-1:0];
          im_wr_data        = '0;
        end
      end
      S_DECIDE: begin
        stk_push   = 1'b1;
        stk_din    = EW'({reg_state, best_var, best_val, 1'b0});
        im_wr_en   = 1'b1;
        im_wr_addr = best_var;
        im_wr_data = onehot(best_var);
      end
      S_C_ADD: begin
        if (reg_num_rows < MW'(M)) begin
          mat_wr_en   = 1'b1;
          reg_add_row = 1'b1;
        end
      end
      S_BJ: begin
        if (!reg_conflict[top_e.dvar]) stk_pop = 1'b1;
      end
      S_FLIP: begin
        // Restore the registers saved at the decision, then take the other
        // value, implied by the conflict-induced clause.
        reg_restore    = 1'b1;
        reg_assign_en  = 1'b1;
        reg_assign_var = top_e.dvar;
        reg_assign_val = ~top_e.dval;
        reg_assign_dec = 1'b0;
        stk_wr_top     = 1'b1;
        im_wr_en       = 1'b1;
        im_wr_addr     = top_e.dvar;
        im_wr_data     = reg_conflict & ~onehot(top_e.dvar);
        mat_rd_col_en  = 1'b1;
        mat_rd_col     = top_e.dvar;
      end
      default: ;
    endcase
  end

  // ------------------------------------------------------------ next state
  always_ff @(posedge clk) begin
    if (rst) begin
      st          <= S_IDLE;
      result      <= RES_NONE;
      ret         <= RET_UNIT_START;
      ri          <= '0;
      cj          <= '0;
      changed     <= 1'b0;
      applied     <= 1'b0;
      pending     <= '0;
      acc         <= '0;
      gather_conf <= 1'b0;
      cur_lits    <= '0;
      asg_var     <= '0;
      asg_val     <= 1'b0;
      asg_dec     <= 1'b0;
      best_found  <= 1'b0;
      best_var    <= '0;
      best_val    <= 1'b0;
      best_cnt    <= '0;
      popped      <= '0;
      stats       <= '0;
    end else begin
      if (busy) stats.cycles <= stats.cycles + 32'd1;
      unique case (st)
        S_IDLE, S_DONE: begin
          if (start) begin
            st     <= S_U_START;
            result <= RES_NONE;
            stats  <= '0;
          end
        end

        // ---------------------------------------------- unit clause rule
        S_U_START: begin
          ri      <= '0;
          changed <= 1'b0;
          st      <= S_U_ISSUE;
        end
        S_U_ISSUE: begin
          if (ri >= (RW+1)'(reg_num_rows)) begin
            if (reg_matrix_empty) begin
              result <= RES_SAT;
              st     <= S_DONE;
            end else if (changed) begin
              st <= S_U_START;
            end else begin
              st <= S_P_START;
            end
          end else if (reg_rows_del[ri[RW-1:0]]) begin
            ri <= ri + 1'b1;
          end else begin
            st <= S_U_EVAL;
          end
        end
        S_U_EVAL: begin
          if (alu_row_sat) begin
            changed <= 1'b1;
            ri      <= ri + 1'b1;
            st      <= S_U_ISSUE;
          end else if (alu_row_nfree == '0) begin
            cur_lits <= alu_row_lits;
            st       <= S_C_START;
          end else if (alu_row_nfree == NW'(1)) begin
            asg_var     <= alu_row_free_idx;
            asg_val     <= alu_row_free_val;
            asg_dec     <= 1'b0;
            ret         <= RET_UNIT_NEXT;
            acc         <= alu_row_lits;
            pending     <= alu_row_lits & ~onehot(alu_row_free_idx);
            gather_conf <= 1'b0;
            stats.implications <= stats.implications + 32'd1;
            st          <= S_G_ISSUE;
          end else begin
            ri <= ri + 1'b1;
            st <= S_U_ISSUE;
          end
        end

        // ------------------------------------ walk over IM words of a clause
        S_G_ISSUE: begin
          if (alu_vec_any) begin
            pending[alu_vec_ffs] <= 1'b0;
            st <= S_G_ACC;
          end else if (!gather_conf) begin
            st <= S_ASSIGN;
          end else begin
            st <= S_C_DECIDE;
          end
        end
        S_G_ACC: begin
          acc <= acc | im_rd_data;
          st  <= S_G_ISSUE;
        end

        // ------------------------------------------------------ assignment
        S_ASSIGN: st <= S_ASSIGN_DEL;
        S_ASSIGN_DEL: begin
          unique case (ret)
            RET_UNIT_NEXT: begin
              changed <= 1'b1;
              ri      <= ri + 1'b1;
              st      <= S_U_ISSUE;
            end
            default: st <= S_U_START;
          endcase
        end

        // ---------------------------- pure literal rule and decision choice
        S_P_START: begin
          cj         <= '0;
          applied    <= 1'b0;
          best_found <= 1'b0;
          best_cnt   <= '0;
          st         <= S_P_ISSUE;
        end
        S_P_ISSUE: begin
          if (cj >= (CW+1)'(reg_num_cols)) begin
            if (applied)         st <= S_U_START;
            else if (best_found) st <= S_DECIDE;
            else                 st <= S_U_START;
          end else if (reg_assigned[cj[CW-1:0]]) begin
            cj <= cj + 1'b1;
          end else begin
            st <= S_P_EVAL;
          end
        end
        S_P_EVAL: begin
          if (PURE_LITERAL_RULE && ((alu_col_npos != '0) != (alu_col_nneg != '0))) begin
            applied <= 1'b1;
            stats.pure_literals <= stats.pure_literals + 32'd1;
          end else if (((alu_col_npos != '0) || (alu_col_nneg != '0)) &&
                       ((MW+1)'(alu_col_npos) + (MW+1)'(alu_col_nneg) > best_cnt)) begin
            best_found <= 1'b1;
            best_var   <= cj[CW-1:0];
            best_val   <= (alu_col_npos >= alu_col_nneg);
            best_cnt   <= (MW+1)'(alu_col_npos) + (MW+1)'(alu_col_nneg);
          end
          cj <= cj + 1'b1;
          st <= S_P_ISSUE;
        end

        // --------------------------------------------------------- decision
        S_DECIDE: begin
          asg_var <= best_var;
          asg_val <= best_val;
          asg_dec <= 1'b1;
          ret     <= RET_UNIT_START;
          stats.decisions <= stats.decisions + 32'd1;
          st      <= S_ASSIGN;
        end

        // --------------------------------------------------------- conflict
        S_C_START: begin
          acc         <= '0;
          pending     <= cur_lits;
          gather_conf <= 1'b1;
          stats.conflicts <= stats.conflicts + 32'd1;
          st          <= S_G_ISSUE;
        end
        S_C_DECIDE: begin
          // reg_conflict now holds the conflict-induced clause.
          popped <= '0;
          if (reg_conflict == '0) begin
            result <= RES_UNSAT;
            st     <= S_DONE;
          end else if (!top_e.tried) begin
            stats.inversions <= stats.inversions + 32'd1;
            st <= S_FLIP;
          end else begin
            st <= S_C_ADD;
          end
        end
        S_C_ADD: begin
          if (reg_num_rows < MW'(M))
            stats.clauses_added   <= stats.clauses_added + 32'd1;
          else
            stats.clauses_dropped <= stats.clauses_dropped + 32'd1;
          st <= S_BJ;
        end
        S_BJ: begin
          if (reg_conflict[top_e.dvar]) begin
            if (popped > 32'd1) begin
              stats.backjumps      <= stats.backjumps + 32'd1;
              stats.levels_skipped <= stats.levels_skipped + popped - 32'd1;
            end
            st <= S_FLIP;
          end else begin
            popped <= popped + 32'd1;
          end
        end
        S_FLIP: begin
          asg_var <= top_e.dvar;
          asg_val <= ~top_e.dval;
          ret     <= RET_UNIT_START;
          st      <= S_ASSIGN_DEL;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------------- checks
  // Every decision in the conflict clause is on the stack, so the
  // backtrack pop never empties it.
  always_ff @(posedge clk)
    if (!rst && st == S_BJ) assert (!stk_empty)
      else $error("sat_control_unit: backtrack emptied the stack");
  // The unit pass leaves every undeleted row with two free variables, so
  // the pure pass always finds a decision candidate when no rule applied.
  always_ff @(posedge clk)
    if (!rst && st == S_P_ISSUE && cj >= (CW+1)'(reg_num_cols))
      assert (applied || best_found)
        else $error("sat_control_unit: no decision candidate");

endmodule
