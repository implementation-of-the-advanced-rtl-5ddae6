// tb_sat_registers: checks the search-state registers against a model.
//
// Random mixes of restore, assignment, row deletion, row addition and
// conflict-clause loads are applied, often several in one cycle, and the
// registers are compared after every clock with a reference that applies
// them in the documented order (restore first, then the assignment and the
// row deletion). Also checked: init clears the search state but keeps the
// dimensions, row deletion never marks rows beyond num_rows, num_rows
// stops at M, and matrix_empty is set exactly when every existing row is
// deleted.
module tb_sat_registers;
  localparam int unsigned N  = 8;
  localparam int unsigned M  = 12;
  localparam int unsigned CW = $clog2(N);
  localparam int unsigned NW = $clog2(N + 1);
  localparam int unsigned MW = $clog2(M + 1);
  localparam int unsigned SW = M + 3 * N;

  logic          clk = 1'b0;
  logic          rst, dims_we, init, restore, assign_en, assign_val, assign_dec;
  logic          del_rows_en, add_row, clause_we, matrix_empty;
  logic [MW-1:0] dims_rows, num_rows;
  logic [NW-1:0] dims_cols, num_cols;
  logic [SW-1:0] restore_state, state;
  logic [CW-1:0] assign_var;
  logic [M-1:0]  del_rows_mask, rows_del, valid_rows, active_rows;
  logic [N-1:0]  clause_in, assigned, values, dec_mask, conflict;

  sat_registers #(.N(N), .M(M)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [M-1:0] r_rows;
  logic [N-1:0] r_asg, r_val, r_dec, r_conf;
  int           r_nrows, r_ncols;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    logic [M-1:0] valid;
    for (int i = 0; i < M; i++) valid[i] = (i < r_nrows);
    checks++;
    if (rows_del !== r_rows || assigned !== r_asg || values !== r_val ||
        dec_mask !== r_dec || conflict !== r_conf || int'(num_rows) != r_nrows ||
        int'(num_cols) != r_ncols || valid_rows !== valid ||
        active_rows !== (valid & ~r_rows) ||
        matrix_empty != ((valid & ~r_rows) == '0) ||
        state !== {r_rows, r_asg, r_val, r_dec}) begin
      failures++;
      $display("FAIL: rows %h/%h asg %h/%h val %h/%h dec %h/%h nrows %0d/%0d",
               rows_del, r_rows, assigned, r_asg, values, r_val, dec_mask, r_dec,
               num_rows, r_nrows);
    end
  endtask

  task automatic idle_inputs();
    dims_we = 0; init = 0; restore = 0; assign_en = 0; del_rows_en = 0;
    add_row = 0; clause_we = 0;
  endtask

  initial begin
    rst = 1'b1;
    idle_inputs();
    dims_rows = '0; dims_cols = '0; restore_state = '0; assign_var = '0;
    assign_val = 0; assign_dec = 0; del_rows_mask = '0; clause_in = '0;
    r_rows = '0; r_asg = '0; r_val = '0; r_dec = '0; r_conf = '0; r_nrows = 0; r_ncols = 0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    compare();
    @(negedge clk);
    dims_we = 1; dims_rows = MW'(7); dims_cols = NW'(6);
    @(negedge clk);
    idle_inputs();
    r_nrows = 7; r_ncols = 6;
    compare();
    for (int t = 0; t < 4000; t++) begin
      restore       = ($urandom_range(7) == 0);
      restore_state = {$urandom, $urandom};
      assign_en     = $urandom_range(1);
      assign_var    = CW'($urandom);
      assign_val    = $urandom_range(1);
      assign_dec    = $urandom_range(1);
      del_rows_en   = ($urandom_range(3) == 0);
      del_rows_mask = M'($urandom) & M'($urandom);
      add_row       = ($urandom_range(15) == 0);
      clause_we     = ($urandom_range(7) == 0);
      clause_in     = N'($urandom);
      init          = ($urandom_range(63) == 0);
      if (init) begin
        r_rows = '0; r_asg = '0; r_val = '0; r_dec = '0; r_conf = '0;
      end else begin
        logic [M-1:0] valid;
        for (int i = 0; i < M; i++) valid[i] = (i < r_nrows);
        if (restore) {r_rows, r_asg, r_val, r_dec} = restore_state;
        if (assign_en) begin
          r_asg[assign_var] = 1'b1;
          r_val[assign_var] = assign_val;
          r_dec[assign_var] = assign_dec;
        end
        if (del_rows_en) r_rows = r_rows | (del_rows_mask & valid);
        if (clause_we) r_conf = clause_in;
      end
      if (add_row && r_nrows < M) r_nrows++;
      @(negedge clk);
      idle_inputs();
      compare();
    end
    checks++;
    if (r_nrows != M) begin
      failures++;
      $display("FAIL: row count never reached its limit in the test");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
