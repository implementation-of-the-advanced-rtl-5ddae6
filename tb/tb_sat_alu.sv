// tb_sat_alu: checks the ALU against a literal-by-literal reference.
//
// Random clause rows, columns, assignments and active-row masks are
// applied. The reference walks the literals one at a time: a clause is
// satisfied when some literal is true under an assigned variable; the free
// literals are counted and the lowest one, with the value that makes it
// true, is found; column occurrences are counted over active rows only;
// the lowest set bit of a vector is searched from bit 0 upward.
module tb_sat_alu;
  localparam int unsigned N  = 12;
  localparam int unsigned M  = 20;
  localparam int unsigned CW = $clog2(N);
  localparam int unsigned NW = $clog2(N + 1);
  localparam int unsigned MW = $clog2(M + 1);

  logic [N-1:0]  assigned, values, row_ones, row_zeros, row_lits, vec;
  logic          row_sat, row_free_val, vec_any;
  logic [NW-1:0] row_nfree;
  logic [CW-1:0] row_free_idx, vec_ffs;
  logic [M-1:0]  col_ones, col_zeros, active_rows, col_sat1, col_sat0;
  logic [MW-1:0] col_npos, col_nneg;

  sat_alu #(.N(N), .M(M)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    for (int t = 0; t < 5000; t++) begin
      logic [N-1:0] lits, pol;
      logic [M-1:0] clits, cpol;
      bit           e_sat, e_any, e_val;
      int           e_nfree, e_idx, e_pos, e_neg, e_ffs;
      // sparse rows now and then, so that 0 and 1 free literals occur
      lits = N'($urandom);
      if (t % 3 == 0) lits = lits & N'($urandom) & N'($urandom);
      pol       = N'($urandom);
      row_ones  = lits & pol;
      row_zeros = lits & ~pol;
      assigned  = N'($urandom) | ((t % 4 == 0) ? lits : '0);
      values    = N'($urandom);
      clits     = M'($urandom);
      cpol      = M'($urandom);
      col_ones  = clits & cpol;
      col_zeros = clits & ~cpol;
      active_rows = M'($urandom);
      vec = (t % 5 == 0) ? '0 : N'($urandom) & N'($urandom);
      #1;
      e_sat = 0; e_nfree = 0; e_idx = -1; e_val = 0;
      for (int j = 0; j < N; j++) begin
        if (lits[j]) begin
          // a negative literal (~x) is true when x = 0
          if (assigned[j] && (pol[j] ? !values[j] : values[j])) e_sat = 1;
          if (!assigned[j]) begin
            e_nfree++;
            if (e_idx < 0) begin e_idx = j; e_val = !pol[j]; end
          end
        end
      end
      e_pos = 0; e_neg = 0;
      for (int i = 0; i < M; i++)
        if (clits[i] && active_rows[i]) begin
          if (cpol[i]) e_neg++; else e_pos++;
        end
      e_ffs = 0; e_any = 0;
      for (int j = 0; j < N; j++)
        if (vec[j] && !e_any) begin e_ffs = j; e_any = 1; end
      expect_eq("row_sat", row_sat, e_sat);
      expect_eq("row_lits", row_lits, lits);
      expect_eq("row_nfree", row_nfree, e_nfree);
      if (e_nfree > 0) begin
        expect_eq("row_free_idx", row_free_idx, e_idx);
        expect_eq("row_free_val", row_free_val, e_val);
      end
      expect_eq("col_npos", col_npos, e_pos);
      expect_eq("col_nneg", col_nneg, e_neg);
      expect_eq("col_sat1", col_sat1, clits & ~cpol);
      expect_eq("col_sat0", col_sat0, clits & cpol);
      expect_eq("vec_any", vec_any, e_any);
      if (e_any) expect_eq("vec_ffs", vec_ffs, e_ffs);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
