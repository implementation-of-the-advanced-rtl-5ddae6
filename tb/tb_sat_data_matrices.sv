// tb_sat_data_matrices: checks the clause matrix and its transpose.
//
// Random clause rows are written through the row port and mirrored in a
// reference array. Every row is then read back through the row port and
// every column through the column port, and each column word must equal
// the transpose of the reference. Reads must deliver their word exactly
// one cycle after the address (the single-cycle access of the matrix) and
// hold it while the read enable is low. Rows are then rewritten and the
// transpose checked again, so stale column bits are caught.
module tb_sat_data_matrices;
  localparam int unsigned N  = 16;
  localparam int unsigned M  = 24;
  localparam int unsigned RW = $clog2(M);
  localparam int unsigned CW = $clog2(N);

  logic          clk = 1'b0;
  logic          wr_en, rd_row_en, rd_col_en;
  logic [RW-1:0] wr_row, rd_row;
  logic [CW-1:0] rd_col;
  logic [N-1:0]  wr_ones, wr_zeros, row_ones, row_zeros;
  logic [M-1:0]  col_ones, col_zeros;

  sat_data_matrices #(.N(N), .M(M)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [N-1:0] ref_ones [M];
  logic [N-1:0] ref_zeros[M];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_row(int i);
    logic [N-1:0] lits = N'($urandom);
    logic [N-1:0] pol  = N'($urandom);
    @(negedge clk);
    wr_en    = 1'b1;
    wr_row   = RW'(i);
    wr_ones  = lits & pol;
    wr_zeros = lits & ~pol;
    ref_ones[i]  = lits & pol;
    ref_zeros[i] = lits & ~pol;
    @(negedge clk);
    wr_en = 1'b0;
  endtask

  task automatic check_all();
    for (int i = 0; i < M; i++) begin
      @(negedge clk);
      rd_row_en = 1'b1;
      rd_row    = RW'(i);
      @(negedge clk);
      rd_row_en = 1'b0;
      rd_row    = RW'(M - 1 - i);    // must not disturb the held word
      checks++;
      if (row_ones !== ref_ones[i] || row_zeros !== ref_zeros[i]) begin
        failures++;
        $display("FAIL row %0d: %h/%h expected %h/%h", i, row_ones, row_zeros,
                 ref_ones[i], ref_zeros[i]);
      end
      @(negedge clk);
      checks++;
      if (row_ones !== ref_ones[i]) begin
        failures++;
        $display("FAIL row %0d not held", i);
      end
    end
    for (int j = 0; j < N; j++) begin
      logic [M-1:0] eo, ez;
      for (int i = 0; i < M; i++) begin
        eo[i] = ref_ones[i][j];
        ez[i] = ref_zeros[i][j];
      end
      @(negedge clk);
      rd_col_en = 1'b1;
      rd_col    = CW'(j);
      @(negedge clk);
      rd_col_en = 1'b0;
      checks++;
      if (col_ones !== eo || col_zeros !== ez) begin
        failures++;
        $display("FAIL col %0d: %h/%h expected %h/%h", j, col_ones, col_zeros, eo, ez);
      end
    end
  endtask

  initial begin
    wr_en = 1'b0; rd_row_en = 1'b0; rd_col_en = 1'b0;
    wr_row = '0; rd_row = '0; rd_col = '0; wr_ones = '0; wr_zeros = '0;
    for (int i = 0; i < M; i++) write_row(i);
    check_all();
    for (int k = 0; k < 3 * M; k++) write_row($urandom_range(M - 1));
    check_all();
    // Latency: the word appears after exactly one clock edge, not before.
    @(negedge clk);
    rd_row_en = 1'b1;
    rd_row    = RW'(3);
    #1;
    checks++;
    if (row_ones === ref_ones[3] && row_zeros === ref_zeros[3] &&
        (ref_ones[3] != ref_ones[M-1] || ref_zeros[3] != ref_zeros[M-1])) begin
      failures++;
      $display("FAIL row read is not registered");
    end
    @(posedge clk);
    #1;
    checks++;
    if (row_ones !== ref_ones[3] || row_zeros !== ref_zeros[3]) begin
      failures++;
      $display("FAIL row word not present one cycle after the address");
    end
    rd_row_en = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
