// tb_sat_implication_matrix: checks the implication matrix RAM.
//
// Random words are written to random addresses while a reference array is
// kept; reads on the second port, often in the same cycle as a write,
// must return the reference contents one cycle after the address, and a
// read of the address being written must return the old word.
module tb_sat_implication_matrix;
  localparam int unsigned N  = 32;
  localparam int unsigned CW = $clog2(N);

  logic          clk = 1'b0;
  logic          wr_en, rd_en;
  logic [CW-1:0] wr_addr, rd_addr;
  logic [N-1:0]  wr_data, rd_data;

  sat_implication_matrix #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [N-1:0] ref_mem [N];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] expect_word;
    wr_en = 1'b0; rd_en = 1'b0; wr_addr = '0; rd_addr = '0; wr_data = '0;
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      wr_en = 1'b1; wr_addr = CW'(i); wr_data = $urandom;
      ref_mem[i] = wr_data;
    end
    @(negedge clk);
    wr_en = 1'b0;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      rd_en   = 1'b1;
      rd_addr = CW'($urandom);
      wr_en   = $urandom_range(1);
      wr_addr = ($urandom_range(3) == 0) ? rd_addr : CW'($urandom);
      wr_data = $urandom;
      expect_word = ref_mem[rd_addr];
      if (wr_en) ref_mem[wr_addr] = wr_data;
      @(negedge clk);
      rd_en = 1'b0;
      wr_en = 1'b0;
      checks++;
      if (rd_data !== expect_word) begin
        failures++;
        $display("FAIL read %0d: %h expected %h", rd_addr, rd_data, expect_word);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
