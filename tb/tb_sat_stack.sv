// tb_sat_stack: checks the backtracking stack against a reference queue.
//
// Random pushes, pops and top rewrites (never on a full or empty stack)
// are applied; after each operation top, depth, empty and full must match
// a reference kept in a queue. The stack is filled to its depth once, and
// clear must empty it.
module tb_sat_stack;
  localparam int unsigned W     = 40;
  localparam int unsigned DEPTH = 8;
  localparam int unsigned DW    = $clog2(DEPTH + 1);

  logic          clk = 1'b0;
  logic          rst, clear, push, pop, wr_top;
  logic [W-1:0]  din, top;
  logic          empty, full;
  logic [DW-1:0] depth;

  sat_stack #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [W-1:0] q[$];

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(string what);
    checks++;
    if (int'(depth) != q.size() || empty != (q.size() == 0) ||
        full != (q.size() == DEPTH) || (q.size() > 0 && top !== q[$])) begin
      failures++;
      $display("FAIL after %s: depth %0d (exp %0d) top %h (exp %h) empty %b full %b",
               what, depth, q.size(), top, (q.size() > 0) ? q[$] : '0, empty, full);
    end
  endtask

  task automatic op(int kind);
    @(negedge clk);
    din = {$urandom, $urandom};
    case (kind)
      0: begin push = 1'b1;   q.push_back(din); end
      1: begin pop = 1'b1;    void'(q.pop_back()); end
      2: begin wr_top = 1'b1; q[$] = din; end
      default: clear = 1'b1;
    endcase
    @(negedge clk);
    push = 1'b0; pop = 1'b0; wr_top = 1'b0; clear = 1'b0;
    if (kind > 2) q.delete();
    compare($sformatf("op %0d", kind));
  endtask

  initial begin
    rst = 1'b1; clear = 1'b0; push = 1'b0; pop = 1'b0; wr_top = 1'b0; din = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    compare("reset");
    for (int i = 0; i < DEPTH; i++) op(0);
    for (int i = 0; i < DEPTH; i++) op(1);
    for (int k = 0; k < 3000; k++) begin
      int kind;
      kind = $urandom_range(9);
      if (kind < 4)      kind = (q.size() < DEPTH) ? 0 : 1;
      else if (kind < 7) kind = (q.size() > 0) ? 1 : 0;
      else if (kind < 9) kind = (q.size() > 0) ? 2 : 0;
      else               kind = ($urandom_range(9) == 0) ? 3 : 0;
      if (kind == 0 && q.size() == DEPTH) kind = 1;
      op(kind);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
