// Self-checking testbench for csa_tree: random operands for tree sizes of 2,
// 3, 5 (the size the 8-bit multiplier uses) and 9 operands, plus all-ones
// operands. Checks C + S = sum of operands modulo 2^WIDTH.
module tb_csa_tree;
  localparam int W = 16;
  logic [W-1:0] o2 [2], o3 [3], o5 [5], o9 [9];
  logic [W-1:0] c2, s2, c3, s3, c5, s5, c9, s9;
  logic         clk = 1'b0;
  int checks = 0, failures = 0;

  csa_tree #(.NUM_OPS(2), .WIDTH(W)) dut2 (.ops(o2), .c(c2), .s(s2));
  csa_tree #(.NUM_OPS(3), .WIDTH(W)) dut3 (.ops(o3), .c(c3), .s(s3));
  csa_tree #(.NUM_OPS(5), .WIDTH(W)) dut5 (.ops(o5), .c(c5), .s(s5));
  csa_tree #(.NUM_OPS(9), .WIDTH(W)) dut9 (.ops(o9), .c(c9), .s(s9));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string name, input logic [W-1:0] c, input logic [W-1:0] s,
                       input logic [W-1:0] want);
    checks++;
    if (W'(c + s) != want) begin
      failures++;
      $display("FAIL %s: C+S=%h expected %h", name, W'(c + s), want);
    end
  endtask

  initial begin
    logic [W-1:0] t2, t3, t5, t9;
    for (int it = 0; it < 2000; it++) begin
      t2 = '0; t3 = '0; t5 = '0; t9 = '0;
      for (int i = 0; i < 9; i++) begin
        o9[i] = (it == 0) ? '1 : W'($urandom);
        t9 += o9[i];
        if (i < 5) begin o5[i] = o9[i]; t5 += o9[i]; end
        if (i < 3) begin o3[i] = o9[i]; t3 += o9[i]; end
        if (i < 2) begin o2[i] = o9[i]; t2 += o9[i]; end
      end
      @(posedge clk);
      check("2 ops", c2, s2, t2);
      check("3 ops", c3, s3, t3);
      check("5 ops", c5, s5, t5);
      check("9 ops", c9, s9, t9);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
