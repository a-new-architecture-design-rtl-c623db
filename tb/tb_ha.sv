// Self-checking testbench for ha: all four input pairs, checks 2c + s = p + q
// and the carry/sum bits against the half-adder truth table.
module tb_ha;
  logic p, q, c, s;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  ha dut (.p(p), .q(q), .c(c), .s(s));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {p, q} = 2'(i);
      @(posedge clk);
      checks++;
      if (2 * int'(c) + int'(s) != int'(p) + int'(q) || c != (p && q)) begin
        failures++;
        $display("FAIL ha p=%0b q=%0b -> c=%0b s=%0b", p, q, c, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
