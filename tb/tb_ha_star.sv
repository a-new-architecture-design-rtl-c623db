// Self-checking testbench for ha_star (signed half adder HA*): all four input
// pairs, checks 2c - s = p + q and each row of the HA* truth table.
module tb_ha_star;
  logic p, q, c, s;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  // Expected {c, s} for {p, q} = 00, 01, 10, 11.
  logic [1:0] expect_cs [4] = '{2'b00, 2'b11, 2'b11, 2'b10};

  ha_star dut (.p(p), .q(q), .c(c), .s(s));

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
      checks += 2;
      if (2 * int'(c) - int'(s) != int'(p) + int'(q)) begin
        failures++;
        $display("FAIL ha_star value p=%0b q=%0b -> c=%0b s=%0b", p, q, c, s);
      end
      if ({c, s} != expect_cs[i]) begin
        failures++;
        $display("FAIL ha_star table p=%0b q=%0b -> c=%0b s=%0b", p, q, c, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
