// Self-checking testbench for cla_adder at 16 bits (the multiplier's width)
// and 13 bits (a width that is not a whole number of groups): carry-chain
// corner cases and random operands, checked against x + y.
module tb_cla_adder;
  logic [15:0] x16, y16, s16;
  logic [12:0] x13, y13, s13;
  logic        clk = 1'b0;
  int checks = 0, failures = 0;

  cla_adder #(.WIDTH(16)) dut16 (.x(x16), .y(y16), .sum(s16));
  cla_adder #(.WIDTH(13)) dut13 (.x(x13), .y(y13), .sum(s13));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 10000; it++) begin
      case (it)
        0: begin x16 = 16'hFFFF; y16 = 16'h0001; end
        1: begin x16 = 16'h7FFF; y16 = 16'h0001; end
        2: begin x16 = 16'h0F0F; y16 = 16'h00F1; end
        3: begin x16 = 16'hFFFF; y16 = 16'hFFFF; end
        default: begin x16 = 16'($urandom); y16 = 16'($urandom); end
      endcase
      x13 = x16[12:0] ^ 13'(it);
      y13 = y16[15:3];
      @(posedge clk);
      checks += 2;
      if (s16 != 16'(x16 + y16)) begin
        failures++;
        $display("FAIL 16-bit %h + %h = %h", x16, y16, s16);
      end
      if (s13 != 13'(x13 + y13)) begin
        failures++;
        $display("FAIL 13-bit %h + %h = %h", x13, y13, s13);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
