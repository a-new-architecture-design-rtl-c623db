// Full-size testbench for nr4sd_premult_top at its default parameters
// (8-bit operands, NR4SD-, ROM with -128, -102, +89, +127). Reads every ROM
// word through the ROM port and multiplies it by every 8-bit value of A,
// checking P = A * B; then checks that the product holds its coefficient
// while cen_n is high and the address changes, and that a new word appears
// only after the clock edge of its read.
module tb_nr4sd_premult_top_full;
  logic        clk = 1'b0;
  logic        cen_n;
  logic [1:0]  addr;
  logic [7:0]  a;
  logic [15:0] p;
  int checks = 0, failures = 0;
  int coeff [4] = '{-128, -102, 89, 127};

  nr4sd_premult_top dut (.clk(clk), .cen_n(cen_n), .addr(addr), .a(a), .p(p));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_p(input string what, input int want);
    checks++;
    if (int'($signed(p)) != want) begin
      failures++;
      $display("FAIL %s: a=%0d product %0d, expected %0d", what, $signed(a), $signed(p), want);
    end
  endtask

  initial begin
    cen_n = 1'b0;
    addr  = 2'd0;
    a     = 8'd1;
    @(posedge clk);
    #1;
    check_p("first read", coeff[0]);
    for (int w = 0; w < 4; w++) begin
      @(negedge clk);
      addr = 2'(w);
      a    = 8'd1;
      #1;
      // Until the edge the previously read word stays.
      check_p("before edge", coeff[(w == 0) ? 0 : w - 1]);
      @(posedge clk);
      #1;
      for (int ai = -128; ai < 128; ai++) begin
        a = 8'(ai);
        #1;
        check_p("product", ai * coeff[w]);
      end
    end
    @(negedge clk);
    cen_n = 1'b1;
    for (int w = 0; w < 4; w++) begin
      addr = 2'(w);
      a    = 8'(w * 41 - 100);
      @(posedge clk);
      #1;
      check_p("hold", int'($signed(a)) * coeff[3]);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
