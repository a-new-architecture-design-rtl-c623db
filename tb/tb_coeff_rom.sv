// Self-checking testbench for coeff_rom with its default contents
// (-128, -102, +89, +127) in both variants. Checks that each word read is the
// reference encoding of its coefficient and sums back to it, that the word
// appears one clock edge after the read (not before), and that q holds while
// cen_n is high.
module tb_coeff_rom;
  import nr4sd_pkg::*;
  import nr4sd_ref_pkg::*;
  localparam int N = 8;
  logic       clk = 1'b0;
  logic       cen_n;
  logic [1:0] addr;
  logic [N:0] q_m, q_p;
  int checks = 0, failures = 0;
  int coeff [4] = '{-128, -102, 89, 127};

  coeff_rom dut_m (.clk(clk), .cen_n(cen_n), .addr(addr), .q(q_m));
  coeff_rom #(.VARIANT(NR4SD_PLUS)) dut_p (.clk(clk), .cen_n(cen_n), .addr(addr), .q(q_p));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_word(input int i);
    checks += 4;
    if (q_m != encode(64'(coeff[i]), N, NR4SD_MINUS)[N:0]) begin
      failures++;
      $display("FAIL NR4SD- word %0d = %b", i, q_m);
    end
    if (q_p != encode(64'(coeff[i]), N, NR4SD_PLUS)[N:0]) begin
      failures++;
      $display("FAIL NR4SD+ word %0d = %b", i, q_p);
    end
    if (value_of(65'(q_m), N, NR4SD_MINUS) != longint'(coeff[i])) begin
      failures++;
      $display("FAIL NR4SD- word %0d value %0d", i, value_of(65'(q_m), N, NR4SD_MINUS));
    end
    if (value_of(65'(q_p), N, NR4SD_PLUS) != longint'(coeff[i])) begin
      failures++;
      $display("FAIL NR4SD+ word %0d value %0d", i, value_of(65'(q_p), N, NR4SD_PLUS));
    end
  endtask

  initial begin
    cen_n = 1'b0;
    addr  = 2'd3;
    @(posedge clk);
    #1;
    expect_word(3);
    for (int i = 0; i < 4; i++) begin
      @(negedge clk);
      addr = 2'(i);
      // Before the edge the previous word must still be there.
      checks++;
      if (q_m != encode(64'(coeff[(i + 3) % 4]), N, NR4SD_MINUS)[N:0]) begin
        failures++;
        $display("FAIL word %0d appeared before the clock edge", i);
      end
      @(posedge clk);
      #1;
      expect_word(i);
    end
    // Disabled: the output holds word 3 whatever the address.
    @(negedge clk);
    cen_n = 1'b1;
    for (int i = 0; i < 3; i++) begin
      addr = 2'(i);
      @(posedge clk);
      #1;
      expect_word(3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
