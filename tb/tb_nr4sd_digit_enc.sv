// Self-checking testbench for nr4sd_digit_enc, both variants, all eight input
// combinations. Checks 2 b_2j+1 + b_2j + c_2j = 4 c_2j+2 + digit, with the
// digit -2 n_hi + n_lo (NR4SD-) or 2 n_hi - n_lo (NR4SD+), and the expected
// digit of each row of the NR4SD- and NR4SD+ encoding tables.
module tb_nr4sd_digit_enc;
  import nr4sd_pkg::*;
  logic b_hi, b_lo, c_in;
  logic m_hi, m_lo, m_c, p_hi, p_lo, p_c;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  // Digit per row {b_2j+1, b_2j, c_2j} = 000 .. 111.
  int minus_digit [8] = '{0, 1, 1, -2, -2, -1, -1, 0};
  int plus_digit  [8] = '{0, 1, 1, 2, 2, -1, -1, 0};

  nr4sd_digit_enc #(.VARIANT(NR4SD_MINUS)) dut_m (
    .b_hi(b_hi), .b_lo(b_lo), .c_in(c_in), .n_hi(m_hi), .n_lo(m_lo), .c_out(m_c));
  nr4sd_digit_enc #(.VARIANT(NR4SD_PLUS)) dut_p (
    .b_hi(b_hi), .b_lo(b_lo), .c_in(c_in), .n_hi(p_hi), .n_lo(p_lo), .c_out(p_c));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v, dm, dp;
    for (int i = 0; i < 8; i++) begin
      {b_hi, b_lo, c_in} = 3'(i);
      @(posedge clk);
      v  = 2 * int'(b_hi) + int'(b_lo) + int'(c_in);
      dm = -2 * int'(m_hi) + int'(m_lo);
      dp = 2 * int'(p_hi) - int'(p_lo);
      checks += 4;
      if (dm != minus_digit[i]) begin
        failures++;
        $display("FAIL NR4SD- row %03b: digit %0d, expected %0d", i[2:0], dm, minus_digit[i]);
      end
      if (4 * int'(m_c) + dm != v) begin
        failures++;
        $display("FAIL NR4SD- row %03b: carry %0b", i[2:0], m_c);
      end
      if (dp != plus_digit[i]) begin
        failures++;
        $display("FAIL NR4SD+ row %03b: digit %0d, expected %0d", i[2:0], dp, plus_digit[i]);
      end
      if (4 * int'(p_c) + dp != v) begin
        failures++;
        $display("FAIL NR4SD+ row %03b: carry %0b", i[2:0], p_c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
