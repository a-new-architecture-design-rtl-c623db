// Self-checking testbench for nr4sd_sig_gen, both variants, all four stored
// bit pairs. Checks that the selects are one-hot (or all zero for digit 0)
// and that they name the digit -2 n_hi + n_lo (NR4SD-) or 2 n_hi - n_lo
// (NR4SD+).
module tb_nr4sd_sig_gen;
  import nr4sd_pkg::*;
  logic       n_hi, n_lo;
  nr4sd_sel_t sm, sp;
  logic       clk = 1'b0;
  int checks = 0, failures = 0;

  nr4sd_sig_gen #(.VARIANT(NR4SD_MINUS)) dut_m (.n_hi(n_hi), .n_lo(n_lo), .sel(sm));
  nr4sd_sig_gen #(.VARIANT(NR4SD_PLUS))  dut_p (.n_hi(n_hi), .n_lo(n_lo), .sel(sp));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int wm, wp, gm, gp;
    for (int i = 0; i < 4; i++) begin
      {n_hi, n_lo} = 2'(i);
      @(posedge clk);
      wm = -2 * int'(n_hi) + int'(n_lo);
      wp = 2 * int'(n_hi) - int'(n_lo);
      gm = int'(sm.one_p) - int'(sm.one_m) - 2 * int'(sm.two);
      gp = int'(sp.one_p) - int'(sp.one_m) + 2 * int'(sp.two);
      checks += 4;
      if (gm != wm) begin
        failures++;
        $display("FAIL NR4SD- %02b: selects %03b, expected digit %0d", i[1:0], sm, wm);
      end
      if (gp != wp) begin
        failures++;
        $display("FAIL NR4SD+ %02b: selects %03b, expected digit %0d", i[1:0], sp, wp);
      end
      if ($countones(sm) > 1) begin
        failures++;
        $display("FAIL NR4SD- %02b: selects not one-hot", i[1:0]);
      end
      if ($countones(sp) > 1) begin
        failures++;
        $display("FAIL NR4SD+ %02b: selects not one-hot", i[1:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
