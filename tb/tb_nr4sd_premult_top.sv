// End-to-end testbench for nr4sd_premult_top.
//
// Three systems run side by side:
//   u_def   - the top at its default parameters (8 bits, NR4SD-, the four
//             default coefficients), every multiplicand times every stored
//             coefficient: one complete operation at full size;
//   u_minus - NR4SD- with a 256-word ROM holding every 8-bit value;
//   u_plus  - NR4SD+ with the same ROM.
// For u_minus and u_plus each word is read through the ROM port and then
// multiplied by all 256 values of A, so every product of two 8-bit numbers
// is checked in both variants against a*b. Checked too: the ROM word is not
// visible before the read edge, and it holds while cen_n is high.
// The mechanisms of the design are counted from the encoded word each system
// reads: every digit value of each NR4SD digit set, every value of the
// Modified Booth top digit, negative partial products and ROM holds. Any
// mechanism that never occurs counts as a failure.
module tb_nr4sd_premult_top;
  import nr4sd_pkg::*;
  import nr4sd_ref_pkg::*;

  function automatic logic [256*8-1:0] all_values();
    logic [256*8-1:0] v;
    for (int i = 0; i < 256; i++) v[i*8 +: 8] = 8'(i);
    return v;
  endfunction
  localparam logic [256*8-1:0] ALL = all_values();

  logic        clk = 1'b0;
  logic        cen_n;
  logic [1:0]  addr_def;
  logic [7:0]  addr_all;
  logic [7:0]  a;
  logic [15:0] p_def, p_minus, p_plus;
  int checks = 0, failures = 0;
  int def_coeff [4] = '{-128, -102, 89, 127};

  // Mechanism counters: digit value + 2 indexes the arrays.
  int minus_digit [5], plus_digit [5], msd_minus [5], msd_plus [5];
  int rom_holds = 0, neg_pp = 0;

  nr4sd_premult_top u_def (
    .clk(clk), .cen_n(cen_n), .addr(addr_def), .a(a), .p(p_def));
  nr4sd_premult_top #(.VARIANT(NR4SD_MINUS), .DEPTH(256), .COEFFS(ALL)) u_minus (
    .clk(clk), .cen_n(cen_n), .addr(addr_all), .a(a), .p(p_minus));
  nr4sd_premult_top #(.VARIANT(NR4SD_PLUS), .DEPTH(256), .COEFFS(ALL)) u_plus (
    .clk(clk), .cen_n(cen_n), .addr(addr_all), .a(a), .p(p_plus));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic count_word(input logic [8:0] w, input nr4sd_variant_e v);
    for (int j = 0; j < 3; j++) begin
      int d = digit_of(65'(w), j, v);
      if (v == NR4SD_MINUS) minus_digit[d+2]++;
      else                  plus_digit[d+2]++;
      if (d < 0) neg_pp++;
    end
    if (v == NR4SD_MINUS) msd_minus[msd_of(65'(w), 8) + 2]++;
    else                  msd_plus[msd_of(65'(w), 8) + 2]++;
  endtask

  task automatic check_p(input string name, input logic [15:0] p, input int want);
    checks++;
    if (int'($signed(p)) != want) begin
      failures++;
      $display("FAIL %s: a=%0d product %0d, expected %0d", name, $signed(a), $signed(p), want);
    end
  endtask

  initial begin
    int bv;
    cen_n    = 1'b0;
    addr_def = 2'd0;
    addr_all = 8'd0;
    a        = 8'd0;
    for (int i = 0; i < 5; i++) begin
      minus_digit[i] = 0; plus_digit[i] = 0; msd_minus[i] = 0; msd_plus[i] = 0;
    end

    // 1. Default system: read each coefficient, multiply by every A.
    for (int w = 0; w < 4; w++) begin
      @(negedge clk);
      addr_def = 2'(w);
      @(posedge clk);
      #1;
      for (int ai = -128; ai < 128; ai++) begin
        a = 8'(ai);
        #1;
        check_p("default", p_def, ai * def_coeff[w]);
      end
    end

    // 2. Full ROMs, both variants: every coefficient times every A.
    for (int w = 0; w < 256; w++) begin
      @(negedge clk);
      addr_all = 8'(w);
      bv = int'($signed(8'(w)));
      a  = 8'd7;
      #1;
      if (w > 0) begin
        // Before the edge the previous word is still on the ROM output.
        check_p("minus before edge", p_minus, 7 * int'($signed(8'(w - 1))));
      end
      @(posedge clk);
      #1;
      count_word(u_minus.b_enc, NR4SD_MINUS);
      count_word(u_plus.b_enc, NR4SD_PLUS);
      for (int ai = -128; ai < 128; ai++) begin
        a = 8'(ai);
        #1;
        check_p("NR4SD-", p_minus, ai * bv);
        check_p("NR4SD+", p_plus, ai * bv);
      end
    end

    // 3. ROM hold: with cen_n high the last word (-1) stays.
    @(negedge clk);
    cen_n = 1'b1;
    for (int w = 0; w < 8; w++) begin
      addr_all = 8'(w * 37);
      addr_def = 2'(w);
      a        = 8'(w * 19 + 3);
      @(posedge clk);
      #1;
      rom_holds++;
      check_p("hold NR4SD-", p_minus, -int'($signed(a)));
      check_p("hold NR4SD+", p_plus, -int'($signed(a)));
      check_p("hold default", p_def, int'($signed(a)) * def_coeff[3]);
      @(negedge clk);
    end

    // Every mechanism must have occurred.
    for (int d = -2; d <= 1; d++) begin
      checks++;
      if (minus_digit[d+2] == 0) begin
        failures++;
        $display("FAIL NR4SD- digit %0d never used", d);
      end
    end
    for (int d = -1; d <= 2; d++) begin
      checks++;
      if (plus_digit[d+2] == 0) begin
        failures++;
        $display("FAIL NR4SD+ digit %0d never used", d);
      end
    end
    for (int d = -2; d <= 2; d++) begin
      checks += 2;
      if (msd_minus[d+2] == 0 || msd_plus[d+2] == 0) begin
        failures++;
        $display("FAIL top digit %0d never used", d);
      end
    end
    checks += 2;
    if (rom_holds == 0) failures++;
    if (neg_pp == 0) failures++;
    $display("mechanisms: NR4SD- digits -2:%0d -1:%0d 0:%0d +1:%0d", minus_digit[0], minus_digit[1], minus_digit[2], minus_digit[3]);
    $display("mechanisms: NR4SD+ digits -1:%0d 0:%0d +1:%0d +2:%0d", plus_digit[1], plus_digit[2], plus_digit[3], plus_digit[4]);
    $display("mechanisms: top digit (NR4SD-) -2..+2: %0d %0d %0d %0d %0d", msd_minus[0], msd_minus[1], msd_minus[2], msd_minus[3], msd_minus[4]);
    $display("mechanisms: top digit (NR4SD+) -2..+2: %0d %0d %0d %0d %0d", msd_plus[0], msd_plus[1], msd_plus[2], msd_plus[3], msd_plus[4]);
    $display("mechanisms: negative low digits %0d, ROM holds %0d", neg_pp, rom_holds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
