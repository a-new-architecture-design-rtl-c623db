// Self-checking testbench for nr4sd_mult, both variants.
// At N = 8 every pair (a, b) is multiplied, with b encoded by the reference
// encoder, and compared with a*b; the products shown in the published
// simulation traces (for example -127 * 77 = -9779 and -117 * -125 = 14625,
// -3 * 2 = -6 and -5 * -3 = 15) are checked on their own as well. At N = 16
// random pairs check that the parameterised widths and the correction term
// scale.
module tb_nr4sd_mult;
  import nr4sd_pkg::*;
  import nr4sd_ref_pkg::*;
  logic [7:0]  a8;
  logic [8:0]  be8_m, be8_p;
  logic [15:0] p8_m, p8_p;
  logic [15:0] a16;
  logic [16:0] be16_m, be16_p;
  logic [31:0] p16_m, p16_p;
  logic        clk = 1'b0;
  int checks = 0, failures = 0;

  nr4sd_mult dut8_m (.a(a8), .b_enc(be8_m), .p(p8_m));
  nr4sd_mult #(.N(8), .VARIANT(NR4SD_PLUS)) dut8_p (.a(a8), .b_enc(be8_p), .p(p8_p));
  nr4sd_mult #(.N(16), .VARIANT(NR4SD_MINUS)) dut16_m (.a(a16), .b_enc(be16_m), .p(p16_m));
  nr4sd_mult #(.N(16), .VARIANT(NR4SD_PLUS))  dut16_p (.a(a16), .b_enc(be16_p), .p(p16_p));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run8(input int av, input int bv);
    a8    = 8'(av);
    be8_m = encode(64'(bv), 8, NR4SD_MINUS)[8:0];
    be8_p = encode(64'(bv), 8, NR4SD_PLUS)[8:0];
    #1;
    checks += 2;
    if (int'($signed(p8_m)) != av * bv) begin
      failures++;
      $display("FAIL N=8 NR4SD- %0d * %0d = %0d", av, bv, $signed(p8_m));
    end
    if (int'($signed(p8_p)) != av * bv) begin
      failures++;
      $display("FAIL N=8 NR4SD+ %0d * %0d = %0d", av, bv, $signed(p8_p));
    end
  endtask

  initial begin
    int vec_a [13] = '{-3, -5, -128, -121, -73, -127, -79, -113, -125, 3, -125, -117, -126};
    int vec_b [13] = '{ 2, -3,    3,   31, 127,   77,   5,    3,   51, -77, -77, -125,  3};
    int av, bv;
    longint x, y;
    for (int i = 0; i < 13; i++) run8(vec_a[i], vec_b[i]);
    for (int ai = -128; ai < 128; ai++) begin
      for (int bi = -128; bi < 128; bi++) run8(ai, bi);
      @(posedge clk);
    end
    for (int it = 0; it < 20000; it++) begin
      x = longint'($signed(16'($urandom)));
      y = (it == 0) ? -32768 : longint'($signed(16'($urandom)));
      if (it == 1) x = -32768;
      a16    = 16'(x);
      be16_m = encode(64'(y), 16, NR4SD_MINUS)[16:0];
      be16_p = encode(64'(y), 16, NR4SD_PLUS)[16:0];
      #1;
      checks += 2;
      if (longint'($signed(p16_m)) != x * y) begin
        failures++;
        $display("FAIL N=16 NR4SD- %0d * %0d = %0d", x, y, $signed(p16_m));
      end
      if (longint'($signed(p16_p)) != x * y) begin
        failures++;
        $display("FAIL N=16 NR4SD+ %0d * %0d = %0d", x, y, $signed(p16_p));
      end
      if (it % 100 == 0) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
