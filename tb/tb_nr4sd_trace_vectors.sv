// Workload testbench: the multiplications of the reference simulation traces,
// run through the RTL encoder chained into the multiplier core
// (2's complement b -> nr4sd_encoder -> nr4sd_mult), as in a multiplier that
// encodes its operand on line. Both variants, 8-bit operands, 16-bit product.
// The expected products are the ones printed with the traces (for example
// -127 * 77 = -9779 for NR4SD- and -117 * -125 = 14625 for NR4SD+), plus the
// two worked examples -3 * 2 = -6 and -5 * -3 = 15. Every vector is applied
// to both variants.
module tb_nr4sd_trace_vectors;
  import nr4sd_pkg::*;
  logic [7:0]  a, b;
  logic [8:0]  enc_m, enc_p;
  logic [15:0] p_m, p_p;
  logic        clk = 1'b0;
  int checks = 0, failures = 0;

  nr4sd_encoder #(.N(8), .VARIANT(NR4SD_MINUS)) u_enc_m (.b(b), .enc(enc_m));
  nr4sd_encoder #(.N(8), .VARIANT(NR4SD_PLUS))  u_enc_p (.b(b), .enc(enc_p));
  nr4sd_mult    #(.N(8), .VARIANT(NR4SD_MINUS)) u_mul_m (.a(a), .b_enc(enc_m), .p(p_m));
  nr4sd_mult    #(.N(8), .VARIANT(NR4SD_PLUS))  u_mul_p (.a(a), .b_enc(enc_p), .p(p_p));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // {a, b, printed product}
    int vec [13][3] = '{
      '{  -3,    2,    -6}, '{  -5,   -3,    15},
      '{-128,    3,  -384}, '{-121,   31, -3751}, '{ -73,  127, -9271},
      '{-127,   77, -9779}, '{ -79,    5,  -395},
      '{-113,    3,  -339}, '{-125,   51, -6375}, '{   3,  -77,  -231},
      '{-125,  -77,  9625}, '{-117, -125, 14625}, '{-126,    3,  -378}};
    for (int i = 0; i < 13; i++) begin
      a = 8'(vec[i][0]);
      b = 8'(vec[i][1]);
      @(posedge clk);
      checks += 2;
      if (int'($signed(p_m)) != vec[i][2]) begin
        failures++;
        $display("FAIL NR4SD- %0d * %0d = %0d, expected %0d", vec[i][0], vec[i][1], $signed(p_m), vec[i][2]);
      end
      if (int'($signed(p_p)) != vec[i][2]) begin
        failures++;
        $display("FAIL NR4SD+ %0d * %0d = %0d, expected %0d", vec[i][0], vec[i][1], $signed(p_p), vec[i][2]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
