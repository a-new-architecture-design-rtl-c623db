// Self-checking testbench for nr4sd_encoder, both variants at N = 8, every
// input value. Checks the encoded word against the arithmetic reference
// encoder, checks that the digits sum back to the input, and checks the digit
// magnitudes (most significant first) of the four worked examples -128, -102,
// +89, +127: NR4SD- 2000 1212 2221 2001, NR4SD+ 2000 2122 1121 2001.
module tb_nr4sd_encoder;
  import nr4sd_pkg::*;
  import nr4sd_ref_pkg::*;
  localparam int N = 8;
  logic [N-1:0] b;
  logic [N:0]   enc_m, enc_p;
  logic         clk = 1'b0;
  int checks = 0, failures = 0;

  nr4sd_encoder #(.N(N), .VARIANT(NR4SD_MINUS)) dut_m (.b(b), .enc(enc_m));
  nr4sd_encoder #(.N(N), .VARIANT(NR4SD_PLUS))  dut_p (.b(b), .enc(enc_p));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int mags(input logic [N:0] enc, input nr4sd_variant_e v);
    // Digit magnitudes as a decimal number, most significant digit first.
    int r = msd_of(65'(enc), N);
    r = (r < 0) ? -r : r;
    for (int j = N / 2 - 2; j >= 0; j--) begin
      int d = digit_of(65'(enc), j, v);
      r = r * 10 + ((d < 0) ? -d : d);
    end
    return r;
  endfunction

  initial begin
    int ex_val  [4] = '{-128, -102, 89, 127};
    int ex_minus[4] = '{2000, 1212, 2221, 2001};
    int ex_plus [4] = '{2000, 2122, 1121, 2001};
    for (int i = 0; i < 2 ** N; i++) begin
      b = N'(i);
      @(posedge clk);
      checks += 4;
      if (enc_m != encode(64'(b), N, NR4SD_MINUS)[N:0]) begin
        failures++;
        $display("FAIL NR4SD- b=%0d: enc %b", $signed(b), enc_m);
      end
      if (enc_p != encode(64'(b), N, NR4SD_PLUS)[N:0]) begin
        failures++;
        $display("FAIL NR4SD+ b=%0d: enc %b", $signed(b), enc_p);
      end
      if (value_of(65'(enc_m), N, NR4SD_MINUS) != longint'($signed(b))) begin
        failures++;
        $display("FAIL NR4SD- b=%0d: digits sum to %0d", $signed(b), value_of(65'(enc_m), N, NR4SD_MINUS));
      end
      if (value_of(65'(enc_p), N, NR4SD_PLUS) != longint'($signed(b))) begin
        failures++;
        $display("FAIL NR4SD+ b=%0d: digits sum to %0d", $signed(b), value_of(65'(enc_p), N, NR4SD_PLUS));
      end
    end
    for (int e = 0; e < 4; e++) begin
      b = N'(ex_val[e]);
      @(posedge clk);
      checks += 2;
      if (mags(enc_m, NR4SD_MINUS) != ex_minus[e]) begin
        failures++;
        $display("FAIL example %0d NR4SD-: %0d", ex_val[e], mags(enc_m, NR4SD_MINUS));
      end
      if (mags(enc_p, NR4SD_PLUS) != ex_plus[e]) begin
        failures++;
        $display("FAIL example %0d NR4SD+: %0d", ex_val[e], mags(enc_p, NR4SD_PLUS));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
