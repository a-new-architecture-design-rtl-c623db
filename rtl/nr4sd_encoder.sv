// Word-level 2's complement to NR4SD converter.
// A chain of k-1 digit cells (nr4sd_digit_enc) converts bit pairs from the
// least significant end, starting with carry c_0 = 0. The last carry c_2k-2
// and the top two bits b_2k-1 (negative) and b_2k-2 form the most significant
// digit as a Modified Booth digit, so that the full 2's complement range is
// covered. Output is the (N+1)-bit encoded word: {s,one,two} of the MB digit
// in bits [N:N-2], {n_2j+1,n_2j} of digit j in bits [2j+1:2j].
// In the pre-encoded multiplier this runs "off-line": the coefficient ROM
// applies it to constant coefficients at elaboration. Combinational.
module nr4sd_encoder
  import nr4sd_pkg::*;
#(
  parameter int             N       = 8,
  parameter nr4sd_variant_e VARIANT = NR4SD_MINUS
) (
  input  logic [N-1:0] b,    // 2's complement number
  output logic [N:0] enc   // encoded word
);
  localparam int K = N / 2;

  if (N % 2 != 0 || N < 4) begin : g_bad_width
    $error("nr4sd_encoder: N must be even and at least 4");
  end

  logic [K-1:0] carry;  // carry[j] = c_2j
  mb_sel_t      msd;

  assign carry[0] = 1'b0;

  for (genvar j = 0; j < K - 1; j++) begin : g_digit
    nr4sd_digit_enc #(.VARIANT(VARIANT)) u_cell (
      .b_hi (b[2*j+1]),
      .b_lo (b[2*j]),
      .c_in (carry[j]),
      .n_hi (enc[2*j+1]),
      .n_lo (enc[2*j]),
      .c_out(carry[j+1])
    );
  end

  mb_encoder u_msd (
    .y_hi (b[N-1]),
    .y_mid(b[N-2]),
    .y_lo (carry[K-1]),
    .sel  (msd)
  );

  assign enc[N:N-2] = msd;
endmodule
