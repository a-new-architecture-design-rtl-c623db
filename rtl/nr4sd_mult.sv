// Pre-encoded NR4SD multiplier core: P = A * B for n-bit 2's complement A and
// a multiplier B supplied already encoded (the coefficient ROM word).
//
// Digits j = 0..k-2 of B are two stored bits each; nr4sd_sig_gen expands them
// into one-hot selects and nr4sd_pp_gen forms A*d_j. The most significant
// digit is an MB digit {s, one, two} and goes through mb_pp_gen. Each partial
// product is n+1 bits wide; its sign bit enters the tree inverted, and one
// correction operand CT = CT(high) + CT(low) makes up for that and for the
// +1 of every negated partial product:
//   CT(high) = 2^n (1 + sum_{j<k} 2^(2j+1)) mod 2^2n,  CT(low) = sum c_in,j 2^2j.
// The k partial products, weighted 4^j, and CT go through a Wallace CSA tree
// to C and S, and a carry-lookahead adder gives P = C + S (2n bits).
// The structure is the method's; the CSA grouping and CLA group size are this
// design's. Purely combinational, no clock.
module nr4sd_mult
  import nr4sd_pkg::*;
#(
  parameter int             N       = 8,
  parameter nr4sd_variant_e VARIANT = NR4SD_MINUS
) (
  input  logic [N-1:0]   a,      // 2's complement multiplicand
  input  logic [N:0]   b_enc,  // encoded multiplier, see nr4sd_pkg
  output logic [2*N-1:0] p       // 2's complement product
);
  localparam int K = N / 2;
  localparam int W = 2 * N;
  localparam logic [127:0] CT_HIGH = ct_high(N);

  if (N % 2 != 0 || N < 4 || N > 64) begin : g_bad_width
    $error("nr4sd_mult: N must be even, 4 <= N <= 64");
  end

  logic [N:0]   pp  [K];
  logic [K-1:0] cin;
  logic [W-1:0] ops [K+1];
  logic [W-1:0] cvec, svec;

  // Low digits: NR4SD.
  for (genvar j = 0; j < K - 1; j++) begin : g_nr_digit
    nr4sd_sel_t sel;
    nr4sd_sig_gen #(.VARIANT(VARIANT)) u_sig (
      .n_hi(b_enc[2*j+1]),
      .n_lo(b_enc[2*j]),
      .sel (sel)
    );
    nr4sd_pp_gen #(.N(N), .VARIANT(VARIANT)) u_pp (
      .a  (a),
      .sel(sel),
      .pp (pp[j]),
      .cin(cin[j])
    );
  end

  // Most significant digit: Modified Booth.
  mb_pp_gen #(.N(N)) u_pp_msd (
    .a  (a),
    .sel(mb_sel_t'(b_enc[N:N-2])),
    .pp (pp[K-1]),
    .cin(cin[K-1])
  );

  // Weighted partial products with inverted sign bits, and the correction term.
  for (genvar j = 0; j < K; j++) begin : g_ops
    assign ops[j] = W'({~pp[j][N], pp[j][N-1:0]}) << (2 * j);
  end

  always_comb begin
    ops[K] = CT_HIGH[W-1:0];
    for (int j = 0; j < K; j++) ops[K][2*j] = cin[j];
  end

  csa_tree #(.NUM_OPS(K + 1), .WIDTH(W)) u_tree (
    .ops(ops),
    .c  (cvec),
    .s  (svec)
  );

  cla_adder #(.WIDTH(W)) u_cla (
    .x  (cvec),
    .y  (svec),
    .sum(p)
  );
endmodule
