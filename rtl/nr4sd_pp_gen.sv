// Partial-product generator for one NR4SD digit.
// Produces the (N+1)-bit partial product A*d, with d one of the four digit
// values of the variant, in one's complement form for negative d plus a
// carry-in bit cin that the adder tree adds at the digit's weight:
//   p_i = (a_i & one_p) | (!a_i & one_m) | (a'_i-1 & two)
// with a'_i-1 = !a_i-1 for NR4SD- (d = -2) and a_i-1 for NR4SD+ (d = +2),
// a_-1 = 0 and a_N = a_N-1. Since a digit is never both -2 and +2, each bit
// needs one AND-OR of three terms and no sign XOR, which is where the NR4SD
// form saves over an MB digit. Bit N is the partial product's sign.
// The bit equation is this design's own. Combinational.
module nr4sd_pp_gen
  import nr4sd_pkg::*;
#(
  parameter int             N       = 8,
  parameter nr4sd_variant_e VARIANT = NR4SD_MINUS
) (
  input  logic [N-1:0] a,
  input  nr4sd_sel_t   sel,
  output logic [N:0]   pp,
  output logic         cin
);
  logic [N:0] ax;   // a sign-extended to N+1 bits
  logic [N:0] ax2;  // ax shifted left by one: 2a

  assign ax  = {a[N-1], a};
  assign ax2 = {a, 1'b0};

  always_comb begin
    if (VARIANT == NR4SD_MINUS) begin
      pp  = (ax & {(N+1){sel.one_p}}) | (~ax & {(N+1){sel.one_m}}) | (~ax2 & {(N+1){sel.two}});
      cin = sel.one_m | sel.two;
    end else begin
      pp  = (ax & {(N+1){sel.one_p}}) | (~ax & {(N+1){sel.one_m}}) | (ax2 & {(N+1){sel.two}});
      cin = sel.one_m;
    end
  end
endmodule
