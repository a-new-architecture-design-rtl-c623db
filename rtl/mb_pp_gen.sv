// Partial-product generator for one Modified Booth digit.
// Each bit is p_i = ((a_i ^ s) & one) | ((a_i-1 ^ s) & two), with a_-1 = 0
// and a_N = a_N-1, giving A*|d| in N+1 bits, inverted when the digit is
// negative; the +1 of the negation comes out as cin = s & (one | two), so
// the zero digit with s = 1 adds nothing. Bit N is the sign of the partial
// product. In the NR4SD multiplier this serves the most significant digit.
// Combinational.
module mb_pp_gen
  import nr4sd_pkg::*;
#(
  parameter int N = 8
) (
  input  logic [N-1:0] a,
  input  mb_sel_t      sel,
  output logic [N:0]   pp,
  output logic         cin
);
  logic [N:0] ax;   // a sign-extended to N+1 bits
  logic [N:0] ax2;  // 2a

  assign ax  = {a[N-1], a};
  assign ax2 = {a, 1'b0};

  always_comb begin
    pp  = ((ax  ^ {(N+1){sel.s}}) & {(N+1){sel.one}})
        | ((ax2 ^ {(N+1){sel.s}}) & {(N+1){sel.two}});
    cin = sel.s & (sel.one | sel.two);
  end
endmodule
