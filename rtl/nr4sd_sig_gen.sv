// Digit decoder of the pre-encoded multiplier: expands the two stored bits of
// an NR4SD digit into one-hot partial-product selects.
//   NR4SD-: digit = -2 n_hi + n_lo: one_p = !n_hi & n_lo, one_m = n_hi & n_lo,
//           two (-2) = n_hi & !n_lo.
//   NR4SD+: digit = +2 n_hi - n_lo: one_p = n_hi & n_lo, one_m = !n_hi & n_lo,
//           two (+2) = n_hi & !n_lo.
// Both follow from the digit definitions; the printed decoding equations
// were not used where they disagree with them. Combinational, two gates deep.
module nr4sd_sig_gen
  import nr4sd_pkg::*;
#(
  parameter nr4sd_variant_e VARIANT = NR4SD_MINUS
) (
  input  logic       n_hi,  // n_2j+1
  input  logic       n_lo,  // n_2j
  output nr4sd_sel_t sel
);
  always_comb begin
    sel.two = n_hi & ~n_lo;
    if (VARIANT == NR4SD_MINUS) begin
      sel.one_p = ~n_hi & n_lo;
      sel.one_m =  n_hi & n_lo;
    end else begin
      sel.one_p =  n_hi & n_lo;
      sel.one_m = ~n_hi & n_lo;
    end
  end
endmodule
