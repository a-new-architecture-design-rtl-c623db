// Modified Booth encoder for one radix-4 digit.
// Three overlapping bits y_2j+1 (weight -2), y_2j and y_2j-1 (weight +1 each)
// give a digit in {-2..+2} as sign, one and two signals:
//   one = y_2j-1 ^ y_2j, two = (y_2j+1 ^ y_2j) & !one, s = y_2j+1.
// Code 111 is the zero digit with s = 1; downstream logic must treat a digit
// with one = two = 0 as zero whatever s is. In the NR4SD word this cell forms
// the most significant digit from b_2k-1, b_2k-2 and the encoder carry
// c_2k-2. Combinational.
module mb_encoder
  import nr4sd_pkg::*;
(
  input  logic    y_hi,   // y_2j+1
  input  logic    y_mid,  // y_2j
  input  logic    y_lo,   // y_2j-1
  output mb_sel_t sel
);
  always_comb begin
    sel.one = y_lo ^ y_mid;
    sel.two = (y_hi ^ y_mid) & ~sel.one;
    sel.s   = y_hi;
  end
endmodule
