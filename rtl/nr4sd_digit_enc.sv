// One digit cell of the 2's complement to NR4SD converter.
// Inputs are the bit pair b_2j+1, b_2j of the number and the carry c_2j from
// the cell below; outputs are the two stored digit bits and the carry c_2j+2.
// In every case 2*b_2j+1 + b_2j + c_2j = 4*c_2j+2 + digit.
//   NR4SD-: HA (b_2j, c_2j) -> c_2j+1, n_2j (+);
//           HA*(b_2j+1, c_2j+1) -> c_2j+2, n_2j+1 (-);  digit = -2 n_hi + n_lo
//   NR4SD+: HA*(b_2j, c_2j) -> c_2j+1, n_2j (-);
//           HA (b_2j+1, c_2j+1) -> c_2j+2, n_2j+1 (+);  digit = +2 n_hi - n_lo
// The cell pairing is the method's; it is combinational and the carry ripples
// from cell to cell.
module nr4sd_digit_enc
  import nr4sd_pkg::*;
#(
  parameter nr4sd_variant_e VARIANT = NR4SD_MINUS
) (
  input  logic b_hi,   // b_2j+1
  input  logic b_lo,   // b_2j
  input  logic c_in,   // c_2j
  output logic n_hi,   // n_2j+1
  output logic n_lo,   // n_2j
  output logic c_out   // c_2j+2
);
  logic c_mid;  // c_2j+1

  if (VARIANT == NR4SD_MINUS) begin : g_minus
    ha      u_lo (.p(b_lo), .q(c_in),  .c(c_mid), .s(n_lo));
    ha_star u_hi (.p(b_hi), .q(c_mid), .c(c_out), .s(n_hi));
  end else begin : g_plus
    ha_star u_lo (.p(b_lo), .q(c_in),  .c(c_mid), .s(n_lo));
    ha      u_hi (.p(b_hi), .q(c_mid), .c(c_out), .s(n_hi));
  end
endmodule
