// Reference model for the testbenches: NR4SD encoding and decoding computed
// arithmetically, digit by digit, independently of the gate-level RTL.
// Word layout as in the RTL: digit j < k-1 in bits [2j+1:2j], the Modified
// Booth top digit {s, one, two} in bits [n:n-2].
package nr4sd_ref_pkg;
  import nr4sd_pkg::*;

  // Value of low digit j of an encoded word.
  function automatic int digit_of(input logic [64:0] enc, input int j, input nr4sd_variant_e v);
    int hi = int'(enc[2*j+1]);
    int lo = int'(enc[2*j]);
    return (v == NR4SD_MINUS) ? (-2 * hi + lo) : (2 * hi - lo);
  endfunction

  // Value of the Modified Booth top digit.
  function automatic int msd_of(input logic [64:0] enc, input int n);
    int s   = int'(enc[n]);
    int one = int'(enc[n-1]);
    int two = int'(enc[n-2]);
    return (s != 0 ? -1 : 1) * (one + 2 * two);
  endfunction

  // Value represented by an encoded word.
  function automatic longint value_of(input logic [64:0] enc, input int n, input nr4sd_variant_e v);
    longint acc = 0;
    for (int j = 0; j < n / 2 - 1; j++) acc += longint'(digit_of(enc, j, v)) <<< (2 * j);
    acc += longint'(msd_of(enc, n)) <<< (n - 2);
    return acc;
  endfunction

  // Encode an n-bit 2's complement number: each low digit is the value
  // 2 b_2j+1 + b_2j + c_2j brought into the variant's digit set by taking
  // 4 off and passing a carry up; the top digit is -2 b_n-1 + b_n-2 + c.
  function automatic logic [64:0] encode(input logic [63:0] b, input int n, input nr4sd_variant_e v);
    logic [64:0] enc = '0;
    int c = 0;
    int val, d, top;
    for (int j = 0; j < n / 2 - 1; j++) begin
      val = 2 * int'(b[2*j+1]) + int'(b[2*j]) + c;
      if (v == NR4SD_MINUS) c = (val >= 2) ? 1 : 0;
      else                  c = (val >= 3) ? 1 : 0;
      d = val - 4 * c;
      if (v == NR4SD_MINUS) begin
        case (d)
          1:  enc[2*j +: 2] = 2'b01;
          -2: enc[2*j +: 2] = 2'b10;
          -1: enc[2*j +: 2] = 2'b11;
          default: enc[2*j +: 2] = 2'b00;
        endcase
      end else begin
        case (d)
          -1: enc[2*j +: 2] = 2'b01;
          2:  enc[2*j +: 2] = 2'b10;
          1:  enc[2*j +: 2] = 2'b11;
          default: enc[2*j +: 2] = 2'b00;
        endcase
      end
    end
    top = -2 * int'(b[n-1]) + int'(b[n-2]) + c;
    enc[n]   = b[n-1];
    enc[n-1] = (top == 1 || top == -1);
    enc[n-2] = (top == 2 || top == -2);
    return enc;
  endfunction
endpackage
