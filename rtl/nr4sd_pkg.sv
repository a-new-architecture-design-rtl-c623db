// Shared types for the pre-encoded NR4SD multiplier.
//
// NR4SD (non-redundant radix-4 signed digit) writes an n-bit 2's complement
// number as k = n/2 radix-4 digits. The k-1 low digits take only four values,
// {-2,-1,0,+1} in the NR4SD- variant or {-1,0,+1,+2} in the NR4SD+ variant,
// and are stored as two bits each. The most significant digit is a Modified
// Booth (MB) digit in {-2..+2}, stored as the three MB signals {s, one, two}.
//
// Encoded word layout (n+1 bits): digit j < k-1 sits in bits [2j+1:2j] as
// {n_2j+1, n_2j}; the MB digit sits in bits [n:n-2] as {s, one, two}.
// This layout is this design's choice; the two-bits-per-digit and
// three-bits-for-the-top-digit split is the method's.
package nr4sd_pkg;

  // Which of the two non-redundant digit sets the low digits use.
  typedef enum logic {
    NR4SD_MINUS = 1'b0,  // digits {-2,-1,0,+1}
    NR4SD_PLUS  = 1'b1   // digits {-1,0,+1,+2}
  } nr4sd_variant_e;

  // Partial-product select for an NR4SD digit. At most one bit is set.
  // 'two' means -2 for NR4SD- and +2 for NR4SD+.
  typedef struct packed {
    logic one_p;  // digit +1
    logic one_m;  // digit -1
    logic two;    // digit -2 (NR4SD-) or +2 (NR4SD+)
  } nr4sd_sel_t;

  // Modified Booth digit signals: value = (-1)^s * (one + 2*two).
  typedef struct packed {
    logic s;
    logic one;
    logic two;
  } mb_sel_t;

  // Correction term CT(high) = 2^n * (1 + sum_{j<k} 2^(2j+1)) modulo 2^(2n):
  // it stands in for the sign extension of all k partial products, each of
  // which enters the adder tree with its sign bit inverted.
  function automatic logic [127:0] ct_high(input int n);
    logic [127:0] v;
    v = 128'd1;
    for (int j = 0; j < n / 2; j++) v += 128'd1 << (2 * j + 1);
    v = v << n;
    return v & ((128'd1 << (2 * n)) - 128'd1);
  endfunction

endpackage
