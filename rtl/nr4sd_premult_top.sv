// Pre-encoded NR4SD multiplier system.
// A coefficient ROM (coeff_rom) holds the multiplier coefficients already
// converted to NR4SD form, and the NR4SD multiplier core (nr4sd_mult)
// multiplies the word read out by the plain 2's complement operand A:
//   P = A * COEFFS[addr], 2N-bit 2's complement.
// VARIANT picks the digit set of the low digits, NR4SD- {-2,-1,0,+1} or
// NR4SD+ {-1,0,+1,+2}; the top digit is Modified Booth in both.
// Timing: the ROM read is registered (a rising clk with cen_n low loads the
// word at addr; cen_n high holds it). A goes to the multiplier unregistered,
// so P follows A combinationally for the coefficient currently held.
// The ROM-plus-multiplier architecture is the method's; the ROM size,
// contents and timing are this design's.
module nr4sd_premult_top
  import nr4sd_pkg::*;
#(
  parameter int                 N       = 8,
  parameter nr4sd_variant_e     VARIANT = NR4SD_MINUS,
  parameter int                 DEPTH   = 4,
  parameter logic [DEPTH*N-1:0] COEFFS  = {8'h7F, 8'h59, 8'h9A, 8'h80},
  localparam int                AW      = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic           clk,
  input  logic           cen_n,
  input  logic [AW-1:0]  addr,
  input  logic [N-1:0]   a,
  output logic [2*N-1:0] p
);
  logic [N:0] b_enc;

  coeff_rom #(.N(N), .VARIANT(VARIANT), .DEPTH(DEPTH), .COEFFS(COEFFS)) u_rom (
    .clk  (clk),
    .cen_n(cen_n),
    .addr (addr),
    .q    (b_enc)
  );

  nr4sd_mult #(.N(N), .VARIANT(VARIANT)) u_mult (
    .a    (a),
    .b_enc(b_enc),
    .p    (p)
  );
endmodule
