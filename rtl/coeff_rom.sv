// Coefficient ROM holding multiplier coefficients pre-encoded in NR4SD form.
// COEFFS lists DEPTH plain 2's complement coefficients (word i in bits
// [i*N +: N]); one nr4sd_encoder per word converts each constant at
// elaboration, so the memory array holds only (N+1)-bit encoded words: two
// bits per low digit and three for the Modified Booth top digit. This is the
// off-line encoding step of a pre-encoded multiplier.
// Interface as in a ROM macro: Clock, active-low chip enable CEn and Addr.
// Timing: synchronous read. On a rising clock edge with cen_n low, q takes
// the word at addr (one cycle latency); with cen_n high, q holds. There is no
// reset; q is undefined until the first read. Read latency, CEn polarity and
// the default contents (the four example numbers -128, -102, +89, +127) are
// this design's choices.
module coeff_rom
  import nr4sd_pkg::*;
#(
  parameter int                  N       = 8,
  parameter nr4sd_variant_e      VARIANT = NR4SD_MINUS,
  parameter int                  DEPTH   = 4,
  parameter logic [DEPTH*N-1:0]  COEFFS  = {8'h7F, 8'h59, 8'h9A, 8'h80},
  localparam int                 AW      = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          cen_n,
  input  logic [AW-1:0] addr,
  output logic [N:0]  q
);
  logic [N:0] rom [DEPTH];

  for (genvar i = 0; i < DEPTH; i++) begin : g_word
    nr4sd_encoder #(.N(N), .VARIANT(VARIANT)) u_enc (
      .b  (COEFFS[i*N +: N]),
      .enc(rom[i])
    );
  end

  always_ff @(posedge clk) begin
    if (!cen_n) q <= (32'(addr) < DEPTH) ? rom[addr] : '0;
  end

  // A read must address a stored word.
  a_addr_in_range: assert property (@(posedge clk) !cen_n |-> 32'(addr) < DEPTH)
    else $error("coeff_rom: read address %0d beyond DEPTH %0d", addr, DEPTH);
endmodule
