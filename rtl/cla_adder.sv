// Two-level carry-lookahead adder: sum = x + y modulo 2^WIDTH.
// Bit generate g = x & y and propagate p = x ^ y are combined into group
// generate/propagate signals over GROUP-bit groups; a second lookahead level
// gives every group its carry-in directly from the group signals, and each
// group then forms its internal carries in sum-of-products form from its
// carry-in. Carry-in of bit 0 is 0; the carry out of the top bit is dropped.
// The group size and the two-level scheme are this design's choices; the
// method only names a fast CLA adder as the final stage. Combinational.
module cla_adder #(
  parameter int WIDTH = 16,
  parameter int GROUP = 4
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  output logic [WIDTH-1:0] sum
);
  localparam int NG = (WIDTH + GROUP - 1) / GROUP;
  localparam int PW = NG * GROUP;

  logic [PW-1:0] g, p, c;
  logic [NG-1:0] gg, gp, gc;

  assign g = PW'(x) & PW'(y);
  assign p = PW'(x) ^ PW'(y);

  // Group generate and propagate.
  always_comb begin
    for (int k = 0; k < NG; k++) begin
      gg[k] = 1'b0;
      gp[k] = 1'b1;
      for (int i = 0; i < GROUP; i++) begin
        gg[k] = g[k*GROUP+i] | (p[k*GROUP+i] & gg[k]);
        gp[k] = gp[k] & p[k*GROUP+i];
      end
    end
  end

  // Second level: carry into group k = OR over m < k of gg[m] & gp[m+1..k-1].
  always_comb begin
    for (int k = 0; k < NG; k++) begin
      gc[k] = 1'b0;
      for (int m = 0; m < k; m++) begin
        logic term;
        term = gg[m];
        for (int t = m + 1; t < k; t++) term = term & gp[t];
        gc[k] = gc[k] | term;
      end
    end
  end

  // First level: carries inside each group from the group carry-in.
  always_comb begin
    for (int k = 0; k < NG; k++) begin
      for (int i = 0; i < GROUP; i++) begin
        logic ci;
        logic term;
        ci = gc[k];
        for (int t = 0; t < i; t++) ci = ci & p[k*GROUP+t];
        for (int m = 0; m < i; m++) begin
          term = g[k*GROUP+m];
          for (int t = m + 1; t < i; t++) term = term & p[k*GROUP+t];
          ci = ci | term;
        end
        c[k*GROUP+i] = ci;
      end
    end
  end

  assign sum = WIDTH'(p ^ c);
endmodule
