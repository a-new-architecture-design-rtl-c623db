// Signed half adder HA*. Both inputs are positively weighted; the carry c is
// positive and the sum s is negatively weighted, so that 2c - s = p + q.
// That gives c = p | q and s = p ^ q (inputs 1,1 -> c=1, s=0 -> +2; one
// input set -> c=1, s=1 -> +1). Combinational.
module ha_star (
  input  logic p,  // weight +1
  input  logic q,  // weight +1
  output logic c,  // weight +2
  output logic s   // weight -1
);
  assign c = p | q;
  assign s = p ^ q;
endmodule
