// Conventional half adder: c = p & q, s = p ^ q, with 2c + s = p + q.
// Used as one of the two cells of an NR4SD digit encoder. Combinational.
module ha (
  input  logic p,
  input  logic q,
  output logic c,
  output logic s
);
  assign c = p & q;
  assign s = p ^ q;
endmodule
