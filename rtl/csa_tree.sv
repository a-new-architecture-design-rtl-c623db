// Wallace carry-save adder tree.
// Reduces NUM_OPS operands of WIDTH bits to a carry vector C and a sum vector
// S with C + S = sum of all operands (modulo 2^WIDTH). Each level takes the
// operands in groups of three through a row of full adders (3:2 counters),
// giving a sum row and a carry row shifted one place left; operands left over
// pass to the next level unchanged. The number of levels is fixed at
// elaboration: ceil(log_1.5(NUM_OPS/2)) levels of one full-adder delay each.
// Only the name "Wallace CSA tree" comes with the method; the grouping is
// this design's. Combinational.
module csa_tree #(
  parameter int NUM_OPS = 5,
  parameter int WIDTH   = 16
) (
  input  logic [WIDTH-1:0] ops [NUM_OPS],
  output logic [WIDTH-1:0] c,
  output logic [WIDTH-1:0] s
);
  // Operand count after each level.
  function automatic int ops_at(input int lvl);
    int cnt = NUM_OPS;
    for (int i = 0; i < lvl; i++) cnt = 2 * (cnt / 3) + cnt % 3;
    return cnt;
  endfunction

  function automatic int num_levels();
    int cnt = NUM_OPS;
    int lvl = 0;
    while (cnt > 2) begin
      cnt = 2 * (cnt / 3) + cnt % 3;
      lvl++;
    end
    return lvl;
  endfunction

  localparam int LEVELS = num_levels();

  if (NUM_OPS < 2) begin : g_bad_ops
    $error("csa_tree: NUM_OPS must be at least 2");
  end

  if (LEVELS == 0) begin : g_direct
    assign s = ops[0];
    assign c = ops[1];
  end else begin : g_tree
    for (genvar l = 0; l < LEVELS; l++) begin : g_level
      localparam int CNT    = ops_at(l);
      localparam int GROUPS = CNT / 3;
      localparam int NEXT   = ops_at(l + 1);
      logic [WIDTH-1:0] cur [CNT];   // operands entering this level
      logic [WIDTH-1:0] nxt [NEXT];  // operands leaving it

      for (genvar i = 0; i < CNT; i++) begin : g_cur
        if (l == 0) begin : g_from_in
          assign cur[i] = ops[i];
        end else begin : g_from_prev
          assign cur[i] = g_level[l-1].nxt[i];
        end
      end

      for (genvar g = 0; g < GROUPS; g++) begin : g_fa_row
        logic [WIDTH-1:0] x, y, z;
        assign x = cur[3*g];
        assign y = cur[3*g+1];
        assign z = cur[3*g+2];
        assign nxt[2*g]   = x ^ y ^ z;
        assign nxt[2*g+1] = ((x & y) | (x & z) | (y & z)) << 1;
      end
      for (genvar r = 0; r < CNT % 3; r++) begin : g_pass
        assign nxt[2*GROUPS+r] = cur[3*GROUPS+r];
      end
    end

    assign s = g_level[LEVELS-1].nxt[0];
    assign c = g_level[LEVELS-1].nxt[1];
  end
endmodule
