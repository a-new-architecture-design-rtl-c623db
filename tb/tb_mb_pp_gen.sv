// Self-checking testbench for mb_pp_gen at N = 8: every multiplicand value
// times every legal {s, one, two} code (including the zero digit with s = 1).
// The partial product read as (N+1)-bit 2's complement plus cin must equal
// a * (-1)^s (one + 2 two).
module tb_mb_pp_gen;
  import nr4sd_pkg::*;
  localparam int N = 8;
  logic [N-1:0] a;
  mb_sel_t      sel;
  logic [N:0]   pp;
  logic         cin;
  logic         clk = 1'b0;
  int checks = 0, failures = 0;

  mb_pp_gen #(.N(N)) dut (.a(a), .sel(sel), .pp(pp), .cin(cin));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int av, d, got;
    for (int ai = 0; ai < 2 ** N; ai++) begin
      for (int code = 0; code < 8; code++) begin
        if (code[1:0] == 2'b11) continue;  // one and two never both set
        a   = N'(ai);
        sel = mb_sel_t'(code[2:0]);
        @(posedge clk);
        av  = int'($signed(a));
        d   = (sel.s ? -1 : 1) * (int'(sel.one) + 2 * int'(sel.two));
        got = int'($signed(pp)) + int'(cin);
        checks++;
        if (got != av * d) begin
          failures++;
          $display("FAIL mb_pp_gen a=%0d code=%03b: got %0d, expected %0d", av, code[2:0], got, av * d);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
