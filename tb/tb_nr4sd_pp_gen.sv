// Self-checking testbench for nr4sd_pp_gen, both variants at N = 8: every
// multiplicand value times every digit of the variant's set. The partial
// product read as an (N+1)-bit 2's complement number plus cin must equal a*d.
module tb_nr4sd_pp_gen;
  import nr4sd_pkg::*;
  localparam int N = 8;
  logic [N-1:0] a;
  nr4sd_sel_t   sel_m, sel_p;
  logic [N:0]   pp_m, pp_p;
  logic         cin_m, cin_p;
  logic         clk = 1'b0;
  int checks = 0, failures = 0;

  nr4sd_pp_gen #(.N(N), .VARIANT(NR4SD_MINUS)) dut_m (.a(a), .sel(sel_m), .pp(pp_m), .cin(cin_m));
  nr4sd_pp_gen #(.N(N), .VARIANT(NR4SD_PLUS))  dut_p (.a(a), .sel(sel_p), .pp(pp_p), .cin(cin_p));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Selects for digit index 0..3: 0, +1, -1, two.
  function automatic nr4sd_sel_t sel_of(input int idx);
    case (idx)
      1:       return '{one_p: 1'b1, one_m: 1'b0, two: 1'b0};
      2:       return '{one_p: 1'b0, one_m: 1'b1, two: 1'b0};
      3:       return '{one_p: 1'b0, one_m: 1'b0, two: 1'b1};
      default: return '0;
    endcase
  endfunction

  initial begin
    int dm [4] = '{0, 1, -1, -2};
    int dp [4] = '{0, 1, -1, 2};
    int av, gm, gp;
    for (int ai = 0; ai < 2 ** N; ai++) begin
      for (int d = 0; d < 4; d++) begin
        a     = N'(ai);
        sel_m = sel_of(d);
        sel_p = sel_of(d);
        @(posedge clk);
        av = int'($signed(a));
        gm = int'($signed(pp_m)) + int'(cin_m);
        gp = int'($signed(pp_p)) + int'(cin_p);
        checks += 2;
        if (gm != av * dm[d]) begin
          failures++;
          $display("FAIL NR4SD- a=%0d d=%0d: got %0d", av, dm[d], gm);
        end
        if (gp != av * dp[d]) begin
          failures++;
          $display("FAIL NR4SD+ a=%0d d=%0d: got %0d", av, dp[d], gp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
