// Self-checking testbench for mb_encoder: all eight bit triples. Checks the
// digit value (-1)^s (one + 2 two) against -2 y_2j+1 + y_2j + y_2j-1, that one
// and two are never both set, and the sign column of the MB table (s = y_2j+1).
module tb_mb_encoder;
  import nr4sd_pkg::*;
  logic    y_hi, y_mid, y_lo;
  mb_sel_t sel;
  logic    clk = 1'b0;
  int checks = 0, failures = 0;

  mb_encoder dut (.y_hi(y_hi), .y_mid(y_mid), .y_lo(y_lo), .sel(sel));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int want, got;
    for (int i = 0; i < 8; i++) begin
      {y_hi, y_mid, y_lo} = 3'(i);
      @(posedge clk);
      want = -2 * int'(y_hi) + int'(y_mid) + int'(y_lo);
      got  = (sel.s ? -1 : 1) * (int'(sel.one) + 2 * int'(sel.two));
      checks += 3;
      if (got != want) begin
        failures++;
        $display("FAIL mb_encoder %03b: value %0d, expected %0d", i[2:0], got, want);
      end
      if (sel.one && sel.two) begin
        failures++;
        $display("FAIL mb_encoder %03b: one and two both set", i[2:0]);
      end
      if (sel.s != y_hi) begin
        failures++;
        $display("FAIL mb_encoder %03b: sign %0b", i[2:0], sel.s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
