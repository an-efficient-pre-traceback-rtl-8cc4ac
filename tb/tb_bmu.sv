// tb_bmu: exhaustive test of the branch metric unit with 3-bit symbols.
// For all 64 received symbol pairs and all four code-bit pairs the metric
// must equal the summed distance |r - level| to the ideal levels 0 and 7.
module tb_bmu;
  logic [1:0][2:0] sym;
  logic [3:0][3:0] bm;
  int checks = 0, failures = 0;

  bmu dut (.sym, .bm);

  initial begin
    for (int a = 0; a < 8; a++)
      for (int b = 0; b < 8; b++) begin
        sym[0] = 3'(a);
        sym[1] = 3'(b);
        #1;
        for (int c = 0; c < 4; c++) begin
          int lev0, lev1, exp;
          lev0 = ((c & 1) != 0) ? 7 : 0;
          lev1 = ((c & 2) != 0) ? 7 : 0;
          exp  = ((a > lev0) ? a - lev0 : lev0 - a) + ((b > lev1) ? b - lev1 : lev1 - b);
          checks++;
          if (int'(bm[c]) != exp) begin
            failures++;
            if (failures < 10) $display("sym=%0d,%0d c=%0d: bm=%0d expected %0d", a, b, c, bm[c], exp);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
