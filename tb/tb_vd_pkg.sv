// tb_vd_pkg: checks the trellis helpers of vd_pkg for K = 3..9.
//
// The predecessor {d, s>>1} is checked against the shift-register view of
// the state (the predecessor, shifted left with the new bit appended, must
// give back s). Branch codes are checked against a textbook encoder whose
// K-bit register holds the newest input in its MSB, so that a generator's
// MSB taps the newest bit; the register for the branch into s from
// predecessor d is built bit by bit from the input history.
module tb_vd_pkg;
  import vd_pkg::*;

  int checks = 0, failures = 0;

  task automatic expect_eq(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    expect_eq(default_gen(7, 0), 91, "K=7 g0 (133 octal)");
    expect_eq(default_gen(7, 1), 121, "K=7 g1 (171 octal)");
    expect_eq(default_gen(3, 0), 7, "K=3 g0");
    expect_eq(default_gen(3, 1), 5, "K=3 g1");
    for (int k = 3; k <= 9; k++) begin
      int n;
      n = 1 << (k - 1);
      for (int s = 0; s < n; s++) begin
        for (int d = 0; d < 2; d++) begin
          int p, hist [16], reg_t, c0, c1;
          p = pred_state(s, bit'(d), k);
          // shifting the new input bit (s[0]) into the predecessor gives s
          expect_eq(((p << 1) | (s & 1)) & (n - 1), s, $sformatf("K=%0d succ of pred", k));
          expect_eq(p >> (k - 2), d, $sformatf("K=%0d pred top bit", k));
          // input history: hist[j] = input j steps before the newest
          for (int j = 0; j < k - 1; j++) hist[j] = (s >> j) & 1;
          hist[k-1] = d;
          reg_t = 0;
          for (int j = 0; j < k; j++) reg_t |= hist[j] << (k - 1 - j);
          c0 = $countones(reg_t & default_gen(k, 0)) & 1;
          c1 = $countones(reg_t & default_gen(k, 1)) & 1;
          expect_eq(int'(branch_code(s, bit'(d), k, default_gen(k, 0), default_gen(k, 1))),
                    (c1 << 1) | c0, $sformatf("K=%0d branch code s=%0d d=%0d", k, s, d));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
