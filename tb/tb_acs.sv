// tb_acs: random test of the 64-state add-compare-select array (K = 7,
// generators 133/171 octal).
//
// For random path metrics (spread below 256) and random branch metrics, the
// testbench finds for each state both predecessors and their code bits with
// its own textbook encoder, adds, compares as plain integers (the metrics are
// unwrapped first) and checks the decision bit and the surviving metric
// modulo 2^10. Ties pick the predecessor with top bit 0.
module tb_acs;
  localparam int K = 7, N = 64, PM_W = 10;
  logic [3:0][3:0]        bm;
  logic [N-1:0][PM_W-1:0] pm_in, pm_out;
  logic [N-1:0]           dec;
  int checks = 0, failures = 0;

  acs dut (.bm, .pm_in, .pm_out, .dec);

  function automatic int code_pair(int s, int d);
    int r = 0, c0, c1;
    for (int j = 0; j < K - 1; j++) r |= ((s >> j) & 1) << (K - 1 - j);
    r |= d;
    c0 = $countones(r & 'o133) & 1;
    c1 = $countones(r & 'o171) & 1;
    return (c1 << 1) | c0;
  endfunction

  initial begin
    for (int t = 0; t < 400; t++) begin
      int base, pmv [N];
      base = $urandom % 1024;
      for (int i = 0; i < N; i++) begin
        pmv[i] = base + ((t % 4 == 0) ? ($urandom % 3) : ($urandom % 200));
        pm_in[i] = PM_W'(pmv[i]);
      end
      for (int c = 0; c < 4; c++) bm[c] = 4'($urandom % 15);
      #1;
      for (int i = 0; i < N; i++) begin
        int p0, p1, m0, m1, ed, em;
        p0 = i >> 1;
        p1 = (1 << (K - 2)) | (i >> 1);
        m0 = pmv[p0] + int'(bm[code_pair(i, 0)]);
        m1 = pmv[p1] + int'(bm[code_pair(i, 1)]);
        ed = (m1 < m0) ? 1 : 0;
        em = (m1 < m0) ? m1 : m0;
        checks += 2;
        if (int'(dec[i]) != ed || int'(pm_out[i]) != (em % 1024)) begin
          failures++;
          if (failures < 10)
            $display("t=%0d state %0d: dec=%0d pm=%0d expected %0d %0d", t, i, dec[i], pm_out[i], ed, em % 1024);
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
