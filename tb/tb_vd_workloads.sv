// tb_vd_workloads: the decoder at each constraint length / decoding depth
// pair of the evaluated configurations: K = 3, 4, 5, 6, 7, 9 with
// L = 16, 32, 32, 32, 64, 64 (L a power of two no smaller than 5K).
//
// Each configuration decodes 2,000 random bits through soft-decision noise,
// isolated symbol errors and input stalls, with every bit and its 3L+1 step
// latency checked (see vd_stim_check). The generators are the package
// defaults for each K.
module tb_vd_workloads;
  localparam int NCFG = 6;
  localparam int KS [NCFG] = '{3, 4, 5, 6, 7, 9};
  localparam int LS [NCFG] = '{16, 32, 32, 32, 64, 64};

  logic clk = 1'b0;
  always #5 clk = !clk;

  logic [NCFG-1:0] done;
  int chk [NCFG], fail [NCFG], errs [NCFG], stalls [NCFG];

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    localparam int unsigned K = KS[c];
    localparam int unsigned L = LS[c];
    logic            rst_n, in_valid, out_valid, out_bit;
    logic [1:0][2:0] in_sym;

    vd_top #(.K(K), .L(L)) dut (.clk, .rst_n, .in_valid, .in_sym, .out_valid, .out_bit);

    vd_stim_check #(.K(K), .L(L), .G0(vd_pkg::default_gen(K, 0)), .G1(vd_pkg::default_gen(K, 1)),
                    .NBITS(2000), .ERR_GAP(40)) u_sc (
      .clk, .rst_n, .in_valid, .in_sym, .out_valid, .out_bit,
      .done(done[c]), .checks(chk[c]), .failures(fail[c]),
      .errors_injected(errs[c]), .stall_cycles(stalls[c])
    );
  end

  initial begin
    int checks, failures;
    repeat (5) @(posedge clk);
    wait (&done);
    repeat (2) @(posedge clk);
    checks = 0; failures = 0;
    for (int c = 0; c < NCFG; c++) begin
      $display("K=%0d L=%0d: %0d checks, %0d failures, %0d symbol errors corrected, %0d stalls",
               KS[c], LS[c], chk[c], fail[c], errs[c], stalls[c]);
      checks += chk[c];
      failures += fail[c];
      checks++;
      if (errs[c] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog: not all configurations finished");
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end
endmodule
