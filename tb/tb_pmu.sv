// tb_pmu: path metric register bank (K = 7). Checks the reset values
// (0 for state 0, 64 elsewhere), loading when en is high and holding when it
// is low, one clock per step.
module tb_pmu;
  localparam int N = 64, PM_W = 10;
  logic clk = 0, rst_n, en;
  logic [N-1:0][PM_W-1:0] pm_d, pm_q, model;
  int checks = 0, failures = 0;

  always #5 clk = !clk;
  pmu dut (.clk, .rst_n, .en, .pm_d, .pm_q);

  task automatic compare(string what);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (pm_q[i] != model[i]) begin
        failures++;
        if (failures < 10) $display("%s: state %0d pm=%0d expected %0d", what, i, pm_q[i], model[i]);
      end
    end
  endtask

  initial begin
    rst_n = 0; en = 0; pm_d = '0;
    @(posedge clk); #1;
    for (int i = 0; i < N; i++) model[i] = (i == 0) ? 0 : 64;
    compare("reset");
    rst_n = 1;
    for (int t = 0; t < 50; t++) begin
      en = ($urandom % 3) != 0;
      for (int i = 0; i < N; i++) pm_d[i] = PM_W'($urandom);
      @(posedge clk); #1;
      if (en) model = pm_d;
      compare(en ? "load" : "hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
