// tb_survivor_mem: survivor memory array at its default size (3 banks of
// L = 64 columns of 64 decision bits).
//
// Fills all 3L columns with random data, then reads them back while writes
// continue to another bank, as the SMU does. Checks that a read returns the
// column one clock after its address and that rdata holds while re is low.
module tb_survivor_mem;
  localparam int N = 64, L = 64, DEPTH = 3 * L;
  logic clk = 0, we, re;
  logic [7:0] waddr, raddr;
  logic [N-1:0] wdata, rdata, held;
  logic [N-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = !clk;
  survivor_mem dut (.clk, .we, .waddr, .wdata, .re, .raddr, .rdata);

  initial begin
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int a = 0; a < DEPTH; a++) begin
      we = 1; waddr = 8'(a); wdata = {$urandom, $urandom};
      model[a] = wdata;
      @(posedge clk); #1;
    end
    we = 0;
    for (int t = 0; t < 600; t++) begin
      int ra;
      ra = $urandom % DEPTH;
      re = ($urandom % 4) != 0;
      raddr = 8'(ra);
      // concurrent write to a bank other than the one read
      we = 1;
      waddr = 8'(((ra / L + 1 + ($urandom % 2)) % 3) * L + ($urandom % L));
      wdata = {$urandom, $urandom};
      held = rdata;
      @(posedge clk); #1;
      checks++;
      if (re ? (rdata != model[ra]) : (rdata != held)) begin
        failures++;
        if (failures < 10) $display("t=%0d re=%0d addr=%0d: wrong rdata", t, re, ra);
      end
      model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
