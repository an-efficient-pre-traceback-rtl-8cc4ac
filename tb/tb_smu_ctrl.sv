// tb_smu_ctrl: write-pointer controller at L = 64.
//
// Steps the controller through seven blocks with random idle cycles and
// compares, on every enabled step, the write address, bank, first/last
// column flags and completed-block count with a count kept in the
// testbench: column c of block k is written at (k mod 3)*L + c, and the
// completed-block count saturates at 2.
module tb_smu_ctrl;
  localparam int L = 64;
  logic clk = 0, rst_n, en, restart, blk_end;
  logic [7:0] waddr;
  logic [1:0] wbank, blocks_done;
  int checks = 0, failures = 0;

  always #5 clk = !clk;
  smu_ctrl dut (.clk, .rst_n, .en, .waddr, .restart, .blk_end, .wbank, .blocks_done);

  initial begin
    rst_n = 0; en = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int step = 0; step < 7 * L; ) begin
      en = ($urandom % 5) != 0;
      #1;
      if (en) begin
        int blk, col, ebank, edone;
        blk = step / L; col = step % L; ebank = blk % 3;
        edone = (blk > 2) ? 2 : blk;
        checks++;
        if (int'(waddr) != ebank * L + col || int'(wbank) != ebank ||
            restart != (col == 0) || blk_end != (col == L - 1) || int'(blocks_done) != edone) begin
          failures++;
          if (failures < 10)
            $display("step %0d: waddr=%0d bank=%0d restart=%0d end=%0d done=%0d", step, waddr, wbank,
                     restart, blk_end, blocks_done);
        end
        step++;
      end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
