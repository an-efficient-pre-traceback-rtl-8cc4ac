// tb_lifo: two-stack reversal buffer at L = 64.
//
// Pushes six blocks of 64 random bits back to back (swap with each block's
// last bit), with random idle cycles, then keeps the enable running to drain.
// Block b, pushed on enabled steps bL .. bL+L-1, must come out reversed on
// enabled steps (b+1)L .. (b+1)L+L-1, with out_valid on exactly those steps.
module tb_lifo;
  localparam int L = 64, NBLK = 6, NSTEP = (NBLK + 2) * L;
  logic clk = 0, rst_n, en, push, din, swap, out_valid, dout;
  int checks = 0, failures = 0;
  bit data [NBLK * L];

  always #5 clk = !clk;
  lifo dut (.clk, .rst_n, .en, .push, .din, .swap, .out_valid, .dout);

  initial begin
    for (int i = 0; i < NBLK * L; i++) data[i] = bit'($urandom & 1);
    rst_n = 0; en = 0; push = 0; din = 0; swap = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int step = 0; step < NSTEP; ) begin
      en   = ($urandom % 5) != 0;
      push = step < NBLK * L;
      din  = push ? data[step] : 1'b0;
      swap = push && (step % L == L - 1);
      #1;
      if (en) begin
        bit ev, eb;
        int blk, j;
        blk = step / L - 1; j = step % L;
        ev = (blk >= 0) && (blk < NBLK);
        eb = ev ? data[blk * L + L - 1 - j] : 1'b0;
        checks++;
        if (out_valid != ev || (ev && dout != eb)) begin
          failures++;
          if (failures < 10) $display("step %0d: valid=%0d bit=%0d expected %0d %0d", step, out_valid, dout, ev, eb);
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
