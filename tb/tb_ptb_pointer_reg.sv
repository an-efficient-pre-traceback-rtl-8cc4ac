// tb_ptb_pointer_reg: pre-traceback pointer registers.
//
// Part 1 (K = 3, four states) replays a five-step worked example. The
// decision bits of states 00, 01, 10, 11 at the five steps of a block are
//   0101, 0110, 1011, 1001, 0101
// and after each step the four registers must hold
//   {0,2,1,3}, {0,1,3,2}, {3,0,2,2}, {2,3,0,2}, {2,0,3,2}.
// Part 2 (K = 7, default size) feeds random decision columns over several
// blocks of random length, with idle cycles, and after every step compares
// each register with a backward traceback S_{n-1} = {d_n[S_n], S_n >> 1}
// over the columns stored since the block began.
module tb_ptb_pointer_reg;
  logic clk = 0;
  int checks = 0, failures = 0;
  always #5 clk = !clk;

  // ---- part 1: worked example, K = 3 ----
  logic       en3, restart3;
  logic [3:0] dec3;
  logic [3:0][1:0] ptr3;
  ptb_pointer_reg #(.K(3)) dut3 (.clk, .en(en3), .restart(restart3), .dec(dec3), .ptr(ptr3));

  // ---- part 2: random, K = 7 ----
  logic        en7, restart7;
  logic [63:0] dec7;
  logic [63:0][5:0] ptr7;
  ptb_pointer_reg dut7 (.clk, .en(en7), .restart(restart7), .dec(dec7), .ptr(ptr7));

  logic [63:0] cols [128];

  initial begin
    logic [3:0] ex_dec [5];
    int ex_ptr [5][4];
    ex_dec = '{4'b1010, 4'b0110, 4'b1101, 4'b1001, 4'b1010};   // bit i = state i
    ex_ptr = '{'{0,2,1,3}, '{0,1,3,2}, '{3,0,2,2}, '{2,3,0,2}, '{2,0,3,2}};
    en3 = 0; restart3 = 0; dec3 = 0; en7 = 0; restart7 = 0; dec7 = 0;
    @(posedge clk); #1;
    for (int n = 0; n < 5; n++) begin
      en3 = 1; restart3 = (n == 0); dec3 = ex_dec[n];
      @(posedge clk); #1;
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (int'(ptr3[i]) != ex_ptr[n][i]) begin
          failures++;
          $display("example step %0d state %0d: pointer %0d expected %0d", n + 1, i, ptr3[i], ex_ptr[n][i]);
        end
      end
    end
    en3 = 0;

    for (int blk = 0; blk < 6; blk++) begin
      int len;
      len = 1 + $urandom % 100;
      for (int n = 0; n < len; ) begin
        en7 = ($urandom % 4) != 0;
        restart7 = (n == 0);
        dec7 = {$urandom, $urandom};
        if (en7) cols[n] = dec7;
        @(posedge clk); #1;
        if (en7) begin
          for (int i = 0; i < 64; i++) begin
            int s;
            s = i;
            for (int m = n; m >= 0; m--) s = (int'(cols[m][s]) << 5) | (s >> 1);
            checks++;
            if (int'(ptr7[i]) != s) begin
              failures++;
              if (failures < 10) $display("block %0d step %0d state %0d: %0d expected %0d", blk, n, i, ptr7[i], s);
            end
          end
          n++;
        end
      end
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
