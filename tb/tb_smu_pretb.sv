// tb_smu_pretb: pre-traceback survivor memory unit at K = 7, L = 64.
//
// Eight blocks of random decision columns are fed with random idle cycles.
// Random columns never merge, so every decoded bit depends on the exact
// start state; the expected bits are computed here with a conventional
// two-pass traceback over the stored columns: from state 0 at the end of
// block b+1, trace back through block b+1 to find the state at the end of
// block b, then trace back through block b reading out the LSB of each state.
// The unit must produce those bits in order, the bit of column m on enabled
// step m + 3L + 1 (0-based), and nothing before.
module tb_smu_pretb;
  localparam int K = 7, L = 64, N = 64, NB = 8, NSTEP = NB * L + 1, NOUT = (NB - 3) * L;
  logic clk = 0, rst_n, dec_valid, out_valid, out_bit;
  logic [N-1:0] dec;
  logic [N-1:0] cols [NSTEP];
  bit expb [NOUT];
  int checks = 0, failures = 0;

  always #5 clk = !clk;
  smu_pretb dut (.clk, .rst_n, .dec_valid, .dec, .out_valid, .out_bit);

  initial begin
    for (int m = 0; m < NSTEP; m++) cols[m] = {$urandom, $urandom};
    for (int b = 0; b + 3 < NB; b++) begin
      int cur;
      cur = 0;
      for (int m = (b + 2) * L - 1; m >= (b + 1) * L; m--) cur = (int'(cols[m][cur]) << (K - 2)) | (cur >> 1);
      for (int m = (b + 1) * L - 1; m >= b * L; m--) begin
        expb[m] = bit'(cur & 1);
        cur = (int'(cols[m][cur]) << (K - 2)) | (cur >> 1);
      end
    end
    rst_n = 0; dec_valid = 0; dec = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int s = 0; s < NSTEP; ) begin
      dec_valid = ($urandom % 6) != 0;
      dec = dec_valid ? cols[s] : N'({$urandom, $urandom});
      #1;
      if (dec_valid) begin
        int m;
        bit ev;
        m = s - 3 * L - 1;
        ev = (m >= 0) && (m < NOUT);
        checks++;
        if (out_valid != ev || (ev && out_bit != expb[m])) begin
          failures++;
          if (failures < 10) $display("step %0d: valid=%0d bit=%0d expected valid=%0d bit=%0d", s, out_valid,
                                      out_bit, ev, ev ? expb[m] : 1'b0);
        end
        s++;
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
