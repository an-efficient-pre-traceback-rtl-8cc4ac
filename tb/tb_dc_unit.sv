// tb_dc_unit: DC start register and decode engine at K = 7, L = 64.
//
// A registered-read memory model holds 3L random decision columns. Five
// decodes are started back to back, every L enabled steps, each with a
// random start state and bank, and the clock enable drops on random cycles.
// The expected output is worked out here by walking each bank backwards
// from its start state (bit = S[0], S <- {column[S], S >> 1}): decode d must
// emit its L bits on enabled steps dL+1 .. dL+L, with blk_last on the last,
// and nothing on other steps.
module tb_dc_unit;
  localparam int K = 7, L = 64, N = 64, NDEC = 5, NSTEP = NDEC * L + 4;
  logic clk = 0, rst_n, en, start, re, bit_valid, bit_out, blk_last;
  logic [5:0] start_state;
  logic [1:0] start_bank;
  logic [7:0] raddr;
  logic [N-1:0] rdata;
  logic [N-1:0] mem [3 * L];
  int checks = 0, failures = 0;

  always #5 clk = !clk;
  dc_unit dut (.clk, .rst_n, .en, .start, .start_state, .start_bank, .re, .raddr, .rdata,
               .bit_valid, .bit_out, .blk_last);

  always_ff @(posedge clk) if (re) rdata <= mem[raddr];

  int ss [NDEC], sb [NDEC];
  bit exp_v [NSTEP], exp_b [NSTEP], exp_l [NSTEP];

  initial begin
    for (int a = 0; a < 3 * L; a++) mem[a] = {$urandom, $urandom};
    for (int s = 0; s < NSTEP; s++) begin exp_v[s] = 0; exp_b[s] = 0; exp_l[s] = 0; end
    for (int d = 0; d < NDEC; d++) begin
      int st;
      ss[d] = $urandom % N; sb[d] = $urandom % 3;
      st = ss[d];
      for (int j = 0; j < L; j++) begin
        exp_v[d * L + 1 + j] = 1;
        exp_b[d * L + 1 + j] = bit'(st & 1);
        exp_l[d * L + 1 + j] = (j == L - 1);
        st = (int'(mem[sb[d] * L + L - 1 - j][st]) << (K - 2)) | (st >> 1);
      end
    end
    rst_n = 0; en = 0; start = 0; start_state = 0; start_bank = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int step = 0; step < NSTEP; ) begin
      en = ($urandom % 5) != 0;
      start = en && (step % L == 0) && (step / L < NDEC);
      start_state = start ? 6'(ss[step / L]) : 6'($urandom);
      start_bank  = start ? 2'(sb[step / L]) : 2'($urandom % 3);
      #1;
      if (en) begin
        checks++;
        if (bit_valid != exp_v[step] || (exp_v[step] && (bit_out != exp_b[step] || blk_last != exp_l[step]))) begin
          failures++;
          if (failures < 10)
            $display("step %0d: valid=%0d bit=%0d last=%0d expected %0d %0d %0d", step, bit_valid, bit_out,
                     blk_last, exp_v[step], exp_b[step], exp_l[step]);
        end
        step++;
      end else begin
        checks++;
        if (bit_valid) begin
          failures++;
          $display("output while disabled");
        end
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
