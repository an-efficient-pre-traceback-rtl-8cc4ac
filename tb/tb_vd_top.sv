// tb_vd_top: end-to-end test of the Viterbi decoder at its default size
// (K = 7, 64 states, L = 64).
//
// 10,000 random message bits are encoded, given soft-decision noise and
// isolated symbol errors, and fed with random input stalls. Every decoded
// bit is compared with the bit sent, and its latency with the expected
// 3L+1 steps. Besides the data check, the testbench counts the mechanisms of
// the pre-traceback survivor memory unit and fails if one never occurs:
// pointer-register restarts, DC start-register loads, writes to each of the
// three banks, LIFO stack swaps, stalled cycles and corrected symbol errors.
// It also checks that the survivor memory is 3L columns deep and that each
// column is read once (one read per decoded bit, against two in a
// conventional traceback), and reports how often all 64 pointer registers
// agreed at a block boundary (the survivor paths had merged).
module tb_vd_top;

  localparam int unsigned K = 7;
  localparam int unsigned L = 64;
  localparam int unsigned N = 1 << (K - 1);

  logic            clk = 1'b0;
  logic            rst_n, in_valid, out_valid, out_bit, done;
  logic [1:0][2:0] in_sym;
  int              checks, failures, errs, stalls;

  always #5 clk = !clk;

  vd_top dut (.clk, .rst_n, .in_valid, .in_sym, .out_valid, .out_bit);

  vd_stim_check #(.K(K), .L(L), .G0('o133), .G1('o171), .NBITS(10000), .ERR_GAP(40)) u_sc (
    .clk, .rst_n, .in_valid, .in_sym, .out_valid, .out_bit,
    .done, .checks, .failures, .errors_injected(errs), .stall_cycles(stalls)
  );

  int extra_fail = 0;

  // Mechanism counters.
  int n_restart, n_dc_start, n_swap, n_merged, n_split, n_wr, n_rd;
  int n_bank [3];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      n_restart <= 0; n_dc_start <= 0; n_swap <= 0; n_merged <= 0; n_split <= 0; n_wr <= 0; n_rd <= 0;
      for (int b = 0; b < 3; b++) n_bank[b] <= 0;
    end else if (dut.u_smu.dec_valid) begin
      n_wr <= n_wr + 1;
      if (dut.u_smu.re) n_rd <= n_rd + 1;
      if (dut.u_smu.restart) n_restart <= n_restart + 1;
      if (dut.u_smu.blk_end) n_bank[dut.u_smu.wbank] <= n_bank[dut.u_smu.wbank] + 1;
      if (dut.u_smu.u_lifo.push && dut.u_smu.u_lifo.swap) n_swap <= n_swap + 1;
      if (dut.u_smu.dc_start) begin
        bit same;
        same = 1'b1;
        n_dc_start <= n_dc_start + 1;
        for (int i = 1; i < N; i++)
          if (dut.u_smu.ptr[i] != dut.u_smu.ptr[0]) same = 1'b0;
        if (same) n_merged <= n_merged + 1; else n_split <= n_split + 1;
      end
    end
  end

  task automatic need(string what, int count);
    $display("  %-28s %0d", what, count);
    if (count == 0) begin
      $display("FAIL: mechanism '%s' never happened", what);
      extra_fail++;
    end
  endtask

  initial begin
    @(posedge rst_n);
    wait (done);
    repeat (2) @(posedge clk);
    $display("mechanisms:");
    need("pointer restarts", n_restart);
    need("DC start register loads", n_dc_start);
    need("bank 0 blocks written", n_bank[0]);
    need("bank 1 blocks written", n_bank[1]);
    need("bank 2 blocks written", n_bank[2]);
    need("LIFO swaps", n_swap);
    need("stalled input cycles", stalls);
    need("symbol errors corrected", errs);
    $display("  pointers merged at boundary  %0d of %0d", n_merged, n_merged + n_split);
    // One memory read per column: every column of a started decode is read
    // exactly once (no separate traceback pass), and the memory is 3L deep.
    $display("  survivor memory writes %0d, reads %0d", n_wr, n_rd);
    // (the last decode may still be under way)
    if (n_rd > n_dc_start * int'(L) || n_rd <= (n_dc_start - 1) * int'(L) || n_rd > n_wr) begin
      $display("FAIL: %0d memory reads for %0d decodes of %0d columns", n_rd, n_dc_start, L);
      extra_fail++;
    end
    if ($size(dut.u_smu.u_mem.mem) != 3 * L) begin
      $display("FAIL: survivor memory depth %0d, expected 3L = %0d", $size(dut.u_smu.u_mem.mem), 3 * L);
      extra_fail++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks + 10, failures + extra_fail);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    $display("watchdog: decoder did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
