// vd_stim_check: stimulus generator and output checker for the Viterbi
// decoder, shared by the end-to-end testbenches.
//
// It draws NBITS random message bits, follows them with 3L+1 zero bits so
// that every message bit is flushed out, and encodes the stream with its own
// rate-1/2 convolutional encoder (a K-bit shift register with the newest
// input in the MSB, code bit g = parity of register AND generator g). Each
// code bit becomes a 3-bit soft symbol near its ideal level (0 or 7) with a
// random perturbation of up to 2 levels. Every ERR_GAP steps or more, one
// symbol is pushed to the wrong side (1 for a sent '1', 6 for a sent '0') to
// make the decoder correct an error. When STALLS is set, in_valid is dropped
// on random cycles.
//
// Checks: every decoded bit equals the bit sent, in order, and leaves the
// decoder exactly 3L+1 accepted symbol pairs after its own pair (the bit of
// pair n appears in the cycle after pair n+3L+1 is accepted). done rises
// once NBITS bits have been checked.
module vd_stim_check #(
  parameter int unsigned K       = 7,
  parameter int unsigned L       = 64,
  parameter int unsigned G0      = 'o133,
  parameter int unsigned G1      = 'o171,
  parameter int unsigned NBITS   = 1000,
  parameter int unsigned ERR_GAP = 40,
  parameter bit          STALLS  = 1'b1
) (
  input  logic            clk,
  output logic            rst_n,
  output logic            in_valid,
  output logic [1:0][2:0] in_sym,
  input  logic            out_valid,
  input  logic            out_bit,
  output logic            done,
  output int              checks,
  output int              failures,
  output int              errors_injected,
  output int              stall_cycles
);

  localparam int unsigned TOTAL = NBITS + 3 * L + 1;

  bit          sent [TOTAL];
  logic [K-1:0] enc_reg;
  int          n_in, n_out, since_err;

  function automatic logic [2:0] soft_level(bit b, int unsigned r);
    int unsigned e = r % 3;
    return b ? 3'(7 - e) : 3'(e);
  endfunction

  initial begin
    for (int i = 0; i < TOTAL; i++) sent[i] = (i < NBITS) ? bit'($urandom & 1) : 1'b0;
  end

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; in_sym = '0; enc_reg = '0;
    n_in = 0; since_err = 0; errors_injected = 0; stall_cycles = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    while (n_in < TOTAL) begin
      @(posedge clk);
      if (STALLS && ($urandom % 8 == 0)) begin
        in_valid <= 1'b0;
        stall_cycles++;
      end else begin
        logic [K-1:0] r;
        logic [1:0]   c;
        logic [1:0][2:0] s;
        r = {sent[n_in], enc_reg[K-1:1]};
        enc_reg = r;
        c[0] = ^(r & K'(G0));
        c[1] = ^(r & K'(G1));
        s[0] = soft_level(c[0], $urandom);
        s[1] = soft_level(c[1], $urandom);
        since_err++;
        if (since_err >= int'(ERR_GAP) && ($urandom % 4 == 0)) begin
          int unsigned which;
          which = $urandom % 2;
          s[which] = c[which] ? 3'd1 : 3'd6;
          since_err = 0;
          errors_injected++;
        end
        in_sym   <= s;
        in_valid <= 1'b1;
        n_in++;
      end
    end
    @(posedge clk);
    in_valid <= 1'b0;
  end

  // Output check. n_acc counts pairs accepted in earlier cycles.
  int n_acc;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      n_acc <= 0; n_out <= 0; checks <= 0; failures <= 0; done <= 1'b0;
    end else begin
      if (in_valid) n_acc <= n_acc + 1;
      if (out_valid && n_out < TOTAL) begin
        checks <= checks + 2;
        if (out_bit !== sent[n_out]) begin
          failures <= failures + 1;
          if (failures < 10)
            $display("K=%0d L=%0d: bit %0d decoded %0d, sent %0d", K, L, n_out, out_bit, sent[n_out]);
        end
        if (n_acc != n_out + 1 + 3 * int'(L) + 1) begin
          failures <= failures + 1;
          if (failures < 10)
            $display("K=%0d L=%0d: bit %0d left after %0d pairs, expected %0d", K, L, n_out, n_acc,
                     n_out + 3 * int'(L) + 2);
        end
        n_out <= n_out + 1;
        if (n_out + 1 == int'(NBITS)) done <= 1'b1;
      end
    end
  end

endmodule
