// lifo: two-stack bit-order reversal buffer behind the decode engine.
//
// The decode engine produces each block of L bits newest first. Two stacks
// of L bits take turns: the engine pushes a block into one stack while the
// other, filled by the previous block, is popped one bit per enabled step,
// which returns that block oldest first. swap arrives with the last push of
// a block; it hands the filled stack to the pop side and points pushes at
// the other stack. A block pushed in steps 1..L is popped in the L enabled
// steps after its last push, so the output is a continuous bit stream at the
// input rate. out_valid is high on steps with a pop. A two-stack reversal is
// what the architecture calls for; the register-based stacks and counters are
// this implementation's.
module lifo #(
  parameter int unsigned L   = 64,
  localparam int unsigned IW = $clog2(L + 1),
  localparam int unsigned XW = (L > 1) ? $clog2(L) : 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic push,
  input  logic din,
  input  logic swap,
  output logic out_valid,
  output logic dout
);

  logic [1:0][L-1:0] stack;
  logic          wsel;      // stack being pushed; the other is popped
  logic [IW-1:0] wcnt;      // bits pushed into stack[wsel]
  logic [IW-1:0] rcnt;      // bits still to pop from stack[!wsel]
  logic [XW-1:0] widx, ridx;

  assign widx = XW'(wcnt);
  assign ridx = XW'(rcnt - 1'b1);

  assign out_valid = en && (rcnt != '0);
  assign dout      = stack[!wsel][ridx];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wsel  <= 1'b0;
      wcnt  <= '0;
      rcnt  <= '0;
      stack <= '0;
    end else if (en) begin
      if (push) stack[wsel][widx] <= din;
      if (push && swap) begin
        wsel <= !wsel;
        wcnt <= '0;
        rcnt <= wcnt + 1'b1;
      end else begin
        if (push) wcnt <= wcnt + 1'b1;
        if (rcnt != '0) rcnt <= rcnt - 1'b1;
      end
    end
  end

  // Blocks are exactly L bits long, and a block is handed over only when the
  // previous one has been popped (at most its last bit is still pending).
  a_block_length: assert property (@(posedge clk) disable iff (!rst_n)
    (en && push) |-> (swap ? (wcnt == IW'(L - 1)) : (wcnt < IW'(L - 1))));
  a_pop_drained: assert property (@(posedge clk) disable iff (!rst_n)
    (en && push && swap) |-> (rcnt <= IW'(1)));

endmodule
