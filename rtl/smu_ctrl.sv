// smu_ctrl: write-pointer and block controller of the pre-traceback SMU.
//
// The survivor memory is worked in blocks of L trellis steps. A column
// counter and a bank counter (0, 1, 2, 0, ...) form the write address
// bank*L + column, advanced on every step with en high. For the current step
// the controller flags
//   restart  - the column is the first of a block: the pointer registers
//              restart from the identity, and the decode of an earlier block
//              may begin;
//   blk_end  - the column is the last of its block.
// blocks_done counts completed blocks up to 2, which is how many must exist
// before a decode has both a finished pointer and a bank to read.
// All outputs are registers or decode registers directly; state changes only
// on clock edges with en high. Reset (synchronous, active low) returns to
// bank 0, column 0. The three-bank rotation is the pre-traceback schedule;
// the counters and flags are this implementation's way of producing it.
module smu_ctrl #(
  parameter int unsigned L   = 64,
  localparam int unsigned AW = $clog2(3 * L),
  localparam int unsigned CW = (L > 1) ? $clog2(L) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  output logic [AW-1:0] waddr,
  output logic          restart,
  output logic          blk_end,
  output logic [1:0]    wbank,
  output logic [1:0]    blocks_done
);

  logic [CW-1:0] col;

  assign restart = (col == '0);
  assign blk_end = (col == CW'(L - 1));
  assign waddr   = AW'(wbank) * AW'(L) + AW'(col);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      col         <= '0;
      wbank       <= '0;
      blocks_done <= '0;
    end else if (en) begin
      if (blk_end) begin
        col         <= '0;
        wbank       <= (wbank == 2'd2) ? 2'd0 : wbank + 2'd1;
        blocks_done <= (blocks_done == 2'd2) ? 2'd2 : blocks_done + 2'd1;
      end else begin
        col <= col + 1'b1;
      end
    end
  end

endmodule
