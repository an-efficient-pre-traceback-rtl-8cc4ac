// dc_unit: DC start register and decode-read (DC) engine of the
// pre-traceback SMU.
//
// At a block boundary (start high on an enabled step) the start state found
// by the pre-traceback pointer registers is captured in the DC start
// register, and the unit begins reading the L columns of the bank named by
// start_bank from the last column down to the first, one column per enabled
// step. Because the survivor memory read is registered, each column arrives
// one enabled step after its address. With the column of step n in hand and
// the state S_n on the survivor path, the unit
//   emits the decoded bit S_n[0] (the newest input bit held in the state), and
//   steps back to S_{n-1} = {column[S_n], S_n >> 1}.
// The first state of a decode comes from the DC start register, the rest from
// the running state register. Decoded bits leave newest first, L per block;
// blk_last marks the oldest (last) bit of a block.
//
// Timing: a decode occupies L+1 enabled steps (L reads, the last bit one step
// later). The next start may coincide with that final step, because the start
// register is separate from the running state; the controller starts a
// decode every L steps, so decodes run back to back with no gap.
// The start register and the backward walk follow the pre-traceback scheme;
// the registered read and the choice of pointer are this implementation's.
module dc_unit #(
  parameter int unsigned K   = 7,
  parameter int unsigned L   = 64,
  localparam int unsigned N  = 1 << (K - 1),
  localparam int unsigned SW = K - 1,
  localparam int unsigned AW = $clog2(3 * L),
  localparam int unsigned CW = (L > 1) ? $clog2(L) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          start,
  input  logic [SW-1:0] start_state,
  input  logic [1:0]    start_bank,
  output logic          re,
  output logic [AW-1:0] raddr,
  input  logic [N-1:0]  rdata,
  output logic          bit_valid,
  output logic          bit_out,
  output logic          blk_last
);

  logic [SW-1:0] start_reg;    // DC start register
  logic [SW-1:0] cur;          // running traceback state
  logic [1:0]    rd_bank;
  logic [CW-1:0] rd_col;
  logic          rd_active;    // reads after the first one still to issue
  logic          cons_v;       // rdata holds a column to consume this step
  logic          cons_first;   // ... and it is the first column of a decode
  logic          cons_last;    // ... and it is the last column of a decode
  logic [SW-1:0] s_now;        // state S_n belonging to the column in rdata

  // Read address: the first read of a decode is issued in the start step.
  always_comb begin
    re    = en && (start || rd_active);
    raddr = start ? AW'(start_bank) * AW'(L) + AW'(L - 1)
                  : AW'(rd_bank) * AW'(L) + AW'(rd_col);
  end

  assign s_now     = cons_first ? start_reg : cur;
  assign bit_valid = en && cons_v;
  assign bit_out   = s_now[0];
  assign blk_last  = cons_last;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_active  <= 1'b0;
      cons_v     <= 1'b0;
      cons_first <= 1'b0;
      cons_last  <= 1'b0;
      rd_col     <= '0;
      rd_bank    <= '0;
      start_reg  <= '0;
      cur        <= '0;
    end else if (en) begin
      // read side
      if (start) begin
        start_reg <= start_state;
        rd_bank   <= start_bank;
        rd_col    <= CW'(L - 2);
        rd_active <= (L > 1);
      end else if (rd_active) begin
        rd_col <= rd_col - 1'b1;
        if (rd_col == '0) rd_active <= 1'b0;
      end
      cons_v     <= re;
      cons_first <= start;
      cons_last  <= start ? (L == 1) : (rd_active && rd_col == '0);
      // traceback recursion on the column read in the previous step
      if (cons_v) cur <= {rdata[s_now], s_now[SW-1:1]};
    end
  end

  // A new decode may only start once all reads of the previous one are issued.
  a_start_after_reads: assert property (@(posedge clk) disable iff (!rst_n)
    (en && start) |-> !rd_active);

endmodule
