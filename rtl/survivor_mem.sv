// survivor_mem: survivor memory array of the pre-traceback SMU.
//
// Three banks of L columns each; a column is the decision-bit vector of one
// trellis step, one bit per state. Column c of bank b sits at address
// b*L + c, so the array is 3L words of N = 2^(K-1) bits. That depth, 3L, is
// the memory saving of the pre-traceback scheme over the 4L of a
// conventional two-pointer traceback.
//
// One write port (WR, increasing addresses) and one read port (DC,
// decreasing addresses) work in the same cycle on different banks. The read
// is registered: rdata holds the column addressed in the last cycle with re
// high, and keeps it while re is low. The array is plain RTL; a memory
// compiler macro could replace it without changing the interface.
module survivor_mem #(
  parameter int unsigned K   = 7,
  parameter int unsigned L   = 64,
  localparam int unsigned N  = 1 << (K - 1),
  localparam int unsigned DEPTH = 3 * L,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [N-1:0]  wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [N-1:0]  rdata
);

  logic [N-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
