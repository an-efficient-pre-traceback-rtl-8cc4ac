// acs: add-compare-select array for all 2^(K-1) trellis states.
//
// State i has two predecessors, {0, i>>1} and {1, i>>1}. For each, the
// candidate metric is the predecessor's path metric plus the branch metric of
// the code-bit pair on that branch; the smaller candidate survives. The
// decision bit dec[i] is the top bit of the surviving predecessor, exactly the
// bit the survivor memory unit needs to step back with {dec, i>>1}. On a tie
// the predecessor with top bit 0 wins.
//
// Path metrics use modulo arithmetic of PM_W bits: they are allowed to wrap,
// and two metrics are compared through the sign of their difference, which
// is correct while the spread of all metrics stays below 2^(PM_W-1). For
// rate 1/2, 3-bit soft symbols and K <= 9 the spread is at most
// (K-1)*14 plus the reset bias of the path metric unit, well below 512.
//
// Purely combinational: one whole trellis step per clock, with the path
// metric unit closing the loop. The branch codes of every state are
// constants computed at elaboration from the generator polynomials.
// The predecessor convention is the one the pre-traceback SMU relies on; the
// metric width, wrap-around comparison and tie rule are this
// implementation's choices.
module acs #(
  parameter int unsigned K      = 7,
  parameter int unsigned PM_W   = 10,
  parameter int unsigned BM_W   = 4,
  parameter int unsigned G0     = vd_pkg::default_gen(K, 0),
  parameter int unsigned G1     = vd_pkg::default_gen(K, 1),
  localparam int unsigned N     = 1 << (K - 1)
) (
  input  logic [3:0][BM_W-1:0]  bm,
  input  logic [N-1:0][PM_W-1:0] pm_in,
  output logic [N-1:0][PM_W-1:0] pm_out,
  output logic [N-1:0]           dec
);

  for (genvar i = 0; i < N; i++) begin : g_state
    localparam int unsigned P0 = vd_pkg::pred_state(i, 1'b0, K);
    localparam int unsigned P1 = vd_pkg::pred_state(i, 1'b1, K);
    localparam logic [1:0]  C0 = vd_pkg::branch_code(i, 1'b0, K, G0, G1);
    localparam logic [1:0]  C1 = vd_pkg::branch_code(i, 1'b1, K, G0, G1);

    logic [PM_W-1:0] m0, m1, diff;
    always_comb begin
      m0   = pm_in[P0] + PM_W'(bm[C0]);
      m1   = pm_in[P1] + PM_W'(bm[C1]);
      diff = m1 - m0;
      dec[i]    = diff[PM_W-1];          // m1 < m0 (modulo): take predecessor 1
      pm_out[i] = dec[i] ? m1 : m0;
    end
  end

endmodule
