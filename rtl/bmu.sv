// bmu: branch metric unit of a rate-1/2 soft-decision Viterbi decoder.
//
// Each trellis step receives two soft symbols of SOFT_W bits (8 levels by
// default). A symbol value of 0 is a confident '0' and 2^SOFT_W-1 a
// confident '1'. For every possible code-bit pair c = {c1, c0} the unit
// outputs the distance of the received pair from that pair: the distance of
// one symbol r from bit 0 is r, from bit 1 it is (2^SOFT_W-1) - r, and the
// two distances are added. Smaller metrics mean more likely branches.
//
// Purely combinational. The soft-value coding and the distance measure are
// choices of this implementation; the decoder architecture only requires a
// metric per code-bit pair.
module bmu #(
  parameter int unsigned SOFT_W = vd_pkg::SOFT_W_DEFAULT,
  localparam int unsigned BM_W  = SOFT_W + 1
) (
  input  logic [1:0][SOFT_W-1:0] sym,  // sym[0] -> code bit 0, sym[1] -> code bit 1
  output logic [3:0][BM_W-1:0]   bm    // bm[c] for code-bit pair c = {c1, c0}
);

  localparam logic [SOFT_W-1:0] SMAX = '1;

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      logic [BM_W-1:0] d0, d1;
      d0 = c[0] ? BM_W'(SMAX - sym[0]) : BM_W'(sym[0]);
      d1 = c[1] ? BM_W'(SMAX - sym[1]) : BM_W'(sym[1]);
      bm[c] = d0 + d1;
    end
  end

endmodule
