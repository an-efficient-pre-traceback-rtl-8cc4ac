// vd_top: rate-1/2 soft-decision Viterbi decoder with a pre-traceback
// survivor-path memory unit.
//
// Datapath: the branch metric unit (bmu) scores the received symbol pair
// against the four code-bit pairs; the add-compare-select array (acs)
// extends every state's survivor path by one step, using the path metrics
// held in the path metric unit (pmu), and produces one decision bit per
// state; the decision vector is registered and handed to the pre-traceback
// SMU (smu_pretb), which stores it and eventually returns the decoded bits in
// transmission order.
//
// Interface: in_sym carries two SOFT_W-bit soft symbols (0 = confident '0',
// all ones = confident '1'), accepted on cycles with in_valid high; there is
// no back-pressure. Each accepted pair advances the decoder by one trellis
// step and, once the pipeline is full, yields one decoded bit with out_valid
// high in the same cycle, so the throughput is one bit per accepted pair. The
// bit of the pair accepted as number n appears in the cycle after pair
// n + 3L + 1 is accepted (3L + 2 clock cycles later when in_valid stays
// high): the decision register, the 3L-step survivor memory schedule and the
// registered memory read. To drain the last bits of a message, follow it
// with 3L + 1 pairs of padding (for example the encoding of zeros).
//
// The defaults, K = 7 with L = 64 and 3-bit soft input, are the wireless LAN
// configuration the pre-traceback design was evaluated in. Generator
// polynomials default to 133/171 octal for K = 7 (and common codes for other
// K); the code, the BMU distance measure, the metric width and the reset
// values are this implementation's choices.
module vd_top #(
  parameter int unsigned K      = 7,
  parameter int unsigned L      = 64,
  parameter int unsigned SOFT_W = vd_pkg::SOFT_W_DEFAULT,
  parameter int unsigned PM_W   = 10,
  parameter int unsigned G0     = vd_pkg::default_gen(K, 0),
  parameter int unsigned G1     = vd_pkg::default_gen(K, 1),
  localparam int unsigned N     = 1 << (K - 1),
  localparam int unsigned BM_W  = SOFT_W + 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic [1:0][SOFT_W-1:0] in_sym,
  output logic                   out_valid,
  output logic                   out_bit
);

  logic [3:0][BM_W-1:0]   bm;
  logic [N-1:0][PM_W-1:0] pm_q, pm_d;
  logic [N-1:0]           dec_c, dec_q;
  logic                   dec_v;

  bmu #(.SOFT_W(SOFT_W)) u_bmu (.sym(in_sym), .bm);

  acs #(.K(K), .PM_W(PM_W), .BM_W(BM_W), .G0(G0), .G1(G1)) u_acs (
    .bm, .pm_in(pm_q), .pm_out(pm_d), .dec(dec_c)
  );

  pmu #(.K(K), .PM_W(PM_W)) u_pmu (
    .clk, .rst_n, .en(in_valid), .pm_d, .pm_q
  );

  // Register the decision vector between the ACS and the SMU.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dec_v <= 1'b0;
      dec_q <= '0;
    end else begin
      dec_v <= in_valid;
      if (in_valid) dec_q <= dec_c;
    end
  end

  smu_pretb #(.K(K), .L(L)) u_smu (
    .clk, .rst_n, .dec_valid(dec_v), .dec(dec_q),
    .out_valid, .out_bit
  );

endmodule
