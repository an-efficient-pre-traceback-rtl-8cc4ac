// pmu: path metric unit, the register bank that closes the ACS loop.
//
// Holds one PM_W-bit metric per trellis state. When en is high the metrics
// computed by the ACS in this cycle are stored and become the ACS inputs of
// the next step. A synchronous active-low reset puts state 0 at 0 and every
// other state at INIT_BIAS, so decoding starts from the encoder's all-zero
// state; the reset values are a choice of this implementation.
module pmu #(
  parameter int unsigned K         = 7,
  parameter int unsigned PM_W      = 10,
  parameter int unsigned INIT_BIAS = 64,
  localparam int unsigned N        = 1 << (K - 1)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  input  logic [N-1:0][PM_W-1:0] pm_d,
  output logic [N-1:0][PM_W-1:0] pm_q
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++)
        pm_q[i] <= (i == 0) ? '0 : PM_W'(INIT_BIAS);
    end else if (en) begin
      pm_q <= pm_d;
    end
  end

endmodule
