// ptb_pointer_reg: pre-traceback pointer register array.
//
// One register of K-1 bits per trellis state i. Register i holds the state at
// the start of the current block from which state i's survivor path
// descends. It is updated forward, at the same step the decision column is
// written into the survivor memory:
//   S_n[i] = S_{n-1}[{d_n[i], i>>1}]   inside a block,
//   S_n[i] = {d_n[i], i>>1}           on the first step of a block (restart),
// i.e. at the first step the previous registers are replaced by the identity
// (register j holding j), which lets consecutive blocks share one register
// array. Each register is an N-to-1 multiplexer over the previous registers,
// indexed by the predecessor of state i, followed by a flip-flop.
//
// After the last step of a block every register holds the state at the
// block's start reached from the corresponding end state; when the block is
// at least as long as the survivor paths need to merge, they all agree and
// any one of them is the start state for the decode. The registers carry no
// reset: the first restart step writes all of them. The update rule and the
// identity restart are those of the pre-traceback scheme; taking the
// registers without reset is this implementation's choice.
module ptb_pointer_reg #(
  parameter int unsigned K  = 7,
  localparam int unsigned N = 1 << (K - 1),
  localparam int unsigned SW = K - 1
) (
  input  logic                 clk,
  input  logic                 en,
  input  logic                 restart,
  input  logic [N-1:0]         dec,
  output logic [N-1:0][SW-1:0] ptr
);

  always_ff @(posedge clk) begin
    if (en) begin
      for (int unsigned i = 0; i < N; i++) begin
        logic [SW-1:0] idx;                       // predecessor {d_n[i], i>>1}
        idx = SW'(i >> 1) | (SW'(dec[i]) << (SW - 1));
        ptr[i] <= restart ? idx : ptr[idx];
      end
    end
  end

endmodule
