// vd_pkg: constants and trellis helper functions shared by the Viterbi decoder.
//
// The trellis is radix-2 with 2^(K-1) states. A state holds the last K-1
// input bits with the newest bit in the least significant position, so the
// predecessor of state s along decision bit d is {d, s >> 1} (the traceback
// rule of the pre-traceback design). The decision bit is therefore the
// oldest input bit of the encoder window, and the decoded bit of a step is
// the LSB of the state reached at that step.
//
// Code bits: the encoder window at step n is w = {d, s} (K bits, w[j] is the
// input j steps ago). A generator polynomial G is written the usual way, its
// MSB tapping the current input, so tap j of G is G[K-1-j]. The default
// generators per constraint length are the common maximum-free-distance
// rate-1/2 codes (133/171 octal for K = 7, as used by IEEE 802.11a); they are
// a choice of this implementation, not part of the SMU architecture.
package vd_pkg;

  // Soft-decision width of one received code symbol (8-level soft input).
  localparam int unsigned SOFT_W_DEFAULT = 3;

  // Default generator polynomial (octal, MSB = current input) for K = 3..9.
  function automatic int unsigned default_gen(int unsigned k, int unsigned idx);
    case (k)
      3:       return (idx == 0) ? 'o7   : 'o5;
      4:       return (idx == 0) ? 'o17  : 'o15;
      5:       return (idx == 0) ? 'o23  : 'o35;
      6:       return (idx == 0) ? 'o53  : 'o75;
      7:       return (idx == 0) ? 'o133 : 'o171;
      8:       return (idx == 0) ? 'o247 : 'o371;
      default: return (idx == 0) ? 'o561 : 'o753;
    endcase
  endfunction

  // Predecessor of state s (K-1 bits) along decision bit d: {d, s >> 1}.
  function automatic int unsigned pred_state(int unsigned s, bit d, int unsigned k);
    return (int'(d) << (k - 2)) | (s >> 1);
  endfunction

  // Parity of the window bits tapped by generator g.
  function automatic bit code_bit(int unsigned window, int unsigned g, int unsigned k);
    bit p = 1'b0;
    for (int unsigned j = 0; j < k; j++)
      if (g[k-1-j]) p ^= window[j];
    return p;
  endfunction

  // Code-bit pair {c1, c0} emitted on the branch into state s from
  // predecessor {d, s >> 1}.
  function automatic logic [1:0] branch_code(int unsigned s, bit d, int unsigned k,
                                             int unsigned g0, int unsigned g1);
    int unsigned w = (int'(d) << (k - 1)) | s;
    return {code_bit(w, g1, k), code_bit(w, g0, k)};
  endfunction

endpackage
