// Shared types, constants and helper functions of the TDMR single-parity codec.
//
// Soft information travels between the detector stages as non-negative
// "costs" (negative log-probabilities, max-log domain): a smaller cost means a
// more likely value, 0 is the most likely one and COST_MAX stands for
// "impossible". A two-track symbol is the pair {side bit, main bit}; the four
// symbol values 00, 01, 10, 11 index a sym_cost_t. The codes are odd single
// parity checks of length 4 (three data bits and one parity bit), both along
// and across the tracks. The DRP permutation of Eq. (1)-(3) is computed here so
// that the interleaver and the testbenches share one definition.
package tdmr_pkg;

  // Width of a cost passed between stages, and the saturated "impossible" value.
  localparam int unsigned CW       = 8;
  localparam int unsigned COST_MAX = (1 << CW) - 1;

  typedef logic [CW-1:0] cost_t;
  // Costs of the four two-track symbols, index = {side bit, main bit}.
  typedef cost_t [3:0] sym_cost_t;
  // Costs of one bit being 0 (index 0) or 1 (index 1).
  typedef cost_t [1:0] bit_cost_t;

  // Coding approach: along-track parities separated by the DRP interleaver
  // (Fig. 1), one parity along and one across the tracks (Fig. 2), or no
  // parity at all (the uncoded reference: same detectors, user bits written
  // directly).
  typedef enum logic [1:0] {
    SCHEME_ALONG   = 2'd0,
    SCHEME_ACROSS  = 2'd1,
    SCHEME_UNCODED = 2'd2
  } scheme_e;

  // Odd parity bit completing three data bits: the four bits hold an odd
  // number of ones.
  function automatic logic odd_parity3(input logic [2:0] d);
    return ~(^d);
  endfunction

  // Saturating addition of two costs.
  function automatic cost_t cost_add(input cost_t a, input cost_t b);
    logic [CW:0] s;
    s = {1'b0, a} + {1'b0, b};
    return (s > (CW+1)'(COST_MAX)) ? cost_t'(COST_MAX) : s[CW-1:0];
  endfunction

  // Dithered relative prime permutation, Eq. (1)-(3): read dither of length R,
  // relative prime stage over the whole frame L, write dither of length W.
  // Input position i goes to output position drp_index(i).
  function automatic int unsigned drp_index(
      input int unsigned i, input int unsigned L,
      input int unsigned R, input int unsigned M, input int unsigned N,
      input int unsigned M2, input int unsigned B2,
      input int unsigned W, input int unsigned S, input int unsigned P);
    int unsigned r, q;
    r = R * (i / R) + ((M + N * i) % R);
    q = (M2 + B2 * r) % L;
    return W * (q / W) + ((S + P * q) % W);
  endfunction

endpackage
