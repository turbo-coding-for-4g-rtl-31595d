// turbo_pkg: types, sizes and trellis functions shared by the turbo codec.
//
// The constituent code is the 8-state recursive systematic convolutional
// code of the 3GPP (UMTS) turbo code: feedback polynomial g0 = 1 + D^2 + D^3
// (octal 13) and feedforward polynomial g1 = 1 + D + D^3 (octal 15). A state
// is the content of the three delay elements, bit 0 being the most recent
// one (D), bit 2 the oldest (D^3).
//
// Soft values are log-likelihood ratios log(P(bit=1)/P(bit=0)) in two's
// complement: a positive value favours a one. The widths below are this
// design's own choice; the fixed-point format of the original core is not
// published.
package turbo_pkg;

  localparam int unsigned NSTATES = 8;   // 2^3 trellis states
  localparam int unsigned LLR_W   = 6;   // channel soft-value width
  localparam int unsigned EXT_W   = 8;   // extrinsic (a-priori) width
  localparam int unsigned SM_W    = 12;  // normalised state-metric width

  typedef logic [2:0] state_t;

  // Recursion bit a_k = u ^ s2 ^ s3 (feedback g0 = 1 + D^2 + D^3).
  function automatic logic rsc_fb(state_t s, logic u);
    return u ^ s[1] ^ s[2];
  endfunction

  // Parity bit p_k = a_k ^ s1 ^ s3 (feedforward g1 = 1 + D + D^3).
  function automatic logic rsc_parity(state_t s, logic u);
    return rsc_fb(s, u) ^ s[0] ^ s[2];
  endfunction

  // Next state: the recursion bit enters the delay line.
  function automatic state_t rsc_next(state_t s, logic u);
    return {s[1], s[0], rsc_fb(s, u)};
  endfunction

  // Saturate a wide signed value to 'w' bits (w <= 16).
  function automatic logic signed [15:0] sat16(logic signed [19:0] v, int unsigned w);
    logic signed [19:0] hi, lo;
    hi = (20'sd1 <<< (w - 1)) - 20'sd1;
    lo = -(20'sd1 <<< (w - 1));
    if (v > hi) return hi[15:0];
    if (v < lo) return lo[15:0];
    return v[15:0];
  endfunction

  // Decoder phases (controller state).
  typedef enum logic [2:0] {
    PH_LOAD,   // take in the channel values of a block
    PH_START,  // start the windows of a half-iteration
    PH_FWD,    // windows read their inputs, forward (alpha) recursion
    PH_BWD,    // backward (beta) recursion, extrinsic write-back
    PH_OUT     // stream the decided bits
  } phase_t;

endpackage
