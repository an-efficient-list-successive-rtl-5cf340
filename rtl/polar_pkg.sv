// polar_pkg: constants and index helpers shared by the list successive
// cancellation (SCL) decoder.
//
// Log-likelihood (LL) pairs: every soft value in the decoder is a pair
// {LL(bit=1), LL(bit=0)} of signed W-bit numbers, packed as [1:0][W-1:0]
// with element 0 holding LL(bit=0). Larger means more likely.
//
// Partial sums (the u_s values of the feedback part) for one list path are
// kept in one flat vector: the partial-sum vector of the last completed left
// node at tree depth d (1 <= d <= log2 N - 1) is N/2^d bits long and starts at
// bit bl_off(N, d).
//
// The M registers of the private stages 3 .. log2(N)-1 of one list path are
// kept in one flat array of MPE results; stage s starts at MPE index
// stg_off(N, s).
package polar_pkg;

  // Configuration used throughout unless a module is given other values.
  // N and L are those of the published FPGA implementation; Q is this
  // design's choice.
  localparam int unsigned N_DEFAULT = 32;  // code length
  localparam int unsigned L_DEFAULT = 8;   // list size
  localparam int unsigned Q_DEFAULT = 6;   // channel LL width in bits

  // Decoder controller phase.
  typedef enum logic [1:0] {
    PH_IDLE = 2'd0,
    PH_RUN  = 2'd1
  } phase_e;

  // Start of the depth-d left-sibling partial sums in the flat vector.
  function automatic int unsigned bl_off(input int unsigned n_len, input int unsigned d);
    return n_len - (n_len >> (d - 1));
  endfunction

  // Start of stage s (s >= 3) in the flat per-path MPE register array.
  function automatic int unsigned stg_off(input int unsigned n_len, input int unsigned s);
    return (n_len / 4) - (n_len >> (s - 1));
  endfunction

  // Number of MPE result registers one list path owns (stages 3 .. log2N-1).
  function automatic int unsigned lane_mpes(input int unsigned n_len);
    return (n_len / 4 > 2) ? (n_len / 4 - 2) : 0;
  endfunction

endpackage
