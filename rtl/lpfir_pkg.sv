// lpfir_pkg: constants and types shared by the single-multiplier linear
// phase FIR filter processor.
//
// The default sizes are those of the headline configuration the design is
// built around: an 8 x 8-bit two's complement multiplier serving a filter of
// up to 128 taps. The same RTL is meant to be rebuilt for 16- and 24-bit
// word lengths and for 32- or 64-tap filters by overriding parameters.
//
// The controller state type is shared between the sequencer and the
// testbenches that observe it.
package lpfir_pkg;

  // Default word lengths and filter length.
  localparam int unsigned DEF_DATA_W = 8;
  localparam int unsigned DEF_COEF_W = 8;
  localparam int unsigned DEF_N_TAPS = 128;

  // Controller states.
  //   ST_IDLE : waiting for a data sample, PCVM holds the filter state
  //   ST_RUN  : one multiply-add per clock, stepping through the coefficient words
  //   ST_OUT  : the output y(n) is available in PCVM0
  typedef enum logic [1:0] {
    ST_IDLE = 2'd0,
    ST_RUN  = 2'd1,
    ST_OUT  = 2'd2
  } ctrl_state_e;

  // Number of PCVM cells needed for an N-tap filter. Every tap writes one
  // cell, a tap with its shift flag set needs a second one, and one cell
  // that is never written supplies the zero term of the last tap:
  // at most 1 + 1 + 2*(N-1) = 2N cells.
  function automatic int unsigned pcvm_depth(input int unsigned n_taps);
    return 2 * n_taps;
  endfunction

endpackage
