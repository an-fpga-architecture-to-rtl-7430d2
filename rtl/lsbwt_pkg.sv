// Shared constants and types of the linear-sorter BWT engine (LSBWT).
// The default string length of 128 characters (one Comparison Unit per character)
// is the size the design was evaluated at; the 8-bit character width is this
// design's choice. The controller phases are listed here so the top level and
// the testbenches can name them.
package lsbwt_pkg;

  localparam int unsigned DEF_N      = 128;  // string length = number of CUs
  localparam int unsigned DEF_DATA_W = 8;    // character width in bits

  // Controller phases. One string passes LOAD -> CAPTURE -> DECIDE ->
  // (SUBST -> CAPTURE -> DECIDE)* -> OUTPUT -> LOAD.
  typedef enum logic [2:0] {
    PH_LOAD    = 3'd0,  // characters are fed and sorted as they arrive
    PH_CAPTURE = 3'd1,  // round-end pulse: EQL and SUST are stored
    PH_DECIDE  = 3'd2,  // BWT done, or tied CUs are loaded with MAX_VALUE
    PH_SUBST   = 3'd3,  // one tied character is substituted per cycle
    PH_OUTPUT  = 3'd4   // sorted indexes are read out, one per cycle
  } phase_e;

endpackage
