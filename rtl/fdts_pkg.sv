// fdts_pkg: types and number formats shared by the frequency-domain timing
// synchronizer.
//
// Number formats (all fixed point, two's complement):
//  * Angles are binary angles of AW bits: the full word range is one turn, so
//    2^AW counts equal 2*pi and wrap-around is free.  AW = 16 is a choice of
//    this design; the source algorithm works in radians.
//  * A least-squares slope carries SFB fraction bits on top of the angle unit
//    (angle counts per subcarrier).
//  * The normalized sampling clock offset delta = (Tr - Tt)/Tt is held in
//    units of 2^-DFB with DFB = AW + SFB = 20 (about 1 ppm per count).  With a
//    short preamble of N samples and no guard interval, the phase difference
//    between preambles m apart is 2*pi*k*delta*m, so delta*2^DFB equals the
//    slope word divided by m.
//  * Sampling phases are counted in steps of the multiphase clock (M steps per
//    sample period), PHW bits signed.
package fdts_pkg;

  localparam int AW  = 16;        // binary angle width
  localparam int SFB = 4;         // fraction bits of a slope
  localparam int DFB = AW + SFB;  // fraction bits of delta
  localparam int DLW = 24;        // width of a delta word
  localparam int PHW = 16;        // width of a phase word (clock-phase steps)
  localparam int KW  = 5;         // width of a signed subcarrier index

  // Which timing-detection register a preamble's TD value is written to.
  typedef enum logic [1:0] {
    TD_NONE  = 2'd0,
    TD_ZERO  = 2'd1,   // TD(eps)
    TD_MINUS = 2'd2,   // TD(eps - M/4)
    TD_PLUS  = 2'd3    // TD(eps + M/4)
  } td_sel_e;

  // Per-preamble commands from the sequencer to every antenna calculator.
  typedef struct packed {
    logic                  store_en;   // write this preamble's bins to the buffer
    logic                  store_bank; // bank written
    logic                  pair_en;    // pair this preamble with a stored one
    logic                  ref_bank;   // bank holding the earlier preamble
    logic                  m_log2;     // preamble distance m = 1 << m_log2
    logic signed [PHW-1:0] h;          // phase step applied between the pair
    td_sel_e               td_sel;     // TD register loaded by this preamble
  } ant_ctrl_t;

endpackage
