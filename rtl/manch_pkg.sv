// manch_pkg: types and defaults shared by the Manchester decoder and clock
// recovery blocks.
//
// The decoder can follow either of the two usual Manchester conventions:
//   - G. E. Thomas: a rising mid-bit transition is a 0, a falling one a 1
//     (the default, as in the original design);
//   - IEEE 802.3:   a falling mid-bit transition is a 0, a rising one a 1.
// CNT_W_DEFAULT is the width of the edge-interval counters and of the
// half-cycle estimates; 16 bits (up to 65535 CLK cycles per half-cycle) is a
// choice of this design, not a number from the original description.
package manch_pkg;

  typedef enum logic {
    CONV_THOMAS  = 1'b0,
    CONV_IEEE8023 = 1'b1
  } convention_e;

  // What the half-cycle estimator does with an interval between two edges.
  typedef enum logic [1:0] {
    UPD_HOLD,     // interval rejected, estimate kept
    UPD_SINGLE,   // one half-cycle: store as is
    UPD_DOUBLE,   // two half-cycles: store halved
    UPD_INIT      // first interval after start-up, stored unchecked
  } upd_e;

  localparam int unsigned CNT_W_DEFAULT = 16;
  localparam int unsigned SYNC_STAGES_DEFAULT = 2;

endpackage
