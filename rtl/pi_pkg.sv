// pi_pkg: types shared by the PI controller's control unit and datapath.
//
// state_e encodes the six states of the control unit. Initialize Setup
// loads the configuration, WAIT_MULTI waits for an averaged ADC sample, and
// the four MULTI_* states each use the one shared multiplier for one
// product. MULTI_KI and MULTI_KP form the first form of the incremental PI
// law; MULTI_KI_KP forms the second. MULTI_DUTY turns D(k) into a DPWM count.
// The state names follow the control-unit state diagram; the encoding is
// this design's own.
package pi_pkg;

  typedef enum logic [2:0] {
    ST_INIT       = 3'd0,  // Initialize Setup
    ST_WAIT_MULTI = 3'd1,  // wait for ADC ready
    ST_MULTI_KI   = 3'd2,  // KI * e(k)                      (Cycle_state = 0)
    ST_MULTI_KP   = 3'd3,  // Kp * (Vout(k-1) - Vout(k))     (Cycle_state = 0)
    ST_MULTI_KIKP = 3'd4,  // (Kp+KI) * (Vout(k) - Vout(k+1)) (Cycle_state = 1)
    ST_MULTI_DUTY = 3'd5   // D(k) * Cycle
  } state_e;

endpackage
