// boc_acq_pkg -- constants, types and helper functions shared by the BOC
// acquisition engine.
//
// The engine correlates in three steps: samples are carrier-wiped and summed
// over one code increment (a "dchip", L samples), the dchip sums are
// sign-inverted by the replica PRN code and accumulated per subcarrier
// position k (K positions per code chip), and finally the K accumulators of a
// code hypothesis are weighted by the in-phase and quad-phase subcarrier
// signs. L = 4 and K = 8 with the BOC(10,5) subcarrier patterns
//   S_I = {+,+,-,-,+,+,-,-}   S_Q = {+,-,-,+,+,-,-,+}
// are the values of the reference configuration. The subcarrier period of
// SC_PERIOD = 4 positions reproduces exactly those patterns.
package boc_acq_pkg;

  // Reference configuration.
  localparam int unsigned L_SAMPLES_DEF  = 4;   // samples per dchip
  localparam int unsigned K_SUBCHIPS_DEF = 8;   // subcarrier positions per code chip
  localparam int unsigned SC_PERIOD_DEF  = 4;   // subcarrier positions per subcarrier period

  // Subcarrier signs at position k (1 = +1, 0 = -1).
  //   in-phase  : sign(sin) -> + for the first half of each period
  //   quad-phase: sign(cos) -> + for the first and last quarter
  function automatic logic sub_i_sign(input int unsigned k, input int unsigned period);
    return (k % period) < (period / 2);
  endfunction

  function automatic logic sub_q_sign(input int unsigned k, input int unsigned period);
    return ((k + period / 4) % period) < (period / 2);
  endfunction

  // Controller states.
  typedef enum logic [2:0] {
    ST_IDLE,     // waiting for start
    ST_LOAD,     // restart replica code and fill the replica window
    ST_ACCUM,    // consume one dwell of input samples
    ST_DRAIN,    // wait for the last dchip to be correlated
    ST_READ,     // read accumulators through the subcarrier stage
    ST_FLUSH,    // wait for the readout pipeline to empty
    ST_DECIDE,   // threshold test, choose next cell block
    ST_DONE      // result valid
  } acq_state_e;

endpackage
