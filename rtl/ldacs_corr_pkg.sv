// Shared constants and types of the LDACS multiplierless correlator.
//
// The defaults follow the correlator design: 16-bit signed I/Q input samples, a
// synchronisation tile of 376 taps (indices 0..375), forward-link operation that
// zeroes taps 1..75 and takes its result at tap 225, and a 4950-sample detection
// window in which a peak must exceed 1.33 times every other value. The 3-bit
// coefficient quantisation (levels -4..+3 for each of I and Q) and the register
// map are choices of this implementation.
package ldacs_corr_pkg;

  localparam int unsigned CORR_SAMPLE_W      = 16;   // input I/Q sample width
  localparam int unsigned CORR_COEF_W        = 3;    // quantised sync coefficient width
  localparam int unsigned CORR_N_TAPS        = 376;  // sync tile length, taps 0..375
  localparam int unsigned CORR_FL_ZERO_FIRST = 1;    // first tap forced to 0 in FL mode
  localparam int unsigned CORR_FL_ZERO_LAST  = 75;   // last tap forced to 0 in FL mode
  localparam int unsigned CORR_FL_OUT_TAP    = 225;  // chain stage read in FL mode
  localparam int unsigned CORR_WINDOW        = 4950; // detection window in samples
  localparam int unsigned CORR_NUM_CH        = 4;    // channeliser outputs open at once
  localparam int unsigned CORR_RATIO_NUM     = 133;  // peak must exceed 1.33 x others
  localparam int unsigned CORR_RATIO_DEN     = 100;

  // Register map of the software control port.
  localparam logic [1:0] REG_CTRL   = 2'd0;  // [0] sync_mode [1] fl_mode [9:8] ch_sel; write restarts
  localparam logic [1:0] REG_COEF   = 2'd1;  // [COEF_W-1:0] coef I, [COEF_W+7:8] coef Q; write shifts in
  localparam logic [1:0] REG_STATUS = 2'd2;  // last detection result (read only)
  localparam logic [1:0] REG_COUNT  = 2'd3;  // number of coefficients shifted in (read only)

  // Operating mode of the correlator seen by the rest of the receiver.
  typedef enum logic {
    MODE_SENSE = 1'b0,  // spectrum sensing: report frame presence per window
    MODE_SYNC  = 1'b1   // receiver synchroniser: strobe symbol timing to the FFT
  } corr_mode_e;

  // Which sync structure the correlator matches.
  typedef enum logic {
    LINK_RL = 1'b0,     // reverse-link tile, all taps, output of the last tap
    LINK_FL = 1'b1      // forward-link symbols, taps 1..75 zeroed, output of tap 225
  } link_e;

endpackage
