// LDACS spectrum-sensing and synchronisation subsystem around the multiplierless
// correlator.
//
// A channeliser delivers NUM_CH channel outputs at once. Software picks one
// (ch_sel) and the sample stream of that channel enters the multiplierless
// correlator (mless_corr), which correlates it with the quantised LDACS sync
// sequence held in its tap registers. The frame detector (peak_detector) looks
// at the correlator magnitude over windows of WINDOW samples and decides whether
// an LDACS frame is present: its peak must exceed 1.33 times every other value.
//   - Sense mode (CTRL[0]=0): every window end gives a report on sense_* and in
//     the STATUS register, for the cognitive software choosing a channel.
//   - Sync mode (CTRL[0]=1): the same unit acts as the receiver synchroniser; a
//     detected frame raises sync_strobe with the peak position (frame timing) on
//     sense_peak_idx, for the FFT stage.
// CTRL[1] selects reverse-link (0) or forward-link (1) matching. A CTRL write
// restarts the window and empties the correlator chain, so a channel or mode
// change starts a clean measurement (samples already inside the 3-stage front
// pipeline still count in the new window).
//
// Ports: ch_valid/ch_i/ch_q per channel; reg_* is the software port (map in
// ctrl_regs). corr_* exposes the raw correlator output.
// STATUS = {.., ch[CH_W+23:24], detected[16], peak_idx[IDX_W-1:0]} of the last report.
// Timing: a report appears 1 clock after the correlator output of the window's
// last sample, which itself comes 3 clocks after that sample's ch_valid.
// The correlator, the window, the ratio rule, the four channels and the
// software mode bit follow the reference design; the channel selector, the register map
// and the form of the sense and sync outputs are this design's choices.
module ldacs_sense_top
  import ldacs_corr_pkg::*;
#(
  parameter int unsigned SAMPLE_W      = ldacs_corr_pkg::CORR_SAMPLE_W,
  parameter int unsigned COEF_W        = ldacs_corr_pkg::CORR_COEF_W,
  parameter int unsigned N_TAPS        = ldacs_corr_pkg::CORR_N_TAPS,
  parameter int unsigned FL_ZERO_FIRST = ldacs_corr_pkg::CORR_FL_ZERO_FIRST,
  parameter int unsigned FL_ZERO_LAST  = ldacs_corr_pkg::CORR_FL_ZERO_LAST,
  parameter int unsigned FL_OUT_TAP    = ldacs_corr_pkg::CORR_FL_OUT_TAP,
  parameter int unsigned NUM_CH        = ldacs_corr_pkg::CORR_NUM_CH,
  parameter int unsigned WINDOW        = ldacs_corr_pkg::CORR_WINDOW,
  parameter int unsigned RATIO_NUM     = ldacs_corr_pkg::CORR_RATIO_NUM,
  parameter int unsigned RATIO_DEN     = ldacs_corr_pkg::CORR_RATIO_DEN,
  localparam int unsigned ACC_W        = SAMPLE_W + COEF_W + 1 + $clog2(N_TAPS),
  localparam int unsigned CH_W         = (NUM_CH > 1) ? $clog2(NUM_CH) : 1,
  localparam int unsigned IDX_W        = $clog2(WINDOW)
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic [NUM_CH-1:0]          ch_valid,
  input  logic signed [SAMPLE_W-1:0] ch_i [NUM_CH],
  input  logic signed [SAMPLE_W-1:0] ch_q [NUM_CH],
  input  logic                       reg_we,
  input  logic [1:0]                 reg_addr,
  input  logic [31:0]                reg_wdata,
  output logic [31:0]                reg_rdata,
  output logic                       sense_valid,
  output logic                       sense_detected,
  output logic [CH_W-1:0]            sense_channel,
  output logic [IDX_W-1:0]           sense_peak_idx,
  output logic                       sync_strobe,
  output logic                       corr_valid,
  output logic signed [ACC_W-1:0]    corr_re,
  output logic signed [ACC_W-1:0]    corr_im
);

  corr_mode_e               sync_mode;
  link_e                    fl_mode;
  logic [CH_W-1:0]          ch_sel;
  logic                     restart, coef_shift;
  logic signed [COEF_W-1:0] coef_i, coef_q;
  logic [31:0]              status;
  logic                     det_valid, detected;
  logic [IDX_W-1:0]         peak_idx;
  logic [ACC_W:0]           peak_mag_unused;
  logic                     in_valid;
  logic signed [SAMPLE_W-1:0] in_i, in_q;
  logic [CH_W-1:0]          rep_ch;

  ctrl_regs #(.NUM_CH(NUM_CH), .COEF_W(COEF_W)) u_regs (
    .clk, .rst, .reg_we, .reg_addr, .reg_wdata, .reg_rdata, .status,
    .sync_mode, .fl_mode, .ch_sel, .restart, .coef_shift, .coef_i, .coef_q);

  // Channel selector: the chosen channeliser output feeds the correlator.
  always_comb begin
    in_valid = ch_valid[ch_sel];
    in_i     = ch_i[ch_sel];
    in_q     = ch_q[ch_sel];
  end

  mless_corr #(
    .SAMPLE_W(SAMPLE_W), .COEF_W(COEF_W), .N_TAPS(N_TAPS),
    .FL_ZERO_FIRST(FL_ZERO_FIRST), .FL_ZERO_LAST(FL_ZERO_LAST), .FL_OUT_TAP(FL_OUT_TAP)
  ) u_corr (
    .clk, .rst, .clr(restart), .fl_mode(fl_mode == LINK_FL),
    .in_valid, .in_i, .in_q,
    .coef_shift, .coef_i, .coef_q,
    .out_valid(corr_valid), .out_re(corr_re), .out_im(corr_im));

  peak_detector #(
    .ACC_W(ACC_W), .WINDOW(WINDOW), .RATIO_NUM(RATIO_NUM), .RATIO_DEN(RATIO_DEN)
  ) u_det (
    .clk, .rst, .restart, .in_valid(corr_valid), .re(corr_re), .im(corr_im),
    .det_valid, .detected, .peak_idx, .peak_mag(peak_mag_unused));

  // Channel of the window that produced the last report.
  always_ff @(posedge clk) begin
    if (rst)                       rep_ch <= '0;
    else if (det_valid)            rep_ch <= ch_sel;
  end

  always_comb begin
    status                = '0;
    status[IDX_W-1:0]     = peak_idx;
    status[16]            = detected;
    status[24 +: CH_W]    = rep_ch;
  end

  assign sense_valid    = det_valid && (sync_mode == MODE_SENSE);
  assign sync_strobe    = det_valid && detected && (sync_mode == MODE_SYNC);
  assign sense_detected = detected;
  assign sense_channel  = ch_sel;   // a window always belongs to the current channel
  assign sense_peak_idx = peak_idx;

endmodule
