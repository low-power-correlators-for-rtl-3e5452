// Multiplierless cross-correlator for LDACS sync detection.
//
// Computes, for every input sample n, the complex correlation of the last N_TAPS
// received samples r with the stored, quantised synchronisation sequence s:
//   C[n] = sum_{k=0}^{N_TAPS-1} r[n-(N_TAPS-1)+k] * conj(s[k])          (RL mode)
// It is a transposed direct-form filter without multipliers. One shared shift-add
// block per component (I, Q) forms the input sample times every coefficient level;
// at each tap, multiplexers driven by the tap's sync coefficient pick the needed
// products (tap_mux), a pipeline register follows the multiplexers, and the
// add-delay chain accumulates the terms. In FL mode (fl_mode=1) taps
// FL_ZERO_FIRST..FL_ZERO_LAST contribute 0 and the result is taken from chain
// stage FL_OUT_TAP instead of the last stage:
//   C[n] = sum_{k in {0..FL_OUT_TAP} \ {FL_ZERO_FIRST..FL_ZERO_LAST}}
//          r[n-FL_OUT_TAP+k] * conj(s[k])                               (FL mode)
//
// Interface: in_valid qualifies in_i/in_q (gaps are allowed; the pipeline moves
// with the samples). coef_shift loads the sequence serially, s[0] first
// (sync_coef_bank). clr empties the chain.
// Timing: one result per sample; out_valid rises 3 clocks after the in_valid of
// the sample it ends on, so a sync sequence entered on consecutive clocks gives
// its peak N_TAPS+1 clocks after its first sample was entered.
// Shared shift-add, tap multiplexers, added pipeline step, taps 1-75 zero select
// and the output select at tap 225 follow the correlator design; the coefficient
// width, the valid handshake and the serial coefficient loading are this
// design's choices.
module mless_corr
  import ldacs_corr_pkg::*;
#(
  parameter int unsigned SAMPLE_W      = ldacs_corr_pkg::CORR_SAMPLE_W,
  parameter int unsigned COEF_W        = ldacs_corr_pkg::CORR_COEF_W,
  parameter int unsigned N_TAPS        = ldacs_corr_pkg::CORR_N_TAPS,
  parameter int unsigned FL_ZERO_FIRST = ldacs_corr_pkg::CORR_FL_ZERO_FIRST,
  parameter int unsigned FL_ZERO_LAST  = ldacs_corr_pkg::CORR_FL_ZERO_LAST,
  parameter int unsigned FL_OUT_TAP    = ldacs_corr_pkg::CORR_FL_OUT_TAP,
  localparam int unsigned PROD_W       = SAMPLE_W + COEF_W,
  localparam int unsigned TAP_W        = PROD_W + 1,
  localparam int unsigned ACC_W        = TAP_W + $clog2(N_TAPS),
  localparam int unsigned NLEV         = 2 ** COEF_W
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       clr,
  input  logic                       fl_mode,
  input  logic                       in_valid,
  input  logic signed [SAMPLE_W-1:0] in_i,
  input  logic signed [SAMPLE_W-1:0] in_q,
  input  logic                       coef_shift,
  input  logic signed [COEF_W-1:0]   coef_i,
  input  logic signed [COEF_W-1:0]   coef_q,
  output logic                       out_valid,
  output logic signed [ACC_W-1:0]    out_re,
  output logic signed [ACC_W-1:0]    out_im
);

  // The chain must have the taps the FL mode reads and zeroes.
  initial begin
    assert (FL_OUT_TAP < N_TAPS && FL_ZERO_LAST < FL_OUT_TAP && FL_ZERO_FIRST <= FL_ZERO_LAST)
      else $error("mless_corr: inconsistent FL tap parameters");
  end

  logic signed [PROD_W-1:0] prod_i [NLEV];
  logic signed [PROD_W-1:0] prod_q [NLEV];
  logic                     prod_valid, prod_valid_q;
  logic                     tap_valid;
  logic signed [COEF_W-1:0] sync_i [N_TAPS];
  logic signed [COEF_W-1:0] sync_q [N_TAPS];
  logic signed [TAP_W-1:0]  tap_re [N_TAPS];
  logic signed [TAP_W-1:0]  tap_im [N_TAPS];
  logic signed [ACC_W-1:0]  rl_re, rl_im, fl_re, fl_im;
  logic                     fl_q;

  shift_add #(.SAMPLE_W(SAMPLE_W), .COEF_W(COEF_W)) u_shift_add_i (
    .clk, .rst, .in_valid, .x(in_i), .prod(prod_i), .prod_valid(prod_valid));

  shift_add #(.SAMPLE_W(SAMPLE_W), .COEF_W(COEF_W)) u_shift_add_q (
    .clk, .rst, .in_valid, .x(in_q), .prod(prod_q), .prod_valid(prod_valid_q));

  // Both shift-add blocks see the same strobe, so their valids never differ.
  a_valid_pair: assert property (@(posedge clk) disable iff (rst) prod_valid == prod_valid_q)
    else $error("mless_corr: I and Q products out of step");

  sync_coef_bank #(.COEF_W(COEF_W), .N_TAPS(N_TAPS)) u_sync (
    .clk, .rst, .shift(coef_shift), .in_i(coef_i), .in_q(coef_q),
    .sync_i(sync_i), .sync_q(sync_q));

  for (genvar k = 0; k < N_TAPS; k++) begin : g_tap
    tap_mux #(
      .SAMPLE_W    (SAMPLE_W),
      .COEF_W      (COEF_W),
      .ZERO_CAPABLE(k >= FL_ZERO_FIRST && k <= FL_ZERO_LAST)
    ) u_tap (
      .clk, .rst, .en(prod_valid), .zero(fl_mode),
      .sync_i(sync_i[k]), .sync_q(sync_q[k]),
      .prod_i(prod_i), .prod_q(prod_q),
      .tap_re(tap_re[k]), .tap_im(tap_im[k]));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      tap_valid <= 1'b0;
      out_valid <= 1'b0;
      fl_q      <= 1'b0;
    end else begin
      tap_valid <= prod_valid;
      out_valid <= tap_valid;
      fl_q      <= fl_mode;
    end
  end

  add_delay_chain #(.TAP_W(TAP_W), .N_TAPS(N_TAPS), .FL_OUT_TAP(FL_OUT_TAP)) u_chain (
    .clk, .rst, .clr, .en(tap_valid),
    .tap_re(tap_re), .tap_im(tap_im),
    .rl_re(rl_re), .rl_im(rl_im), .fl_re(fl_re), .fl_im(fl_im));

  // Output select between the last tap (RL) and tap FL_OUT_TAP (FL).
  assign out_re = fl_q ? fl_re : rl_re;
  assign out_im = fl_q ? fl_im : rl_im;

endmodule
