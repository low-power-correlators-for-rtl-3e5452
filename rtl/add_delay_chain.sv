// Add-delay chain of the transposed direct-form correlator.
//
// Stage k holds a register z[k]. On every enabled clock each stage takes the
// previous stage's register plus its own tap term: z[k] <= z[k-1] + tap[k], with
// z[-1] = 0. Because all taps see the same (pipelined) sample, the term added at
// stage k has passed through N_TAPS-1-k further registers when it reaches the
// last stage, so tap k meets the sample that arrived N_TAPS-1-k samples before
// the newest one: tap 0 carries the oldest sample of the correlation window.
// Both the last stage (reverse-link result) and stage FL_OUT_TAP (forward-link
// result) are brought out. clr empties the chain.
//
// Timing: one stage update per enabled clock; outputs are the registers. The
// structure follows the correlator figure; the accumulator width, wide enough
// that no sum over all taps can overflow, is this design's choice.
module add_delay_chain #(
  parameter int unsigned TAP_W      = 20,
  parameter int unsigned N_TAPS     = 376,
  parameter int unsigned FL_OUT_TAP = 225,
  localparam int unsigned ACC_W     = TAP_W + $clog2(N_TAPS)
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    clr,
  input  logic                    en,
  input  logic signed [TAP_W-1:0] tap_re [N_TAPS],
  input  logic signed [TAP_W-1:0] tap_im [N_TAPS],
  output logic signed [ACC_W-1:0] rl_re,
  output logic signed [ACC_W-1:0] rl_im,
  output logic signed [ACC_W-1:0] fl_re,
  output logic signed [ACC_W-1:0] fl_im
);

  logic signed [ACC_W-1:0] z_re [N_TAPS];
  logic signed [ACC_W-1:0] z_im [N_TAPS];

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      for (int k = 0; k < N_TAPS; k++) begin
        z_re[k] <= '0;
        z_im[k] <= '0;
      end
    end else if (en) begin
      z_re[0] <= ACC_W'(tap_re[0]);
      z_im[0] <= ACC_W'(tap_im[0]);
      for (int k = 1; k < N_TAPS; k++) begin
        z_re[k] <= z_re[k-1] + ACC_W'(tap_re[k]);
        z_im[k] <= z_im[k-1] + ACC_W'(tap_im[k]);
      end
    end
  end

  assign rl_re = z_re[N_TAPS-1];
  assign rl_im = z_im[N_TAPS-1];
  assign fl_re = z_re[FL_OUT_TAP];
  assign fl_im = z_im[FL_OUT_TAP];

endmodule
