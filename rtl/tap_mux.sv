// One correlator tap: product selection in place of a multiplier.
//
// The shared shift-add block supplies every product of the current I and Q
// samples with every coefficient level. This tap uses its sync coefficient pair
// (sI, sQ) as the select lines of four multiplexers and picks I*sI, Q*sQ, Q*sI and
// I*sQ. Their sums form the product with the conjugate coefficient,
//   tap_re = I*sI + Q*sQ,   tap_im = Q*sI - I*sQ,
// which is the correlation term of this tap. Taps built with ZERO_CAPABLE=1
// (taps 1..75 of the correlator) have the extra select line 'zero' that feeds 0
// instead, used when forward-link frames are synchronised.
//
// Timing: the result is registered (the pipeline stage added after the tap
// multiplexers to shorten the critical path) and updates one clock after en.
// The selection and the zero line follow the correlator design; forming the
// complex sum inside the tap stage is this design's choice.
module tap_mux #(
  parameter int unsigned SAMPLE_W     = 16,
  parameter int unsigned COEF_W       = 3,
  parameter bit          ZERO_CAPABLE = 1'b0,
  localparam int unsigned PROD_W      = SAMPLE_W + COEF_W,
  localparam int unsigned NLEV        = 2 ** COEF_W,
  localparam int unsigned TAP_W       = PROD_W + 1
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     en,
  input  logic                     zero,
  input  logic signed [COEF_W-1:0] sync_i,
  input  logic signed [COEF_W-1:0] sync_q,
  input  logic signed [PROD_W-1:0] prod_i [NLEV],
  input  logic signed [PROD_W-1:0] prod_q [NLEV],
  output logic signed [TAP_W-1:0]  tap_re,
  output logic signed [TAP_W-1:0]  tap_im
);

  logic signed [PROD_W-1:0] i_si, q_sq, q_si, i_sq;
  logic                     force_zero;

  assign force_zero = ZERO_CAPABLE && zero;

  always_comb begin
    i_si = prod_i[unsigned'(sync_i)];
    q_sq = prod_q[unsigned'(sync_q)];
    q_si = prod_q[unsigned'(sync_i)];
    i_sq = prod_i[unsigned'(sync_q)];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      tap_re <= '0;
      tap_im <= '0;
    end else if (en) begin
      if (force_zero) begin
        tap_re <= '0;
        tap_im <= '0;
      end else begin
        tap_re <= TAP_W'(i_si) + TAP_W'(q_sq);
        tap_im <= TAP_W'(q_si) - TAP_W'(i_sq);
      end
    end
  end

endmodule
