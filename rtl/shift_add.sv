// Shared shift-add product generator.
//
// Instead of one multiplier per correlator tap, a single block forms the product
// of the incoming sample x with every level a quantised sync coefficient can take.
// Coefficients are COEF_W-bit two's complement codes, so there are 2**COEF_W
// levels; prod[c] holds x * signed'(c). Each product is built from shifted copies
// of x (one per set bit of the level's magnitude), summed and negated for negative
// levels, so no multiplier is inferred. The products are registered: this is the
// register behind the shift-add triangle at the correlator input.
//
// Timing: prod/prod_valid are updated one clock after in_valid; prod holds its
// value while in_valid is low. The set of products and the shared use follow the
// correlator design; the product width (SAMPLE_W+COEF_W) is this design's choice.
module shift_add #(
  parameter int unsigned SAMPLE_W = 16,
  parameter int unsigned COEF_W   = 3,
  localparam int unsigned PROD_W  = SAMPLE_W + COEF_W,
  localparam int unsigned NLEV    = 2 ** COEF_W
) (
  input  logic                            clk,
  input  logic                            rst,
  input  logic                            in_valid,
  input  logic signed [SAMPLE_W-1:0]      x,
  output logic signed [PROD_W-1:0]        prod [NLEV],
  output logic                            prod_valid
);

  logic signed [PROD_W-1:0] prod_d [NLEV];

  always_comb begin
    logic signed [PROD_W-1:0] xe;
    logic        [COEF_W:0]   mag;   // one bit wider: |-2**(COEF_W-1)| fits
    logic signed [PROD_W-1:0] acc;
    logic signed [COEF_W-1:0] lev;
    xe = PROD_W'(x);
    for (int c = 0; c < NLEV; c++) begin
      lev = COEF_W'(c);
      mag = (lev < 0) ? (COEF_W+1)'(-int'(lev)) : (COEF_W+1)'(lev);
      acc = '0;
      for (int b = 0; b <= COEF_W; b++) begin
        if (mag[b]) acc = acc + (xe <<< b);
      end
      prod_d[c] = (lev < 0) ? -acc : acc;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      prod_valid <= 1'b0;
      for (int c = 0; c < NLEV; c++) prod[c] <= '0;
    end else begin
      prod_valid <= in_valid;
      if (in_valid) prod <= prod_d;
    end
  end

endmodule
