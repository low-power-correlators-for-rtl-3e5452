// Sync coefficient registers (Sync_0 .. Sync_{N_TAPS-1}).
//
// Each tap of the correlator reads one quantised synchronisation sample, an I and a
// Q coefficient of COEF_W bits. The bank is a shift register loaded serially by
// software: every shift pulse moves all pairs one tap down (tap n takes tap n+1's
// pair) and puts the new pair into the last tap. Writing the sequence s[0], s[1],
// ..., s[N_TAPS-1] in that order therefore leaves s[n] in tap n. The registers
// clear to zero on reset, so an unloaded correlator outputs zero.
//
// Timing: one pair per clock with shift high; sync_i/sync_q change the clock after.
// The registers per tap follow the correlator figure; serial loading is this
// design's choice (the reference design does not say how the sequence is stored).
module sync_coef_bank #(
  parameter int unsigned COEF_W = 3,
  parameter int unsigned N_TAPS = 376
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     shift,
  input  logic signed [COEF_W-1:0] in_i,
  input  logic signed [COEF_W-1:0] in_q,
  output logic signed [COEF_W-1:0] sync_i [N_TAPS],
  output logic signed [COEF_W-1:0] sync_q [N_TAPS]
);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int n = 0; n < N_TAPS; n++) begin
        sync_i[n] <= '0;
        sync_q[n] <= '0;
      end
    end else if (shift) begin
      for (int n = 0; n < N_TAPS - 1; n++) begin
        sync_i[n] <= sync_i[n+1];
        sync_q[n] <= sync_q[n+1];
      end
      sync_i[N_TAPS-1] <= in_i;
      sync_q[N_TAPS-1] <= in_q;
    end
  end

endmodule
