// Frame detector on the correlator output.
//
// The correlator output is examined in windows of WINDOW samples (one LDACS
// reverse-link frame). For each sample the magnitude |re|+|im| is formed, and the
// largest magnitude in the window, its index and the largest of all other
// magnitudes are tracked. At the last sample of the window the detector reports a
// frame when the peak exceeds RATIO_NUM/RATIO_DEN (1.33) times every other value,
// i.e. when peak*RATIO_DEN > second*RATIO_NUM, and starts the next window.
//
// Interface: in_valid qualifies re/im; restart abandons the current window and
// begins a new one with the next sample. Timing: det_valid is a one-clock pulse in
// the clock after the window's last sample was accepted; detected, peak_idx
// (0..WINDOW-1, position in the window) and peak_mag hold until the next report.
// Window length and the 1.33 ratio follow the reference design's detection rule; the
// |re|+|im| magnitude (chosen because it needs no multiplier) and the tie rule
// (the first of equal peaks wins) are this design's choices.
module peak_detector #(
  parameter int unsigned ACC_W     = 29,
  parameter int unsigned WINDOW    = 4950,
  parameter int unsigned RATIO_NUM = 133,
  parameter int unsigned RATIO_DEN = 100,
  localparam int unsigned MAG_W    = ACC_W + 1,
  localparam int unsigned IDX_W    = $clog2(WINDOW),
  localparam int unsigned CMP_W    = MAG_W + 8
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    restart,
  input  logic                    in_valid,
  input  logic signed [ACC_W-1:0] re,
  input  logic signed [ACC_W-1:0] im,
  output logic                    det_valid,
  output logic                    detected,
  output logic [IDX_W-1:0]        peak_idx,
  output logic [MAG_W-1:0]        peak_mag
);

  logic [IDX_W-1:0] idx;
  logic [MAG_W-1:0] mag;
  logic [MAG_W-1:0] max_q, second_q, max_d, second_d;
  logic [IDX_W-1:0] max_idx_q, max_idx_d;
  logic             first;

  always_comb begin
    logic [MAG_W-1:0] abs_re, abs_im;
    abs_re = (re < 0) ? MAG_W'(-re) : MAG_W'(re);
    abs_im = (im < 0) ? MAG_W'(-im) : MAG_W'(im);
    mag    = abs_re + abs_im;
  end

  assign first = (idx == '0);

  // Running maximum and runner-up including the current sample.
  always_comb begin
    if (first) begin
      max_d     = mag;
      max_idx_d = idx;
      second_d  = '0;
    end else if (mag > max_q) begin
      max_d     = mag;
      max_idx_d = idx;
      second_d  = max_q;
    end else begin
      max_d     = max_q;
      max_idx_d = max_idx_q;
      second_d  = (mag > second_q) ? mag : second_q;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      idx       <= '0;
      max_q     <= '0;
      second_q  <= '0;
      max_idx_q <= '0;
      det_valid <= 1'b0;
      detected  <= 1'b0;
      peak_idx  <= '0;
      peak_mag  <= '0;
    end else begin
      det_valid <= 1'b0;
      if (restart) begin
        idx <= '0;
      end else if (in_valid) begin
        max_q     <= max_d;
        second_q  <= second_d;
        max_idx_q <= max_idx_d;
        if (idx == IDX_W'(WINDOW - 1)) begin
          idx       <= '0;
          det_valid <= 1'b1;
          detected  <= CMP_W'(max_d) * CMP_W'(RATIO_DEN) > CMP_W'(second_d) * CMP_W'(RATIO_NUM);
          peak_idx  <= max_idx_d;
          peak_mag  <= max_d;
        end else begin
          idx <= idx + 1'b1;
        end
      end
    end
  end

endmodule
