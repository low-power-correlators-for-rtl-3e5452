// Detection workload for ldacs_sense_top at its default parameters.
//
// Builds reverse-link frames of one 4950-sample window each: a 376-sample copy of
// the quantised sync sequence at a random position, the rest filled with random
// data samples of the same power (levels -4..+3 per component, as the sync), all
// scaled to a set signal amplitude and added to near-Gaussian noise (sum of four
// uniforms, sigma = 1000 per component). The signal-to-noise ratio per sample is
// SNR = amp^2 * E[sI^2 + sQ^2] / (2 * sigma^2), with E[sI^2 + sQ^2] = 11 for
// uniformly drawn levels. Frames are run at 10, 0, -5 and -10 dB, plus windows of
// noise only. Checked: at 0 dB and above every frame is found at the right
// position; noise-only windows raise no detection. The detection rate at -5 and
// -10 dB is printed for information.
module tb_snr_sweep;
  import ldacs_corr_pkg::*;
  localparam int unsigned NT = CORR_N_TAPS, NC = CORR_NUM_CH, W = CORR_WINDOW;
  localparam int unsigned SW = CORR_SAMPLE_W, CW = CORR_COEF_W;
  localparam int unsigned AW = SW + CW + 1 + $clog2(NT), IW = $clog2(W);
  localparam int N_PER_SNR = 4;

  logic clk = 0, rst = 1;
  logic [NC-1:0] ch_valid = '0;
  logic signed [SW-1:0] ch_i [NC];
  logic signed [SW-1:0] ch_q [NC];
  logic reg_we = 0;
  logic [1:0] reg_addr = '0;
  logic [31:0] reg_wdata = '0, reg_rdata;
  logic sense_valid, sense_detected, sync_strobe, corr_valid;
  logic [1:0] sense_channel;
  logic [IW-1:0] sense_peak_idx;
  logic signed [AW-1:0] corr_re, corr_im;

  ldacs_sense_top dut (.*);

  int checks = 0, failures = 0;
  int s_i [NT], s_q [NT];
  int rep_n = 0;
  bit rep_det;
  int rep_idx;

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (sense_valid) begin
    rep_n++; rep_det = sense_detected; rep_idx = int'(sense_peak_idx);
  end

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  task automatic wr(logic [1:0] a, logic [31:0] d);
    reg_addr = a; reg_wdata = d; reg_we = 1;
    @(negedge clk);
    reg_we = 0;
  endtask

  function automatic int gauss();   // sigma ~ 1000
    int s = 0;
    for (int k = 0; k < 4; k++) s += int'($urandom % 1733) - 866;
    return s;
  endfunction

  function automatic int lev();
    return int'($urandom % 8) - 4;
  endfunction

  // Runs one window; returns 1 when detected at the expected position.
  task automatic frame(int amp, bit planted, output bit det, output bit at_peak);
    int p, n0;
    p = 200 + $urandom % (W - NT - 400);
    ch_valid = '0;
    repeat (5) @(negedge clk);
    wr(REG_CTRL, 32'h0);          // sense mode, RL, channel 0; new window
    repeat (3) @(negedge clk);
    n0 = rep_n;
    for (int n = 0; n < W; n++) begin
      int vi, vq;
      if (planted && n >= p && n < p + NT) begin vi = amp * s_i[n-p]; vq = amp * s_q[n-p]; end
      else if (planted) begin vi = amp * lev(); vq = amp * lev(); end
      else begin vi = 0; vq = 0; end
      ch_i[0] = SW'(vi + gauss()); ch_q[0] = SW'(vq + gauss()); ch_valid[0] = 1;
      @(negedge clk);
    end
    ch_valid = '0;
    repeat (6) @(negedge clk);
    chk("one report per window", rep_n - n0, 1);
    det = rep_det;
    at_peak = rep_det && rep_idx == p + NT - 1;
  endtask

  initial begin
    int snr_db [4] = '{10, 0, -5, -10};
    int amp_tab [4] = '{1348, 426, 240, 135};   // sqrt(2e6 * 10^(SNR/10) / 11)
    for (int c = 0; c < NC; c++) begin ch_i[c] = '0; ch_q[c] = '0; end
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    for (int k = 0; k < NT; k++) begin
      logic [CW-1:0] a, b;
      a = CW'($urandom); b = CW'($urandom);
      s_i[k] = int'($signed(a)); s_q[k] = int'($signed(b));
      wr(REG_COEF, {21'b0, b, 5'b0, a});
    end
    for (int s = 0; s < 4; s++) begin
      int hits;
      hits = 0;
      for (int f = 0; f < N_PER_SNR; f++) begin
        bit det, ok;
        frame(amp_tab[s], 1, det, ok);
        if (ok) hits++;
        if (snr_db[s] >= 0) chk("frame found at its position", ok, 1);
      end
      $display("SNR %0d dB: %0d of %0d frames detected at the sync position", snr_db[s], hits, N_PER_SNR);
    end
    begin
      int fa;
      fa = 0;
      for (int f = 0; f < N_PER_SNR; f++) begin
        bit det, ok;
        frame(0, 0, det, ok);
        if (det) fa++;
        chk("no detection on noise", det, 0);
      end
      $display("noise only: %0d false detections in %0d windows", fa, N_PER_SNR);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
