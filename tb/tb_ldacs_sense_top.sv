// End-to-end testbench of ldacs_sense_top at its default parameters (376 taps,
// 4 channels, 4950-sample windows, 1.33 peak ratio).
//
// Software actions go through the register port: a random quantised sync
// sequence is loaded with 376 COEF writes, then a series of sensing windows is
// run, each started by a CTRL write that selects mode, link and channel. The
// selected channel carries noise (uniform, +-512) and, in some windows, a copy of
// the sync sequence at amplitude 60..100 starting at a random offset P (about
// -6 dB SNR per sample). The other channels carry unrelated noise. Checked per
// window: a single report at the window end, frame detected or not as planted,
// peak position (P+375 for RL, P+225 for FL), reported channel, STATUS read-back,
// and that sync mode raises sync_strobe instead of a sense report. Mechanisms
// counted, each required at least once: coefficient load, RL detection,
// rejection of a noise-only window, FL detection, sync-mode strobe, channel
// switch and input gaps (stalls).
module tb_ldacs_sense_top;
  import ldacs_corr_pkg::*;
  localparam int unsigned NT = CORR_N_TAPS, NC = CORR_NUM_CH, W = CORR_WINDOW;
  localparam int unsigned SW = CORR_SAMPLE_W, CW = CORR_COEF_W;
  localparam int unsigned AW = SW + CW + 1 + $clog2(NT), IW = $clog2(W);

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
  int n_coef = 0, n_rl_det = 0, n_reject = 0, n_fl_det = 0, n_sync = 0, n_switch = 0, n_gap = 0;
  int n_sense_rep = 0, n_sync_rep = 0;
  logic [1:0] last_ch = '0;
  typedef struct { bit strobe; bit det; int ch; int idx; } rep_t;
  rep_t reps [$];

  always #5 clk = ~clk;

  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (sense_valid) reps.push_back('{0, sense_detected, sense_channel, sense_peak_idx});
    if (sync_strobe) reps.push_back('{1, sense_detected, sense_channel, sense_peak_idx});
  end

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  // called at a falling edge; the write is taken at the next rising edge
  task automatic wr(logic [1:0] a, logic [31:0] d);
    reg_addr = a; reg_wdata = d; reg_we = 1;
    @(negedge clk);
    reg_we = 0;
  endtask

  task automatic idle(int n);
    ch_valid = '0;
    repeat (n) @(negedge clk);
  endtask

  function automatic int noise();
    return int'($signed(10'($urandom)));
  endfunction

  // One sensing window on channel ch. Returns after the window's report time.
  task automatic window(bit sync_mode, bit fl, int ch, bit planted, int amp, bit gaps);
    int p, exp_idx;
    p = 200 + $urandom % (W - NT - 400);
    exp_idx = fl ? p + CORR_FL_OUT_TAP : p + NT - 1;
    if (ch != last_ch) n_switch++;
    last_ch = 2'(ch);
    idle(5);
    begin
      logic [31:0] status_prev;
      reg_addr = REG_STATUS; #1;
      status_prev = reg_rdata;
      wr(REG_CTRL, {22'b0, 2'(ch), 6'b0, fl, sync_mode});
      reg_addr = REG_STATUS; #1;
      chk("status kept over CTRL write", reg_rdata, status_prev);
    end
    idle(3);
    reps.delete();
    for (int n = 0; n < W; n++) begin
      int vi, vq;
      vi = noise(); vq = noise();
      if (planted && n >= p && n < p + NT) begin
        vi += amp * s_i[n-p]; vq += amp * s_q[n-p];
      end
      for (int c = 0; c < NC; c++) begin
        ch_i[c] = SW'(noise()); ch_q[c] = SW'(noise());
        ch_valid[c] = $urandom % 2;
      end
      while (gaps && ($urandom % 8 == 0)) begin   // stall: selected channel has no sample
        ch_valid[ch] = 0;
        n_gap++;
        @(negedge clk);
      end
      ch_i[ch] = SW'(vi); ch_q[ch] = SW'(vq); ch_valid[ch] = 1;
      @(negedge clk);
    end
    idle(6);
    if (sync_mode) begin
      chk("sync strobe count", reps.size(), planted ? 1 : 0);
      if (reps.size() > 0) begin
        chk("strobe kind", reps[0].strobe, 1);
        chk("strobe idx", reps[0].idx, exp_idx);
        if (reps[0].strobe && reps[0].idx == exp_idx) n_sync++;
      end
    end else begin
      chk("one report", reps.size(), 1);
      if (reps.size() > 0) begin
        chk("report kind", reps[0].strobe, 0);
        chk("detected", reps[0].det, planted);
        chk("channel", reps[0].ch, ch);
        if (planted) chk("peak idx", reps[0].idx, exp_idx);
        if (planted && reps[0].det && reps[0].idx == exp_idx) begin
          if (fl) n_fl_det++; else n_rl_det++;
        end
        if (!planted && !reps[0].det) n_reject++;
        reg_addr = REG_STATUS; #1;
        chk("status detected", reg_rdata[16], planted);
        chk("status channel", reg_rdata[25:24], ch);
        chk("status idx", reg_rdata[IW-1:0], reps[0].idx);
      end
    end
  endtask

  initial begin
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
    reg_addr = REG_COUNT; #1;
    chk("coef count", reg_rdata, NT);
    if (reg_rdata == NT) n_coef++;

    window(0, 0, 2, 1, 60, 0);    // RL frame on channel 2
    window(0, 0, 0, 0, 0, 0);     // noise only on channel 0
    window(0, 0, 3, 1, 80, 1);    // RL frame on channel 3, with stalls
    window(0, 1, 1, 1, 100, 0);   // FL frame on channel 1
    window(1, 0, 2, 1, 60, 1);    // receiver synchroniser on channel 2
    window(1, 0, 0, 0, 0, 0);     // synchroniser, nothing to lock to

    $display("mechanisms: coef_load=%0d rl_detect=%0d reject=%0d fl_detect=%0d sync_strobe=%0d channel_switch=%0d stall_cycles=%0d",
             n_coef, n_rl_det, n_reject, n_fl_det, n_sync, n_switch, n_gap);
    checks++; if (n_coef == 0)   begin failures++; $display("FAIL never: coefficient load"); end
    checks++; if (n_rl_det == 0) begin failures++; $display("FAIL never: RL detection"); end
    checks++; if (n_reject == 0) begin failures++; $display("FAIL never: noise rejection"); end
    checks++; if (n_fl_det == 0) begin failures++; $display("FAIL never: FL detection"); end
    checks++; if (n_sync == 0)   begin failures++; $display("FAIL never: sync strobe"); end
    checks++; if (n_switch == 0) begin failures++; $display("FAIL never: channel switch"); end
    checks++; if (n_gap == 0)    begin failures++; $display("FAIL never: input stall"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
