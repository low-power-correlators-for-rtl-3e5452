// Testbench for mless_corr at its default size (376 taps, FL zero taps 1..75,
// FL output at tap 225). A random quantised sync sequence is loaded, then noisy
// I/Q streams carrying copies of the sequence are applied, first back to back and
// then with random gaps. Every output is compared with a direct-form model
// C[n] = sum_k r[n-L+k] * conj(s[k]) (L = 375 in RL mode; in FL mode the sum runs
// over taps 0 and 76..225 and L = 225). Also checked: the peak of an RL sequence
// sent back to back appears N_TAPS+1 clocks after its first sample was taken, one
// output per input, and that clr empties the chain.
module tb_mless_corr;
  localparam int unsigned SW = 16, CW = 3, NT = 376, ZF = 1, ZL = 75, FO = 225;
  localparam int unsigned AW = SW + CW + 1 + $clog2(NT);
  logic clk = 0, rst = 1, clr = 0, fl_mode = 0, in_valid = 0, coef_shift = 0;
  logic signed [SW-1:0] in_i = '0, in_q = '0;
  logic signed [CW-1:0] coef_i = '0, coef_q = '0;
  logic out_valid;
  logic signed [AW-1:0] out_re, out_im;
  int checks = 0, failures = 0;
  int s_i [NT], s_q [NT];
  int hist_i [$], hist_q [$];        // applied samples, newest last
  longint exp_re [$], exp_im [$];
  longint cycle = 0;
  int n_in = 0, n_out = 0;
  bit fl;

  mless_corr #(.SAMPLE_W(SW), .COEF_W(CW), .N_TAPS(NT), .FL_ZERO_FIRST(ZF),
               .FL_ZERO_LAST(ZL), .FL_OUT_TAP(FO)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  // output checker
  always @(negedge clk) begin
    if (out_valid) begin
      n_out++;
      checks++;
      if (exp_re.size() == 0) begin
        failures++; $display("FAIL unexpected output");
      end else begin
        longint er, ei;
        er = exp_re.pop_front(); ei = exp_im.pop_front();
        chk("out_re", out_re, er);
        chk("out_im", out_im, ei);
      end
    end
  end

  function automatic void model();
    longint re = 0, im = 0;
    int last = fl ? FO : NT - 1;
    for (int k = 0; k <= last; k++) begin
      int age = last - k;
      int ri, rq;
      if (fl && k >= ZF && k <= ZL) continue;
      if (age >= hist_i.size()) continue;
      ri = hist_i[hist_i.size() - 1 - age];
      rq = hist_q[hist_q.size() - 1 - age];
      re += longint'(ri) * s_i[k] + longint'(rq) * s_q[k];
      im += longint'(rq) * s_i[k] - longint'(ri) * s_q[k];
    end
    exp_re.push_back(re); exp_im.push_back(im);
  endfunction

  // called at a falling edge; the sample is taken at the next rising edge
  task automatic put(int vi, int vq, bit gap);
    in_i = SW'(vi); in_q = SW'(vq); in_valid = 1;
    hist_i.push_back(vi); hist_q.push_back(vq);
    if (hist_i.size() > NT) begin void'(hist_i.pop_front()); void'(hist_q.pop_front()); end
    model();
    n_in++;
    @(negedge clk);
    in_valid = 0;
    if (gap && ($urandom % 3 == 0)) repeat (1 + $urandom % 3) @(negedge clk);
  endtask

  task automatic send(int len, bit with_sync, int amp, bit gap);
    for (int n = 0; n < len; n++) begin
      int vi, vq;
      vi = int'($signed(10'($urandom))); vq = int'($signed(10'($urandom)));
      if (with_sync && n >= 100 && n < 100 + NT) begin
        vi += amp * s_i[n-100];
        vq += amp * s_q[n-100];
      end
      put(vi, vq, gap);
    end
  endtask

  task automatic drain();
    repeat (6) @(negedge clk);
    chk("all outputs", exp_re.size(), 0);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    // load the sequence, s[0] first
    for (int k = 0; k < NT; k++) begin
      logic [CW-1:0] a, b;
      a = CW'($urandom); b = CW'($urandom);
      s_i[k] = int'($signed(a)); s_q[k] = int'($signed(b));
      coef_i = a; coef_q = b; coef_shift = 1;
      @(negedge clk);
    end
    coef_shift = 0;
    fl = 0;
    // RL, back to back
    send(600, 1, 20, 0);
    drain();
    chk("one output per input", n_out, n_in);
    // RL with gaps and a strong sequence
    send(700, 1, 60, 1);
    drain();
    // clr empties the chain
    clr = 1; @(negedge clk); clr = 0;
    chk("clr re", out_re, 0);
    hist_i.delete(); hist_q.delete();
    // FL mode
    fl_mode = 1; fl = 1;
    @(negedge clk);
    clr = 1; @(negedge clk); clr = 0;
    send(700, 1, 60, 1);
    drain();
    // back to RL
    fl_mode = 0; fl = 0;
    @(negedge clk);
    clr = 1; @(negedge clk); clr = 0;
    hist_i.delete(); hist_q.delete();
    send(500, 0, 0, 0);
    drain();
    chk("one output per input", n_out, n_in);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Latency: the first sync sample is taken at rising edge t; the result that ends
  // on the last sync sample (taken at t+NT-1) is in the output register from edge
  // t+NT+1 on, i.e. NT+1 clock periods later, and is seen by this sampler at t+NT+2.
  longint t_in_last = -1, t_out_last = -1;
  int in_count = 0, out_count = 0;
  always @(posedge clk) begin
    if (in_valid) begin
      if (in_count == 100) t_in_last = cycle;   // first sync sample taken here
      in_count <= in_count + 1;
    end
    if (out_valid) begin
      if (out_count == 100 + NT - 1) begin
        checks++;
        if (cycle - t_in_last != NT + 2) begin
          failures++;
          $display("FAIL latency %0d cycles, expected %0d", cycle - t_in_last - 1, NT + 1);
        end else $display("correlation peak %0d cycles after the first sync sample", cycle - t_in_last - 1);
      end
      out_count <= out_count + 1;
    end
  end
endmodule
