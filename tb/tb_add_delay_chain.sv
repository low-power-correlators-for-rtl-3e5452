// Testbench for add_delay_chain at 8 taps, FL output at stage 5. Random tap terms
// are applied with random idle clocks; a model keeps the history of applied term
// vectors and checks that the last stage equals sum_k tap_k(applied N-1-k updates
// ago) and stage 5 the same over taps 0..5. Also checks clr and the hold when en
// is low.
module tb_add_delay_chain;
  localparam int unsigned TW = 20, NT = 8, FLT = 5, AW = TW + $clog2(NT);
  logic clk = 0, rst = 1, clr = 0, en = 0;
  logic signed [TW-1:0] tap_re [NT];
  logic signed [TW-1:0] tap_im [NT];
  logic signed [AW-1:0] rl_re, rl_im, fl_re, fl_im;
  longint hist_re [$][NT];
  longint hist_im [$][NT];
  int checks = 0, failures = 0;

  add_delay_chain #(.TAP_W(TW), .N_TAPS(NT), .FL_OUT_TAP(FLT)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint model(bit im, int last);
    longint s = 0;
    for (int k = 0; k <= last; k++) begin
      int age = last - k;            // updates since the term of tap k was added
      if (age < hist_re.size())
        s += im ? hist_im[hist_re.size()-1-age][k] : hist_re[hist_re.size()-1-age][k];
    end
    return s;
  endfunction

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    for (int k = 0; k < NT; k++) begin tap_re[k] = '0; tap_im[k] = '0; end
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < 4000; t++) begin
      longint vr [NT], vi [NT];
      if (t == 2000) begin
        clr <= 1; @(posedge clk); clr <= 0;
        hist_re.delete(); hist_im.delete();
        @(negedge clk);
        chk("clr", rl_re, 0);
      end
      for (int k = 0; k < NT; k++) begin
        vr[k] = longint'($signed(TW'($urandom)));
        vi[k] = longint'($signed(TW'($urandom)));
        if (t < 10) begin vr[k] = -(longint'(1) <<< (TW-1)); vi[k] = (longint'(1) <<< (TW-1)) - 1; end
        tap_re[k] <= TW'(vr[k]); tap_im[k] <= TW'(vi[k]);
      end
      en <= 1;
      @(posedge clk);
      en <= 0;
      hist_re.push_back(vr); hist_im.push_back(vi);
      @(negedge clk);
      chk("rl_re", rl_re, model(0, NT-1));
      chk("rl_im", rl_im, model(1, NT-1));
      chk("fl_re", fl_re, model(0, FLT));
      chk("fl_im", fl_im, model(1, FLT));
      if ($urandom % 2) begin
        for (int k = 0; k < NT; k++) tap_re[k] <= TW'($urandom);
        @(posedge clk); @(negedge clk);
        chk("hold", rl_re, model(0, NT-1));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
