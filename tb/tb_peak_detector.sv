// Testbench for peak_detector with a 64-sample window. Windows of random
// correlator values (some with a planted strong peak, some where the peak is just
// above or just below 1.33 times the runner-up, some with gaps in in_valid and a
// restart in the middle of a window) are compared with a model that finds the
// largest |re|+|im|, its index and the largest other value.
module tb_peak_detector;
  localparam int unsigned AW = 29, W = 64, MW = AW + 1, IW = $clog2(W);
  logic clk = 0, rst = 1, restart = 0, in_valid = 0;
  logic signed [AW-1:0] re = '0, im = '0;
  logic det_valid, detected;
  logic [IW-1:0] peak_idx;
  logic [MW-1:0] peak_mag;
  int checks = 0, failures = 0, n_det = 0, n_nodet = 0;

  peak_detector #(.ACC_W(AW), .WINDOW(W), .RATIO_NUM(133), .RATIO_DEN(100)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic d; logic [IW-1:0] idx; logic [MW-1:0] mag; } report_t;
  report_t reports [$];
  always @(negedge clk) if (det_valid) reports.push_back('{detected, peak_idx, peak_mag});

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  task automatic put(longint r, longint i);
    // called at a falling edge; the sample is taken at the next rising edge
    re = AW'(r); im = AW'(i); in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    if ($urandom % 4 == 0) @(negedge clk);   // gap
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    // abandoned partial window
    for (int n = 0; n < 20; n++) put(1000000, 0);
    restart = 1; @(negedge clk); restart = 0;
    for (int w = 0; w < 300; w++) begin
      longint mags [W];
      longint best, second;
      int bidx, pidx, kind;
      best = -1; second = 0; bidx = 0; kind = w % 4;
      pidx = $urandom % W;
      for (int n = 0; n < W; n++) begin
        longint r, i;
        r = longint'($signed(20'($urandom))); i = longint'($signed(20'($urandom)));
        if (n == pidx) begin
          case (kind)
            0: begin r = 64'sd4000000; i = -64'sd3000000; end           // clear peak
            1: begin r = 64'sd1330000; i = 0; end                       // exactly 1.33x, no detect
            2: begin r = 64'sd1330001; i = 0; end                       // just above
            default: ;
          endcase
        end
        if ((kind == 1 || kind == 2) && n == (pidx + 1) % W) begin r = -64'sd1000000; i = 0; end
        mags[n] = (r < 0 ? -r : r) + (i < 0 ? -i : i);
        put(r, i);
      end
      for (int n = 0; n < W; n++) begin
        if (mags[n] > best) begin second = (best < 0) ? 0 : best; best = mags[n]; bidx = n; end
        else if (mags[n] > second) second = mags[n];
      end
      // det_valid follows the last sample by one clock
      repeat (2) @(negedge clk);
      chk("one report", reports.size(), 1);
      if (reports.size() > 0) begin
        report_t rp;
        rp = reports.pop_front();
        chk("detected", rp.d, best * 100 > second * 133);
        chk("peak_idx", rp.idx, bidx);
        chk("peak_mag", rp.mag, best);
      end
      reports.delete();
      if (best * 100 > second * 133) n_det++; else n_nodet++;
      @(posedge clk);
    end
    checks++; if (n_det == 0 || n_nodet == 0) failures++;
    $display("detected %0d windows, rejected %0d", n_det, n_nodet);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
