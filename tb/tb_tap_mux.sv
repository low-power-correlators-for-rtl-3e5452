// Testbench for tap_mux: feeds the product arrays of random I/Q samples (formed
// here by multiplication) and random coefficient pairs, and checks the registered
// conjugate product I*sI+Q*sQ, Q*sI-I*sQ one clock later, the hold when en is low,
// and the zero select: it clears a ZERO_CAPABLE tap but not an ordinary one.
module tb_tap_mux;
  localparam int unsigned SW = 16, CW = 3, PW = SW + CW, NL = 2 ** CW, TW = PW + 1;
  logic clk = 0, rst = 1, en = 0, zero = 0;
  logic signed [CW-1:0] sync_i = '0, sync_q = '0;
  logic signed [PW-1:0] prod_i [NL];
  logic signed [PW-1:0] prod_q [NL];
  logic signed [TW-1:0] re0, im0, re1, im1;
  int checks = 0, failures = 0, zero_seen = 0;

  tap_mux #(.SAMPLE_W(SW), .COEF_W(CW), .ZERO_CAPABLE(1'b0)) dut_plain (
    .clk, .rst, .en, .zero, .sync_i, .sync_q, .prod_i, .prod_q, .tap_re(re0), .tap_im(im0));
  tap_mux #(.SAMPLE_W(SW), .COEF_W(CW), .ZERO_CAPABLE(1'b1)) dut_zero (
    .clk, .rst, .en, .zero, .sync_i, .sync_q, .prod_i, .prod_q, .tap_re(re1), .tap_im(im1));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int lev(logic [CW-1:0] c);
    return (int'(c) >= NL/2) ? int'(c) - NL : int'(c);
  endfunction

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    longint er, ei, pr, pi;
    for (int c = 0; c < NL; c++) begin prod_i[c] = '0; prod_q[c] = '0; end
    repeat (3) @(posedge clk);
    rst <= 0;
    pr = 0; pi = 0;
    for (int t = 0; t < 3000; t++) begin
      int xi, xq, si, sq;
      logic z;
      xi = int'($signed(16'($urandom))); xq = int'($signed(16'($urandom)));
      if (t == 0) begin xi = -32768; xq = -32768; end
      si = lev(3'($urandom)); sq = lev(3'($urandom));
      if (t == 0) begin si = -4; sq = -4; end
      z = ($urandom % 4 == 0);
      for (int c = 0; c < NL; c++) begin
        prod_i[c] <= PW'(xi * lev(3'(c)));
        prod_q[c] <= PW'(xq * lev(3'(c)));
      end
      sync_i <= CW'(si); sync_q <= CW'(sq); zero <= z; en <= 1;
      @(posedge clk);
      en <= 0;
      @(negedge clk);
      er = longint'(xi) * si + longint'(xq) * sq;
      ei = longint'(xq) * si - longint'(xi) * sq;
      chk("plain re", re0, er);
      chk("plain im", im0, ei);
      if (z) zero_seen++;
      chk("zero re", re1, z ? 0 : er);
      chk("zero im", im1, z ? 0 : ei);
      // en low: outputs hold even though inputs change
      sync_i <= CW'($urandom);
      @(posedge clk); @(negedge clk);
      chk("hold re", re0, er);
      chk("hold im", im1, z ? 0 : ei);
    end
    checks++; if (zero_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
