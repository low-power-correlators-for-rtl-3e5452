// Testbench for sync_coef_bank: after reset all taps read zero; a random sequence
// written s[0] first must end with s[n] in tap n; idle clocks must not move it;
// a second, partial load must shift the old contents down by its length.
module tb_sync_coef_bank;
  localparam int unsigned CW = 3, NT = 376;
  logic clk = 0, rst = 1, shift = 0;
  logic signed [CW-1:0] in_i = '0, in_q = '0;
  logic signed [CW-1:0] sync_i [NT];
  logic signed [CW-1:0] sync_q [NT];
  logic [CW-1:0] ref_i [NT], ref_q [NT];
  int checks = 0, failures = 0;

  sync_coef_bank #(.COEF_W(CW), .N_TAPS(NT)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(string what);
    for (int n = 0; n < NT; n++) begin
      checks++;
      if (sync_i[n] !== ref_i[n] || sync_q[n] !== ref_q[n]) begin
        failures++;
        if (failures < 10) $display("FAIL %s tap %0d got %0d/%0d exp %0d/%0d", what, n,
                                    sync_i[n], sync_q[n], ref_i[n], ref_q[n]);
      end
    end
  endtask

  task automatic load(int count);
    for (int k = 0; k < count; k++) begin
      logic [CW-1:0] a, b;
      a = CW'($urandom); b = CW'($urandom);
      in_i <= a; in_q <= b; shift <= 1;
      for (int n = 0; n < NT - 1; n++) begin ref_i[n] = ref_i[n+1]; ref_q[n] = ref_q[n+1]; end
      ref_i[NT-1] = a; ref_q[NT-1] = b;
      @(posedge clk);
    end
    shift <= 0;
    @(posedge clk);
  endtask

  initial begin
    for (int n = 0; n < NT; n++) begin ref_i[n] = '0; ref_q[n] = '0; end
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    compare("reset");
    load(NT);
    compare("full load");
    in_i <= 3'sd1; in_q <= 3'sd2;
    repeat (5) @(posedge clk);
    compare("idle");
    load(37);
    compare("partial load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
