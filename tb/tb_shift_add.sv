// Testbench for shift_add: drives random samples (with idle cycles between some)
// and checks every registered product against x*level computed by the testbench,
// the one-clock latency of prod_valid and that prod holds while in_valid is low.
module tb_shift_add;
  localparam int unsigned SW = 16, CW = 3, PW = SW + CW, NL = 2 ** CW;
  logic clk = 0, rst = 1, in_valid = 0;
  logic signed [SW-1:0] x = '0;
  logic signed [PW-1:0] prod [NL];
  logic prod_valid;
  int checks = 0, failures = 0;

  shift_add #(.SAMPLE_W(SW), .COEF_W(CW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_prod(input logic signed [SW-1:0] xv);
    for (int c = 0; c < NL; c++) begin
      automatic int lev = (c >= NL/2) ? c - NL : c;
      automatic longint exp = longint'(xv) * lev;
      checks++;
      if (longint'(prod[c]) != exp) begin
        failures++;
        $display("FAIL x=%0d level=%0d got %0d exp %0d", xv, lev, prod[c], exp);
      end
    end
  endtask

  initial begin
    logic signed [SW-1:0] last;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    checks++; if (prod_valid !== 1'b0) failures++;
    for (int t = 0; t < 2000; t++) begin
      logic signed [SW-1:0] v;
      v = (t == 0) ? 16'sh7fff : (t == 1) ? 16'sh8000 : SW'($urandom);
      x <= v; in_valid <= 1;
      @(posedge clk);
      in_valid <= 0;
      @(negedge clk);
      checks++; if (prod_valid !== 1'b1) begin failures++; $display("FAIL valid"); end
      check_prod(v);
      last = v;
      if (t % 3 == 0) begin
        x <= SW'($urandom);
        @(posedge clk); @(negedge clk);
        checks++; if (prod_valid !== 1'b0) begin failures++; $display("FAIL valid idle"); end
        check_prod(last);   // held while idle
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
