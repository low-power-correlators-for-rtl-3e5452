// Testbench for ctrl_regs: checks reset values, CTRL writes (mode bits, channel,
// one-clock restart pulse), COEF writes (coefficient fields, one-clock shift
// pulse, write counter), that read-only registers ignore writes, and read-back
// of every register including the STATUS input.
module tb_ctrl_regs;
  import ldacs_corr_pkg::*;
  logic clk = 0, rst = 1, reg_we = 0;
  logic [1:0] reg_addr = '0;
  logic [31:0] reg_wdata = '0, reg_rdata, status = '0;
  corr_mode_e sync_mode;
  link_e fl_mode;
  logic [1:0] ch_sel;
  logic restart, coef_shift;
  logic signed [2:0] coef_i, coef_q;
  int checks = 0, failures = 0;

  ctrl_regs #(.NUM_CH(4), .COEF_W(3)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0h exp %0h", what, got, exp);
    end
  endtask

  // called at a falling edge; the write happens at the next rising edge
  task automatic wr(logic [1:0] a, logic [31:0] d);
    reg_addr = a; reg_wdata = d; reg_we = 1;
    @(negedge clk);
    reg_we = 0;
  endtask

  initial begin
    int ncoef;
    ncoef = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    chk("reset mode", sync_mode, MODE_SENSE);
    chk("reset link", fl_mode, LINK_RL);
    chk("reset ch", ch_sel, 0);
    chk("reset pulses", {restart, coef_shift}, 0);
    for (int t = 0; t < 500; t++) begin
      logic [31:0] d;
      d = $urandom;
      case ($urandom % 3)
        0: begin
          wr(REG_CTRL, d);
          chk("restart pulse", restart, 1);
          chk("no shift", coef_shift, 0);
          chk("mode", sync_mode, d[0]);
          chk("link", fl_mode, d[1]);
          chk("ch", ch_sel, d[9:8]);
          reg_addr = REG_CTRL; #1;
          chk("rd ctrl", reg_rdata, {22'b0, d[9:8], 6'b0, d[1:0]});
          @(negedge clk);
          chk("restart one clock", restart, 0);
        end
        1: begin
          wr(REG_COEF, d);
          ncoef++;
          chk("shift pulse", coef_shift, 1);
          chk("no restart", restart, 0);
          chk("coef i", coef_i, $signed(d[2:0]));
          chk("coef q", coef_q, $signed(d[10:8]));
          reg_addr = REG_COUNT; #1;
          chk("count", reg_rdata, ncoef);
          reg_addr = REG_COEF; #1;
          chk("rd coef", reg_rdata, {21'b0, d[10:8], 5'b0, d[2:0]});
          @(negedge clk);
          chk("shift one clock", coef_shift, 0);
        end
        default: begin
          logic [1:0] keep_ch;
          keep_ch = ch_sel;
          wr(($urandom % 2) ? REG_STATUS : REG_COUNT, d);
          chk("ro no pulse", {restart, coef_shift}, 0);
          chk("ro keeps ch", ch_sel, keep_ch);
          status = $urandom;
          reg_addr = REG_STATUS; #1;
          chk("rd status", reg_rdata, status);
          reg_addr = REG_COUNT; #1;
          chk("count kept", reg_rdata, ncoef);
          @(negedge clk);
        end
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
