// Software control registers of the correlator.
//
// The cognitive software running on the processor steers the correlator through a
// small register port: it selects spectrum sensing or receiver synchronisation,
// reverse- or forward-link sync structure and the channeliser output to sense,
// and it loads the quantised sync sequence.
//   addr 0 CTRL   rw  [0] sync_mode  [1] fl_mode  [CH_W+7:8] ch_sel.
//                     Every write also pulses 'restart' (new sensing window).
//   addr 1 COEF   rw  [COEF_W-1:0] coefficient I, [COEF_W+7:8] coefficient Q.
//                     Every write pulses 'coef_shift' with that pair.
//   addr 2 STATUS ro  the 'status' input.
//   addr 3 COUNT  ro  number of coefficient writes since reset.
// Timing: a write is taken on the clock edge where reg_we is high; the new
// outputs and the one-clock pulses appear after that edge. reg_rdata is
// combinational on reg_addr. The mode bit set by software follows the reference design;
// the map itself is this design's choice.
module ctrl_regs
  import ldacs_corr_pkg::*;
#(
  parameter int unsigned NUM_CH = ldacs_corr_pkg::CORR_NUM_CH,
  parameter int unsigned COEF_W = ldacs_corr_pkg::CORR_COEF_W,
  localparam int unsigned CH_W  = (NUM_CH > 1) ? $clog2(NUM_CH) : 1
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     reg_we,
  input  logic [1:0]               reg_addr,
  input  logic [31:0]              reg_wdata,
  output logic [31:0]              reg_rdata,
  input  logic [31:0]              status,
  output corr_mode_e               sync_mode,
  output link_e                    fl_mode,
  output logic [CH_W-1:0]          ch_sel,
  output logic                     restart,
  output logic                     coef_shift,
  output logic signed [COEF_W-1:0] coef_i,
  output logic signed [COEF_W-1:0] coef_q
);

  logic [31:0] coef_count;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync_mode  <= MODE_SENSE;
      fl_mode    <= LINK_RL;
      ch_sel     <= '0;
      restart    <= 1'b0;
      coef_shift <= 1'b0;
      coef_i     <= '0;
      coef_q     <= '0;
      coef_count <= '0;
    end else begin
      restart    <= 1'b0;
      coef_shift <= 1'b0;
      if (reg_we) begin
        unique case (reg_addr)
          REG_CTRL: begin
            sync_mode <= corr_mode_e'(reg_wdata[0]);
            fl_mode   <= link_e'(reg_wdata[1]);
            ch_sel    <= reg_wdata[8 +: CH_W];
            restart   <= 1'b1;
          end
          REG_COEF: begin
            coef_i     <= reg_wdata[0 +: COEF_W];
            coef_q     <= reg_wdata[8 +: COEF_W];
            coef_shift <= 1'b1;
            coef_count <= coef_count + 1;
          end
          default: ;  // read-only registers ignore writes
        endcase
      end
    end
  end

  always_comb begin
    reg_rdata = '0;
    unique case (reg_addr)
      REG_CTRL: begin
        reg_rdata[0]         = sync_mode;
        reg_rdata[1]         = fl_mode;
        reg_rdata[8 +: CH_W] = ch_sel;
      end
      REG_COEF: begin
        reg_rdata[0 +: COEF_W] = coef_i;
        reg_rdata[8 +: COEF_W] = coef_q;
      end
      REG_STATUS: reg_rdata = status;
      REG_COUNT:  reg_rdata = coef_count;
      default: ;
    endcase
  end

endmodule
