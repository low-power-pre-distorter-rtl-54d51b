// scheduler: front end of the training system.
//
// It holds the input power calculation, the control FSM (stage_ctrl) and two
// demultiplexers. The sample demultiplexer hands each input sample with its
// power to the Actual DPD (always, since it keeps feeding the amplifier) and,
// in STAGE3, to the Shadow DPD too. The update demultiplexer steers each LUT
// coefficient write to the instance being trained in the current stage.
//
// Update rounds: a round is one write to every bin of every LUT trained in
// the stage (lut_luts * NUM_BINS writes). After the last write of a round the
// scheduler spends one clock on the round trigger: round_done is high and
// upd_ready is low, so no write is taken in that clock. Every accepted write
// and every trigger clock is a tick for the FSM counters.
//
// Interface: upd_valid/upd_ready is a valid/ready handshake; a write is taken
// in a clock where both are high. Samples have no back-pressure. All outputs
// towards the predistorters are registered: the sample path has one clock of
// latency (the power calculation), a write leaves one clock after it is taken.
//
// The power calculation in front of the demultiplexer, the control logic and
// the two demultiplexers are the source design's; the one-clock trigger after
// each round is too. Handshake, round order and registering are this
// implementation's choices.
module scheduler
  import dpd_pkg::*;
#(
  parameter int unsigned NUM_LUTS     = 3,
  parameter int unsigned NUM_BINS     = 64,
  parameter int unsigned STAGE1_ITERS = 4,
  parameter int unsigned STAGE2_ITERS = 4,
  parameter int unsigned STAGE3_ITERS = 4,
  localparam int unsigned AW = $clog2(NUM_BINS),
  localparam int unsigned LW = $clog2(NUM_LUTS + 1),
  localparam int unsigned TW = (NUM_LUTS > 1) ? $clog2(NUM_LUTS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  // input samples
  input  logic          in_valid,
  input  cplx_t         in_x,
  // coefficient updates from the training algorithm
  input  logic          upd_valid,
  output logic          upd_ready,
  input  logic [TW-1:0] upd_sel,
  input  logic [AW-1:0] upd_addr,
  input  ccoef_t        upd_coef,
  // sample demultiplexer outputs (shared data, one valid per destination)
  output logic          act_valid,
  output logic          sh_valid,
  output cplx_t         dmx_x,
  output power_t        dmx_pwr,
  // update demultiplexer outputs (shared data, one write enable per destination)
  output logic          act_we,
  output logic          sh_we,
  output logic          pm_we,
  output logic [TW-1:0] lut_wsel,
  output logic [AW-1:0] lut_waddr,
  output ccoef_t        lut_wdata,
  // stage settings
  output stage_e        stage,
  output logic          round_done,
  output logic [LW-1:0] act_luts,
  output logic [LW-1:0] sh_luts,
  output logic [LW-1:0] pm_luts,
  output logic          pm_from_sh,
  output logic          out_from_pm
);

  // ------------------------------------------------------ power calculation
  logic pc_valid;

  power_calc u_pwr (
    .clk, .rst_n, .in_valid, .in_x,
    .out_valid(pc_valid), .out_x(dmx_x), .out_pwr(dmx_pwr)
  );

  // ----------------------------------------------------------- control FSM
  logic          tick;
  logic          sh_in;
  dpd_sel_e      lut_dst;
  logic [LW-1:0] lut_luts;
  logic [31:0]   stage_cnt_unused;

  stage_ctrl #(
    .NUM_LUTS(NUM_LUTS), .NUM_BINS(NUM_BINS),
    .STAGE1_ITERS(STAGE1_ITERS), .STAGE2_ITERS(STAGE2_ITERS),
    .STAGE3_ITERS(STAGE3_ITERS)
  ) u_ctrl (
    .clk, .rst_n, .start, .tick,
    .stage, .stage_cnt(stage_cnt_unused),
    .lut_dst, .lut_luts, .act_luts, .sh_luts, .pm_luts,
    .sh_in, .pm_from_sh, .out_from_pm
  );

  // ------------------------------------------------------- sample demux
  assign act_valid = pc_valid;
  assign sh_valid  = pc_valid && sh_in;

  // ------------------------------------------------------- update demux
  logic        accept;
  logic [31:0] wr_cnt;
  logic [31:0] round_len;

  assign round_len = 32'(lut_luts) * 32'(NUM_BINS);
  assign upd_ready = !round_done && (stage != IDLE);
  assign accept    = upd_valid && upd_ready;
  assign tick      = accept || round_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_cnt     <= '0;
      round_done <= 1'b0;
      act_we     <= 1'b0;
      sh_we      <= 1'b0;
      pm_we      <= 1'b0;
      lut_wsel   <= '0;
      lut_waddr  <= '0;
      lut_wdata  <= '0;
    end else begin
      round_done <= 1'b0;
      if (accept) begin
        if (wr_cnt == round_len - 1) begin
          wr_cnt     <= '0;
          round_done <= 1'b1;
        end else begin
          wr_cnt <= wr_cnt + 1'b1;
        end
      end
      act_we    <= accept && lut_dst == DPD_ACTUAL;
      sh_we     <= accept && lut_dst == DPD_SHADOW;
      pm_we     <= accept && lut_dst == DPD_PAMODEL;
      lut_wsel  <= upd_sel;
      lut_waddr <= upd_addr;
      lut_wdata <= upd_coef;
    end
  end

  // a write never targets a LUT that the trained instance has switched off
  a_sel_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    accept |-> (LW'(upd_sel) < lut_luts));

endmodule
