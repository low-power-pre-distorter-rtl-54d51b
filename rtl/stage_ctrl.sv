// stage_ctrl: control logic of the scheduler, a one-way training FSM.
//
// The FSM walks once through the four training steps and then stays in the
// last one: IDLE -(start)-> STAGE1 -> STAGE2 -> STAGE3 -> STAGE4. Each of the
// first three stages has its own counter threshold, expressed in LUT update
// rounds (STAGEk_ITERS). A round writes every bin of every LUT that the
// stage trains and is closed by a one-clock trigger cycle, so a round lasts
// (LUTs trained * NUM_BINS + 1) counted clocks. The counter advances on
// `tick`, which the scheduler raises for every coefficient write accepted and
// for every trigger cycle; counting the trigger cycle keeps the counter in
// step with the update stream, and counting only accepted writes keeps it in
// step when the coefficient source pauses.
//
// Besides the stage, the FSM produces, from registers only so that they can
// drive clock gates without glitches, the routing and power settings of the
// stage:
//   stage     lut_dst   act_luts  sh_luts  pm_luts  sh_in  pm_from_sh  out_from_pm
//   IDLE      ACTUAL    X         0        0        0      0           0
//   STAGE1    ACTUAL    X         0        0        0      0           0
//   STAGE2    PAMODEL   X         0        X        0      0           1
//   STAGE3    SHADOW    X         X-1      X        1      1           1
//   STAGE4    ACTUAL    X-1       0        0        0      0           0
// where X = NUM_LUTS. The one-way FSM and counter thresholds are the source
// design's; the threshold values are not given there and are parameters here,
// and which instance each stage uses is this implementation's reading of the
// top-level block diagram.
module stage_ctrl
  import dpd_pkg::*;
#(
  parameter int unsigned NUM_LUTS     = 3,
  parameter int unsigned NUM_BINS     = 64,
  parameter int unsigned STAGE1_ITERS = 4,
  parameter int unsigned STAGE2_ITERS = 4,
  parameter int unsigned STAGE3_ITERS = 4,
  localparam int unsigned LW = $clog2(NUM_LUTS + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          tick,
  output stage_e        stage,
  output logic [31:0]   stage_cnt,
  output dpd_sel_e      lut_dst,
  output logic [LW-1:0] lut_luts,     // LUTs written per round in this stage
  output logic [LW-1:0] act_luts,
  output logic [LW-1:0] sh_luts,
  output logic [LW-1:0] pm_luts,
  output logic          sh_in,
  output logic          pm_from_sh,
  output logic          out_from_pm
);

  localparam logic [LW-1:0] X   = LW'(NUM_LUTS);
  localparam logic [LW-1:0] XM1 = LW'(NUM_LUTS - 1);

  localparam logic [31:0] LIMIT1 = 32'(STAGE1_ITERS * (NUM_LUTS * NUM_BINS + 1));
  localparam logic [31:0] LIMIT2 = 32'(STAGE2_ITERS * (NUM_LUTS * NUM_BINS + 1));
  localparam logic [31:0] LIMIT3 = 32'(STAGE3_ITERS * ((NUM_LUTS - 1) * NUM_BINS + 1));

  stage_e stage_n;
  logic   at_limit;

  always_comb begin
    unique case (stage)
      STAGE1:  at_limit = (stage_cnt == LIMIT1 - 1);
      STAGE2:  at_limit = (stage_cnt == LIMIT2 - 1);
      STAGE3:  at_limit = (stage_cnt == LIMIT3 - 1);
      default: at_limit = 1'b0;
    endcase

    stage_n = stage;
    unique case (stage)
      IDLE:    if (start)           stage_n = STAGE1;
      STAGE1:  if (tick && at_limit) stage_n = STAGE2;
      STAGE2:  if (tick && at_limit) stage_n = STAGE3;
      STAGE3:  if (tick && at_limit) stage_n = STAGE4;
      default: stage_n = STAGE4;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage       <= IDLE;
      stage_cnt   <= '0;
      lut_dst     <= DPD_ACTUAL;
      lut_luts    <= X;
      act_luts    <= X;
      sh_luts     <= '0;
      pm_luts     <= '0;
      sh_in       <= 1'b0;
      pm_from_sh  <= 1'b0;
      out_from_pm <= 1'b0;
    end else begin
      stage <= stage_n;
      if (stage_n != stage)                   stage_cnt <= '0;
      else if (tick && stage inside {STAGE1, STAGE2, STAGE3}) stage_cnt <= stage_cnt + 1'b1;

      unique case (stage_n)
        STAGE2: begin
          lut_dst <= DPD_PAMODEL; lut_luts <= X;
          act_luts <= X; sh_luts <= '0; pm_luts <= X;
          sh_in <= 1'b0; pm_from_sh <= 1'b0; out_from_pm <= 1'b1;
        end
        STAGE3: begin
          lut_dst <= DPD_SHADOW; lut_luts <= XM1;
          act_luts <= X; sh_luts <= XM1; pm_luts <= X;
          sh_in <= 1'b1; pm_from_sh <= 1'b1; out_from_pm <= 1'b1;
        end
        STAGE4: begin
          lut_dst <= DPD_ACTUAL; lut_luts <= XM1;
          act_luts <= XM1; sh_luts <= '0; pm_luts <= '0;
          sh_in <= 1'b0; pm_from_sh <= 1'b0; out_from_pm <= 1'b0;
        end
        default: begin  // IDLE, STAGE1: conventional X-LUT operation
          lut_dst <= DPD_ACTUAL; lut_luts <= X;
          act_luts <= X; sh_luts <= '0; pm_luts <= '0;
          sh_in <= 1'b0; pm_from_sh <= 1'b0; out_from_pm <= 1'b0;
        end
      endcase
    end
  end

  // the FSM never returns to an earlier stage
  property p_one_way;
    @(posedge clk) disable iff (!rst_n) stage_n >= stage;
  endproperty
  a_one_way: assert property (p_one_way);

endmodule
