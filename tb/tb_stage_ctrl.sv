// tb_stage_ctrl: feeds random ticks to the training FSM and checks that each
// stage lasts exactly STAGEk_ITERS * (LUTs * NUM_BINS + 1) ticks, that ticks
// before start are ignored, that STAGE4 is never left, and that the routing
// and LUT settings match the stage in every clock.
module tb_stage_ctrl;
  import dpd_pkg::*;

  localparam int NL = 3, NB = 4, I1 = 2, I2 = 3, I3 = 1;
  localparam int L1 = I1 * (NL * NB + 1), L2 = I2 * (NL * NB + 1), L3 = I3 * ((NL - 1) * NB + 1);

  logic clk = 0, rst_n = 0, start = 0, tick = 0;
  stage_e stage;
  logic [31:0] stage_cnt;
  dpd_sel_e lut_dst;
  logic [1:0] lut_luts, act_luts, sh_luts, pm_luts;
  logic sh_in, pm_from_sh, out_from_pm;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  stage_ctrl #(.NUM_LUTS(NL), .NUM_BINS(NB), .STAGE1_ITERS(I1),
               .STAGE2_ITERS(I2), .STAGE3_ITERS(I3)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_settings(input stage_e s);
    int dst, ll, al, sl, pl, si, ps, op;
    case (s)
      STAGE2:  begin dst = 2; ll = 3; al = 3; sl = 0; pl = 3; si = 0; ps = 0; op = 1; end
      STAGE3:  begin dst = 1; ll = 2; al = 3; sl = 2; pl = 3; si = 1; ps = 1; op = 1; end
      STAGE4:  begin dst = 0; ll = 2; al = 2; sl = 0; pl = 0; si = 0; ps = 0; op = 0; end
      default: begin dst = 0; ll = 3; al = 3; sl = 0; pl = 0; si = 0; ps = 0; op = 0; end
    endcase
    checks++;
    if (int'(lut_dst) != dst || int'(lut_luts) != ll || int'(act_luts) != al ||
        int'(sh_luts) != sl || int'(pm_luts) != pl || int'(sh_in) != si ||
        int'(pm_from_sh) != ps || int'(out_from_pm) != op) begin
      failures++;
      $display("settings wrong in stage %0d", s);
    end
  endtask

  initial begin
    int ticks;
    stage_e exp_stage;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // ticks while idle are ignored
    for (int i = 0; i < 20; i++) begin
      @(negedge clk) tick = 1;
      @(posedge clk); #1;
      checks++;
      if (stage != IDLE) failures++;
      check_settings(stage);
    end
    @(negedge clk) begin start = 1; tick = 0; end
    @(posedge clk); #1;
    @(negedge clk) start = 0;
    checks++;
    if (stage != STAGE1) begin failures++; $display("start ignored"); end
    exp_stage = STAGE1;
    ticks = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk) tick = ($urandom_range(9) < 7);
      @(posedge clk); #1;
      if (tick && exp_stage != STAGE4) begin
        ticks++;
        if (exp_stage == STAGE1 && ticks == L1) begin exp_stage = STAGE2; ticks = 0; end
        else if (exp_stage == STAGE2 && ticks == L2) begin exp_stage = STAGE3; ticks = 0; end
        else if (exp_stage == STAGE3 && ticks == L3) begin exp_stage = STAGE4; ticks = 0; end
      end
      checks++;
      if (stage != exp_stage || (exp_stage != STAGE4 && int'(stage_cnt) != ticks)) begin
        failures++;
        $display("clock %0d: stage %0d count %0d, expected %0d count %0d", i, stage, stage_cnt, exp_stage, ticks);
      end
      check_settings(stage);
    end
    checks++;
    if (stage != STAGE4) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
