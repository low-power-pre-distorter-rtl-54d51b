// dpd_top: low-power LUT predistorter with a training scheduler.
//
// The design trains a predistorter that works with one LUT fewer (X-1) than
// the conventional one (X) while keeping its linearisation, so that the
// deployed predistorter needs fewer memories and multipliers. Three identical
// predistorter instances take part:
//   Actual DPD    the one in the transmit chain, in front of the amplifier
//   Shadow DPD    the X-1-LUT predistorter being trained in the background
//   PA-model DPD  an X-LUT model of the inverse of the Actual DPD, used as a
//                 stand-in for the amplifier while the Shadow DPD trains
// The scheduler computes the input power, routes samples and coefficient
// writes by stage, and runs the one-way training FSM (see stage_ctrl). A
// multiplexer feeds the Actual or the Shadow output, through a second power
// calculation, into the PA-model DPD; the output multiplexer returns the
// Actual output (STAGE1, STAGE4: conventional and optimised modes) or the
// PA-model output (STAGE2, STAGE3: open-loop mode) for the training algorithm,
// which runs outside this design and sends LUT coefficients back through the
// upd_* handshake.
//
// Instances that a stage does not use get active_luts = 0: their taps are
// clock gated (GATE_CLOCKS = 1) and they draw no dynamic power. In the
// optimised mode the Actual DPD's deepest tap is gated the same way. The
// latches synthesis reports under this module are those clock gates' enable
// latches and are intended.
//
// Timing: out_y follows in_x by 5 clocks on the Actual path (power 1 +
// predistorter 4) and by 10 clocks on the PA-model path (5 + mux power 1 +
// predistorter 4). `detect` is passed to all three address generators: while
// it is high each one learns the power range of the samples it sees.
//
// The block structure follows the source design's top-level diagram; the
// stage-to-instance mapping, widths and latencies are this implementation's.
module dpd_top
  import dpd_pkg::*;
#(
  parameter int unsigned NUM_LUTS     = 3,
  parameter int unsigned NUM_BINS     = 64,
  parameter int unsigned STAGE1_ITERS = 4,
  parameter int unsigned STAGE2_ITERS = 4,
  parameter int unsigned STAGE3_ITERS = 4,
  parameter bit          GATE_CLOCKS  = 1'b1,
  localparam int unsigned AW = $clog2(NUM_BINS),
  localparam int unsigned TW = (NUM_LUTS > 1) ? $clog2(NUM_LUTS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          detect,
  // samples
  input  logic          in_valid,
  input  cplx_t         in_x,
  output logic          out_valid,
  output cplx_t         out_y,
  // coefficient updates from the training algorithm
  input  logic          upd_valid,
  output logic          upd_ready,
  input  logic [TW-1:0] upd_sel,
  input  logic [AW-1:0] upd_addr,
  input  ccoef_t        upd_coef,
  // status
  output stage_e        stage,
  output logic          round_done,
  output logic          busy
);

  localparam int unsigned LW = $clog2(NUM_LUTS + 1);

  logic          act_valid, sh_valid;
  cplx_t         dmx_x;
  power_t        dmx_pwr;
  logic          act_we, sh_we, pm_we;
  logic [TW-1:0] lut_wsel;
  logic [AW-1:0] lut_waddr;
  ccoef_t        lut_wdata;
  logic [LW-1:0] act_luts, sh_luts, pm_luts;
  logic          pm_from_sh, out_from_pm;

  scheduler #(
    .NUM_LUTS(NUM_LUTS), .NUM_BINS(NUM_BINS),
    .STAGE1_ITERS(STAGE1_ITERS), .STAGE2_ITERS(STAGE2_ITERS),
    .STAGE3_ITERS(STAGE3_ITERS)
  ) u_sched (
    .clk, .rst_n, .start, .in_valid, .in_x,
    .upd_valid, .upd_ready, .upd_sel, .upd_addr, .upd_coef,
    .act_valid, .sh_valid, .dmx_x, .dmx_pwr,
    .act_we, .sh_we, .pm_we, .lut_wsel, .lut_waddr, .lut_wdata,
    .stage, .round_done, .act_luts, .sh_luts, .pm_luts,
    .pm_from_sh, .out_from_pm
  );

  // ------------------------------------------------------------ Actual DPD
  logic  act_ovalid, act_busy;
  cplx_t act_y;

  predistorter #(.NUM_LUTS(NUM_LUTS), .NUM_BINS(NUM_BINS), .GATE_CLOCKS(GATE_CLOCKS)) u_actual (
    .clk, .rst_n, .active_luts(act_luts), .detect, .busy(act_busy),
    .lut_we(act_we), .lut_wsel, .lut_waddr, .lut_wdata,
    .in_valid(act_valid), .in_x(dmx_x), .in_pwr(dmx_pwr),
    .out_valid(act_ovalid), .out_y(act_y)
  );

  // ------------------------------------------------------------ Shadow DPD
  logic  sh_ovalid, sh_busy;
  cplx_t sh_y;

  predistorter #(.NUM_LUTS(NUM_LUTS), .NUM_BINS(NUM_BINS), .GATE_CLOCKS(GATE_CLOCKS)) u_shadow (
    .clk, .rst_n, .active_luts(sh_luts), .detect, .busy(sh_busy),
    .lut_we(sh_we), .lut_wsel, .lut_waddr, .lut_wdata,
    .in_valid(sh_valid), .in_x(dmx_x), .in_pwr(dmx_pwr),
    .out_valid(sh_ovalid), .out_y(sh_y)
  );

  // ------------------------------------- mux and power into the PA-model DPD
  logic   pm_in_valid;
  cplx_t  pm_in_x;
  logic   pmc_valid;
  cplx_t  pmc_x;
  power_t pmc_pwr;

  always_comb begin
    if (pm_from_sh) begin
      pm_in_valid = sh_ovalid;
      pm_in_x     = sh_y;
    end else begin
      pm_in_valid = act_ovalid;
      pm_in_x     = act_y;
    end
    // the PA-model path carries samples while that instance is on, and
    // during range detection so that it learns its own input range
    pm_in_valid = pm_in_valid && (pm_luts != '0 || detect);
  end

  power_calc u_pm_pwr (
    .clk, .rst_n, .in_valid(pm_in_valid), .in_x(pm_in_x),
    .out_valid(pmc_valid), .out_x(pmc_x), .out_pwr(pmc_pwr)
  );

  // ---------------------------------------------------------- PA-model DPD
  logic  pm_ovalid, pm_busy;
  cplx_t pm_y;

  predistorter #(.NUM_LUTS(NUM_LUTS), .NUM_BINS(NUM_BINS), .GATE_CLOCKS(GATE_CLOCKS)) u_pamodel (
    .clk, .rst_n, .active_luts(pm_luts), .detect, .busy(pm_busy),
    .lut_we(pm_we), .lut_wsel, .lut_waddr, .lut_wdata,
    .in_valid(pmc_valid), .in_x(pmc_x), .in_pwr(pmc_pwr),
    .out_valid(pm_ovalid), .out_y(pm_y)
  );

  // ------------------------------------------------------------ output mux
  always_comb begin
    if (out_from_pm) begin
      out_valid = pm_ovalid;
      out_y     = pm_y;
    end else begin
      out_valid = act_ovalid;
      out_y     = act_y;
    end
  end

  assign busy = act_busy || sh_busy || pm_busy;

endmodule
