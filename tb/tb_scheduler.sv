// tb_scheduler: runs the scheduler through all four stages with a random
// coefficient stream and random samples. Checks: a round trigger after every
// (LUTs trained * NUM_BINS) accepted writes, with upd_ready low in that clock;
// each stage ends after its number of rounds; each accepted write reaches the
// instance trained in its stage one clock later with its data unchanged; the
// sample demultiplexer delivers I*I+Q*Q one clock after the sample, to the
// Actual DPD always and to the Shadow DPD only in STAGE3.
module tb_scheduler;
  import dpd_pkg::*;
  import dpd_model_pkg::*;

  localparam int NL = 3, NB = 4, IT = 2;
  logic clk = 0, rst_n = 0, start = 0;
  logic in_valid = 0;
  cplx_t in_x = '0;
  logic upd_valid = 0, upd_ready;
  logic [1:0] upd_sel = '0;
  logic [1:0] upd_addr = '0;
  ccoef_t upd_coef = '0;
  logic act_valid, sh_valid;
  cplx_t dmx_x;
  power_t dmx_pwr;
  logic act_we, sh_we, pm_we;
  logic [1:0] lut_wsel;
  logic [1:0] lut_waddr;
  ccoef_t lut_wdata;
  stage_e stage;
  logic round_done;
  logic [1:0] act_luts, sh_luts, pm_luts;
  logic pm_from_sh, out_from_pm;

  int checks = 0, failures = 0;
  int rounds_in_stage = 0, writes_in_round = 0, n_stall = 0;

  always #5 clk = ~clk;

  scheduler #(.NUM_LUTS(NL), .NUM_BINS(NB), .STAGE1_ITERS(IT),
              .STAGE2_ITERS(IT), .STAGE3_ITERS(IT)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int luts_of(input stage_e s);
    return (s == STAGE3 || s == STAGE4) ? NL - 1 : NL;
  endfunction

  initial begin
    logic acc_q, inv_q;
    stage_e st_q;
    logic [1:0] sel_q, addr_q;
    ccoef_t coef_q;
    int re_q, im_q;
    int seen [5];
    int sel_cnt;
    acc_q = 0; inv_q = 0; st_q = IDLE; sel_q = 0; addr_q = 0; coef_q = '0; re_q = 0; im_q = 0;
    sel_cnt = 0;
    for (int i = 0; i < 5; i++) seen[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    for (int i = 0; i < 600; i++) begin
      stage_e st_now;
      logic acc_now, rd;
      @(negedge clk);
      // new inputs for this clock
      in_valid = ($urandom_range(4) != 0);
      in_x = cplx_t'($urandom);
      upd_valid = ($urandom_range(4) != 0);
      upd_sel = 2'((sel_cnt / NB) % luts_of(stage));
      upd_addr = 2'(sel_cnt % NB);
      upd_coef = ccoef_t'($urandom);
      st_now = stage;
      seen[int'(st_now)]++;
      #1;
      acc_now = upd_valid && upd_ready;
      rd = round_done;
      checks++;
      if (rd && upd_ready) begin failures++; $display("ready during round trigger"); end
      if (rd) n_stall++;
      @(posedge clk); #1;
      // write routed one clock after acceptance
      checks++;
      if (acc_now) begin
        logic [2:0] exp_we;
        case (st_now)
          STAGE2:  exp_we = 3'b001;  // {act, sh, pm}
          STAGE3:  exp_we = 3'b010;
          default: exp_we = 3'b100;
        endcase
        if ({act_we, sh_we, pm_we} != exp_we || lut_wsel != upd_sel ||
            lut_waddr != upd_addr || lut_wdata != upd_coef) begin
          failures++; $display("write misrouted in stage %0d", st_now);
        end
        sel_cnt++;
        writes_in_round++;
      end else if (act_we || sh_we || pm_we) begin
        failures++; $display("spurious write");
      end
      // round trigger after a complete round
      if (writes_in_round == luts_of(st_now) * NB) begin
        checks++;
        if (!round_done) begin failures++; $display("missing round trigger"); end
        writes_in_round = 0;
        sel_cnt = 0;
        rounds_in_stage++;
        if (st_now != STAGE4 && rounds_in_stage == IT) begin
          rounds_in_stage = 0;
          @(posedge clk); #1;   // the trigger clock is the last one of the stage
          checks++;
          if (stage != stage_e'(int'(st_now) + 1)) begin
            failures++; $display("stage %0d did not end after %0d rounds", st_now, IT);
          end
        end
      end else if (round_done) begin
        failures++; $display("early round trigger");
      end
      // sample demultiplexer
      checks++;
      if (act_valid != in_valid || sh_valid != (in_valid && stage == STAGE3) ||
          (in_valid && (dmx_x != in_x || longint'(dmx_pwr) != m_power(int'(in_x.re), int'(in_x.im))))) begin
        failures++; $display("sample path wrong");
      end
    end
    checks++;
    if (stage != STAGE4 || seen[2] == 0 || seen[3] == 0 || n_stall == 0) begin
      failures++; $display("not all stages seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
