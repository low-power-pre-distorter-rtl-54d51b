// tb_dpd_top: end-to-end test of the training system at its default size
// (3 LUTs of 64 bins per predistorter, 4 update rounds per training stage).
//
// The testbench plays the training algorithm: it streams coefficient tables
// through the update handshake (the table for the instance trained in each
// stage, repeated every round), streams random samples, and runs a range
// detection phase during STAGE1. An integer model of all three predistorter
// instances (tap delay lines, bins from each instance's own detected power
// range, bypass, rescale and saturation) predicts every output of the Actual
// path (5 clocks) or of the PA-model path (10 clocks) as selected by the
// stage. Outputs close to a table change, a stage change or the boundary
// build are not compared, because the model does not time those events to
// the clock. It counts and requires: all four stages, round triggers,
// update stalls in the trigger clock, range detection, bypassed samples,
// compared outputs from the open-loop path in STAGE2 and in STAGE3 and from
// the X-1-LUT Actual DPD in STAGE4, and clock-gated idle taps.
module tb_dpd_top;
  import dpd_pkg::*;
  import dpd_model_pkg::*;

  localparam int NL = 3, NB = 64, G = 14;
  localparam int ACT = 0, SH = 1, PM = 2;

  logic clk = 0, rst_n = 0, start = 0, detect = 0;
  logic in_valid = 0, out_valid;
  cplx_t in_x = '0, out_y;
  logic upd_valid = 0, upd_ready;
  logic [1:0] upd_sel = '0;
  logic [5:0] upd_addr = '0;
  ccoef_t upd_coef = '0;
  stage_e stage;
  logic round_done, busy;

  dpd_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0, last_change = 0;
  // mechanism counters
  int n_stage [5];
  int n_round = 0, n_stall = 0, n_bypass = 0, n_sat = 0, n_busy = 0;
  int n_chk_s1 = 0, n_chk_s2 = 0, n_chk_s3 = 0, n_chk_s4 = 0;
  int n_gated_sh = 0, n_gated_tap = 0;

  // coefficient tables the "algorithm" sends, per stage: [tap][bin]
  int tab_re [5][NL][NB], tab_im [5][NL][NB];
  // the model's mirror of each instance's LUTs
  int lut_re [3][NL][NB], lut_im [3][NL][NB];
  bit lut_ok [3][NL][NB];
  // the model's tap registers and power range per instance
  int mx_re [3][NL], mx_im [3][NL], mb [3][NL];
  longint pmin [3], dp [3], dmin [3], dmax [3];

  typedef struct { int tin; int due; int re; int im; bit ok; } exp_t;
  exp_t expq[$];
  stage_e stage_q = IDLE;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ the model
  // one sample into instance `inst` with `n` active taps
  task automatic dpd_step(input int inst, input int re, input int im, input int n,
                          output int yre, output int yim, output bit ok, output bit byp);
    longint p, ar, ai;
    int b;
    p = m_power(re, im);
    b = m_bin(p, pmin[inst], dp[inst], NB);
    if (n > 0) begin
      for (int m = n - 1; m >= 1; m--) begin
        mx_re[inst][m] = mx_re[inst][m-1];
        mx_im[inst][m] = mx_im[inst][m-1];
        mb[inst][m]    = mb[inst][m-1];
      end
      mx_re[inst][0] = re; mx_im[inst][0] = im; mb[inst][0] = (b < 0) ? 0 : b;
    end
    ok = 1;
    ar = 0; ai = 0;
    for (int m = 0; m < n; m++) begin
      int cr, ci;
      cr = lut_re[inst][m][mb[inst][m]];
      ci = lut_im[inst][m][mb[inst][m]];
      if (!lut_ok[inst][m][mb[inst][m]]) ok = 0;
      ar += longint'(mx_re[inst][m]) * cr - longint'(mx_im[inst][m]) * ci;
      ai += longint'(mx_re[inst][m]) * ci + longint'(mx_im[inst][m]) * cr;
    end
    byp = (b < 0);
    if (byp) begin
      yre = re; yim = im; ok = 1;
    end else begin
      yre = m_sat(m_asr(ar, 14));
      yim = m_sat(m_asr(ai, 14));
      if (yre != int'(m_asr(ar, 14)) || yim != int'(m_asr(ai, 14))) n_sat++;
    end
    if (detect) begin
      if (dmin[inst] < 0 || p < dmin[inst]) dmin[inst] = p;
      if (dmax[inst] < 0 || p > dmax[inst]) dmax[inst] = p;
    end
  endtask

  // the whole system for one input sample presented in stage `s`
  task automatic model_sample(input int re, input int im, input stage_e s);
    int ar, ai, sr, si, pr, pi, tr, ti;
    bit aok, sok, pok, abyp, sbyp, pbyp, tok, tbyp;
    exp_t e;
    dpd_step(ACT, re, im, (s == STAGE4) ? NL - 1 : NL, ar, ai, aok, abyp);
    sr = 0; si = 0; sok = 0;
    if (s == STAGE3) dpd_step(SH, re, im, NL - 1, sr, si, sok, sbyp);
    pok = 0; pr = 0; pi = 0;
    if (s == STAGE2) dpd_step(PM, ar, ai, NL, pr, pi, tok, pbyp);
    if (s == STAGE3) dpd_step(PM, sr, si, NL, pr, pi, tok, pbyp);
    if (s == STAGE2) pok = aok && tok;
    if (s == STAGE3) pok = sok && tok;
    if (detect && !(s == STAGE2 || s == STAGE3)) begin
      // the PA-model address generator learns its range from the Actual output
      dpd_step(PM, ar, ai, 0, tr, ti, tok, tbyp);
    end
    e.tin = cyc;
    if (s == STAGE2 || s == STAGE3) begin
      e.due = cyc + 10; e.re = pr; e.im = pi; e.ok = pok;
    end else begin
      e.due = cyc + 5; e.re = ar; e.im = ai; e.ok = aok;
      if (abyp && aok) n_bypass++;
    end
    expq.push_back(e);
  endtask

  function automatic void end_detection();
    for (int i = 0; i < 3; i++) begin
      longint lo, hi;
      lo = (dmin[i] < 0) ? 0 : dmin[i];
      hi = (dmax[i] < 0) ? 64'hFFFF_FFFF : dmax[i];
      pmin[i] = lo;
      dp[i] = (hi - lo) / NB;
    end
  endfunction

  // -------------------------------------------------------------- checker
  always @(posedge clk) begin
    #1;
    cyc++;
    // stage changes are table-like events for the guard
    if (stage != stage_q) last_change = cyc;
    stage_q = stage;
    if (busy) last_change = cyc;
    if (busy) n_busy++;
    if (round_done) n_round++;
    if (upd_valid && !upd_ready && stage != IDLE) n_stall++;
    n_stage[int'(stage)]++;
    if (dut.u_shadow.tap_en_q == '0) n_gated_sh++;
    if (stage == STAGE4 && dut.u_actual.tap_en_q == 3'b011) n_gated_tap++;
    while (expq.size() != 0 && expq[0].due < cyc) begin
      exp_t e;
      e = expq.pop_front();
      if (e.ok && last_change < e.tin - G) begin
        failures++; $display("missing output due %0d", e.due);
      end
    end
    if (out_valid) begin
      if (expq.size() != 0 && expq[0].due == cyc) begin
        exp_t e;
        e = expq.pop_front();
        if (e.ok && last_change < e.tin - G) begin
          checks++;
          case (stage)
            STAGE1: n_chk_s1++;
            STAGE2: n_chk_s2++;
            STAGE3: n_chk_s3++;
            STAGE4: n_chk_s4++;
            default: ;
          endcase
          if (int'(out_y.re) != e.re || int'(out_y.im) != e.im) begin
            failures++;
            $display("cycle %0d stage %0d: got (%0d,%0d) exp (%0d,%0d), sample from %0d, last change %0d",
                     cyc, stage, out_y.re, out_y.im, e.re, e.im, e.tin, last_change);
          end
        end
      end else if (last_change < cyc - 2 * G) begin
        failures++; $display("unexpected output at %0d", cyc);
      end
    end
  end

  // ------------------------------------------------ coefficient "algorithm"
  initial begin
    int pos;
    bit acc;
    for (int s = 0; s < 5; s++)
      for (int m = 0; m < NL; m++)
        for (int a = 0; a < NB; a++) begin
          tab_re[s][m][a] = ((m == 0) ? 15000 + int'($urandom_range(3000)) : int'($urandom_range(1600)) - 800);
          tab_im[s][m][a] = int'($urandom_range(1600)) - 800;
        end
    pos = 0;
    wait (rst_n);
    forever begin
      stage_e s;
      int nl, dst;
      @(negedge clk);
      s = stage;
      nl = (s == STAGE3 || s == STAGE4) ? NL - 1 : NL;
      upd_valid = (s != IDLE) && ($urandom_range(19) != 0);
      upd_sel  = 2'(pos / NB);
      upd_addr = 6'(pos % NB);
      upd_coef.re = 16'(tab_re[int'(s)][pos / NB][pos % NB]);
      upd_coef.im = 16'(tab_im[int'(s)][pos / NB][pos % NB]);
      #1 acc = upd_valid && upd_ready;
      @(posedge clk);
      if (acc) begin
        dst = (s == STAGE2) ? PM : (s == STAGE3) ? SH : ACT;
        if (!lut_ok[dst][pos / NB][pos % NB] ||
            lut_re[dst][pos / NB][pos % NB] != tab_re[int'(s)][pos / NB][pos % NB] ||
            lut_im[dst][pos / NB][pos % NB] != tab_im[int'(s)][pos / NB][pos % NB])
          last_change = cyc + 1;
        lut_re[dst][pos / NB][pos % NB] = tab_re[int'(s)][pos / NB][pos % NB];
        lut_im[dst][pos / NB][pos % NB] = tab_im[int'(s)][pos / NB][pos % NB];
        lut_ok[dst][pos / NB][pos % NB] = 1;
        pos = (pos + 1) % (nl * NB);
      end
    end
  end

  // ---------------------------------------------------------------- samples
  task automatic send(input int n, input int amp, input int small_pct, input int gap_pct);
    for (int i = 0; i < n; i++) begin
      int re, im, a;
      @(negedge clk);
      in_valid = ($urandom_range(99) >= gap_pct);
      a = ($urandom_range(99) < small_pct) ? 300 : amp;
      re = int'($urandom_range(2*a)) - a;
      im = int'($urandom_range(2*a)) - a;
      in_x.re = 16'(re); in_x.im = 16'(im);
      if (in_valid) model_sample(re, im, stage);
    end
  endtask

  task automatic quiet(input int n);
    @(negedge clk) in_valid = 0;
    repeat (n) @(negedge clk);
  endtask

  initial begin
    for (int i = 0; i < 3; i++) begin
      pmin[i] = 0; dp[i] = longint'(1) << 26; dmin[i] = -1; dmax[i] = -1;
      for (int m = 0; m < NL; m++) begin
        mx_re[i][m] = 0; mx_im[i][m] = 0; mb[i][m] = 0;
        for (int a = 0; a < NB; a++) begin lut_ok[i][m][a] = 0; lut_re[i][m][a] = 0; lut_im[i][m][a] = 0; end
      end
    end
    for (int i = 0; i < 5; i++) n_stage[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    send(300, 12000, 0, 5);
    // range detection while the conventional predistorter runs
    quiet(20);
    @(negedge clk) detect = 1;
    for (int i = 0; i < 150; i++) begin
      int re, im;
      @(negedge clk);
      in_valid = 1;
      re = (i % 2 ? 1 : -1) * (2000 + int'($urandom_range(8000)));
      im = int'($urandom_range(16000)) - 8000;
      in_x.re = 16'(re); in_x.im = 16'(im);
      model_sample(re, im, stage);
    end
    quiet(20);
    @(negedge clk) detect = 0;
    end_detection();
    // the rest of training and the optimised mode
    while (stage != STAGE4) send(1, 12000, 15, 5);
    send(900, 12000, 15, 5);
    quiet(20);

    checks++;
    if (n_stage[1] == 0 || n_stage[2] == 0 || n_stage[3] == 0 || n_stage[4] == 0 ||
        n_round < 12 || n_stall == 0 || n_busy != NB - 1 || n_bypass == 0 ||
        n_chk_s1 == 0 || n_chk_s2 == 0 || n_chk_s3 == 0 || n_chk_s4 == 0 ||
        n_gated_sh == 0 || n_gated_tap == 0) begin
      failures++;
      $display("a mechanism never happened");
    end
    $display("stage clocks: S1 %0d S2 %0d S3 %0d S4 %0d", n_stage[1], n_stage[2], n_stage[3], n_stage[4]);
    $display("round triggers %0d, update stalls %0d, boundary build clocks %0d", n_round, n_stall, n_busy);
    $display("bypassed %0d, saturated %0d, shadow gated clocks %0d, X-1 gated clocks %0d", n_bypass, n_sat, n_gated_sh, n_gated_tap);
    $display("outputs compared: S1 %0d S2 %0d S3 %0d S4 %0d", n_chk_s1, n_chk_s2, n_chk_s3, n_chk_s4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
