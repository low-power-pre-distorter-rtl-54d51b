// tb_predistorter: drives one predistorter instance at its default size with
// random coefficient tables and random samples (with gaps), and compares every
// output with an integer model of the memory-tap sum
//   y(n) = sat( (sum_{m<active} LUT_m[bin(n-m)] * x(n-m)) >>> 14 )
// and of the below-Pmin bypass. It also checks the 4-clock latency, operation
// with X-1 LUTs (the deepest tap switched off and clock gated), with every tap
// off, after a range detection, and coefficient updates between bursts.
module tb_predistorter;
  import dpd_pkg::*;
  import dpd_model_pkg::*;

  localparam int NL = 3, NB = 64;
  logic clk = 0, rst_n = 0;
  logic [1:0] active_luts = 2'd3;
  logic detect = 0, busy;
  logic lut_we = 0;
  logic [1:0] lut_wsel = '0;
  logic [5:0] lut_waddr = '0;
  ccoef_t lut_wdata = '0;
  logic in_valid = 0, out_valid;
  cplx_t in_x = '0, out_y;
  power_t in_pwr = '0;

  int checks = 0, failures = 0;
  int n_bypass = 0, n_sat = 0, n_gated = 0;
  int cyc = 0;

  int tab_re [NL][NB], tab_im [NL][NB];
  int mx_re [NL], mx_im [NL], mb [NL];
  longint m_pmin = 0, m_dp = longint'(1) << 26;

  typedef struct { int due; int re; int im; } exp_t;
  exp_t expq[$];

  always #5 clk = ~clk;

  predistorter #(.NUM_LUTS(NL), .NUM_BINS(NB), .GATE_CLOCKS(1'b1)) dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------- checker
  always @(posedge clk) begin
    #1;
    cyc++;
    if (dut.tap_en_q != 3'b111) n_gated++;
    if (rst_n) begin
      if (out_valid) begin
        checks++;
        if (expq.size() == 0) begin
          failures++; $display("unexpected output at %0d", cyc);
        end else begin
          exp_t e;
          e = expq.pop_front();
          if (e.due != cyc || int'(out_y.re) != e.re || int'(out_y.im) != e.im) begin
            failures++;
            $display("cycle %0d: got (%0d,%0d) due %0d exp (%0d,%0d)", cyc, out_y.re, out_y.im, e.due, e.re, e.im);
          end
        end
      end else if (expq.size() != 0 && expq[0].due <= cyc) begin
        failures++; $display("missing output due %0d", expq[0].due);
        void'(expq.pop_front());
      end
    end
  end

  // --------------------------------------------------------------- model
  function automatic void model_sample(input int re, input int im, input int n);
    longint p, ar, ai;
    int b;
    exp_t e;
    p = m_power(re, im);
    b = m_bin(p, m_pmin, m_dp, NB);
    if (n > 0) begin
      for (int m = n - 1; m >= 1; m--) begin
        mx_re[m] = mx_re[m-1]; mx_im[m] = mx_im[m-1]; mb[m] = mb[m-1];
      end
      mx_re[0] = re; mx_im[0] = im; mb[0] = (b < 0) ? 0 : b;
    end
    ar = 0; ai = 0;
    for (int m = 0; m < n; m++) begin
      ar += longint'(mx_re[m]) * tab_re[m][mb[m]] - longint'(mx_im[m]) * tab_im[m][mb[m]];
      ai += longint'(mx_re[m]) * tab_im[m][mb[m]] + longint'(mx_im[m]) * tab_re[m][mb[m]];
    end
    e.due = cyc + 4;
    if (b < 0) begin
      e.re = re; e.im = im; n_bypass++;
    end else begin
      e.re = m_sat(m_asr(ar, 14)); e.im = m_sat(m_asr(ai, 14));
      if (e.re != int'(m_asr(ar, 14)) || e.im != int'(m_asr(ai, 14))) n_sat++;
    end
    expq.push_back(e);
  endfunction

  // ------------------------------------------------------------- stimulus
  task automatic write_tables(input int scale);
    for (int m = 0; m < NL; m++)
      for (int a = 0; a < NB; a++) begin
        int cr, ci;
        cr = (m == 0) ? 16384 + int'($urandom_range(2*scale)) - scale : int'($urandom_range(2*scale)) - scale;
        ci = int'($urandom_range(2*scale)) - scale;
        @(negedge clk);
        lut_we = 1; lut_wsel = 2'(m); lut_waddr = 6'(a);
        lut_wdata.re = 16'(cr); lut_wdata.im = 16'(ci);
        tab_re[m][a] = cr; tab_im[m][a] = ci;
      end
    @(negedge clk) lut_we = 0;
  endtask

  task automatic burst(input int n_samples, input int amp, input int small_pct);
    for (int i = 0; i < n_samples; i++) begin
      int re, im, a;
      @(negedge clk);
      in_valid = ($urandom_range(9) != 0);
      a = ($urandom_range(99) < small_pct) ? 300 : amp;
      re = int'($urandom_range(2*a)) - a;
      im = int'($urandom_range(2*a)) - a;
      in_x.re = 16'(re); in_x.im = 16'(im);
      in_pwr = power_t'(m_power(re, im));
      if (in_valid) model_sample(re, im, int'(active_luts));
    end
    @(negedge clk) in_valid = 0;
    repeat (8) @(negedge clk);
  endtask

  task automatic set_active(input int n);
    @(negedge clk) active_luts = 2'(n);
    repeat (3) @(negedge clk);
  endtask

  initial begin
    for (int m = 0; m < NL; m++) begin mx_re[m] = 0; mx_im[m] = 0; mb[m] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    write_tables(4000);
    burst(1500, 30000, 0);           // full range, X LUTs, some saturation
    set_active(2);
    burst(800, 12000, 0);            // X-1 LUTs, deepest tap gated
    write_tables(3000);              // new coefficients while X-1
    burst(800, 12000, 0);
    set_active(0);
    burst(100, 12000, 0);            // every tap off: output zero
    set_active(3);
    // range detection on mid-amplitude samples, then bypass of small ones
    @(negedge clk) detect = 1;
    begin
      longint mn, mx;
      mn = -1; mx = -1;
      for (int i = 0; i < 300; i++) begin
        int re, im;
        longint p;
        @(negedge clk);
        in_valid = 1;
        re = int'($urandom_range(8000)) - 4000 + ((i % 2) ? 6000 : -6000);
        im = int'($urandom_range(8000)) - 4000;
        in_x.re = 16'(re); in_x.im = 16'(im);
        p = m_power(re, im);
        in_pwr = power_t'(p);
        model_sample(re, im, 3);
        if (mn < 0 || p < mn) mn = p;
        if (mx < 0 || p > mx) mx = p;
      end
      @(negedge clk) begin in_valid = 0; detect = 0; end
      repeat (8) @(negedge clk);
      m_pmin = mn;
      m_dp = (mx - mn) / NB;
    end
    wait (!busy);
    burst(1500, 12000, 20);          // 20 % small samples are bypassed
    checks++;
    if (n_bypass < 100 || n_sat == 0 || n_gated == 0) begin
      failures++;
      $display("mechanisms: bypass %0d saturation %0d gated %0d", n_bypass, n_sat, n_gated);
    end
    checks++;
    if (expq.size() != 0) begin failures++; $display("%0d outputs missing", expq.size()); end
    $display("bypass=%0d saturated=%0d gated_cycles=%0d", n_bypass, n_sat, n_gated);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
