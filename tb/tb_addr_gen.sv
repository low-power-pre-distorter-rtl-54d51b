// tb_addr_gen: checks the power-to-bin mapping of addr_gen out of reset
// (whole power range in NUM_BINS equal bins), then after several range
// detection phases: Pmin/Pmax taken from the samples seen, the boundary build
// time (busy for NUM_BINS-1 clocks), bin = min(NUM_BINS-1, (p-Pmin)/dP) and
// the below-Pmin flag.
module tb_addr_gen;
  import dpd_pkg::*;
  import dpd_model_pkg::*;

  localparam int NB = 64;
  logic clk = 0, rst_n = 0, detect = 0, in_valid = 0;
  power_t in_pwr = '0;
  logic [5:0] bin;
  logic below_min, busy;
  power_t pmin, pmax;
  int checks = 0, failures = 0;
  longint m_pmin = 0, m_dp = longint'(1) << 26;

  always #5 clk = ~clk;

  addr_gen #(.NUM_BINS(NB)) dut (.*);

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_map(input int n, input longint lo, input longint hi);
    for (int i = 0; i < n; i++) begin
      longint p;
      int eb;
      p = lo + longint'($urandom) % (hi - lo + 1);
      if (i == 0) p = m_pmin;
      if (i == 1 && m_pmin > 0) p = m_pmin - 1;
      if (i == 2) p = m_pmin + m_dp;
      if (i == 3) p = m_pmin + m_dp - 1;
      if (p < 0) p = 0;
      @(negedge clk);
      in_pwr = power_t'(p);
      #1;
      eb = m_bin(p, m_pmin, m_dp, NB);
      checks++;
      if (below_min != (eb < 0) || (eb >= 0 && int'(bin) != eb)) begin
        failures++;
        $display("p=%0d bin=%0d below=%b exp %0d (pmin %0d dp %0d)", p, bin, below_min, eb, m_pmin, m_dp);
      end
    end
  endtask

  task automatic detect_range(input longint lo, input longint hi, input int n);
    longint mn, mx;
    int cyc;
    mn = -1; mx = -1;
    @(negedge clk) detect = 1;
    for (int i = 0; i < n; i++) begin
      longint p;
      @(negedge clk);
      in_valid = ($urandom_range(3) != 0);
      p = lo + longint'($urandom) % (hi - lo + 1);
      in_pwr = power_t'(p);
      if (in_valid) begin
        if (mn < 0 || p < mn) mn = p;
        if (mx < 0 || p > mx) mx = p;
      end
    end
    @(negedge clk) begin detect = 0; in_valid = 0; end
    // busy must rise and stay up for the boundary build
    cyc = 0;
    @(posedge clk); #1;
    while (busy) begin @(posedge clk); #1; cyc++; end
    checks++;
    if (cyc != NB - 1) begin failures++; $display("build took %0d clocks", cyc); end
    checks++;
    if (longint'(pmin) != mn || longint'(pmax) != mx) begin
      failures++; $display("range %0d..%0d exp %0d..%0d", pmin, pmax, mn, mx);
    end
    m_pmin = mn;
    m_dp = (mx - mn) / NB;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    check_map(500, 0, 64'hFFFF_FFFF);
    detect_range(1000000, 50000000, 300);
    check_map(2000, 0, 60000000);
    detect_range(5, 200, 100);        // narrow range: dP of 2 or 3
    check_map(500, 0, 300);
    detect_range(77, 100, 50);        // range narrower than NUM_BINS: dP = 0
    check_map(200, 0, 200);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
