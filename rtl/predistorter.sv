// predistorter: look-up-table based digital predistorter (one DPD instance).
//
// For every sample x(n) the power |x(n)|^2 (computed outside, arriving on
// in_pwr with the sample) is mapped to a LUT bin. Tap m holds the bin and the
// sample from m samples earlier, reads its own LUT at that bin and multiplies
// the delayed sample by the complex coefficient read. The taps' products are
// added and scaled back by 2**COEF_FRAC:
//
//     y(n) = sum_{m < active_luts} LUT_m[bin(n-m)] * x(n-m)
//
// which is the memory-polynomial model carried by tables. A sample whose power
// is below the detected minimum skips the arithmetic: y(n) = x(n).
//
// Reduced-LUT operation: only the first `active_luts` taps contribute. The
// taps that are off have their delay stage, LUT read port and multiplier
// clocked through a clock gate driven by a registered enable, so they draw no
// dynamic power (GATE_CLOCKS = 1), or merely hold their registers through
// clock enables (GATE_CLOCKS = 0). Setting active_luts to 0 idles the whole
// datapath, which is how the top level parks an unused instance. (The latches
// synthesis reports in this module are the clock gates' enable latches, one per
// tap, and are intended.) The tap that
// is dropped for X-1 operation is the deepest one (the longest memory delay).
//
// Coefficient updates: lut_we writes lut_wdata to bin lut_waddr of LUT
// lut_wsel at any time, into the write port of that LUT's dual-port memory.
//
// Timing: fully pipelined, one sample per clock at most, no back-pressure.
// out_valid/out_y follow in_valid/in_x by 4 clocks: tap delay and address
// register, LUT read, complex multiply, sum and saturate. The delay line
// advances only on valid samples, so gaps in the input do not change the
// memory taps. Changing active_luts takes effect two clocks later.
//
// From the source design: power index I^2+Q^2, equal-width bins with bypass
// below Pmin, one dual-port LUT and one complex multiplier per LUT, adders
// summing all products, clock gating from registered enables. This
// implementation's choices: the widths in dpd_pkg, the pipeline, the memory
// delay of one sample per tap, truncating rescale with saturation.
module predistorter
  import dpd_pkg::*;
#(
  parameter int unsigned NUM_LUTS    = 3,
  parameter int unsigned NUM_BINS    = 64,
  parameter bit          GATE_CLOCKS = 1'b1,
  localparam int unsigned AW = $clog2(NUM_BINS),
  localparam int unsigned LW = $clog2(NUM_LUTS + 1),
  localparam int unsigned TW = (NUM_LUTS > 1) ? $clog2(NUM_LUTS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // configuration
  input  logic [LW-1:0] active_luts,
  input  logic          detect,
  output logic          busy,
  // coefficient update (LUT write port)
  input  logic          lut_we,
  input  logic [TW-1:0] lut_wsel,
  input  logic [AW-1:0] lut_waddr,
  input  ccoef_t        lut_wdata,
  // sample stream
  input  logic          in_valid,
  input  cplx_t         in_x,
  input  power_t        in_pwr,
  output logic          out_valid,
  output cplx_t         out_y
);

  // ---------------------------------------------------------------- address
  logic [AW-1:0] bin_c;
  logic          below_c;
  power_t        pmin_unused, pmax_unused;

  addr_gen #(.NUM_BINS(NUM_BINS)) u_addr (
    .clk, .rst_n, .detect, .in_valid, .in_pwr,
    .bin(bin_c), .below_min(below_c), .busy,
    .pmin(pmin_unused), .pmax(pmax_unused)
  );

  // ------------------------------------------------------- tap enables/clocks
  logic [NUM_LUTS-1:0] tap_en_q;
  logic [NUM_LUTS-1:0] tap_clk;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tap_en_q <= '0;
    else
      for (int m = 0; m < NUM_LUTS; m++)
        tap_en_q[m] <= (LW'(m) < active_luts);
  end

  // ------------------------------------------------------------ control pipe
  cplx_t sum_scaled;
  logic  v_a, v_b, v_c;
  logic  byp_a, byp_b, byp_c;
  cplx_t xbp_b, xbp_c;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {v_a, v_b, v_c, out_valid} <= '0;
      {byp_a, byp_b, byp_c}      <= '0;
      xbp_c <= '0;
      out_y <= '0;
    end else begin
      v_a <= in_valid;
      v_b <= v_a;
      v_c <= v_b;
      out_valid <= v_c;
      if (in_valid) byp_a <= below_c;
      byp_b <= byp_a;
      byp_c <= byp_b;
      xbp_c <= xbp_b;
      out_y <= byp_c ? xbp_c : sum_scaled;
    end
  end

  // ------------------------------------------------------------------- taps
  cplx_t         xd   [NUM_LUTS];   // x(n-m)
  logic [AW-1:0] bd   [NUM_LUTS];   // bin(n-m)
  cplx_t         xb   [NUM_LUTS];   // x(n-m) aligned with the LUT read
  ccoef_t        coef [NUM_LUTS];
  cprod_t        prod [NUM_LUTS];

  assign xbp_b = xb[0];

  for (genvar m = 0; m < NUM_LUTS; m++) begin : g_tap
    clock_gate #(.GATING(GATE_CLOCKS)) u_cg (
      .clk, .en(tap_en_q[m]), .gclk(tap_clk[m])
    );

    cplx_t         xd_q, xb_q;
    logic [AW-1:0] bd_q;
    cplx_t         x_prev;
    logic [AW-1:0] b_prev;

    if (m == 0) begin : g_head
      assign x_prev = in_x;
      assign b_prev = bin_c;
    end else begin : g_chain
      assign x_prev = xd[m-1];
      assign b_prev = bd[m-1];
    end

    always_ff @(posedge tap_clk[m] or negedge rst_n) begin
      if (!rst_n) begin
        xd_q <= '0;
        bd_q <= '0;
        xb_q <= '0;
      end else if (tap_en_q[m]) begin
        if (in_valid) begin
          xd_q <= x_prev;
          bd_q <= b_prev;
        end
        xb_q <= xd_q;
      end
    end

    assign xd[m] = xd_q;
    assign bd[m] = bd_q;
    assign xb[m] = xb_q;

    lut_ram #(.NUM_BINS(NUM_BINS)) u_lut (
      .wclk (clk),
      .we   (lut_we && lut_wsel == TW'(m)),
      .waddr(lut_waddr),
      .wdata(lut_wdata),
      .rclk (tap_clk[m]),
      .rd_en(tap_en_q[m] && v_a),
      .raddr(bd[m]),
      .rdata(coef[m])
    );

    cmul u_mul (
      .clk(tap_clk[m]), .rst_n, .en(tap_en_q[m]),
      .x(xb[m]), .c(coef[m]), .p(prod[m])
    );
  end

  // ------------------------------------------------------ adder and rescale
  sample_t sum_re, sum_im;

  always_comb begin
    logic signed [PROD_W+3:0] acc_re, acc_im;
    acc_re = '0;
    acc_im = '0;
    for (int m = 0; m < NUM_LUTS; m++) begin
      if (tap_en_q[m]) begin
        acc_re = acc_re + (PROD_W+4)'(prod[m].re);
        acc_im = acc_im + (PROD_W+4)'(prod[m].im);
      end
    end
    sum_re = sat_sample(acc_re >>> COEF_FRAC);
    sum_im = sat_sample(acc_im >>> COEF_FRAC);
    sum_scaled.re = sum_re;
    sum_scaled.im = sum_im;
  end

endmodule
