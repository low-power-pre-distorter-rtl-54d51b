// cmul: complex multiplier, sample times LUT coefficient.
//
// (a + jb)(c + jd) = (ac - bd) + j(ad + bc), kept at full precision
// (PROD_W bits per part) so that the adder chain behind it can sum several
// taps before the single rounding step. The multiplier is the plain
// four-multiply form; the source design says only that each LUT is followed
// by one complex multiplier.
//
// Timing: one register stage, enabled by `en`. A tap whose LUT is switched
// off holds its product register (and may have its clock gated off).
module cmul
  import dpd_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  cplx_t  x,
  input  ccoef_t c,
  output cprod_t p
);

  cprod_t p_c;

  always_comb begin
    logic signed [SAMPLE_W+COEF_W-1:0] ac, bd, ad, bc;
    ac     = x.re * c.re;
    bd     = x.im * c.im;
    ad     = x.re * c.im;
    bc     = x.im * c.re;
    p_c.re = PROD_W'(ac) - PROD_W'(bd);
    p_c.im = PROD_W'(ad) + PROD_W'(bc);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  p <= '0;
    else if (en) p <= p_c;
  end

endmodule
