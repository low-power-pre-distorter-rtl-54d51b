// power_calc: instantaneous power of a complex sample, I*I + Q*Q.
//
// The predistorter indexes its look-up tables by the power of the input
// sample, so this block sits in front of address generation (and, at the top
// level, in front of the scheduler's demultiplexer and of the PA-model DPD).
// The sum is computed in full precision: for SAMPLE_W-bit signed parts the
// result fits PWR_W = 2*SAMPLE_W unsigned bits, so no value is clipped and the
// address generator's range is never exceeded.
//
// Timing: one register stage. The sample and its valid flag are delayed with
// the power so that out_x and out_pwr belong to the same sample, one clock
// after in_x / in_valid.
module power_calc
  import dpd_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  cplx_t  in_x,
  output logic   out_valid,
  output cplx_t  out_x,
  output power_t out_pwr
);

  power_t pwr_c;

  always_comb begin
    logic signed [PWR_W-1:0] ii, qq;
    ii    = PWR_W'(in_x.re) * PWR_W'(in_x.re);
    qq    = PWR_W'(in_x.im) * PWR_W'(in_x.im);
    pwr_c = power_t'(ii) + power_t'(qq);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_x     <= '0;
      out_pwr   <= '0;
    end else begin
      out_valid <= in_valid;
      out_x     <= in_x;
      out_pwr   <= pwr_c;
    end
  end

endmodule
