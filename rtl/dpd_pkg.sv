// dpd_pkg: types and constants shared by the look-up-table predistorter.
//
// Samples are complex baseband values with signed I and Q parts of SAMPLE_W
// bits. LUT coefficients are complex signed fixed-point values with COEF_FRAC
// fractional bits, so a coefficient of 1.0 is 2**COEF_FRAC. The power of a
// sample, I*I + Q*Q, is an unsigned PWR_W-bit value. None of these widths is
// fixed by the source design; they are this implementation's choice.
//
// The training stages follow the four machine-learning steps of the design:
//   STAGE1  X-LUT Actual DPD is trained in front of the PA (conventional mode)
//   STAGE2  PA-model DPD learns the inverse of the X-LUT Actual DPD (open loop)
//   STAGE3  Shadow DPD with X-1 LUTs learns against that inverse (open loop)
//   STAGE4  Actual DPD runs with X-1 LUTs (optimised mode); the FSM stays here
package dpd_pkg;

  localparam int unsigned SAMPLE_W  = 16;
  localparam int unsigned COEF_W    = 16;
  localparam int unsigned COEF_FRAC = 14;
  localparam int unsigned PWR_W     = 2 * SAMPLE_W;

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic signed [COEF_W-1:0]   coef_t;
  typedef logic        [PWR_W-1:0]    power_t;

  typedef struct packed {
    sample_t re;
    sample_t im;
  } cplx_t;

  typedef struct packed {
    coef_t re;
    coef_t im;
  } ccoef_t;

  // Full-precision complex product of a sample and a coefficient.
  localparam int unsigned PROD_W = SAMPLE_W + COEF_W + 1;
  typedef struct packed {
    logic signed [PROD_W-1:0] re;
    logic signed [PROD_W-1:0] im;
  } cprod_t;

  typedef enum logic [2:0] {
    IDLE   = 3'd0,
    STAGE1 = 3'd1,
    STAGE2 = 3'd2,
    STAGE3 = 3'd3,
    STAGE4 = 3'd4
  } stage_e;

  // Which of the three predistorter instances a LUT write or a sample targets.
  typedef enum logic [1:0] {
    DPD_ACTUAL = 2'd0,
    DPD_SHADOW = 2'd1,
    DPD_PAMODEL = 2'd2
  } dpd_sel_e;

  // Saturate a wide signed value to a sample.
  function automatic sample_t sat_sample(input logic signed [PROD_W+3:0] v);
    localparam logic signed [PROD_W+3:0] MAXV = (PROD_W+4)'(2**(SAMPLE_W-1) - 1);
    localparam logic signed [PROD_W+3:0] MINV = -(PROD_W+4)'(2**(SAMPLE_W-1));
    if (v > MAXV)      return sample_t'(MAXV);
    else if (v < MINV) return sample_t'(MINV);
    else               return sample_t'(v);
  endfunction

endpackage
