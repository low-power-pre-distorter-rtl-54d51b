// addr_gen: maps the power of a sample to a LUT bin number.
//
// The power range [Pmin, Pmax] is split into NUM_BINS equal intervals of
// width dP = (Pmax - Pmin) / NUM_BINS, and a sample whose power falls in
// interval k gets bin k. Powers at or above the last boundary (including
// Pmax itself) map to the last bin. A power below Pmin sets `below_min`,
// which tells the predistorter to pass that sample through unprocessed.
//
// Range detection: while `detect` is high, every valid power updates the
// running minimum and maximum (the first sample after `detect` rises loads
// both). When `detect` falls the block spends NUM_BINS-1 clocks building the
// interval boundaries thr[k] = Pmin + k*dP one addition per clock, with
// `busy` high; the mapping uses the new boundaries once `busy` is low. Out of
// reset the range is the whole power word, Pmin = 0 and dP = 2**PWR_W /
// NUM_BINS, so nothing is bypassed until a range has been detected.
//
// The bin lookup itself is combinational: a bank of comparators against the
// stored boundaries, one per interval, as the interval table of the source
// design describes. The source design gives the equal-interval rule and the
// detection of Pmin/Pmax in an initialisation phase; the sequential boundary
// build and the reset range are this implementation's choices.
module addr_gen
  import dpd_pkg::*;
#(
  parameter int unsigned NUM_BINS = 64,
  localparam int unsigned AW = $clog2(NUM_BINS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          detect,
  input  logic          in_valid,
  input  power_t        in_pwr,
  output logic [AW-1:0] bin,
  output logic          below_min,
  output logic          busy,
  output power_t        pmin,
  output power_t        pmax
);

  localparam power_t RESET_DP = power_t'((64'(1) << PWR_W) / 64'(NUM_BINS));

  power_t        thr [NUM_BINS];   // thr[k]: lower boundary of bin k
  logic          detect_q;
  logic          first;
  logic [AW-1:0] build_k;
  power_t        dp;

  assign dp = (pmax - pmin) / power_t'(NUM_BINS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      detect_q <= 1'b0;
      first    <= 1'b1;
      busy     <= 1'b0;
      build_k  <= '0;
      pmin     <= '0;
      pmax     <= '1;
      for (int k = 0; k < NUM_BINS; k++) thr[k] <= power_t'(k) * RESET_DP;
    end else begin
      detect_q <= detect;
      if (detect) begin
        busy <= 1'b0;
        if (in_valid) begin
          first <= 1'b0;
          if (first || in_pwr < pmin) pmin <= in_pwr;
          if (first || in_pwr > pmax) pmax <= in_pwr;
        end
      end else begin
        first <= 1'b1;
        if (detect_q) begin
          // detection just ended: start the boundary build
          thr[0]  <= pmin;
          build_k <= AW'(1);
          busy    <= (NUM_BINS > 1);
        end else if (busy) begin
          thr[build_k] <= thr[build_k - 1'b1] + dp;
          build_k      <= build_k + 1'b1;
          if (build_k == AW'(NUM_BINS - 1)) busy <= 1'b0;
        end
      end
    end
  end

  always_comb begin
    bin = '0;
    for (int k = 1; k < NUM_BINS; k++) begin
      if (in_pwr >= thr[k]) bin = AW'(k);
    end
    below_min = (in_pwr < thr[0]);
  end

endmodule
