// fir_filter: one direct-form FIR filter, y[n] = sum_{l=0}^{TAPS-1} x[n-l] * h[l].
//
// This is the filter "H" that the protected bank instantiates K + R times,
// always with the same coefficients. A sample is taken when in_valid is high:
// the filter multiplies the new sample and the TAPS-1 stored past samples by
// the coefficients, adds the products and registers the sum in y, while the
// delay line shifts by one. out_valid follows in_valid one cycle later, so the
// latency is one clock. The sum is kept at OUT_W bits; with the default
// OUT_W = IN_W + COEF_W + clog2(TAPS) no result overflows, and with a smaller
// OUT_W the result wraps modulo 2^OUT_W, which keeps the linearity the error
// checks rely on.
//
// The structure (direct form, registered output, one sample per enabled clock,
// asynchronous active-low reset clearing the delay line) is a choice of this
// design: the scheme only requires that every copy computes the same linear
// filter.
module fir_filter #(
  parameter int unsigned IN_W   = ecc_fir_pkg::DATA_W,
  parameter int unsigned COEF_W = ecc_fir_pkg::COEF_W,
  parameter int unsigned TAPS   = ecc_fir_pkg::TAPS,
  parameter logic [TAPS-1:0][COEF_W-1:0] COEFS = ecc_fir_pkg::DEFAULT_COEFS,
  parameter int unsigned OUT_W  = IN_W + COEF_W + $clog2(TAPS)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  x,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] y
);

  // dly[l] holds x[n-l] for l = 1 .. TAPS-1 (before the current sample).
  logic signed [IN_W-1:0]  dly [1:TAPS-1];
  logic signed [OUT_W-1:0] acc;

  always_comb begin
    acc = OUT_W'(x) * OUT_W'($signed(COEFS[0]));
    for (int l = 1; l < TAPS; l++)
      acc += OUT_W'(dly[l]) * OUT_W'($signed(COEFS[l]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 1; l < TAPS; l++) dly[l] <= '0;
      y         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        y      <= acc;
        dly[1] <= x;
        for (int l = 2; l < TAPS; l++) dly[l] <= dly[l-1];
      end
    end
  end

  initial begin
    if (TAPS < 2) $error("fir_filter: TAPS must be at least 2");
  end

endmodule
