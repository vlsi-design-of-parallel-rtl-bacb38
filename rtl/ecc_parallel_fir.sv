// ecc_parallel_fir: K parallel FIR filters with the same impulse response,
// protected against a fault in any one filter by R redundant filters arranged
// as a linear block code (default: four filters, Hamming(7,4), three checks).
//
// Because filtering is linear, filtering the sum of some inputs gives the sum
// of the corresponding outputs. The coder adds the data inputs selected by
// each row of the parity matrix and feeds the sums to R extra copies of the
// same filter. The fault corrector compares each check filter output with the
// sum of the matching data filter outputs; the pattern of failing checks (the
// syndrome) names the faulty filter, and a faulty data output is rebuilt from
// a check output and the other data outputs. Structure:
//
//   x[K] --+--> K data filters  (H) --- y[K] ---+--> fault_corrector --> yc[K]
//          +--> check_encoder --> R check filters (H) --- z[R] --+
//
// Interface: one K-sample vector is taken when in_valid is high; the corrected
// outputs yc appear with out_valid two clocks later (one clock in the
// filters, one in the corrector), together with the syndrome, a one-hot
// fault location (data filters in bits 0..K-1, check filters in bits
// K..K+R-1) and an uncorrectable flag. Inputs are signed DATA_W-bit samples;
// outputs are signed Y_W-bit values wide enough for exact results of every
// filter, so the checks compare exact sums.
//
// The block structure, the code, the check equations and the correction rule
// follow the scheme. Filter length, coefficients, output width, the register
// stages and the reset are choices of this design.
module ecc_parallel_fir #(
  parameter int unsigned K      = ecc_fir_pkg::NUM_DATA,
  parameter int unsigned R      = ecc_fir_pkg::NUM_CHECK,
  parameter logic [R-1:0][K-1:0] PCHK = ecc_fir_pkg::HAMMING_7_4_P,
  parameter int unsigned DATA_W = ecc_fir_pkg::DATA_W,
  parameter int unsigned COEF_W = ecc_fir_pkg::COEF_W,
  parameter int unsigned TAPS   = ecc_fir_pkg::TAPS,
  parameter logic [TAPS-1:0][COEF_W-1:0] COEFS = ecc_fir_pkg::DEFAULT_COEFS,
  // Derived widths: check inputs and the common output width.
  localparam int unsigned XC_W  = DATA_W + $clog2(K),
  localparam int unsigned Y_W   = XC_W + COEF_W + $clog2(TAPS)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic [K-1:0][DATA_W-1:0] x,
  output logic                     out_valid,
  output logic [K-1:0][Y_W-1:0]    yc,
  output logic [R-1:0]             syndrome,
  output logic [K+R-1:0]           fault_loc,
  output logic                     uncorrectable
);

  logic [R-1:0][XC_W-1:0] xc;
  logic [K-1:0][Y_W-1:0]  y;
  logic [R-1:0][Y_W-1:0]  z;
  logic [K-1:0]           y_valid;
  logic [R-1:0]           z_valid;

  // Original modules: one filter per data input.
  for (genvar i = 0; i < K; i++) begin : g_data
    fir_filter #(
      .IN_W(DATA_W), .COEF_W(COEF_W), .TAPS(TAPS), .COEFS(COEFS), .OUT_W(Y_W)
    ) u_fir (
      .clk, .rst_n, .in_valid,
      .x        (x[i]),
      .out_valid(y_valid[i]),
      .y        (y[i])
    );
  end

  // Coding: inputs of the redundant modules.
  check_encoder #(
    .K(K), .R(R), .DATA_W(DATA_W), .PCHK(PCHK), .XC_W(XC_W)
  ) u_coder (
    .x (x),
    .xc(xc)
  );

  // Redundant modules: the same filter on the coded inputs.
  for (genvar j = 0; j < R; j++) begin : g_check
    fir_filter #(
      .IN_W(XC_W), .COEF_W(COEF_W), .TAPS(TAPS), .COEFS(COEFS), .OUT_W(Y_W)
    ) u_fir (
      .clk, .rst_n, .in_valid,
      .x        (xc[j]),
      .out_valid(z_valid[j]),
      .y        (z[j])
    );
  end

  // Single fault correction.
  fault_corrector #(
    .K(K), .R(R), .Y_W(Y_W), .PCHK(PCHK)
  ) u_corr (
    .clk, .rst_n,
    .in_valid(y_valid[0]),
    .y, .z,
    .out_valid, .yc, .syndrome, .fault_loc, .uncorrectable
  );

  // All filters take their samples together, so their valid flags agree.
  a_valid_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    ({y_valid, z_valid} == '0) || ({y_valid, z_valid} == '1));

endmodule
