// check_encoder: the "coding" stage that feeds the redundant filters.
//
// For every check j it adds the data inputs x_i selected by row j of the
// parity matrix: with the default Hamming(7,4) matrix the three outputs are
// x1+x2+x3, x1+x2+x4 and x1+x3+x4. Each output has its own adder chain and no
// partial sum is shared between rows, so a fault in one adder corrupts only
// one check input and, through the correction table, never a data output.
// The sums are signed and XC_W = DATA_W + clog2(K) bits wide, enough for any
// row weight up to K. Purely combinational.
//
// The sums, the row definitions and the rule of not sharing adders follow the
// scheme; widths and the packed-array port layout are choices of this design.
module check_encoder #(
  parameter int unsigned K      = ecc_fir_pkg::NUM_DATA,
  parameter int unsigned R      = ecc_fir_pkg::NUM_CHECK,
  parameter int unsigned DATA_W = ecc_fir_pkg::DATA_W,
  parameter logic [R-1:0][K-1:0] PCHK = ecc_fir_pkg::HAMMING_7_4_P,
  parameter int unsigned XC_W   = DATA_W + $clog2(K)
) (
  input  logic [K-1:0][DATA_W-1:0] x,    // data inputs, signed samples
  output logic [R-1:0][XC_W-1:0]   xc    // check filter inputs, signed sums
);

  for (genvar j = 0; j < R; j++) begin : g_row
    // One independent adder chain per check row.
    logic signed [XC_W-1:0] sum;
    always_comb begin
      sum = '0;
      for (int i = 0; i < K; i++)
        if (PCHK[j][i]) sum += XC_W'($signed(x[i]));
    end
    assign xc[j] = sum;
  end

endmodule
