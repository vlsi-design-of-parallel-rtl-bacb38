// ecc_fir_pkg: constants shared by the ECC-protected parallel FIR filter bank.
//
// The scheme treats each of K parallel filters with the same impulse response
// as one "bit" of a linear block code. R redundant (check) filters process sums
// of the data inputs; because filtering is linear, each check filter output
// must equal the same sum of the data filter outputs, and a mismatch pattern
// (the syndrome) locates a faulty filter.
//
// The parity matrix is stored as PCHK[j][i] = 1 when data filter i (0-based)
// takes part in check j. The default is the Hamming(7,4) code of the scheme:
//   z1 = f(x1+x2+x3), z2 = f(x1+x2+x4), z3 = f(x1+x3+x4).
// The four data filters, three checks and the 32-bit input width follow the
// scheme; the coefficient width, the number of taps and the coefficient values
// are choices of this design (the scheme works for any impulse response).
package ecc_fir_pkg;

  // Code: four data filters, three check filters (Hamming(7,4)).
  localparam int unsigned NUM_DATA  = 4;
  localparam int unsigned NUM_CHECK = 3;

  // Row j = check j; bit i = data filter i.
  localparam logic [NUM_CHECK-1:0][NUM_DATA-1:0] HAMMING_7_4_P = '{
    4'b1101,   // check 3: x1 + x3 + x4
    4'b1011,   // check 2: x1 + x2 + x4
    4'b0111    // check 1: x1 + x2 + x3
  };

  // Sample width of the data inputs.
  localparam int unsigned DATA_W = 32;

  // Filter shape: 8 taps of signed 16-bit coefficients, a symmetric low-pass.
  localparam int unsigned COEF_W = 16;
  localparam int unsigned TAPS   = 8;
  localparam logic [TAPS-1:0][COEF_W-1:0] DEFAULT_COEFS = '{
    -16'sd612, 16'sd1180, 16'sd5217, 16'sd9470,
     16'sd9470, 16'sd5217, 16'sd1180, -16'sd612
  };

endpackage
