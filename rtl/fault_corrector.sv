// fault_corrector: syndrome computation, fault location and single fault
// correction for K data filters protected by R check filters.
//
// Check j is satisfied when z_j equals the sum of the data outputs y_i that
// row j of the parity matrix selects. Syndrome bit j is 1 when check j fails.
// With the default Hamming(7,4) matrix (syndrome written s1 s2 s3, s1 = bit 0):
//   111 -> y1,  110 -> y2,  101 -> y3,  011 -> y4   (data filter at fault)
//   100 -> z1,  010 -> z2,  001 -> z3               (check filter at fault)
//   000 -> no fault.
// In general a syndrome equal to column i of the matrix points at data filter
// i, and a syndrome with a single 1 at check filter j. A faulty data output is
// rebuilt from the first check j that covers it, as z_j minus the other data
// outputs of that check (for y1 this is z1 - y2 - y3). A faulty check filter
// needs no action on the data outputs. Any other nonzero syndrome is flagged
// as uncorrectable and the data outputs pass unchanged.
//
// Interface: y and z are signed Y_W-bit values, all sampled in the same cycle
// when in_valid is high. The corrected outputs and the flags are registered:
// out_valid, yc, syndrome, fault_loc and uncorrectable appear one clock after
// in_valid. fault_loc is one-hot over the K data filters (bits 0..K-1) and the
// R check filters (bits K..K+R-1). All arithmetic is modulo 2^Y_W.
//
// The comparison, the location table and the rebuild formula follow the
// scheme; the register stage, the choice of the first covering check for the
// rebuild and the uncorrectable flag are choices of this design.
module fault_corrector #(
  parameter int unsigned K   = ecc_fir_pkg::NUM_DATA,
  parameter int unsigned R   = ecc_fir_pkg::NUM_CHECK,
  parameter int unsigned Y_W = 56,
  parameter logic [R-1:0][K-1:0] PCHK = ecc_fir_pkg::HAMMING_7_4_P
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [K-1:0][Y_W-1:0] y,          // data filter outputs
  input  logic [R-1:0][Y_W-1:0] z,          // check filter outputs
  output logic                  out_valid,
  output logic [K-1:0][Y_W-1:0] yc,         // corrected data outputs
  output logic [R-1:0]          syndrome,
  output logic [K+R-1:0]        fault_loc,
  output logic                  uncorrectable
);

  // Column i of the parity matrix: the syndrome a fault in data filter i gives.
  function automatic logic [R-1:0] column(int i);
    logic [R-1:0] c;
    for (int j = 0; j < R; j++) c[j] = PCHK[j][i];
    return c;
  endfunction

  // The check used to rebuild data filter i: the first one that covers it.
  function automatic int unsigned fix_check(int i);
    for (int j = R - 1; j >= 0; j--)
      if (PCHK[j][i]) fix_check = j;
  endfunction

  // The code must give every data filter a distinct column of weight >= 2,
  // so that data faults, check faults and no fault can be told apart.
  function automatic bit code_ok();
    code_ok = 1'b1;
    for (int i = 0; i < K; i++) begin
      if ($countones(column(i)) < 2) code_ok = 1'b0;
      for (int m = 0; m < i; m++)
        if (column(i) == column(m)) code_ok = 1'b0;
    end
  endfunction

  if (!code_ok()) begin : g_bad_code
    $error("fault_corrector: PCHK does not locate single faults");
  end

  logic [R-1:0]          s;
  logic [K+R-1:0]        loc;
  logic                  unc;
  logic [K-1:0][Y_W-1:0] yfix;

  // Syndrome: check j fails when z_j differs from the sum of its data outputs.
  always_comb begin
    logic [Y_W-1:0] sum;
    for (int j = 0; j < R; j++) begin
      sum = '0;
      for (int i = 0; i < K; i++)
        if (PCHK[j][i]) sum += y[i];
      s[j] = (sum != z[j]);
    end
  end

  // Location and reconstruction.
  always_comb begin
    logic [Y_W-1:0] rebuilt;
    int unsigned    fj;
    loc = '0;
    for (int i = 0; i < K; i++) begin
      loc[i] = (s == column(i));
      fj = fix_check(i);
      rebuilt = z[fj];
      for (int m = 0; m < K; m++)
        if (m != i && PCHK[fj][m]) rebuilt -= y[m];
      yfix[i] = loc[i] ? rebuilt : y[i];
    end
    for (int j = 0; j < R; j++)
      loc[K+j] = (s == R'(1) << j);
    unc = (s != '0) && (loc == '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid     <= 1'b0;
      yc            <= '0;
      syndrome      <= '0;
      fault_loc     <= '0;
      uncorrectable <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        yc            <= yfix;
        syndrome      <= s;
        fault_loc     <= loc;
        uncorrectable <= unc;
      end
    end
  end

  // At most one filter is reported at a time.
  a_loc_onehot: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0(fault_loc));

endmodule
