// tb_ecc_parallel_fir: end-to-end test of the protected filter bank at its
// default size (four 32-bit channels, Hamming(7,4), three check filters,
// 8-tap filters).
//
// Random signed samples, with random gaps in in_valid, go into the four
// channels. Single-event upsets are injected by flipping one bit of a
// register inside one filter at a time: either the output register or one
// word of the delay line, in any of the seven filters. Faults in the coder
// are modelled by forcing one row sum to a wrong value for one clock; as the
// rows share no adder, such a fault must show up as a fault of one check
// filter and leave the data outputs untouched. The test computes the
// fault-free response of every channel by convolution and checks that
//   - every corrected output equals the fault-free response,
//   - the outputs arrive exactly two clocks after their inputs, in order,
//   - fault_loc is zero unless an upset is active, and otherwise names the
//     upset filter (data or check),
//   - the uncorrectable flag never rises for a single upset.
// It counts corrections of each data filter, detections of each check
// filter, coder faults contained in each check and clean samples, and counts
// a failure for any of them that never happened.
module tb_ecc_parallel_fir;
  localparam int unsigned K      = ecc_fir_pkg::NUM_DATA;
  localparam int unsigned R      = ecc_fir_pkg::NUM_CHECK;
  localparam int unsigned DATA_W = ecc_fir_pkg::DATA_W;
  localparam int unsigned COEF_W = ecc_fir_pkg::COEF_W;
  localparam int unsigned TAPS   = ecc_fir_pkg::TAPS;
  localparam logic [TAPS-1:0][COEF_W-1:0] H = ecc_fir_pkg::DEFAULT_COEFS;
  localparam int unsigned XC_W   = DATA_W + $clog2(K);
  localparam int unsigned Y_W    = XC_W + COEF_W + $clog2(TAPS);
  localparam int unsigned NSAMP  = 20000;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [K-1:0][DATA_W-1:0] x = '0;
  logic                     out_valid, uncorrectable;
  logic [K-1:0][Y_W-1:0]    yc;
  logic [R-1:0]             syndrome;
  logic [K+R-1:0]           fault_loc;

  ecc_parallel_fir dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (NSAMP * 4 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // ---------------- upset injection ----------------
  bit          inj_go = 1'b0;
  // inj_f: filter 0..K+R-1 or coder row K+R..K+2R-1; inj_tgt: 0 = output
  // register, l = delay word dly[l]; inj_bit: bit to flip.
  int unsigned inj_f, inj_tgt, inj_bit;

  for (genvar g = 0; g < K; g++) begin : g_inj_data
    always @(negedge clk)
      if (inj_go && inj_f == g) begin
        if (inj_tgt == 0)
          dut.g_data[g].u_fir.y[inj_bit % Y_W] = ~dut.g_data[g].u_fir.y[inj_bit % Y_W];
        else
          dut.g_data[g].u_fir.dly[inj_tgt][inj_bit % DATA_W] =
            ~dut.g_data[g].u_fir.dly[inj_tgt][inj_bit % DATA_W];
      end
  end
  for (genvar g = 0; g < R; g++) begin : g_inj_check
    always @(negedge clk)
      if (inj_go && inj_f == K + g) begin
        if (inj_tgt == 0)
          dut.g_check[g].u_fir.y[inj_bit % Y_W] = ~dut.g_check[g].u_fir.y[inj_bit % Y_W];
        else
          dut.g_check[g].u_fir.dly[inj_tgt][inj_bit % XC_W] =
            ~dut.g_check[g].u_fir.dly[inj_tgt][inj_bit % XC_W];
      end
  end

  for (genvar g = 0; g < R; g++) begin : g_inj_coder
    logic [XC_W-1:0] bad;
    bit              forced = 1'b0;
    always @(negedge clk)
      if (inj_go && inj_f == K + R + g) begin
        bad = dut.u_coder.g_row[g].sum ^ (XC_W'(1) << (inj_bit % XC_W));
        force dut.u_coder.g_row[g].sum = bad;
        forced = 1'b1;
      end else if (forced) begin
        release dut.u_coder.g_row[g].sum;
        forced = 1'b0;
      end
  end

  // ---------------- reference model ----------------
  typedef struct {
    longint y [K];
    longint t;          // cycle of the input
  } exp_t;
  exp_t   expq [$];
  longint hist [K][TAPS];

  int     active = -1;            // filter with a live upset, -1 for none
  int     n_corr [K];
  int     n_chk  [R];
  int     n_coder [R];              // coder faults seen as check faults
  bit     coder_fault = 1'b0;
  int     n_clean = 0, n_inj = 0, n_unc = 0;

  // Output monitor.
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      check(expq.size() > 0, "output without input");
      if (expq.size() > 0) begin
        e = expq.pop_front();
        check(cycle - e.t == 2, $sformatf("latency %0d", cycle - e.t));
        for (int i = 0; i < K; i++)
          check(longint'($signed(yc[i])) == e.y[i],
                $sformatf("channel %0d: %0d expected %0d (fault_loc %b)", i,
                          $signed(yc[i]), e.y[i], fault_loc));
      end
      check(!uncorrectable, "uncorrectable on a single upset");
      if (uncorrectable) n_unc++;
      if (active < 0) check(fault_loc == '0, $sformatf("fault_loc %b with no upset", fault_loc));
      else check(fault_loc == '0 || fault_loc == (K+R)'(1) << active,
                 $sformatf("fault_loc %b, upset in filter %0d", fault_loc, active));
      for (int i = 0; i < K; i++) if (fault_loc[i]) n_corr[i]++;
      for (int j = 0; j < R; j++) if (fault_loc[K+j]) n_chk[j]++;
      for (int j = 0; j < R; j++) if (fault_loc[K+j] && coder_fault) n_coder[j]++;
      if (fault_loc == '0 && syndrome == '0) n_clean++;
    end
  end

  // Stimulus.
  initial begin
    int accepted_since = 0;
    int quiet = 0;
    for (int i = 0; i < K; i++) begin
      n_corr[i] = 0;
      for (int l = 0; l < TAPS; l++) hist[i][l] = 0;
    end
    for (int j = 0; j < R; j++) begin
      n_chk[j] = 0;
      n_coder[j] = 0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < NSAMP; ) begin
      @(negedge clk);
      inj_go = 1'b0;
      // Retire an upset once its effect has left every register.
      if (active >= 0 && accepted_since > TAPS + 1) begin
        quiet++;
        if (quiet > 3) begin
          active = -1;
          coder_fault = 1'b0;
          quiet = 0;
        end
      end
      // Start a new upset now and then.
      if (active < 0 && n > 20 && $urandom_range(0, 9) == 0) begin
        inj_f   = $urandom_range(0, K + 2 * R - 1);
        inj_tgt = $urandom_range(0, TAPS - 1);
        inj_bit = $urandom;
        inj_go  = 1'b1;
        coder_fault = (inj_f >= K + R);
        active  = coder_fault ? int'(inj_f) - int'(R) : int'(inj_f);
        accepted_since = 0;
        n_inj++;
      end
      in_valid = ($urandom_range(0, 4) != 0);
      if (in_valid) begin
        exp_t e;
        for (int i = 0; i < K; i++) begin
          case ($urandom_range(0, 5))
            0: x[i] = DATA_W'(32'h7fff_ffff);
            1: x[i] = DATA_W'(32'h8000_0000);
            default: x[i] = DATA_W'($urandom);
          endcase
          for (int l = TAPS - 1; l > 0; l--) hist[i][l] = hist[i][l-1];
          hist[i][0] = longint'($signed(x[i]));
          e.y[i] = 0;
          for (int l = 0; l < TAPS; l++) e.y[i] += hist[i][l] * longint'($signed(H[l]));
        end
        e.t = cycle;
        expq.push_back(e);
        accepted_since++;
        n++;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (5) @(negedge clk);
    check(expq.size() == 0, "outputs missing at the end");
    $display("upsets injected %0d, clean samples %0d", n_inj, n_clean);
    for (int i = 0; i < K; i++) begin
      $display("corrections of data filter %0d: %0d", i + 1, n_corr[i]);
      check(n_corr[i] > 0, $sformatf("data filter %0d never corrected", i + 1));
    end
    for (int j = 0; j < R; j++) begin
      $display("detections in check filter %0d: %0d", j + 1, n_chk[j]);
      check(n_chk[j] > 0, $sformatf("check filter %0d never flagged", j + 1));
    end
    for (int j = 0; j < R; j++) begin
      $display("coder row %0d faults contained in check filter %0d: %0d", j + 1, j + 1, n_coder[j]);
      check(n_coder[j] > 0, $sformatf("coder row %0d fault never seen", j + 1));
    end
    check(n_clean > 0, "no clean sample");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
