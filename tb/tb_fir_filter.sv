// tb_fir_filter: self-checking test of fir_filter.
//
// Drives random signed samples, with random gaps in in_valid, into a filter
// with the default 8 taps and coefficients and a 32-bit input, and compares
// every output with a convolution computed here from the sample history
// (64-bit integer arithmetic). Also checks that out_valid follows in_valid by
// exactly one clock and that reset clears the delay line.
module tb_fir_filter;
  localparam int unsigned IN_W   = 32;
  localparam int unsigned COEF_W = 16;
  localparam int unsigned TAPS   = 8;
  localparam int unsigned OUT_W  = IN_W + COEF_W + $clog2(TAPS);
  localparam logic [TAPS-1:0][COEF_W-1:0] H = ecc_fir_pkg::DEFAULT_COEFS;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [IN_W-1:0]  x = '0;
  logic                    out_valid;
  logic signed [OUT_W-1:0] y;

  int checks = 0, failures = 0;
  longint hist [TAPS];          // hist[l] = x[n-l] as the reference sees it
  longint expected;
  bit     pending;

  fir_filter #(.IN_W(IN_W), .COEF_W(COEF_W), .TAPS(TAPS), .COEFS(H)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint conv();
    longint s = 0;
    for (int l = 0; l < TAPS; l++) s += hist[l] * longint'($signed(H[l]));
    return s;
  endfunction

  initial begin
    for (int l = 0; l < TAPS; l++) hist[l] = 0;
    pending = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      // Check the result of the previous clock.
      checks++;
      if (out_valid !== pending) begin
        failures++;
        $display("n=%0d out_valid=%b expected %b", n, out_valid, pending);
      end
      if (pending) begin
        checks++;
        if (longint'(y) != expected) begin
          failures++;
          $display("n=%0d y=%0d expected %0d", n, y, expected);
        end
      end
      // Drive the next sample.
      in_valid = ($urandom_range(0, 3) != 0);
      case ($urandom_range(0, 3))
        0: x = signed'(IN_W'(32'h7fff_ffff));
        1: x = signed'(IN_W'(32'h8000_0000));
        default: x = signed'(IN_W'($urandom));
      endcase
      pending = in_valid;
      if (in_valid) begin
        for (int l = TAPS - 1; l > 0; l--) hist[l] = hist[l-1];
        hist[0] = longint'(x);
        expected = conv();
      end
      // A reset in the middle clears the delay line.
      if (n == 1500) begin
        rst_n = 1'b0;
        in_valid = 1'b0;
        pending = 1'b0;
        for (int l = 0; l < TAPS; l++) hist[l] = 0;
        @(negedge clk);
        checks++;
        if (y !== '0 || out_valid !== 1'b0) begin
          failures++;
          $display("reset did not clear the filter");
        end
        rst_n = 1'b1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
