// tb_check_encoder: self-checking test of check_encoder.
//
// Applies random and extreme signed inputs and compares the three outputs with
// x1+x2+x3, x1+x2+x4 and x1+x3+x4, written out here one by one. A second
// instance with a Hamming(15,11) matrix (11 inputs, 4 sums) is checked against
// sums built from the matrix columns.
module tb_check_encoder;
  localparam int unsigned DATA_W = 32;

  int checks = 0, failures = 0;

  // Default Hamming(7,4) configuration.
  logic [3:0][DATA_W-1:0] x;
  logic [2:0][DATA_W+1:0] xc;
  check_encoder dut (.x, .xc);

  // Hamming(15,11): data filter i takes part in check j when bit j of the
  // i-th 4-bit value of weight >= 2 (3, 5, 6, 7, 9, ...) is set.
  function automatic logic [3:0][10:0] p15();
    int i = 0;
    p15 = '0;
    for (int v = 1; v < 16; v++)
      if ($countones(4'(v)) >= 2) begin
        for (int j = 0; j < 4; j++) p15[j][i] = v[j];
        i++;
      end
  endfunction
  localparam logic [3:0][10:0] P15 = p15();

  logic [10:0][DATA_W-1:0] x11;
  logic [3:0][DATA_W+3:0]  xc11;
  check_encoder #(.K(11), .R(4), .DATA_W(DATA_W), .PCHK(P15)) dut11 (.x(x11), .xc(xc11));

  function automatic logic [DATA_W-1:0] rnd();
    case ($urandom_range(0, 3))
      0: return 32'h7fff_ffff;
      1: return 32'h8000_0000;
      default: return $urandom;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e [3];
    longint s;
    for (int n = 0; n < 2000; n++) begin
      for (int i = 0; i < 4; i++) x[i] = rnd();
      for (int i = 0; i < 11; i++) x11[i] = rnd();
      #1;
      e[0] = longint'($signed(x[0])) + longint'($signed(x[1])) + longint'($signed(x[2]));
      e[1] = longint'($signed(x[0])) + longint'($signed(x[1])) + longint'($signed(x[3]));
      e[2] = longint'($signed(x[0])) + longint'($signed(x[2])) + longint'($signed(x[3]));
      for (int j = 0; j < 3; j++) begin
        checks++;
        if (longint'($signed(xc[j])) != e[j]) begin
          failures++;
          $display("n=%0d xc[%0d]=%0d expected %0d", n, j, $signed(xc[j]), e[j]);
        end
      end
      for (int j = 0; j < 4; j++) begin
        s = 0;
        for (int i = 0; i < 11; i++) if (P15[j][i]) s += longint'($signed(x11[i]));
        checks++;
        if (longint'($signed(xc11[j])) != s) begin
          failures++;
          $display("n=%0d xc11[%0d]=%0d expected %0d", n, j, $signed(xc11[j]), s);
        end
      end
      #9;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
