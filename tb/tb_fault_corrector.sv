// tb_fault_corrector: self-checking test of fault_corrector.
//
// Builds consistent data outputs y1..y4 and check outputs z1..z3 (z1 = y1+y2+y3,
// z2 = y1+y2+y4, z3 = y1+y3+y4), then adds a random nonzero error to none or
// one of the seven values. Checks, one clock later, that the data outputs come
// back as the fault-free values, that the syndrome s1 s2 s3 matches the error
// location table (111 y1, 110 y2, 101 y3, 011 y4, 100 z1, 010 z2, 001 z3) and
// that fault_loc names the faulty filter. A second instance with three data
// filters and three checks (an incomplete code) checks the uncorrectable flag
// on a syndrome that names no filter.
module tb_fault_corrector;
  localparam int unsigned Y_W = 56;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [3:0][Y_W-1:0] y, yc, ygood;
  logic [2:0][Y_W-1:0] z;
  logic                out_valid, uncorrectable;
  logic [2:0]          syndrome;
  logic [6:0]          fault_loc;

  fault_corrector #(.Y_W(Y_W)) dut (.*);

  // Incomplete code: columns 011, 101, 110; syndrome 111 names no filter.
  localparam logic [2:0][2:0] P3 = '{3'b110, 3'b101, 3'b011};
  logic [2:0][Y_W-1:0] y3, yc3;
  logic [2:0][Y_W-1:0] z3;
  logic                ov3, unc3;
  logic [2:0]          syn3;
  logic [5:0]          loc3;
  fault_corrector #(.K(3), .R(3), .Y_W(Y_W), .PCHK(P3)) dut3 (
    .clk, .rst_n, .in_valid, .y(y3), .z(z3), .out_valid(ov3), .yc(yc3),
    .syndrome(syn3), .fault_loc(loc3), .uncorrectable(unc3));

  // Error location table, written as s1 s2 s3; index 0..3 = y1..y4, 4..6 = z1..z3.
  localparam string TABLE [7] = '{"111", "110", "101", "011", "100", "010", "001"};

  function automatic logic [2:0] syn_of(int loc);
    logic [2:0] s;
    for (int b = 0; b < 3; b++) s[b] = (TABLE[loc][b] == "1");   // s[0] = s1
    return s;
  endfunction

  int checks = 0, failures = 0;
  int seen [8];

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [Y_W-1:0] rnd();
    return {$urandom, $urandom};
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int loc;
    logic [Y_W-1:0] err;
    logic [2:0] es;
    logic [6:0] eloc;
    for (int i = 0; i < 8; i++) seen[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      for (int i = 0; i < 4; i++) ygood[i] = rnd();
      y = ygood;
      z[0] = y[0] + y[1] + y[2];
      z[1] = y[0] + y[1] + y[3];
      z[2] = y[0] + y[2] + y[3];
      loc = $urandom_range(0, 7);          // 7 = no fault
      do err = rnd(); while (err == '0);
      if ($urandom_range(0, 1) != 0) err = Y_W'(1) << $urandom_range(0, Y_W - 1);
      if (loc < 4) y[loc] += err;
      else if (loc < 7) z[loc-4] += err;
      es   = (loc < 7) ? syn_of(loc) : 3'b000;
      eloc = (loc < 7) ? 7'(1) << loc : '0;
      // Incomplete code instance: a fault in y3[0] or a double fault.
      for (int i = 0; i < 3; i++) y3[i] = rnd();
      z3[0] = y3[0] + y3[1];
      z3[1] = y3[0] + y3[2];
      z3[2] = y3[1] + y3[2];
      if (n % 2 == 0) z3 = {z3[2] + 1'b1, z3[1] + 1'b1, z3[0] + 1'b1};   // syndrome 111
      in_valid = 1'b1;
      @(negedge clk);
      in_valid = 1'b0;
      check(out_valid === 1'b1, "out_valid one clock after in_valid");
      check(yc === ygood, $sformatf("n=%0d loc=%0d corrected outputs", n, loc));
      check(syndrome === es, $sformatf("n=%0d loc=%0d syndrome %b expected %b", n, loc, syndrome, es));
      check(fault_loc === eloc, $sformatf("n=%0d loc=%0d fault_loc %b", n, loc, fault_loc));
      check(uncorrectable === 1'b0, "uncorrectable on a single fault");
      check(unc3 === (n % 2 == 0), $sformatf("n=%0d uncorrectable of the incomplete code", n));
      if (n % 2 == 0) check(yc3 === y3, "no change on an uncorrectable syndrome");
      seen[loc]++;
      @(negedge clk);
      check(out_valid === 1'b0, "out_valid drops after one sample");
    end
    for (int i = 0; i < 8; i++) check(seen[i] > 0, $sformatf("location %0d exercised", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
