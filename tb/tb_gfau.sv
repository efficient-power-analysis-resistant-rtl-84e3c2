// tb_gfau: self-checking testbench of the Galois field arithmetic unit.
//
// Drives random operands through MD, MM, ADD and SUB over GF(p) and GF(2^m),
// for several field lengths on a 160-bit datapath, and checks each result
// against its defining relation, computed here with wide integer and
// carry-less arithmetic:  MM: res * 2^m = a * b,  MD: res * b = a * 2^m
// (mod p). It also checks the latencies: 1 cycle for ADD/SUB, ceil(m/2) + 2
// for MM, and a bound of 9m/8 + 6 cycles on the mean division latency (this
// datapath averages about 0.85 m over GF(p) and about m over GF(2^m); the
// paper quotes 0.66 m iterations).
module tb_gfau;
  import dfecc_pkg::*;
  localparam int unsigned W  = 160;
  localparam int unsigned MW = $clog2(W + 1);

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  fop_e op = OP_ADD;
  field_e field = FLD_P;
  logic [MW-1:0] m = '0;
  logic [W:0] p = '0;
  logic [W-1:0] a = '0, b = '0, res;
  logic busy, done;
  int checks = 0, failures = 0;

  gfau #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [2*W+3:0] imod(logic [2*W+3:0] x, logic [W:0] pm);
    return x % {{(W+3){1'b0}}, pm};
  endfunction

  function automatic logic [2*W+3:0] clmul(logic [W:0] x, logic [W:0] y);
    logic [2*W+3:0] acc = '0;
    for (int k = 0; k <= W; k++) if (y[k]) acc ^= ({{(W+3){1'b0}}, x} << k);
    return acc;
  endfunction

  function automatic logic [W:0] pmod(logic [2*W+3:0] x, logic [W:0] pm, int mm);
    for (int k = 2*W+3; k >= mm; k--) if (x[k]) x ^= ({{(W+3){1'b0}}, pm} << (k - mm));
    return x[W:0];
  endfunction

  function automatic logic [W-1:0] rnd_elem(logic [W:0] pm, field_e f, int mm);
    logic [2*W+3:0] x = '0;
    for (int k = 0; k < (W + 31) / 32; k++) x[k*32 +: 32] = $urandom;
    if (f == FLD_B) return W'(x & ((({{(W+3){1'b0}}, 1'b1}) << mm) - 1'b1));
    return W'(imod(x, pm));
  endfunction

  task automatic run(input fop_e o, input logic [W-1:0] xa, input logic [W-1:0] xb, output int cyc);
    @(negedge clk);
    op = o; a = xa; b = xb; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s field=%0d m=%0d a=%h b=%h res=%h", what, field, m, a, b, res);
    end
  endtask

  task automatic test_field(input field_e f, input logic [W:0] pm, input int mm, input int n);
    int cyc, mdcyc = 0, nmd = 0;
    logic [W-1:0] x, y;
    logic [2*W+3:0] two_m;
    field = f; p = pm; m = MW'(mm);
    two_m = (f == FLD_P) ? imod({{(W+3){1'b0}}, 1'b1} << mm, pm) : {{(W+3){1'b0}}, pm ^ ((W+1)'(1) << mm)};
    for (int k = 0; k < n; k++) begin
      x = rnd_elem(pm, f, mm);
      y = rnd_elem(pm, f, mm);
      if (k == 0) x = '0;
      if (y == '0) y = W'(1);
      run(OP_MM, x, y, cyc);
      if (f == FLD_P) check(res < pm && imod({{(W+4){1'b0}}, res} * two_m, pm) == imod({{(W+4){1'b0}}, x} * {{(W+4){1'b0}}, y}, pm), "MM");
      else check(pmod(clmul({1'b0, res}, two_m[W:0]), pm, mm) == pmod(clmul({1'b0, x}, {1'b0, y}), pm, mm), "MM");
      check(cyc == (mm + 1) / 2 + 2, "MM latency");
      run(OP_MD, x, y, cyc);
      mdcyc += cyc; nmd++;
      if (f == FLD_P) check(res < pm && imod({{(W+4){1'b0}}, res} * {{(W+4){1'b0}}, y}, pm) == imod({{(W+4){1'b0}}, x} * two_m, pm), "MD");
      else check(res < ((W+1)'(1) << mm) && pmod(clmul({1'b0, res}, {1'b0, y}), pm, mm) == pmod(clmul({1'b0, x}, two_m[W:0]), pm, mm), "MD");
      run(OP_ADD, x, y, cyc);
      check(res == ((f == FLD_P) ? W'(imod({{(W+4){1'b0}}, x} + {{(W+4){1'b0}}, y}, pm)) : (x ^ y)), "ADD");
      check(cyc == 1, "ADD latency");
      run(OP_SUB, x, y, cyc);
      check(res == ((f == FLD_P) ? W'(imod({{(W+4){1'b0}}, x} + {{(W+3){1'b0}}, pm} - {{(W+4){1'b0}}, y}, pm)) : (x ^ y)), "SUB");
    end
    $display("field=%0d m=%0d: mean MD latency %0d cycles", f, mm, mdcyc / nmd);
    check(mdcyc / nmd < (mm * 9) / 8 + 6, "MD mean latency");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // GF(p): 160-bit prime 2^160 - 2^31 - 1, Mersenne prime 2^127 - 1, 16-bit prime 65521
    test_field(FLD_P, ((W+1)'(1) << 160) - ((W+1)'(1) << 31) - (W+1)'(1), 160, 40);
    test_field(FLD_P, ((W+1)'(1) << 127) - (W+1)'(1), 127, 40);
    test_field(FLD_P, (W+1)'(65521), 16, 60);
    // GF(2^m): x^127 + x + 1, x^17 + x^3 + 1
    test_field(FLD_B, ((W+1)'(1) << 127) | (W+1)'(3), 127, 40);
    test_field(FLD_B, ((W+1)'(1) << 17) | (W+1)'(9), 17, 60);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
