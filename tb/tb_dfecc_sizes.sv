// tb_dfecc_sizes: the processor built for a 256-bit datapath, W = 256.
//
// The same processor, parameterized wider, runs scalar multiplications at the
// larger field lengths of the family of designs this architecture was
// evaluated in. Over GF(p) these are 192 and 256 bits, with the NIST primes.
// Over GF(2^m) these are 163 and 233 bits, with the NIST field polynomials.
// Each run uses a 48-bit key and a mask refresh. The key is kept short because
// the reference model's inversions dominate the run time. Every field
// operation still runs at the full field length.
// For each run the testbench checks:
//   - K*P and the refreshed masks against the reference model;
//   - the cycle count against twice the cycle model of the reference design
//     for that key length.
// The memory is w = 80 bits wide here too, so an element takes 4 words.
module tb_dfecc_sizes;
  import dfecc_pkg::*;
  import ecc_ref_pkg::*;

  localparam int unsigned TW = 256, WM = 80, NWPE = 4, AW = 7, MW = 9;
  localparam int KLEN = 48;   // key length: keeps the reference model's run time short

  logic clk = 1'b0, rst_n = 1'b0;
  field_e field = FLD_P;
  logic [MW-1:0] m = '0;
  logic [TW:0] p = '0;
  logic start = 1'b0;
  logic [TW-1:0] key = '0;
  logic [MW-1:0] key_len = '0;
  logic refresh_en = 1'b0, alpha = 1'b0;
  logic busy, done;
  stats_t stats;
  logic host_we = 1'b0, host_re = 1'b0;
  logic [AW-1:0] host_addr = '0;
  logic [WM-1:0] host_wdata = '0, host_rdata;
  int checks = 0, failures = 0;
  int n_alpha0 = 0, n_alpha1 = 0, n_gfp = 0, n_gfb = 0;

  dfecc_top #(.W(TW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr_ent(input ent_t e, input fe_t v);
    for (int k = 0; k < NWPE; k++) begin
      @(negedge clk);
      host_we = 1'b1; host_addr = AW'(e * NWPE + k); host_wdata = WM'(v >> (k * WM));
    end
    @(negedge clk);
    host_we = 1'b0;
  endtask

  // only the first ceil(m/WM) words of an entry are defined
  task automatic rd_ent(input ent_t e, output fe_t v);
    v = '0;
    for (int k = 0; k < (int'(m) + WM - 1) / WM; k++) begin
      @(negedge clk);
      host_re = 1'b1; host_addr = AW'(e * NWPE + k);
      @(negedge clk);
      host_re = 1'b0;
      v |= fe_t'(host_rdata) << (k * WM);
    end
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int paper_cycles(input bit bin, input int mm, input int lk);
    real tmm, tmd, tmem, t;
    tmm = 0.5 * mm; tmd = 0.66 * mm; tmem = (mm + WM - 1) / WM + 1;
    if (!bin)
      t = (3*tmd + 6*tmem) + (tmd + 2*tmm + 6 + 13*tmem) + 2*((tmm + 4 + 6*tmem) + (tmd + tmem))
        + (2*tmm + 4 + 9*tmem) + (lk - 1) * (tmem + 2*tmm + 4 + 8*tmem)
        + (lk - 2) * ((tmm + 4 + 7*tmem) + (tmem + tmd)) + (tmd + 2*tmm + 7 + 15*tmem) + (2*tmm + 4*tmem);
    else
      t = (3*tmd + 6*tmem) + (tmd + 2*tmm + 9 + 16*tmem) + 2*(tmd + 1 + 2*tmem) + (2*tmm + 5 + 9*tmem)
        + (lk - 1) * (tmem + 2*tmm + 5 + 8*tmem) + (lk - 2) * (2*tmm + 7 + 10*tmem)
        + (tmd + 2*tmm + 10 + 18*tmem) + (2*tmm + 4*tmem);
    return int'(t);
  endfunction

  task automatic run_curve(input curve_t c, input int klen);
    pt_t P, M, N, KP, M2, N2;
    fe_t k, v, rx, ry;
    int cyc;
    P.inf = 1'b0;
    P.x = rnd_fe(c); P.y = rnd_fe(c);
    if (P.x == '0) P.x = fe_t'(1);
    M = pmul(c, fe_t'($urandom), 32, P);
    k = '0;
    for (int j = 0; j < 8; j++) k[j*32 +: 32] = $urandom;
    k = k & ((fe_t'(1) << klen) - 1'b1);
    k[klen-1] = 1'b1;
    k[0] = 1'b0;                      // at least one move iteration after the first
    N  = pmul(c, k, klen, M);
    KP = pmul(c, k, klen, P);
    field = c.bin ? FLD_B : FLD_P; m = MW'(c.m); p = (TW+1)'(c.p);
    key = TW'(k); key_len = MW'(klen);
    wr_ent(E_A, c.a);
    wr_ent(E_PX, P.x); wr_ent(E_PY, P.y);
    wr_ent(E_MX, to_mont(c, M.x)); wr_ent(E_MY, to_mont(c, M.y));
    wr_ent(E_NX, to_mont(c, N.x)); wr_ent(E_NY, to_mont(c, N.y));
    for (int r = 0; r < 1; r++) begin
      alpha = (r == 0);
      refresh_en = 1'b1;
      if (alpha) n_alpha1++; else n_alpha0++;
      if (c.bin) n_gfb++; else n_gfp++;
      wr_ent(E_A, c.a);
      wr_ent(E_PX, P.x); wr_ent(E_PY, P.y);
      @(negedge clk); start = 1'b1;
      @(negedge clk); start = 1'b0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      $display("field=%0d m=%0d key_len=%0d: %0d cycles (paper estimate without refresh %0d)", c.bin, c.m, klen, cyc, paper_cycles(c.bin, c.m, klen));
      check(cyc < 2 * paper_cycles(c.bin, c.m, klen), "cycle count within twice the paper estimate");
      rd_ent(E_RX, rx); rd_ent(E_RY, ry);
      check(!KP.inf && rx == KP.x && ry == KP.y, "K*P");
      if (rx != KP.x || ry != KP.y) $display("  got %h %h exp %h %h", rx, ry, KP.x, KP.y);
      M2 = pdbl(c, M); N2 = pdbl(c, N);
      if (alpha) begin M2 = pneg(c, M2); N2 = pneg(c, N2); end
      rd_ent(E_MX, rx); rd_ent(E_MY, ry);
      check(rx == to_mont(c, M2.x) && ry == to_mont(c, M2.y), "refreshed M");
      rd_ent(E_NX, rx); rd_ent(E_NY, ry);
      check(rx == to_mont(c, N2.x) && ry == to_mont(c, N2.y), "refreshed N");
      M = M2; N = N2;
    end
  endtask

  task automatic mech(input int n, input string what);
    $display("%-40s %0d", what, n);
    check(n > 0, what);
  endtask

  initial begin
    curve_t c;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // GF(p): P-192 and P-256 primes
    c.bin = 1'b0; c.m = 192;
    c.p = (fe_t'(1) << 192) - (fe_t'(1) << 64) - fe_t'(1); c.a = rnd_fe(c);
    run_curve(c, KLEN);
    c.m = 256;
    c.p = (fe_t'(1) << 256) - (fe_t'(1) << 224) + (fe_t'(1) << 192) + (fe_t'(1) << 96) - fe_t'(1);
    c.a = rnd_fe(c);
    run_curve(c, KLEN);
    // GF(2^m): x^163 + x^7 + x^6 + x^3 + 1 and x^233 + x^74 + 1
    c.bin = 1'b1; c.m = 163; c.a = fe_t'(1);
    c.p = (fe_t'(1) << 163) | (fe_t'(1) << 7) | (fe_t'(1) << 6) | (fe_t'(1) << 3) | fe_t'(1);
    run_curve(c, KLEN);
    c.m = 233;
    c.p = (fe_t'(1) << 233) | (fe_t'(1) << 74) | fe_t'(1);
    run_curve(c, KLEN);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
