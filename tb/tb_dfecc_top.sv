// tb_dfecc_top: end-to-end testbench of the dual-field ECC processor.
//
// For a curve over GF(p) (16-bit prime) and one over GF(2^17), all on the
// default 160-bit datapath, it loads a, a base point P and a mask pair
// (M, N = K*M) through the host port, runs scalar multiplications with mask
// refresh (alpha = 1, then alpha = 0 on the refreshed masks) and checks
//   - the result against K*P from a plain double-and-add reference model,
//   - the refreshed masks against (-1)^alpha * 2M and (-1)^alpha * 2N.
// It counts how often each mechanism occurred and fails if one never did:
// MD tasks through the instruction FIFO, PE-ID exchanges, local memory
// synchronization, local reuse, shared-memory fetches and write-throughs,
// loop iterations with Q0 at infinity (move), Q0 <- Q1 selections, refresh
// with alpha 0 and 1, and both fields.
module tb_dfecc_top;
  import dfecc_pkg::*;
  import ecc_ref_pkg::*;

  localparam int unsigned TW = 160, WM = 80, NWPE = 2, AW = 6, MW = 8;

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

  dfecc_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
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

  task automatic run_curve(input curve_t c, input int klen);
    pt_t P, M, N, KP, M2, N2;
    fe_t k, v, rx, ry;
    int cyc;
    P.inf = 1'b0;
    P.x = rnd_fe(c); P.y = rnd_fe(c);
    if (P.x == '0) P.x = fe_t'(1);
    M = pmul(c, fe_t'($urandom), 32, P);
    k = '0;
    for (int j = 0; j < 6; j++) k[j*32 +: 32] = $urandom;
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
    for (int r = 0; r < 2; r++) begin
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
      $display("field=%0d m=%0d key_len=%0d: %0d cycles", c.bin, c.m, klen, cyc);
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
    c.bin = 1'b0; c.p = fe_t'(65521); c.m = 16; c.a = fe_t'(7);
    run_curve(c, 16);
    c.bin = 1'b1; c.p = (fe_t'(1) << 17) | fe_t'(9); c.m = 17; c.a = fe_t'(1);
    run_curve(c, 17);
    mech(stats.md_fifo, "MD tasks through instruction FIFO");
    mech(stats.pe_swaps, "PE-ID exchanges");
    mech(stats.sync, "local memory synchronizations");
    mech(stats.reuse, "local register reuses");
    mech(stats.fetch, "shared memory fetches");
    mech(stats.store, "write-through stores");
    mech(stats.moves, "iterations with Q0 at infinity");
    mech(stats.q_swaps, "Q0 <- Q1 selections");
    mech(stats.task_mas, "tasks on MAS");
    mech(stats.task_gfau, "tasks on GFAU");
    mech(n_alpha0, "refresh alpha=0");
    mech(n_alpha1, "refresh alpha=1");
    mech(n_gfp, "GF(p) runs");
    mech(n_gfb, "GF(2^m) runs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
