// tb_ecsm_seq: self-checking testbench of the scalar-multiplication sequencer.
//
// The scheduler, PEs and memory are replaced by a behavioural stage model.
// Points are abstracted to elements of the additive group of 32-bit integers,
// so that a point multiple k*P is simply k*P mod 2^32. Each x and y entry holds
// the same value. The model executes each stage program on this abstract
// memory with the program's point meaning:
//   CONV and POST leave the point as it is; DBL 2*Q; ADD Q1+Q2; ADDNEG Q1-Q2;
//   MOVE Q2; REF0 2*Q; REF1 -2*Q.
// It then answers with s_done after a random delay. Q0/Q1 start with garbage
// values, since the point at infinity has no representation.
// For random keys, key lengths and alpha, the bench checks:
//   - the result entry R = K*P (masked with M, N = K*M);
//   - the refreshed masks (-1)^alpha 2M and (-1)^alpha 2N;
//   - the number of loop stages, which must equal key_len;
//   - the number of move iterations, which must be (trailing zeros of K) + 1;
//   - one done pulse per run;
//   - each stage is started exactly once per s_done.
module tb_ecsm_seq;
  import dfecc_pkg::*;
  localparam int unsigned W = 160, MW = $clog2(W + 1);

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  field_e field = FLD_P;
  logic [W-1:0] key = '0;
  logic [MW-1:0] key_len = '0;
  logic refresh_en = 1'b0, alpha = 1'b0;
  logic busy, done, clear_tags, s_start, s_done = 1'b0;
  prog_e s_pg [2];
  logic [1:0] s_en;
  rmap_t s_map [2];
  logic [MW-1:0] iter;
  logic [31:0] n_moves, n_swaps;

  int unsigned mem [NENT];
  int checks = 0, failures = 0, n_loop = 0, n_mv = 0, n_dones = 0, n_clear = 0;

  ecsm_seq #(.W(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic int unsigned pmean(prog_e g, int unsigned q1, int unsigned q2);
    case (g)
      PG_DBL, PG_REF0: return 2 * q1;
      PG_ADD:          return q1 + q2;
      PG_ADDNEG:       return q1 - q2;
      PG_MOVE:         return q2;
      PG_REF1:         return -(2 * q1);
      default:         return q1;     // CONV, POST
    endcase
  endfunction

  // stage model
  always @(posedge clk) if (rst_n) begin
    if (done) n_dones++;
    if (clear_tags) n_clear++;
  end

  initial begin
    forever begin
      @(posedge clk);
      #1;
      s_done = 1'b0;
      if (s_start) begin
        int unsigned v [2];
        check(s_en != 2'b00, "stage enables a thread");
        for (int t = 0; t < 2; t++)
          if (s_en[t]) v[t] = pmean(s_pg[t], mem[s_map[t].x1], mem[s_map[t].x2]);
        if (s_en == 2'b11 && s_pg[0] == PG_DBL) begin
          n_loop++;
          if (s_pg[1] == PG_MOVE) n_mv++;
        end
        for (int t = 0; t < 2; t++)
          if (s_en[t]) begin
            check(mem[s_map[t].x1] == mem[s_map[t].y1], "x/y of an operand agree");
            mem[s_map[t].x3] = v[t];
            mem[s_map[t].y3] = v[t];
          end
        repeat ($urandom_range(1, 6)) begin
          @(posedge clk);
          #1;
          check(!s_start, "no start while a stage runs");
        end
        s_done = 1'b1;
      end
    end
  end

  task automatic run(int unsigned klen, bit alp);
    int unsigned P = $urandom, M = $urandom, K32 = 0, tz = 0, N, cyc = 0;
    logic [W-1:0] k = '0;
    int nl0 = n_loop, nm0 = n_mv, nd0 = n_dones;
    for (int i = 0; i < W / 32; i++) k[i*32 +: 32] = $urandom;
    k &= (W'(1) << klen) - 1'b1;
    if (k == '0) k[0] = 1'b1;
    while (!k[tz]) tz++;
    // K mod 2^32 from the low bits
    K32 = k[31:0];
    N = K32 * M;
    for (int e = 0; e < NENT; e++) mem[e] = $urandom;
    mem[E_PX] = P; mem[E_PY] = P;
    mem[E_MX] = M; mem[E_MY] = M;
    mem[E_NX] = N; mem[E_NY] = N;
    mem[E_QAY] = mem[E_QAX]; mem[E_QBY] = mem[E_QBX];
    field = ($urandom_range(0, 1) == 1) ? FLD_B : FLD_P;
    @(negedge clk);
    key = k; key_len = MW'(klen); refresh_en = 1'b1; alpha = alp; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done && cyc < 100000) begin
      @(posedge clk);
      #1;
      cyc++;
    end
    repeat (3) @(posedge clk);
    #1;
    check(mem[E_RX] == K32 * P && mem[E_RY] == K32 * P, $sformatf("K*P len %0d: %h vs %h", klen, mem[E_RX], K32 * P));
    check(mem[E_MX] == (alp ? -(2 * M) : 2 * M), "refreshed M");
    check(mem[E_NX] == (alp ? -(2 * N) : 2 * N), "refreshed N");
    check(n_loop - nl0 == int'(klen), $sformatf("loop stages %0d vs %0d", n_loop - nl0, klen));
    check(n_mv - nm0 == int'(tz) + 1 || (tz + 1 > klen && n_mv - nm0 == int'(klen)),
          $sformatf("moves %0d, trailing zeros %0d", n_mv - nm0, tz));
    check(n_dones - nd0 == 1, "one done pulse");
    check(!busy, "idle after done");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(1, 0);
    run(160, 1);
    for (int n = 0; n < 60; n++) run($urandom_range(1, 160), $urandom_range(0, 1));
    check(n_clear == 62, "memory tags cleared at each start");
    $display("ecsm_seq: loop stages=%0d moves=%0d swaps=%0d", n_loop, n_mv, n_swaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
