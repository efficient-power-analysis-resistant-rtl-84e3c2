// tb_mem_hier: self-checking testbench of the two-level memory hierarchy.
//
// The test bench loads random field elements into the shared memory through
// the host port, then issues PE commands and checks values and latencies:
//   - MEM fetch: value of the entry, T_MEM = ceil(m/WM)+1 cycles;
//   - store (write-through): T_MEM cycles, value readable from MEM afterwards;
//   - reuse of a PE's own R and local synchronization from the other PE's R:
//     1 cycle, value of R;
//   - constants 0 and 1: 1 cycle;
//   - tag invalidation by pe_start, by a store of the other PE to the same
//     entry and by clear_tags (next load goes to MEM again);
//   - two simultaneous requests are both served (round robin).
// The PE result registers are driven by the test bench. A reference copy of
// the memory contents is kept in the test bench. Runs with m = 160 (two
// words) and m = 70 (one word).
module tb_mem_hier;
  import dfecc_pkg::*;
  localparam int unsigned W = 160, WM = 80, NWPE = 2, DEPTH = NENT * NWPE;
  localparam int unsigned AW = $clog2(DEPTH), MW = $clog2(W + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  logic [MW-1:0] m = MW'(160);
  logic [1:0] cmd_valid = '0, cmd_store = '0, cmd_port = '0, cmd_ack;
  ent_t cmd_ent [2] = '{default: '0};
  logic [1:0] pe_start = '0;
  logic [W-1:0] pe_res [2] = '{default: '0};
  logic [W-1:0] pe_in1 [2], pe_in2 [2];
  logic clear_tags = 1'b0, host_en = 1'b1, host_we = 1'b0, host_re = 1'b0;
  logic [AW-1:0] host_addr = '0;
  logic [WM-1:0] host_wdata = '0, host_rdata;
  logic [31:0] n_fetch, n_store, n_sync, n_reuse;

  logic [W-1:0] ref_mem [NENT];
  int checks = 0, failures = 0;

  mem_hier #(.W(W), .WM(WM)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  function automatic logic [W-1:0] rnd_el(int unsigned mm);
    logic [W-1:0] v;
    for (int i = 0; i < W / 32; i++) v[i*32 +: 32] = $urandom;
    if (mm < W) v &= (W'(1) << mm) - 1'b1;
    return v;
  endfunction

  function automatic int unsigned tmem(int unsigned mm);
    return (mm + WM - 1) / WM + 1;
  endfunction

  task automatic host_write_all(int unsigned mm);
    host_en = 1'b1;
    for (int e = 0; e < E_ZERO; e++) begin
      ref_mem[e] = rnd_el(mm);
      for (int k = 0; k < NWPE; k++) begin
        @(negedge clk);
        host_we = 1'b1; host_addr = AW'(e * NWPE + k); host_wdata = ref_mem[e][k*WM +: WM];
      end
    end
    @(negedge clk);
    host_we = 1'b0;
    host_en = 1'b0;
  endtask

  task automatic host_read(int e, output logic [W-1:0] v);
    v = '0;
    host_en = 1'b1;
    for (int k = 0; k < NWPE; k++) begin
      @(negedge clk);
      host_re = 1'b1; host_addr = AW'(e * NWPE + k);
      @(negedge clk);
      host_re = 1'b0;
      v[k*WM +: WM] = host_rdata;
    end
    host_en = 1'b0;
  endtask

  // one command of PE j; returns the latency in cycles
  task automatic cmd(int j, bit store, bit port, int e, output int lat);
    @(negedge clk);
    cmd_valid[j] = 1'b1; cmd_store[j] = store; cmd_port[j] = port; cmd_ent[j] = ent_t'(e);
    lat = 0;
    do begin
      @(posedge clk);
      lat++;
    end while (!cmd_ack[j]);
    #1;
    cmd_valid[j] = 1'b0;
  endtask

  task automatic start_pe(int j);
    @(negedge clk);
    pe_start[j] = 1'b1;
    @(negedge clk);
    pe_start[j] = 1'b0;
  endtask

  function automatic logic [W-1:0] expv(int e);
    return e == E_ZERO ? '0 : e == E_ONE ? W'(1) : ref_mem[e];
  endfunction

  task automatic run(int unsigned mm);
    int lat, e, e2, j;
    logic [W-1:0] v;
    m = MW'(mm);
    host_write_all(mm);
    @(negedge clk); clear_tags = 1'b1; @(negedge clk); clear_tags = 1'b0;
    for (int n = 0; n < 150; n++) begin
      j = $urandom_range(0, 1);
      e = $urandom_range(0, E_ZERO - 1);
      // fetch from MEM (no tags hold e after a start of both PEs)
      start_pe(0); start_pe(1);
      cmd(j, 1'b0, n[0], e, lat);
      v = n[0] ? pe_in2[j] : pe_in1[j];
      check(v == ref_mem[e], $sformatf("fetch value e=%0d", e));
      check(lat == tmem(mm), $sformatf("fetch latency %0d", lat));
      // PE j produces a result and stores it to e2
      e2 = $urandom_range(0, E_ZERO - 1);
      start_pe(j);
      pe_res[j] = rnd_el(mm);
      ref_mem[e2] = pe_res[j];
      cmd(j, 1'b1, 1'b0, e2, lat);
      check(lat == tmem(mm), $sformatf("store latency %0d", lat));
      // own reuse
      cmd(j, 1'b0, 1'b1, e2, lat);
      check(pe_in2[j] == ref_mem[e2] && lat == 1, "reuse");
      // synchronization to the other PE
      cmd(1 - j, 1'b0, 1'b0, e2, lat);
      check(pe_in1[1-j] == ref_mem[e2] && lat == 1, "sync");
      // constants
      cmd(1 - j, 1'b0, 1'b1, (n % 2) ? E_ONE : E_ZERO, lat);
      check(pe_in2[1-j] == expv((n % 2) ? E_ONE : E_ZERO) && lat == 1, "constant");
      // the other PE overwrites e2: tag of PE j is dropped
      start_pe(1 - j);
      pe_res[1-j] = rnd_el(mm);
      ref_mem[e2] = pe_res[1-j];
      cmd(1 - j, 1'b1, 1'b0, e2, lat);
      pe_res[j] = rnd_el(mm);          // R of PE j changes without a start
      cmd(j, 1'b0, 1'b0, e2, lat);
      check(pe_in1[j] == ref_mem[e2] && lat == 1, "sync after overwrite");
      // clear_tags forces a MEM fetch
      @(negedge clk); clear_tags = 1'b1; @(negedge clk); clear_tags = 1'b0;
      cmd(j, 1'b0, 1'b1, e2, lat);
      check(pe_in2[j] == ref_mem[e2] && lat == tmem(mm), "fetch after clear");
      // simultaneous requests
      @(negedge clk);
      e = $urandom_range(0, E_ZERO - 1);
      e2 = $urandom_range(0, E_ZERO - 1);
      cmd_valid = 2'b11; cmd_store = 2'b00; cmd_port = 2'b00;
      cmd_ent[0] = ent_t'(e); cmd_ent[1] = ent_t'(e2);
      begin
        bit [1:0] got = 2'b00;
        int cyc = 0;
        while (got != 2'b11 && cyc < 20) begin
          @(posedge clk);
          cyc++;
          for (int q = 0; q < 2; q++) if (cmd_ack[q]) begin got[q] = 1'b1; #0; end
          #1;
          for (int q = 0; q < 2; q++) if (got[q]) cmd_valid[q] = 1'b0;
        end
        check(got == 2'b11 && cyc <= 2 * tmem(mm), $sformatf("two requests served in %0d", cyc));
        check(pe_in1[0] == expv(e) && pe_in1[1] == expv(e2), "two requests values");
      end
    end
    // MEM holds every write-through value
    for (int q = 0; q < E_ZERO; q++) begin
      host_read(q, v);
      check(v == ref_mem[q], $sformatf("host read %0d", q));
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(160);
    run(70);
    $display("mem_hier: fetch=%0d store=%0d sync=%0d reuse=%0d", n_fetch, n_store, n_sync, n_reuse);
    check(n_sync > 0 && n_reuse > 0 && n_fetch > 0 && n_store > 0, "counters");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
