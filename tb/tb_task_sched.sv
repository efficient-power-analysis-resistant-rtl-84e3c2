// tb_task_sched: self-checking testbench of the priority-oriented scheduler.
//
// The two PEs and the memory hierarchy are replaced by behavioural models in
// this test bench. Field elements are abstracted to 32-bit words. Each
// operation is given a distinct, order-sensitive function:
//   ADD a+b, SUB a-b, MM a*b+0x9e37, MD (a*3)^b.
// The PE models have random latencies (MD longest) and the memory model
// acknowledges after a random delay. Random stages of the scalar
// multiplication are run, with the operand bindings the sequencer uses:
//   conversion, masking, loop iteration (doubling + addition or move), unmask,
//   conversion back, and refresh.
// After each stage, every memory entry must equal the result of executing
// the stage's threads one task after another in program order.
// Further checks:
//   - an MD never starts on the MAS;
//   - both PEs work at the same time in some cycles;
//   - PE-ID exchanges happen and MD tasks pass through the FIFO;
//   - done is a single pulse and the stage ends within a cycle bound.
module tb_task_sched;
  import dfecc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  field_e field = FLD_P;
  logic start = 1'b0;
  prog_e pg [2] = '{default: PG_DBL};
  logic [1:0] en = '0;
  rmap_t map [2] = '{default: '0};
  logic busy, done;
  logic [1:0] pe_start, pe_done;
  fop_e pe_op [2];
  logic [1:0] cmd_valid, cmd_store, cmd_port, cmd_ack;
  ent_t cmd_ent [2];
  logic [31:0] n_swap, n_md_fifo, n_task [2], n_busy [2];

  int unsigned mem [NENT];
  int unsigned rmem [NENT];
  int unsigned in1 [2], in2 [2], res [2];
  int checks = 0, failures = 0, n_par = 0, n_md_mas = 0;

  task_sched dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
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

  function automatic int unsigned f_op(fop_e op, int unsigned a, int unsigned b);
    case (op)
      OP_ADD:  return a + b;
      OP_SUB:  return a - b;
      OP_MM:   return a * b + 32'h9e37;
      default: return (a * 3) ^ b;
    endcase
  endfunction

  function automatic int unsigned rd(ent_t e);
    return e == E_ZERO ? 0 : e == E_ONE ? 1 : mem[e];
  endfunction

  function automatic int unsigned rrd(ent_t e);
    return e == E_ZERO ? 0 : e == E_ONE ? 1 : rmem[e];
  endfunction

  // memory model
  for (genvar j = 0; j < 2; j++) begin : g_model
    initial begin
      cmd_ack[j] = 1'b0;
      forever begin
        @(posedge clk);
        #1;
        cmd_ack[j] = 1'b0;
        if (cmd_valid[j]) begin
          repeat ($urandom_range(0, 3)) @(posedge clk);
          #1;
          cmd_ack[j] = 1'b1;
          @(negedge clk);
          if (cmd_store[j]) mem[cmd_ent[j]] = res[j];
          else if (cmd_port[j]) in2[j] = rd(cmd_ent[j]);
          else in1[j] = rd(cmd_ent[j]);
        end
      end
    end
    // PE model
    initial begin
      pe_done[j] = 1'b0;
      forever begin
        @(posedge clk);
        #1;
        pe_done[j] = 1'b0;
        if (pe_start[j]) begin
          fop_e op;
          int unsigned lat;
          op = pe_op[j];
          if (j == 0 && op == OP_MD) n_md_mas++;
          lat = op == OP_MD ? $urandom_range(20, 40) : op == OP_MM ? $urandom_range(6, 12) : 1;
          res[j] = f_op(op, in1[j], in2[j]);
          repeat (lat) @(posedge clk);
          #1;
          pe_done[j] = 1'b1;
        end
      end
    end
  end

  always @(posedge clk) if (rst_n && n_busy[0] != 0) begin
    if (dut.sst[0] != 0 && dut.sst[1] != 0) n_par++;
  end

  // reference: threads executed one task at a time
  task automatic ref_thread(prog_e g, rmap_t mp, logic thr);
    ftask_t t;
    for (int pc = 0; pc < 32; pc++) begin
      t = prog_task(field, g, 5'(pc));
      rmem[role_ent(t.dst, mp, thr)] = f_op(t.op, rrd(role_ent(t.a, mp, thr)), rrd(role_ent(t.b, mp, thr)));
      if (t.last) break;
    end
  endtask

  function automatic rmap_t mm(ent_t x1, ent_t y1, ent_t x2, ent_t y2, ent_t x3, ent_t y3);
    rmap_t r;
    r.x1 = x1; r.y1 = y1; r.x2 = x2; r.y2 = y2; r.x3 = x3; r.y3 = y3;
    return r;
  endfunction

  task automatic run_stage(int kind);
    bit sel = 1'($urandom), par = 1'($urandom), alpha = 1'($urandom);
    ent_t q0x = sel ? E_QBX : E_QAX, q0y = sel ? E_QBY : E_QAY;
    ent_t q1x = sel ? E_QAX : E_QBX, q1y = sel ? E_QAY : E_QBY;
    ent_t q2x = par ? E_Q2BX : E_Q2AX, q2y = par ? E_Q2BY : E_Q2AY;
    ent_t qnx = par ? E_Q2AX : E_Q2BX, qny = par ? E_Q2AY : E_Q2BY;
    int cyc = 0, ndone = 0;
    en = 2'b00;
    case (kind)
      0: begin pg[0] = PG_CONV; en = 2'b01; map[0] = mm(E_PX, E_PY, E_PX, E_PY, E_PX, E_PY); end
      1: begin pg[1] = PG_ADD; en = 2'b10; map[1] = mm(E_PX, E_PY, E_MX, E_MY, q2x, q2y); end
      2, 3, 4: begin
        pg[0] = PG_DBL; pg[1] = (kind == 4) ? PG_MOVE : PG_ADD; en = 2'b11;
        map[0] = mm(q2x, q2y, q2x, q2y, qnx, qny);
        map[1] = mm(q0x, q0y, q2x, q2y, q1x, q1y);
      end
      5: begin pg[1] = PG_ADDNEG; en = 2'b10; map[1] = mm(q0x, q0y, E_NX, E_NY, E_RX, E_RY); end
      6: begin pg[1] = PG_POST; en = 2'b10; map[1] = mm(E_RX, E_RY, E_RX, E_RY, E_RX, E_RY); end
      default: begin
        pg[0] = alpha ? PG_REF1 : PG_REF0; pg[1] = pg[0]; en = 2'b11;
        map[0] = mm(E_MX, E_MY, E_MX, E_MY, E_MX, E_MY);
        map[1] = mm(E_NX, E_NY, E_NX, E_NY, E_NX, E_NY);
      end
    endcase
    rmem = mem;
    for (int t = 0; t < 2; t++) if (en[t]) ref_thread(pg[t], map[t], t[0]);
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (cyc < 5000 && !(ndone > 0 && !busy)) begin
      @(posedge clk);
      #1;
      if (done) ndone++;
      cyc++;
    end
    repeat (3) begin
      @(posedge clk);
      #1;
      if (done) ndone++;
    end
    check(ndone == 1, $sformatf("stage %0d: one done pulse (%0d)", kind, ndone));
    check(cyc < 2000, $sformatf("stage %0d: %0d cycles", kind, cyc));
    for (int e = 0; e < E_ZERO; e++)
      check(mem[e] == rmem[e], $sformatf("stage %0d field %0d entry %0d: %h vs %h", kind, field, e, mem[e], rmem[e]));
  endtask

  initial begin
    for (int e = 0; e < NENT; e++) mem[e] = $urandom;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      field = n[0] ? FLD_B : FLD_P;
      run_stage(n < 8 ? n : $urandom_range(0, 7));
      if (busy) begin
        failures++;
        $display("FAIL stage did not finish");
        break;
      end
    end
    $display("task_sched: swaps=%0d md_fifo=%0d tasks MAS=%0d GFAU=%0d parallel cycles=%0d",
             n_swap, n_md_fifo, n_task[0], n_task[1], n_par);
    check(n_md_mas == 0, "MD never on the MAS");
    check(n_swap > 0, "PE-ID exchanges happened");
    check(n_md_fifo > 0, "MD tasks through the FIFO");
    check(n_par > 0, "both PEs busy at once");
    check(n_task[0] > 0 && n_task[1] > 0, "both PEs used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
