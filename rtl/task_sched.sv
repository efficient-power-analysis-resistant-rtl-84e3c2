// task_sched: priority-oriented task scheduler for the two processing elements.
//
// A stage of the scalar multiplication consists of up to two independent
// threads (thread 0 normally the point doubling, thread 1 the point addition).
// Each thread is an in-order list of field-operation tasks (dfecc_pkg
// prog_task); a thread issues its next task only after the previous one has
// been written back. The scheduler maps the tasks onto the GFAU (full
// function) and the MAS (no division) as follows:
//   - task priority: MD high, MM medium, ADD/SUB low;
//   - each thread is bound to one PE (its "PE ID"); a task of medium or low
//     priority runs on the PE of its thread;
//   - an MD task is pushed into the instruction FIFO; if its thread was bound
//     to the MAS, the two threads exchange PE IDs (interleaved processing);
//   - the GFAU, when free, serves the FIFO first and otherwise its own
//     thread's MM/ADD/SUB tasks.
// The stage ends when both threads have finished their last task; the caller
// then starts the next stage (the synchronisation between dependent
// iterations). PE IDs are kept from stage to stage.
//
// Each PE slot runs a task in four steps: load in1, load in2 (through the
// memory hierarchy, 1 cycle from a local register or T_MEM cycles from the
// shared memory), execute (pe_start for one cycle, wait for pe_done), store
// the result (write-through, T_MEM cycles).
//
// The scheduling rules follow the paper's algorithm; FIFO depth, the slot
// sequencing and the "only one FIFO push per cycle" rule are this design's.
// Interface: start (one cycle) latches pg/en/map for both threads; done is
// high for one cycle when the stage is complete; busy is high in between.
module task_sched
  import dfecc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  field_e      field,
  // stage control
  input  logic        start,
  input  prog_e       pg  [2],
  input  logic [1:0]  en,
  input  rmap_t       map [2],
  output logic        busy,
  output logic        done,
  // processing elements (index 0: MAS, 1: GFAU)
  output logic [1:0]  pe_start,
  output fop_e        pe_op [2],
  input  logic [1:0]  pe_done,
  // memory hierarchy commands
  output logic [1:0]  cmd_valid,
  output logic [1:0]  cmd_store,
  output logic [1:0]  cmd_port,
  output ent_t        cmd_ent [2],
  input  logic [1:0]  cmd_ack,
  // activity counters
  output logic [31:0] n_swap,        // PE-ID exchanges
  output logic [31:0] n_md_fifo,     // MD tasks queued in the FIFO
  output logic [31:0] n_task [2],    // tasks run per PE
  output logic [31:0] n_busy [2]     // busy cycles per PE slot
);
  localparam logic PE_MAS  = 1'b0;
  localparam logic PE_GFAU = 1'b1;

  typedef enum logic [2:0] {SL_IDLE, SL_LD1, SL_LD2, SL_EXEC, SL_WAIT, SL_ST} slot_e;

  typedef struct packed {
    logic   thr;
    ftask_t tk;
  } fifo_t;

  prog_e      pg_q [2];
  rmap_t      map_q [2];
  logic [1:0] act, inflight, queued, pe_id;
  logic [4:0] pc [2];
  logic       busy_q;

  slot_e      sst [2];
  logic       s_thr [2];
  fop_e       s_op [2];
  logic       s_last [2];
  ent_t       s_a [2], s_b [2], s_d [2];

  ftask_t     head [2];
  logic [1:0] ready;

  // FIFO
  logic       f_push, f_pop, f_empty, f_full;
  fifo_t      f_din, f_dout;

  // dispatch decisions
  logic       push_t;
  logic [1:0] take;          // slot j takes a task this cycle
  logic       take_thr [2];
  ftask_t     take_tk [2];

  always_comb begin
    for (int t = 0; t < 2; t++) begin
      head[t]  = prog_task(field, pg_q[t], pc[t]);
      ready[t] = act[t] && !inflight[t] && !queued[t];
    end
  end

  always_comb begin
    f_push = 1'b0;
    push_t = 1'b0;
    if (ready[0] && head[0].op == OP_MD && !f_full) begin
      f_push = 1'b1; push_t = 1'b0;
    end else if (ready[1] && head[1].op == OP_MD && !f_full) begin
      f_push = 1'b1; push_t = 1'b1;
    end
    f_din.thr = push_t;
    f_din.tk  = head[push_t];

    take        = 2'b00;
    take_thr[0] = 1'b0;
    take_thr[1] = 1'b0;
    take_tk[0]  = head[0];
    take_tk[1]  = head[1];
    f_pop       = 1'b0;
    // GFAU: FIFO first, then its own thread
    if (sst[PE_GFAU] == SL_IDLE) begin
      if (!f_empty) begin
        f_pop = 1'b1; take[PE_GFAU] = 1'b1;
        take_thr[PE_GFAU] = f_dout.thr; take_tk[PE_GFAU] = f_dout.tk;
      end else begin
        for (int t = 1; t >= 0; t--)
          if (ready[t] && pe_id[t] == PE_GFAU && head[t].op != OP_MD) begin
            take[PE_GFAU] = 1'b1; take_thr[PE_GFAU] = t[0]; take_tk[PE_GFAU] = head[t];
          end
      end
    end
    // MAS: its own thread's non-division tasks
    if (sst[PE_MAS] == SL_IDLE) begin
      for (int t = 1; t >= 0; t--)
        if (ready[t] && pe_id[t] == PE_MAS && head[t].op != OP_MD) begin
          take[PE_MAS] = 1'b1; take_thr[PE_MAS] = t[0]; take_tk[PE_MAS] = head[t];
        end
    end
  end

  instr_fifo #(.DW($bits(fifo_t)), .DEPTH(2)) u_fifo (
    .clk(clk), .rst_n(rst_n), .push(f_push), .din(f_din), .pop(f_pop),
    .dout(f_dout), .empty(f_empty), .full(f_full)
  );

  // slot outputs
  always_comb begin
    for (int j = 0; j < 2; j++) begin
      pe_start[j]  = (sst[j] == SL_EXEC);
      pe_op[j]     = s_op[j];
      cmd_valid[j] = (sst[j] == SL_LD1) || (sst[j] == SL_LD2) || (sst[j] == SL_ST);
      cmd_store[j] = (sst[j] == SL_ST);
      cmd_port[j]  = (sst[j] == SL_LD2);
      cmd_ent[j]   = (sst[j] == SL_LD1) ? s_a[j] : (sst[j] == SL_LD2) ? s_b[j] : s_d[j];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pg_q      <= '{default: PG_CONV};
      map_q     <= '{default: '0};
      act       <= 2'b00;
      inflight  <= 2'b00;
      queued    <= 2'b00;
      pe_id     <= 2'b01;          // thread 0 on the GFAU, thread 1 on the MAS
      pc        <= '{default: '0};
      busy_q    <= 1'b0;
      sst       <= '{default: SL_IDLE};
      s_thr     <= '{default: 1'b0};
      s_op      <= '{default: OP_ADD};
      s_last    <= '{default: 1'b0};
      s_a       <= '{default: '0};
      s_b       <= '{default: '0};
      s_d       <= '{default: '0};
      n_swap    <= '0;
      n_md_fifo <= '0;
      n_task    <= '{default: '0};
      n_busy    <= '{default: '0};
    end else begin
      busy_q <= busy;
      if (start) begin
        pg_q  <= pg;
        map_q <= map;
        act   <= en;
        pc    <= '{default: '0};
      end
      // FIFO push and PE-ID exchange
      if (f_push) begin
        queued[push_t] <= 1'b1;
        n_md_fifo      <= n_md_fifo + 1'b1;
        if (pe_id[push_t] == PE_MAS) begin
          pe_id  <= ~pe_id;
          n_swap <= n_swap + 1'b1;
        end
      end
      for (int j = 0; j < 2; j++) begin
        if (sst[j] != SL_IDLE) n_busy[j] <= n_busy[j] + 1'b1;
        case (sst[j])
          SL_IDLE: if (take[j]) begin
            s_thr[j]  <= take_thr[j];
            s_op[j]   <= take_tk[j].op;
            s_last[j] <= take_tk[j].last;
            s_a[j]    <= role_ent(take_tk[j].a,   map_q[take_thr[j]], take_thr[j]);
            s_b[j]    <= role_ent(take_tk[j].b,   map_q[take_thr[j]], take_thr[j]);
            s_d[j]    <= role_ent(take_tk[j].dst, map_q[take_thr[j]], take_thr[j]);
            inflight[take_thr[j]] <= 1'b1;
            queued[take_thr[j]]   <= 1'b0;
            n_task[j] <= n_task[j] + 1'b1;
            sst[j]    <= SL_LD1;
          end
          SL_LD1:  if (cmd_ack[j]) sst[j] <= SL_LD2;
          SL_LD2:  if (cmd_ack[j]) sst[j] <= SL_EXEC;
          SL_EXEC: sst[j] <= SL_WAIT;
          SL_WAIT: if (pe_done[j]) sst[j] <= SL_ST;
          default: if (cmd_ack[j]) begin     // SL_ST
            inflight[s_thr[j]] <= 1'b0;
            if (s_last[j]) act[s_thr[j]] <= 1'b0;
            else           pc[s_thr[j]]  <= pc[s_thr[j]] + 1'b1;
            sst[j] <= SL_IDLE;
          end
        endcase
      end
    end
  end

  assign busy = (act != 2'b00) || (inflight != 2'b00);
  assign done = busy_q && !busy;

  a_md_on_gfau: assert property (@(posedge clk) disable iff (!rst_n) pe_start[PE_MAS] |-> pe_op[PE_MAS] != OP_MD);
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);
endmodule
