// dfecc_top: heterogeneous dual-PE dual-field elliptic curve processor.
//
// Computes the scalar multiplication K*P on an arbitrary curve over GF(p) or
// GF(2^m), m <= W, in affine coordinates with Montgomery-domain arithmetic,
// protected against simple and differential power analysis and the doubling
// attack by a right-to-left double-and-add-always schedule with a randomized
// base point. Two processing elements work in parallel: the GFAU (division,
// multiplication, add/subtract) and the smaller MAS (multiplication,
// add/subtract). Division tasks always go to the GFAU; the scheduler swaps the
// PE binding of the doubling and addition threads when needed.
//
//   ecsm_seq   -> stages and loop of the scalar multiplication
//   task_sched -> dispatch of field-operation tasks to the two PEs
//   mem_hier   -> shared memory, its w-bit buffer and the PE operand muxes
//   gfau, mas  -> the two processing elements
//
// Use: while busy is low, the host writes the curve constant a, the point P
// (normal form), the mask points M and N = K*M (Montgomery form: value * 2^m
// mod p), through the w-bit memory port; entry e, word k is at address
// e * ceil(W/WM) + k (entries in dfecc_pkg). Then it pulses start with field,
// m, p, key, key_len, refresh_en and alpha stable until done. The result x, y
// is read from entries Rx, Ry, of which only the first ceil(m/WM) words are
// defined (the memory is not cleared). Host reads return data one cycle after
// host_re. p is the prime (GF(p)) or the field polynomial with its x^m term
// (GF(2^m)); p must have exactly m bits for GF(p).
// stats carries cumulative activity counters (FIFO use, PE-ID exchanges,
// memory routes, PE occupancy) for performance analysis.
//
// Reset is asynchronous for the registers; the concurrent assertions in this
// and the other modules use rst_n synchronously in their disable condition,
// which is why lint reports rst_n as used both ways. That is intended.
module dfecc_top
  import dfecc_pkg::*;
#(
  parameter int unsigned W     = 160,                 // datapath width (160-b chip)
  parameter int unsigned WM    = 80,                  // shared memory width w
  parameter int unsigned NWPE  = (W + WM - 1) / WM,
  parameter int unsigned AW    = $clog2(NENT * NWPE),
  parameter int unsigned MW    = $clog2(W + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // configuration
  input  field_e        field,
  input  logic [MW-1:0] m,
  input  logic [W:0]    p,
  // scalar multiplication
  input  logic          start,
  input  logic [W-1:0]  key,
  input  logic [MW-1:0] key_len,
  input  logic          refresh_en,
  input  logic          alpha,           // random bit for the mask refresh
  output logic          busy,
  output logic          done,
  // host memory port
  input  logic          host_we,
  input  logic          host_re,
  input  logic [AW-1:0] host_addr,
  input  logic [WM-1:0] host_wdata,
  output logic [WM-1:0] host_rdata,
  // activity counters
  output stats_t        stats
);
  // scheduler <-> sequencer
  logic        s_start, s_done, s_busy;
  prog_e       s_pg [2];
  logic [1:0]  s_en;
  rmap_t       s_map [2];
  logic        clear_tags;
  // PEs
  logic [1:0]  pe_start, pe_done, pe_busy;
  fop_e        pe_op [2];
  logic [W-1:0] pe_res [2], pe_in1 [2], pe_in2 [2];
  // memory commands
  logic [1:0]  cmd_valid, cmd_store, cmd_port, cmd_ack;
  ent_t        cmd_ent [2];
  // observation
  logic [MW-1:0] iter;
  logic [31:0] n_moves, n_swaps, n_fetch, n_store, n_sync, n_reuse, n_swap, n_md_fifo;
  logic [31:0] n_task [2], n_busy [2];

  ecsm_seq #(.W(W)) u_seq (
    .clk, .rst_n, .start, .key, .key_len, .refresh_en, .alpha,
    .busy, .done, .clear_tags,
    .s_start, .s_pg, .s_en, .s_map, .s_done,
    .iter, .n_moves, .n_swaps
  );

  task_sched u_sched (
    .clk, .rst_n, .field,
    .start(s_start), .pg(s_pg), .en(s_en), .map(s_map), .busy(s_busy), .done(s_done),
    .pe_start, .pe_op, .pe_done,
    .cmd_valid, .cmd_store, .cmd_port, .cmd_ent, .cmd_ack,
    .n_swap, .n_md_fifo, .n_task, .n_busy
  );

  mem_hier #(.W(W), .WM(WM)) u_mem (
    .clk, .rst_n, .m,
    .cmd_valid, .cmd_store, .cmd_port, .cmd_ent, .cmd_ack,
    .pe_start, .pe_res, .pe_in1, .pe_in2, .clear_tags,
    .host_en(!busy), .host_we, .host_re, .host_addr, .host_wdata, .host_rdata,
    .n_fetch, .n_store, .n_sync, .n_reuse
  );

  mas #(.W(W)) u_mas (
    .clk, .rst_n, .start(pe_start[0]), .op(pe_op[0]), .field, .m, .p,
    .a(pe_in1[0]), .b(pe_in2[0]), .busy(pe_busy[0]), .done(pe_done[0]), .res(pe_res[0])
  );

  gfau #(.W(W)) u_gfau (
    .clk, .rst_n, .start(pe_start[1]), .op(pe_op[1]), .field, .m, .p,
    .a(pe_in1[1]), .b(pe_in2[1]), .busy(pe_busy[1]), .done(pe_done[1]), .res(pe_res[1])
  );

  always_comb begin
    stats.md_fifo   = n_md_fifo;
    stats.pe_swaps  = n_swap;
    stats.sync      = n_sync;
    stats.reuse     = n_reuse;
    stats.fetch     = n_fetch;
    stats.store     = n_store;
    stats.moves     = n_moves;
    stats.q_swaps   = n_swaps;
    stats.task_mas  = n_task[0];
    stats.task_gfau = n_task[1];
    stats.busy_mas  = n_busy[0];
    stats.busy_gfau = n_busy[1];
    stats.iter      = 8'(iter);
  end

  // A PE is started only when idle; a stage is started only when the
  // scheduler is idle.
  a_pe_idle: assert property (@(posedge clk) disable iff (!rst_n) (pe_start & pe_busy) == 2'b00);
  a_stage_idle: assert property (@(posedge clk) disable iff (!rst_n) s_start |-> !s_busy);
endmodule
