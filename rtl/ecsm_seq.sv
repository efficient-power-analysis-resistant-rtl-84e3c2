// ecsm_seq: stage sequencer of the power-analysis-resistant scalar multiplication.
//
// Computes K*P as (K*(P + M)) - N with a random mask point M and N = K*M held
// in memory (randomized base point), using the right-to-left
// double-and-add-always loop reformulated so that the doubling and the
// addition of one iteration are independent threads:
//     QT = Q2;  Q2 = 2*Q2;  Q1 = Q0 + QT;  Q0 = Q_{K_i}
// The stages, each handed to the task scheduler as one or two threads, are:
//   PRE     x, y of P and the curve constant a into the Montgomery domain (3 MD)
//   MASK    Q2 = P + M
//   LOOP    L_K iterations: thread 0 doubles Q2, thread 1 adds Q0 + QT
//   UNMASK  R = Q0 - N
//   POST    R out of the Montgomery domain (2 MM)
//   REFRESH (if refresh_en) M = (-1)^alpha 2M, N = (-1)^alpha 2N
// The sequencer renames rather than copies points: QT is the Q2 buffer of the
// previous iteration (ping-pong pair Q2A/Q2B, selector par) and Q0 <- Q1 is a
// swap of the Q0/Q1 buffer pair (selector sel) when K_i = 1. The same field
// operations are executed for either key bit.
//
// While Q0 is still the point at infinity (before the first 1 bit of K has
// been consumed) the addition thread runs a move (Q1 = QT) instead, as the
// paper's initial stages do; this reveals the number of trailing zero bits of
// K, a choice the paper makes too. Exceptional additions (Q0 = +-QT) are not
// handled; with the masked base point they occur with negligible probability.
// M and N must be loaded in Montgomery form; P and a in normal form.
//
// Interface: start (one cycle) with key, key_len L_K (1..W),
// refresh_en and alpha stable until done; done is high for one cycle; the
// result x, y is then in memory entries Rx, Ry.
module ecsm_seq
  import dfecc_pkg::*;
#(
  parameter int unsigned W  = 160,
  parameter int unsigned MW = $clog2(W + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [W-1:0]  key,
  input  logic [MW-1:0] key_len,
  input  logic          refresh_en,
  input  logic          alpha,
  output logic          busy,
  output logic          done,
  output logic          clear_tags,
  // task scheduler
  output logic          s_start,
  output prog_e         s_pg  [2],
  output logic [1:0]    s_en,
  output rmap_t         s_map [2],
  input  logic          s_done,
  // observation
  output logic [MW-1:0] iter,
  output logic [31:0]   n_moves,      // loop iterations with Q0 at infinity
  output logic [31:0]   n_swaps       // Q0 <- Q1 selections
);
  typedef enum logic [2:0] {SQ_IDLE, SQ_PRE, SQ_MASK, SQ_LOOP, SQ_UNMASK, SQ_POST, SQ_REFRESH, SQ_DONE} sq_e;

  sq_e           st;
  logic          go;           // issue the current stage
  logic          sel, par, q0_inf;
  logic [MW-1:0] i_q;

  ent_t q0x, q0y, q1x, q1y, q2x, q2y, qnx, qny;

  always_comb begin
    q0x = sel ? E_QBX : E_QAX;   q0y = sel ? E_QBY : E_QAY;
    q1x = sel ? E_QAX : E_QBX;   q1y = sel ? E_QAY : E_QBY;
    q2x = par ? E_Q2BX : E_Q2AX; q2y = par ? E_Q2BY : E_Q2AY;
    qnx = par ? E_Q2AX : E_Q2BX; qny = par ? E_Q2AY : E_Q2BY;
  end

  function automatic rmap_t mkmap(ent_t x1, ent_t y1, ent_t x2, ent_t y2, ent_t x3, ent_t y3);
    rmap_t r;
    r.x1 = x1; r.y1 = y1; r.x2 = x2; r.y2 = y2; r.x3 = x3; r.y3 = y3;
    return r;
  endfunction

  // stage programs and operand bindings
  always_comb begin
    s_pg[0]  = PG_DBL;
    s_pg[1]  = PG_ADD;
    s_en     = 2'b00;
    s_map[0] = '0;
    s_map[1] = '0;
    case (st)
      SQ_PRE: begin
        s_pg[0] = PG_CONV; s_en = 2'b01;
        s_map[0] = mkmap(E_PX, E_PY, E_PX, E_PY, E_PX, E_PY);
      end
      SQ_MASK: begin
        s_pg[1] = PG_ADD; s_en = 2'b10;
        s_map[1] = mkmap(E_PX, E_PY, E_MX, E_MY, q2x, q2y);
      end
      SQ_LOOP: begin
        s_pg[0] = PG_DBL; s_pg[1] = q0_inf ? PG_MOVE : PG_ADD; s_en = 2'b11;
        s_map[0] = mkmap(q2x, q2y, q2x, q2y, qnx, qny);
        s_map[1] = mkmap(q0x, q0y, q2x, q2y, q1x, q1y);
      end
      SQ_UNMASK: begin
        s_pg[1] = PG_ADDNEG; s_en = 2'b10;
        s_map[1] = mkmap(q0x, q0y, E_NX, E_NY, E_RX, E_RY);
      end
      SQ_POST: begin
        s_pg[1] = PG_POST; s_en = 2'b10;
        s_map[1] = mkmap(E_RX, E_RY, E_RX, E_RY, E_RX, E_RY);
      end
      SQ_REFRESH: begin
        s_pg[0] = alpha ? PG_REF1 : PG_REF0;
        s_pg[1] = alpha ? PG_REF1 : PG_REF0;
        s_en = 2'b11;
        s_map[0] = mkmap(E_MX, E_MY, E_MX, E_MY, E_MX, E_MY);
        s_map[1] = mkmap(E_NX, E_NY, E_NX, E_NY, E_NX, E_NY);
      end
      default: ;
    endcase
  end

  assign s_start = go;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= SQ_IDLE;
      go         <= 1'b0;
      sel        <= 1'b0;
      par        <= 1'b0;
      q0_inf     <= 1'b1;
      i_q        <= '0;
      done       <= 1'b0;
      clear_tags <= 1'b0;
      n_moves    <= '0;
      n_swaps    <= '0;
    end else begin
      go         <= 1'b0;
      done       <= 1'b0;
      clear_tags <= 1'b0;
      case (st)
        SQ_IDLE: if (start) begin
          st         <= SQ_PRE;
          go         <= 1'b1;
          sel        <= 1'b0;
          par        <= 1'b0;
          q0_inf     <= 1'b1;
          i_q        <= '0;
          clear_tags <= 1'b1;
        end
        SQ_PRE:  if (s_done) begin st <= SQ_MASK; go <= 1'b1; end
        SQ_MASK: if (s_done) begin st <= SQ_LOOP; go <= 1'b1; end
        SQ_LOOP: if (s_done) begin
          par <= ~par;
          if (q0_inf) n_moves <= n_moves + 1'b1;
          if (key[i_q]) begin
            sel     <= ~sel;
            q0_inf  <= 1'b0;
            n_swaps <= n_swaps + 1'b1;
          end
          go <= 1'b1;
          if (i_q == key_len - 1'b1) st <= SQ_UNMASK;
          else i_q <= i_q + 1'b1;
        end
        SQ_UNMASK: if (s_done) begin st <= SQ_POST; go <= 1'b1; end
        SQ_POST: if (s_done) begin
          if (refresh_en) begin st <= SQ_REFRESH; go <= 1'b1; end
          else st <= SQ_DONE;
        end
        SQ_REFRESH: if (s_done) st <= SQ_DONE;
        default: begin  // SQ_DONE
          done <= 1'b1;
          st   <= SQ_IDLE;
        end
      endcase
    end
  end

  assign busy = (st != SQ_IDLE);
  assign iter = i_q;

  a_len: assert property (@(posedge clk) disable iff (!rst_n) start |-> (key_len != '0 && key_len <= MW'(W)));
endmodule
