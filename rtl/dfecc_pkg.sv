// dfecc_pkg: types, memory map and task programs shared by the dual-field
// ECC processor.
//
// The processor computes an elliptic-curve scalar multiplication (ECSM) as a
// sequence of field operations ("tasks"). A task is one of ADD, SUB, MM
// (Montgomery multiplication) or MD (Montgomery division), reads two operands
// and writes one result. Tasks are grouped into thread programs: an EC point
// doubling (ECPD), an EC point addition (ECPA), a domain conversion, and so on.
// Operands in a program are named by role (X1, Y1, X2, Y2, X3, Y3, temporaries,
// the curve constant a, and the constants 0 and 1); the sequencer binds the
// point roles to shared-memory entries for each stage.
//
// The point formulas are the affine ones for y^2 = x^3 + a x + b over GF(p) and
// y^2 + xy = x^3 + a x^2 + b over GF(2^m). All values are kept in the
// Montgomery domain (X = x * r), so MM and MD of domain values stay in the
// domain and ADD/SUB are unchanged. The ordering of field operations inside
// each program is this design's own; the paper gives the formulas and the
// operation counts per stage, not the micro-ordering.
// The memory-map constants (NENT, E_*) are used by the sequencer, the memory
// hierarchy and the host, not inside this package, so a lint of the package
// alone reports them as unused parameters.
package dfecc_pkg;

  // Field operations. Priority for scheduling: MD high, MM medium, ADD/SUB low.
  typedef enum logic [1:0] {
    OP_ADD = 2'd0,
    OP_SUB = 2'd1,
    OP_MM  = 2'd2,
    OP_MD  = 2'd3
  } fop_e;

  // Field select: prime field GF(p) or binary extension field GF(2^m).
  typedef enum logic {
    FLD_P = 1'b0,
    FLD_B = 1'b1
  } field_e;

  // Operand roles inside a thread program.
  typedef enum logic [3:0] {
    RL_A    = 4'd0,   // curve coefficient a
    RL_ZERO = 4'd1,   // constant 0
    RL_ONE  = 4'd2,   // constant 1
    RL_X1   = 4'd3,
    RL_Y1   = 4'd4,
    RL_X2   = 4'd5,
    RL_Y2   = 4'd6,
    RL_X3   = 4'd7,
    RL_Y3   = 4'd8,
    RL_T0   = 4'd9,   // thread-private temporaries
    RL_T1   = 4'd10,
    RL_T2   = 4'd11,
    RL_T3   = 4'd12,
    RL_T4   = 4'd13
  } role_e;

  typedef struct packed {
    fop_e  op;
    role_e dst;
    role_e a;     // first operand (dividend for MD)
    role_e b;     // second operand (divisor for MD)
    logic  last;  // last task of the program
  } ftask_t;

  // Thread programs.
  typedef enum logic [2:0] {
    PG_CONV   = 3'd0,  // X3 = MD(X1,1), Y3 = MD(Y1,1), a = MD(a,1): into Montgomery domain
    PG_DBL    = 3'd1,  // (X3,Y3) = 2 (X1,Y1)
    PG_ADD    = 3'd2,  // (X3,Y3) = (X1,Y1) + (X2,Y2)
    PG_ADDNEG = 3'd3,  // (X3,Y3) = (X1,Y1) - (X2,Y2)
    PG_MOVE   = 3'd4,  // (X3,Y3) = (X2,Y2)
    PG_POST   = 3'd5,  // X3 = MM(X1,1), Y3 = MM(Y1,1): out of Montgomery domain
    PG_REF0   = 3'd6,  // (X1,Y1) =  2 (X1,Y1)
    PG_REF1   = 3'd7   // (X1,Y1) = -2 (X1,Y1)
  } prog_e;

  // Shared-memory entry map (one entry holds one field element).
  localparam int unsigned NENT = 32;
  typedef logic [4:0] ent_t;
  localparam ent_t E_A    = 5'd0;
  localparam ent_t E_QAX  = 5'd1;   // point pair {QA, QB} holds Q0 and Q1
  localparam ent_t E_QAY  = 5'd2;
  localparam ent_t E_QBX  = 5'd3;
  localparam ent_t E_QBY  = 5'd4;
  localparam ent_t E_Q2AX = 5'd5;   // point pair {Q2A, Q2B} holds Q2 and QT
  localparam ent_t E_Q2AY = 5'd6;
  localparam ent_t E_Q2BX = 5'd7;
  localparam ent_t E_Q2BY = 5'd8;
  localparam ent_t E_MX   = 5'd9;   // mask point M
  localparam ent_t E_MY   = 5'd10;
  localparam ent_t E_NX   = 5'd11;  // N = K M
  localparam ent_t E_NY   = 5'd12;
  localparam ent_t E_PX   = 5'd15;  // base point P
  localparam ent_t E_PY   = 5'd16;
  localparam ent_t E_RX   = 5'd17;  // result K P
  localparam ent_t E_RY   = 5'd18;
  localparam ent_t E_T0   = 5'd19;  // temporaries of thread 0: 19..23
  localparam ent_t E_U0   = 5'd24;  // temporaries of thread 1: 24..28
  localparam ent_t E_ZERO = 5'd30;  // not stored: constant 0 on the PE input mux
  localparam ent_t E_ONE  = 5'd31;  // not stored: constant 1 on the PE input mux

  // Binding of the point roles of one thread to memory entries.
  typedef struct packed {
    ent_t x1, y1, x2, y2, x3, y3;
  } rmap_t;

  function automatic ent_t role_ent(role_e r, rmap_t mp, logic thr);
    ent_t tb;
    tb = thr ? E_U0 : E_T0;
    case (r)
      RL_A:    return E_A;
      RL_ZERO: return E_ZERO;
      RL_ONE:  return E_ONE;
      RL_X1:   return mp.x1;
      RL_Y1:   return mp.y1;
      RL_X2:   return mp.x2;
      RL_Y2:   return mp.y2;
      RL_X3:   return mp.x3;
      RL_Y3:   return mp.y3;
      RL_T0:   return tb;
      RL_T1:   return tb + 5'd1;
      RL_T2:   return tb + 5'd2;
      RL_T3:   return tb + 5'd3;
      default: return tb + 5'd4;
    endcase
  endfunction

  function automatic ftask_t mk(fop_e op, role_e d, role_e a, role_e b, logic l = 1'b0);
    ftask_t t;
    t.op = op; t.dst = d; t.a = a; t.b = b; t.last = l;
    return t;
  endfunction

  // Point doubling body, result to (dx, dy); the last task is flagged when lst.
  function automatic ftask_t dbl_task(field_e f, logic [4:0] pc, role_e dx, role_e dy, logic lst);
    if (f == FLD_P) begin
      // lambda = (3 x^2 + a) / (2 y); x3 = lambda^2 - 2x; y3 = lambda (x - x3) - y
      case (pc)
        5'd0:    return mk(OP_MM,  RL_T0, RL_X1, RL_X1);
        5'd1:    return mk(OP_ADD, RL_T1, RL_T0, RL_T0);
        5'd2:    return mk(OP_ADD, RL_T1, RL_T1, RL_T0);
        5'd3:    return mk(OP_ADD, RL_T1, RL_T1, RL_A);
        5'd4:    return mk(OP_ADD, RL_T2, RL_Y1, RL_Y1);
        5'd5:    return mk(OP_MD,  RL_T0, RL_T1, RL_T2);
        5'd6:    return mk(OP_MM,  RL_T1, RL_T0, RL_T0);
        5'd7:    return mk(OP_ADD, RL_T2, RL_X1, RL_X1);
        5'd8:    return mk(OP_SUB, dx,    RL_T1, RL_T2);
        5'd9:    return mk(OP_SUB, RL_T2, RL_X1, dx);
        5'd10:   return mk(OP_MM,  RL_T2, RL_T0, RL_T2);
        default: return mk(OP_SUB, dy,    RL_T2, RL_Y1, lst);
      endcase
    end else begin
      // lambda = x + y / x; x3 = lambda^2 + lambda + a; y3 = lambda (x + x3) + x3 + y
      case (pc)
        5'd0:    return mk(OP_MD,  RL_T0, RL_Y1, RL_X1);
        5'd1:    return mk(OP_ADD, RL_T0, RL_T0, RL_X1);
        5'd2:    return mk(OP_MM,  RL_T1, RL_T0, RL_T0);
        5'd3:    return mk(OP_ADD, RL_T1, RL_T1, RL_T0);
        5'd4:    return mk(OP_ADD, dx,    RL_T1, RL_A);
        5'd5:    return mk(OP_ADD, RL_T1, RL_X1, dx);
        5'd6:    return mk(OP_MM,  RL_T1, RL_T0, RL_T1);
        5'd7:    return mk(OP_ADD, RL_T1, RL_T1, dx);
        default: return mk(OP_ADD, dy,    RL_T1, RL_Y1, lst);
      endcase
    end
  endfunction

  // Point addition body with second y operand y2r (Y2, or T3 holding -Y2).
  function automatic ftask_t add_task(field_e f, logic [4:0] pc, role_e y2r);
    if (f == FLD_P) begin
      // lambda = (y1 - y2) / (x1 - x2); x3 = lambda^2 - x1 - x2; y3 = lambda (x2 - x3) - y2
      case (pc)
        5'd0:    return mk(OP_SUB, RL_T0, RL_Y1, y2r);
        5'd1:    return mk(OP_SUB, RL_T1, RL_X1, RL_X2);
        5'd2:    return mk(OP_MD,  RL_T0, RL_T0, RL_T1);
        5'd3:    return mk(OP_MM,  RL_T1, RL_T0, RL_T0);
        5'd4:    return mk(OP_SUB, RL_T1, RL_T1, RL_X1);
        5'd5:    return mk(OP_SUB, RL_X3, RL_T1, RL_X2);
        5'd6:    return mk(OP_SUB, RL_T1, RL_X2, RL_X3);
        5'd7:    return mk(OP_MM,  RL_T1, RL_T0, RL_T1);
        default: return mk(OP_SUB, RL_Y3, RL_T1, y2r, 1'b1);
      endcase
    end else begin
      // lambda = (y1 + y2) / (x1 + x2); x3 = lambda^2 + lambda + x1 + x2 + a;
      // y3 = lambda (x2 + x3) + x3 + y2
      case (pc)
        5'd0:    return mk(OP_ADD, RL_T0, RL_Y1, y2r);
        5'd1:    return mk(OP_ADD, RL_T1, RL_X1, RL_X2);
        5'd2:    return mk(OP_MD,  RL_T0, RL_T0, RL_T1);
        5'd3:    return mk(OP_MM,  RL_T2, RL_T0, RL_T0);
        5'd4:    return mk(OP_ADD, RL_T2, RL_T2, RL_T0);
        5'd5:    return mk(OP_ADD, RL_T2, RL_T2, RL_T1);
        5'd6:    return mk(OP_ADD, RL_X3, RL_T2, RL_A);
        5'd7:    return mk(OP_ADD, RL_T1, RL_X2, RL_X3);
        5'd8:    return mk(OP_MM,  RL_T1, RL_T0, RL_T1);
        5'd9:    return mk(OP_ADD, RL_T1, RL_T1, RL_X3);
        default: return mk(OP_ADD, RL_Y3, RL_T1, y2r, 1'b1);
      endcase
    end
  endfunction

  // Task pc of program pg over field f.
  function automatic ftask_t prog_task(field_e f, prog_e pg, logic [4:0] pc);
    logic [4:0] nd;
    nd = (f == FLD_P) ? 5'd12 : 5'd9;   // length of the doubling body
    case (pg)
      PG_CONV: begin
        case (pc)
          5'd0:    return mk(OP_MD, RL_X3, RL_X1, RL_ONE);
          5'd1:    return mk(OP_MD, RL_Y3, RL_Y1, RL_ONE);
          default: return mk(OP_MD, RL_A,  RL_A,  RL_ONE, 1'b1);
        endcase
      end
      PG_DBL:  return dbl_task(f, pc, RL_X3, RL_Y3, 1'b1);
      PG_ADD:  return add_task(f, pc, RL_Y2);
      PG_ADDNEG: begin
        // -(x, y) is (x, -y) over GF(p) and (x, x + y) over GF(2^m)
        if (pc == 5'd0)
          return (f == FLD_P) ? mk(OP_SUB, RL_T3, RL_ZERO, RL_Y2)
                              : mk(OP_ADD, RL_T3, RL_X2, RL_Y2);
        return add_task(f, pc - 5'd1, RL_T3);
      end
      PG_MOVE: begin
        if (pc == 5'd0) return mk(OP_ADD, RL_X3, RL_X2, RL_ZERO);
        return mk(OP_ADD, RL_Y3, RL_Y2, RL_ZERO, 1'b1);
      end
      PG_POST: begin
        if (pc == 5'd0) return mk(OP_MM, RL_X3, RL_X1, RL_ONE);
        return mk(OP_MM, RL_Y3, RL_Y1, RL_ONE, 1'b1);
      end
      default: begin
        // mask refresh: (T3,T4) = 2 (X1,Y1), then (X1,Y1) = (-1)^alpha (T3,T4)
        if (pc < nd) return dbl_task(f, pc, RL_T3, RL_T4, 1'b0);
        if (pc == nd) return mk(OP_ADD, RL_X1, RL_T3, RL_ZERO);
        if (pg == PG_REF0) return mk(OP_ADD, RL_Y1, RL_T4, RL_ZERO, 1'b1);
        return (f == FLD_P) ? mk(OP_SUB, RL_Y1, RL_ZERO, RL_T4, 1'b1)
                            : mk(OP_ADD, RL_Y1, RL_T4, RL_T3, 1'b1);
      end
    endcase
  endfunction

  // Activity counters of the processor, cumulative since reset.
  typedef struct packed {
    logic [31:0] md_fifo;     // MD tasks queued in the instruction FIFO
    logic [31:0] pe_swaps;    // PE-ID exchanges between the threads
    logic [31:0] sync;        // operand loads from the other PE's result register
    logic [31:0] reuse;       // operand loads from the PE's own result register
    logic [31:0] fetch;       // operand loads from the shared memory
    logic [31:0] store;       // write-through stores
    logic [31:0] moves;       // loop iterations with Q0 at infinity
    logic [31:0] q_swaps;     // Q0 <- Q1 selections
    logic [31:0] task_mas;    // tasks run on the MAS
    logic [31:0] task_gfau;   // tasks run on the GFAU
    logic [31:0] busy_mas;    // cycles the MAS slot was occupied
    logic [31:0] busy_gfau;   // cycles the GFAU slot was occupied
    logic [7:0]  iter;        // current loop iteration (low bits)
  } stats_t;

endpackage
