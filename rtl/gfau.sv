// gfau: Galois field arithmetic unit, the full-function processing element.
//
// One unit performs all four field operations over GF(p) and GF(2^m) with a
// run-time field length m <= W and modulus p (for GF(2^m), p is the field
// polynomial of degree m, W+1 bits):
//   MD  : radix-4 Montgomery division, res = a * b^-1 * 2^m mod p
//   MM  : radix-4 Montgomery multiplication, res = a * b * 2^-m mod p
//   ADD : (a + b) mod p      SUB : (a - b) mod p   (XOR over GF(2^m))
//
// Structure. The unit holds the four registers U, V, R, S of the division and
// multiplication algorithms and is split into two pipeline stages, as in the
// paper's figure of the unit: stage 1 updates U and V and decides the case of
// the iteration ("group decision" on U[1:0], V[1:0], the sign of the
// comparison and the counter conditions i = m-1 and i >= m); the decision is
// registered (the "RS state") and stage 2 applies the matching update to R and
// S one cycle later, so both stages work every cycle on successive iterations.
// Stage 2 forms R' = kRr*R - kRs*S and S' = kSs*S - kSr*R with small shifts,
// reduces modulo p (or the field polynomial) and, once i has reached m,
// divides both by 2^t as in step 20 of the division algorithm.
//
// Division. Starting from U = p, V = b, R = 0, S = a, every iteration removes
// one or two factors of 2 (t = 1 or 2) while keeping b*S = a*V*2^i and
// b*R = a*U*2^i (mod p); when V reaches 0, U = 1 and R = a/b * 2^i. The counter
// i stops at m, and after that R and S are divided by 2^t instead, so R ends as
// a/b * 2^m. In the cases with U = 2 mod 4 (resp. V = 2 mod 4) the new U
// (resp. V) is ((U/2) - V)/2 and (V - U/2)/2 (resp. (U - V/2)/2 and
// ((V/2) - U)/2), the forms that keep both invariants. If V reaches 0 while
// i < m, R is doubled until i = m; this fix-up is this design's addition to the
// published algorithm, whose loop ends when V reaches 0. Over GF(2^m) the same
// cases are used with XOR for subtraction; the comparisons are integer
// comparisons of the coefficient vectors, which order by degree first.
//
// Multiplication runs ceil(m/2) radix-4 steps on the digits of a (the last one
// radix-2 when m is odd), one per cycle.
//
// Timing: start is accepted when busy is low. done is high for one cycle,
// 1 cycle after start for ADD/SUB, ceil(m/2) + 2 cycles after start for MM and
// (iterations + fix-up + 3) cycles after start for MD, where the paper quotes
// about 0.66 m iterations on average. A new start may be given in the done
// cycle. res is the R register and holds the result until the next start.
module gfau
  import dfecc_pkg::*;
#(
  parameter int unsigned W  = 160,             // datapath width, 160 in the DF160 chip
  parameter int unsigned MW = $clog2(W + 1)    // width of the field length
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  fop_e            op,
  input  field_e          field,
  input  logic [MW-1:0]   m,                   // field length, 2..W
  input  logic [W:0]      p,
  input  logic [W-1:0]    a,
  input  logic [W-1:0]    b,
  output logic            busy,
  output logic            done,
  output logic [W-1:0]    res
);
  typedef enum logic [2:0] {S1_IDLE, S1_MD, S1_FIX, S1_MM, S1_DRAIN, S1_FIN} st1_e;

  // Decision passed from stage 1 to stage 2.
  typedef struct packed {
    logic       valid;
    logic       mm;      // Montgomery multiplication step
    logic       v0, v1;  // MM digit
    logic       half;    // MM radix-2 step
    logic [1:0] krr;     // R' = (R << krr) - krs*S
    logic [1:0] krs;     // 0: none, 1: S, 2: 2S
    logic [1:0] kss;     // S' = (S << kss) - ksr*R
    logic [1:0] ksr;     // 0: none, 1: R, 2: 2R
    logic [1:0] dv;      // divide R and S by 2^dv afterwards
  } rs_cmd_t;

  st1_e          st;
  logic [W:0]    u_q, v_q;
  logic [W-1:0]  r_q, s_q;
  logic [MW:0]   i_q;
  logic [MW-1:0] mm_left;
  rs_cmd_t       cmd_q;
  field_e        fld_q;

  // ---------------------------------------------------------------- stage 1
  logic [W:0]    u_n, v_n, u_h, v_h;
  logic [1:0]    c, d, t_n;
  rs_cmd_t       dec;
  logic [MW:0]   m_ext;

  function automatic logic [W:0] fsub(logic [W:0] x, logic [W:0] y, field_e f);
    return (f == FLD_B) ? (x ^ y) : (x - y);
  endfunction

  always_comb begin
    u_h   = u_q >> 1;
    v_h   = v_q >> 1;
    c     = u_q[1:0];
    d     = v_q[1:0];
    m_ext = {1'b0, m};
    u_n   = u_q;
    v_n   = v_q;
    t_n   = 2'd2;
    dec   = '0;
    dec.valid = 1'b1;
    if (i_q == m_ext - 1'b1) begin
      dec.krr = 2'd1; dec.kss = 2'd1; t_n = 2'd1;                // R = 2R, S = 2S
    end else if (c == 2'd0) begin
      u_n = u_q >> 2; dec.kss = 2'd2;                            // S = 4S
    end else if (d == 2'd0) begin
      v_n = v_q >> 2; dec.krr = 2'd2;                            // R = 4R
    end else if (c == d) begin
      if (u_q > v_q) begin
        u_n = fsub(u_q, v_q, fld_q) >> 2; dec.krs = 2'd1; dec.kss = 2'd2;   // R = R - S, S = 4S
      end else begin
        v_n = fsub(v_q, u_q, fld_q) >> 2; dec.ksr = 2'd1; dec.krr = 2'd2;   // S = S - R, R = 4R
      end
    end else if (c == 2'd2) begin
      if (u_h > v_q) begin
        u_n = fsub(u_h, v_q, fld_q) >> 1; dec.krs = 2'd2; dec.kss = 2'd2;   // R = R - 2S, S = 4S
      end else begin
        v_n = fsub(v_q, u_h, fld_q) >> 1; u_n = u_h;                        // S = 2S - R, R = 2R
        dec.kss = 2'd1; dec.ksr = 2'd1; dec.krr = 2'd1;
      end
    end else if (d == 2'd2) begin
      if (u_q > v_h) begin
        u_n = fsub(u_q, v_h, fld_q) >> 1; v_n = v_h;                        // R = 2R - S, S = 2S
        dec.krr = 2'd1; dec.krs = 2'd1; dec.kss = 2'd1;
      end else begin
        v_n = fsub(v_h, u_q, fld_q) >> 1; dec.ksr = 2'd2; dec.krr = 2'd2;   // S = S - 2R, R = 4R
      end
    end else begin
      t_n = 2'd1;
      if (u_q > v_q) begin
        u_n = fsub(u_q, v_q, fld_q) >> 1; dec.krs = 2'd1; dec.kss = 2'd1;   // R = R - S, S = 2S
      end else begin
        v_n = fsub(v_q, u_q, fld_q) >> 1; dec.ksr = 2'd1; dec.krr = 2'd1;   // S = S - R, R = 2R
      end
    end
    if (i_q >= m_ext) dec.dv = t_n;
  end

  // ---------------------------------------------------------------- stage 2
  logic signed [W+3:0] rx, sx;
  logic        [W+2:0] rb, sb;
  logic        [W-1:0] r_md, s_md, r_mm, ab_y;

  function automatic logic [W-1:0] red_p(logic signed [W+3:0] x, logic [W:0] pm);
    logic signed [W+3:0] y, p1, p2;
    p1 = signed'({3'b000, pm});
    p2 = p1 <<< 1;
    y  = x;
    if (y < 0)   y = y + p2;
    if (y >= p2) y = y - p2;
    if (y >= p1) y = y - p1;
    return W'(y);
  endfunction

  function automatic logic [W-1:0] half_p(logic [W-1:0] x, logic [W:0] pm);
    logic [W+1:0] y;
    y = {2'b00, x} + (x[0] ? {1'b0, pm} : '0);
    return W'(y >> 1);
  endfunction

  function automatic logic [W-1:0] red_b(logic [W+2:0] x, logic [W:0] pm, logic [MW-1:0] mm);
    logic [W+2:0] y;
    y = x;
    if (y[MW'(mm + 1'b1)]) y = y ^ ({2'b00, pm} << 1);
    if (y[mm])             y = y ^ {2'b00, pm};
    return W'(y);
  endfunction

  function automatic logic [W-1:0] half_b(logic [W-1:0] x, logic [W:0] pm);
    logic [W:0] y;
    y = {1'b0, x} ^ (x[0] ? pm : '0);
    return W'(y >> 1);
  endfunction

  always_comb begin
    rx = (signed'({4'b0000, r_q}) <<< cmd_q.krr)
       - ((cmd_q.krs == 2'd0) ? '0 : (signed'({4'b0000, s_q}) <<< (cmd_q.krs - 2'd1)));
    sx = (signed'({4'b0000, s_q}) <<< cmd_q.kss)
       - ((cmd_q.ksr == 2'd0) ? '0 : (signed'({4'b0000, r_q}) <<< (cmd_q.ksr - 2'd1)));
    rb = ({3'b000, r_q} << cmd_q.krr)
       ^ ((cmd_q.krs == 2'd0) ? '0 : ({3'b000, s_q} << (cmd_q.krs - 2'd1)));
    sb = ({3'b000, s_q} << cmd_q.kss)
       ^ ((cmd_q.ksr == 2'd0) ? '0 : ({3'b000, r_q} << (cmd_q.ksr - 2'd1)));
    if (fld_q == FLD_B) begin
      r_md = red_b(rb, p, m);
      s_md = red_b(sb, p, m);
      if (cmd_q.dv != 2'd0) begin r_md = half_b(r_md, p); s_md = half_b(s_md, p); end
      if (cmd_q.dv == 2'd2) begin r_md = half_b(r_md, p); s_md = half_b(s_md, p); end
    end else begin
      r_md = red_p(rx, p);
      s_md = red_p(sx, p);
      if (cmd_q.dv != 2'd0) begin r_md = half_p(r_md, p); s_md = half_p(s_md, p); end
      if (cmd_q.dv == 2'd2) begin r_md = half_p(r_md, p); s_md = half_p(s_md, p); end
    end
  end

  mm_step #(.W(W)) u_mm (
    .field(fld_q), .p(p), .r(r_q), .s(s_q),
    .v0(cmd_q.v0), .v1(cmd_q.v1), .half(cmd_q.half), .r_n(r_mm)
  );

  gf_addsub #(.W(W)) u_as (
    .field(field), .sub(op == OP_SUB), .p(p), .a(a), .b(b), .y(ab_y)
  );

  // ---------------------------------------------------------------- control
  logic [MW-1:0] mm_iters;
  assign mm_iters = MW'((m + 1'b1) >> 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= S1_IDLE;
      u_q     <= '0;
      v_q     <= '0;
      r_q     <= '0;
      s_q     <= '0;
      i_q     <= '0;
      mm_left <= '0;
      cmd_q   <= '0;
      fld_q   <= FLD_P;
    end else begin
      cmd_q <= '0;
      // stage 2
      if (cmd_q.valid) begin
        if (cmd_q.mm) begin
          r_q <= r_mm;
        end else begin
          r_q <= r_md;
          s_q <= s_md;
        end
      end
      // stage 1
      if ((st == S1_IDLE || st == S1_FIN) && start) begin
          fld_q <= field;
          i_q   <= '0;
          case (op)
            OP_MD: begin
              u_q <= p; v_q <= {1'b0, b}; r_q <= '0; s_q <= a; st <= S1_MD;
            end
            OP_MM: begin
              v_q <= {1'b0, a}; r_q <= '0; s_q <= b; mm_left <= mm_iters; st <= S1_MM;
            end
            default: begin
              r_q <= ab_y; st <= S1_FIN;
            end
          endcase
      end else begin
       case (st)
        S1_MD: begin
          if (v_q == '0) begin
            st <= S1_FIX;
          end else begin
            u_q   <= u_n;
            v_q   <= v_n;
            cmd_q <= dec;
            if (i_q < {1'b0, m}) i_q <= i_q + (MW+1)'(t_n);
          end
        end
        S1_FIX: begin
          // V reached 0 before i reached m: double R until i = m
          if (i_q < {1'b0, m}) begin
            cmd_q       <= '0;
            cmd_q.valid <= 1'b1;
            cmd_q.krr   <= 2'd1;
            cmd_q.kss   <= 2'd1;
            i_q         <= i_q + 1'b1;
          end else begin
            st <= S1_DRAIN;
          end
        end
        S1_MM: begin
          cmd_q       <= '0;
          cmd_q.valid <= 1'b1;
          cmd_q.mm    <= 1'b1;
          cmd_q.v0    <= v_q[0];
          cmd_q.v1    <= v_q[1];
          cmd_q.half  <= (mm_left == MW'(1)) && m[0];
          v_q         <= v_q >> 2;
          mm_left     <= mm_left - 1'b1;
          if (mm_left == MW'(1)) st <= S1_DRAIN;
        end
        S1_DRAIN: st <= S1_FIN;
        default:  st <= S1_IDLE;   // S1_IDLE, S1_FIN
       endcase
      end
    end
  end

  assign busy = (st != S1_IDLE) && (st != S1_FIN);
  assign done = (st == S1_FIN);
  assign res  = r_q;

  // A new operation may only be started while the unit is not busy.
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);
endmodule
