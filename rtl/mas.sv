// mas: multiplier-adder/subtractor, the reduced processing element.
//
// The MAS performs the field operations other than division, over GF(p) and
// GF(2^m) with run-time field length m <= W:
//   MM  : radix-4 Montgomery multiplication, res = a * b * 2^-m mod p
//   ADD : (a + b) mod p      SUB : (a - b) mod p   (XOR over GF(2^m))
// It has no U register and no division datapath, which is what makes it
// smaller than the GFAU; an MD task is never issued to it (the scheduler moves
// such a task to the GFAU). The paper gives its function and its
// multiplication time, equal to the GFAU's; the structure below, with the same
// registered digit stage in front of the R update as in the GFAU, is this
// design's own so that both units have identical MM timing.
//
// Timing: start is accepted when busy is low. done is high for one cycle,
// 1 cycle after start for ADD/SUB and ceil(m/2) + 2 cycles after start for MM.
// A new start may be given in the done cycle. res holds the result until the
// next start.
module mas
  import dfecc_pkg::*;
#(
  parameter int unsigned W  = 160,
  parameter int unsigned MW = $clog2(W + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  fop_e            op,              // OP_ADD, OP_SUB or OP_MM
  input  field_e          field,
  input  logic [MW-1:0]   m,
  input  logic [W:0]      p,
  input  logic [W-1:0]    a,
  input  logic [W-1:0]    b,
  output logic            busy,
  output logic            done,
  output logic [W-1:0]    res
);
  typedef enum logic [1:0] {M_IDLE, M_RUN, M_DRAIN, M_FIN} st_e;

  st_e           st;
  logic [W-1:0]  v_q, r_q, s_q;
  logic [MW-1:0] left;
  logic          dig_vld, dig_v0, dig_v1, dig_half;
  field_e        fld_q;
  logic [W-1:0]  r_mm, ab_y;
  logic [MW-1:0] mm_iters;

  assign mm_iters = MW'((m + 1'b1) >> 1);

  mm_step #(.W(W)) u_mm (
    .field(fld_q), .p(p), .r(r_q), .s(s_q),
    .v0(dig_v0), .v1(dig_v1), .half(dig_half), .r_n(r_mm)
  );

  gf_addsub #(.W(W)) u_as (
    .field(field), .sub(op == OP_SUB), .p(p), .a(a), .b(b), .y(ab_y)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= M_IDLE;
      v_q      <= '0;
      r_q      <= '0;
      s_q      <= '0;
      left     <= '0;
      dig_vld  <= 1'b0;
      dig_v0   <= 1'b0;
      dig_v1   <= 1'b0;
      dig_half <= 1'b0;
      fld_q    <= FLD_P;
    end else begin
      dig_vld <= 1'b0;
      if (dig_vld) r_q <= r_mm;
      if ((st == M_IDLE || st == M_FIN) && start) begin
        fld_q <= field;
        if (op == OP_MM) begin
          v_q  <= a;
          s_q  <= b;
          r_q  <= '0;
          left <= mm_iters;
          st   <= M_RUN;
        end else begin
          r_q <= ab_y;
          st  <= M_FIN;
        end
      end else begin
        case (st)
          M_RUN: begin
            dig_vld  <= 1'b1;
            dig_v0   <= v_q[0];
            dig_v1   <= v_q[1];
            dig_half <= (left == MW'(1)) && m[0];
            v_q      <= v_q >> 2;
            left     <= left - 1'b1;
            if (left == MW'(1)) st <= M_DRAIN;
          end
          M_DRAIN: st <= M_FIN;
          default: st <= M_IDLE;
        endcase
      end
    end
  end

  assign busy = (st == M_RUN) || (st == M_DRAIN);
  assign done = (st == M_FIN);
  assign res  = r_q;

  // The MAS has no divider.
  a_no_md: assert property (@(posedge clk) disable iff (!rst_n) start |-> op != OP_MD);
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);
endmodule
