// mm_step: one iteration of radix-4 Montgomery multiplication (combinational).
//
// Computes R' = (R + v0*S + v1*2S + q*p) / 4, with q in 0..3 chosen so that the
// sum is divisible by 4, i.e. step 4 of the radix-4 MM algorithm; with half=1
// it computes the radix-2 step (R + v0*S + q*p) / 2 used for the last digit of
// an odd field length. Over GF(p) q = -(sum) * p^-1 mod 4, and p^-1 = p mod 4
// for odd p; the result is brought below p by one conditional subtraction
// (the sum is below 7p, so R' is below 7p/4). Over GF(2^m) the additions are
// XORs and q is picked bit by bit so that the two lowest coefficients vanish;
// no final reduction is needed because the degree stays below m.
module mm_step
  import dfecc_pkg::*;
#(
  parameter int unsigned W = 160
) (
  input  field_e         field,
  input  logic [W:0]     p,
  input  logic [W-1:0]   r,
  input  logic [W-1:0]   s,
  input  logic           v0,              // multiplier digit, bit 0
  input  logic           v1,              // multiplier digit, bit 1
  input  logic           half,            // radix-2 step instead of radix-4
  output logic [W-1:0]   r_n
);
  logic [W+3:0] t, tq, pp, u;
  logic [1:0]   q;
  logic [1:0]   qprod;
  logic [W+1:0] bt;

  always_comb begin
    pp    = {3'b000, p};
    t     = {4'b0, r} + (v0 ? {4'b0, s} : '0) + ((v1 && !half) ? {3'b0, s, 1'b0} : '0);
    qprod = (2'b00 - t[1:0]) * p[1:0];   // mod 4
    q     = half ? {1'b0, t[0]} : qprod[1:0];
    tq    = t + (q[0] ? pp : '0) + (q[1] ? (pp << 1) : '0);
    u     = half ? (tq >> 1) : (tq >> 2);
    bt    = {2'b00, r} ^ (v0 ? {2'b00, s} : '0) ^ ((v1 && !half) ? {1'b0, s, 1'b0} : '0);
    if (bt[0]) bt = bt ^ {1'b0, p};
    if (!half && bt[1]) bt = bt ^ {p, 1'b0};
    if (field == FLD_B)
      r_n = half ? W'(bt >> 1) : W'(bt >> 2);
    else
      r_n = (u >= pp) ? W'(u - pp) : W'(u);
  end
endmodule
