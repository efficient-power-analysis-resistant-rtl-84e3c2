// gf_addsub: dual-field modular adder/subtractor (combinational).
//
// Over GF(p) it returns (a + b) mod p or (a - b) mod p for operands already
// reduced below p: one add or subtract followed by one conditional correction
// by p. Over GF(2^m) addition and subtraction are both the bitwise XOR.
// This is the ADD/SUB field operation of both processing elements; the paper
// gives its function and a one-cycle latency, the circuit is this design's.
module gf_addsub
  import dfecc_pkg::*;
#(
  parameter int unsigned W = 160          // datapath width (max field length)
) (
  input  field_e         field,
  input  logic           sub,             // 1: a - b, 0: a + b
  input  logic [W:0]     p,               // modulus (GF(p)) or field polynomial (GF(2^m))
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [W-1:0]   y
);
  logic [W+1:0] ext_a, ext_b, ext_p, sum, dif;

  always_comb begin
    ext_a = {2'b00, a};
    ext_b = {2'b00, b};
    ext_p = {1'b0, p};
    sum   = ext_a + ext_b;
    dif   = ext_a - ext_b;
    if (field == FLD_B) begin
      y = a ^ b;
    end else if (!sub) begin
      y = (sum >= ext_p) ? W'(sum - ext_p) : W'(sum);
    end else begin
      y = (ext_a >= ext_b) ? W'(dif) : W'(dif + ext_p);
    end
  end
endmodule
