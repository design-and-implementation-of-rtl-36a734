// gf_mult: generic GF(2^M) multiplier, z = a * b mod p(x).
//
// Combinational. Each bit of b selects a copy of a shifted by that bit's
// position; every shift is reduced modulo the field generator polynomial, so
// the result never leaves the field. For M = 8 and p(x) = x^8+x^4+x^3+x^2+1
// this yields the same XOR equations as the classic bit-level derivation
// (partial products a_i b_j plus the reduction terms of the high part).
// Tying b to a constant gives the fixed multipliers used by the syndrome,
// Chien and encoder stages; synthesis folds those to small XOR networks.
module gf_mult #(
  parameter int         M    = 8,
  parameter logic [M:0] POLY = 9'h11D
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic [M-1:0] z
);

  always_comb begin
    logic [M:0] t;
    z = '0;
    t = {1'b0, a};
    for (int i = 0; i < M; i++) begin
      if (b[i]) z = z ^ t[M-1:0];
      t = t << 1;
      if (t[M]) t = t ^ POLY;
    end
  end

endmodule
