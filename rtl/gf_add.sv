// gf_add: GF(2^M) adder. Addition and subtraction in a field of
// characteristic two are both the bitwise XOR of the two symbols, so
// z = a ^ b. Combinational, no latency.
module gf_add #(
  parameter int M = 8
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic [M-1:0] z
);

  assign z = a ^ b;

endmodule
