// rs_field_gen: field generator for the encoder.
//
// Holds the field generator polynomial p(x) (output poly, the P(x) bus) and
// steps through the roots of the code generator polynomial,
//   root_i = alpha^(H*(GEN_START+i)),  i = 0, 1, 2, ...
// After reset (or restart) root = alpha^(H*GEN_START); each cycle with step
// high it is multiplied by the constant alpha^H modulo p(x), i.e. a Galois
// LFSR. The code generator consumes one root per cycle.
// GEN_START and H follow the usual convention (1 and 1); the LFSR form of
// the block is this design's own choice.
module rs_field_gen
  import rs_pkg::*;
#(
  parameter int         M         = 8,
  parameter logic [M:0] POLY      = 9'h11D,
  parameter int         GEN_START = 1,
  parameter int         H         = 1
) (
  input  logic         clk,
  input  logic         rst,      // synchronous, active high
  input  logic         restart,  // reload the first root
  input  logic         step,     // advance to the next root
  output logic [M:0]   poly,     // p(x) coefficients
  output logic [M-1:0] root      // current root
);

  localparam logic [M-1:0] FIRST = M'(gf_pow(H * GEN_START, M, polyw_t'(POLY)));
  localparam logic [M-1:0] STEPC = M'(gf_pow(H, M, polyw_t'(POLY)));

  logic [M-1:0] nxt;

  gf_mult #(.M(M), .POLY(POLY)) u_mul (.a(root), .b(STEPC), .z(nxt));

  always_ff @(posedge clk) begin
    if (rst || restart) root <= FIRST;
    else if (step)      root <= nxt;
  end

  assign poly = POLY;

endmodule
