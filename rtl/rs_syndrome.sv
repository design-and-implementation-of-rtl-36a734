// rs_syndrome: syndrome calculator of the RS decoder.
//
// 2T Horner cells run in parallel; cell i (i = 1..2T) evaluates the received
// polynomial at alpha^i:
//   S_i <= S_i * alpha^i + r      for every valid symbol,
// with the accumulation restarted (S_i <= r) on the first symbol. Symbols
// arrive highest degree first (R(n-1) ... R(0)), so after the last one
// S_i = R(alpha^i). The multiplier of each cell is a constant alpha^i
// multiplier. zero flags an all-zero syndrome, i.e. a valid codeword.
// Results are valid the clock after the last symbol and hold until the next
// word starts. One Horner cell per syndrome, all in parallel, as in the
// reference design; the cell computes multiply-then-add so that the result
// is exactly R(alpha^i).
module rs_syndrome
  import rs_pkg::*;
#(
  parameter int         M    = 8,
  parameter logic [M:0] POLY = 9'h11D,
  parameter int         T    = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,     // synchronous, active low
  input  logic                  first,
  input  logic                  in_valid,
  input  logic [M-1:0]          sym,
  output logic [2*T-1:0][M-1:0] synd,      // synd[i-1] = S_i
  output logic                  zero
);

  logic [2*T-1:0][M-1:0] prod;

  for (genvar i = 0; i < 2*T; i++) begin : g_cell
    localparam logic [M-1:0] AI = M'(gf_pow(i + 1, M, polyw_t'(POLY)));
    gf_mult #(.M(M), .POLY(POLY)) u_mul (.a(synd[i]), .b(AI), .z(prod[i]));

    always_ff @(posedge clk) begin
      if (!rst_n)        synd[i] <= '0;
      else if (in_valid) synd[i] <= (first ? '0 : prod[i]) ^ sym;
    end
  end

  assign zero = (synd == '0);

endmodule
