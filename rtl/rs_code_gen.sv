// rs_code_gen: code generator coefficients g0..g(2T-1).
//
// Computes g(x) = prod_{i=0}^{2T-1} (x + root_i) after reset, one factor per
// clock, with 2T parallel GF multipliers:
//   g_new[j] = g[j-1] + root * g[j]      (g[-1] = 0)
// starting from g(x) = 1. The roots come from rs_field_gen, which this block
// advances with step. 2T cycles after reset ready rises and g holds the
// coefficients; g(2T) = 1 is implicit (monic generator) and not output.
// Computing the table in hardware rather than storing hand-derived values is
// this design's choice; the result is the same constant set.
module rs_code_gen #(
  parameter int         M    = 8,
  parameter logic [M:0] POLY = 9'h11D,
  parameter int         T    = 8
) (
  input  logic                    clk,
  input  logic                    rst,    // synchronous, active high
  input  logic [M-1:0]            root,   // current root from the field generator
  output logic                    step,   // root consumed this cycle
  output logic [2*T-1:0][M-1:0]   g,      // g0 .. g(2T-1)
  output logic                    ready
);

  localparam int CW = $clog2(2*T + 1);

  logic [2*T:0][M-1:0] gr;     // running product, degree up to 2T
  logic [2*T:0][M-1:0] prod;   // root * gr[j]
  logic [CW-1:0]       cnt;

  for (genvar j = 0; j <= 2*T; j++) begin : g_mul
    gf_mult #(.M(M), .POLY(POLY)) u_mul (.a(gr[j]), .b(root), .z(prod[j]));
  end

  assign step  = !ready;
  assign ready = (cnt == CW'(2*T));

  always_ff @(posedge clk) begin
    if (rst) begin
      gr    <= '0;
      gr[0] <= M'(1);
      cnt   <= '0;
    end else if (!ready) begin
      gr[0] <= prod[0];
      for (int j = 1; j <= 2*T; j++) gr[j] <= gr[j-1] ^ prod[j];
      cnt <= cnt + 1'b1;
    end
  end

  assign g = gr[2*T-1:0];

endmodule
