// rs_parity: parity computation of the RS encoder (the rs_encode pin set:
// datain, gin0..gin15, valid, q0..q15).
//
// A 2T-stage linear feedback shift register that divides the message
// polynomial by g(x). For every message symbol presented with valid high:
//   fb   = datain + q(2T-1)
//   q0   <= fb * g0
//   qi   <= q(i-1) + fb * gi            (i = 1 .. 2T-1)
// After the K message symbols the registers hold the remainder R(x): q(2T-1)
// is the highest-degree parity symbol. With valid low the registers hold, so
// the parity can be read out in parallel. rst (master reset) and clr (start
// of a new codeword, an addition to the pin set) clear all registers.
// Latency: a symbol sampled at a clock edge is in q after that edge.
module rs_parity #(
  parameter int         M    = 8,
  parameter logic [M:0] POLY = 9'h11D,
  parameter int         T    = 8
) (
  input  logic                  clk,
  input  logic                  rst,     // synchronous, active high
  input  logic                  clr,
  input  logic                  valid,
  input  logic [M-1:0]          datain,
  input  logic [2*T-1:0][M-1:0] gin,
  output logic [2*T-1:0][M-1:0] q
);

  logic [M-1:0]            fb;
  logic [2*T-1:0][M-1:0]   prod;

  assign fb = datain ^ q[2*T-1];

  for (genvar i = 0; i < 2*T; i++) begin : g_tap
    gf_mult #(.M(M), .POLY(POLY)) u_mul (.a(fb), .b(gin[i]), .z(prod[i]));
  end

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      q <= '0;
    end else if (valid) begin
      q[0] <= prod[0];
      for (int i = 1; i < 2*T; i++) q[i] <= q[i-1] ^ prod[i];
    end
  end

endmodule
