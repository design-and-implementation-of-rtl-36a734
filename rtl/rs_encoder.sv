// rs_encoder: systematic Reed-Solomon encoder, RS(N, N-2T) over GF(2^M).
//
// Structure (data flows left to right):
//   rs_field_gen -> rs_code_gen -> g(x) -> rs_parity -> R(x) -> rs_cw_gen -> t_out
//                                          rs_enc_ctrl steers parity and cw_gen
// After reset the code generator needs 2T clocks to build g(x) from p(x)
// (g_ready); start is ignored until then. A codeword is started with start,
// then K = N-2T message symbols are presented on data_in with enable high
// (gaps allowed). t_out/dvalid follow one clock later: the K message symbols
// unchanged, then the 2T parity symbols on 2T consecutive clocks. q exposes
// the parity registers (q0..q(2T-1)) directly. Default: RS(255,239), 8-bit
// symbols, p(x) = x^8+x^4+x^3+x^2+1, generator roots alpha^1..alpha^16.
// The block split and the 16-register parity LFSR with its gin/q buses follow
// the reference FPGA design; the hardware generator set-up, the control
// phases and the handshake are this design's own. The field generator's
// p(x) output is informational only and left unconnected here (it is
// reported by lint as an unused signal).
module rs_encoder #(
  parameter int         M         = 8,
  parameter logic [M:0] POLY      = 9'h11D,
  parameter int         N         = 255,
  parameter int         T         = 8,
  parameter int         GEN_START = 1,
  parameter int         H         = 1
) (
  input  logic                  clk,
  input  logic                  rst,       // synchronous, active high
  input  logic                  start,
  input  logic                  enable,
  input  logic                  bypass,
  input  logic [M-1:0]          data_in,
  output logic [M-1:0]          t_out,
  output logic                  dvalid,
  output logic [1:0]            status,
  output logic                  g_ready,
  output logic [2*T-1:0][M-1:0] q
);

  logic [M:0]                  poly;
  logic [M-1:0]                root;
  logic                        step;
  logic [2*T-1:0][M-1:0]       g;
  logic                        clr, enc_en, sel_parity;
  logic [$clog2(2*T)-1:0]      par_idx;

  rs_field_gen #(.M(M), .POLY(POLY), .GEN_START(GEN_START), .H(H)) u_field (
    .clk, .rst, .restart(1'b0), .step, .poly, .root
  );

  rs_code_gen #(.M(M), .POLY(POLY), .T(T)) u_codegen (
    .clk, .rst, .root, .step, .g, .ready(g_ready)
  );

  rs_enc_ctrl #(.N(N), .T(T)) u_ctrl (
    .clk, .rst, .enable, .bypass, .start(start && g_ready), .status, .dvalid,
    .clr, .enc_en, .sel_parity, .par_idx
  );

  rs_parity #(.M(M), .POLY(POLY), .T(T)) u_parity (
    .clk, .rst, .clr, .valid(enc_en), .datain(data_in), .gin(g), .q
  );

  rs_cw_gen #(.M(M), .T(T)) u_cwgen (
    .clk, .rst, .data_in, .r(q), .sel_parity, .par_idx, .t_out
  );

endmodule
