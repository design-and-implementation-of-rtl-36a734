// rs_codec_top: Reed-Solomon codec, encoder and decoder of the same
// RS(N, N-2T) code over GF(2^M) (default RS(255,239), 8-bit symbols,
// p(x) = x^8+x^4+x^3+x^2+1, t = 8 correctable symbol errors per word).
//
// The two halves are independent, as they would be at the two ends of a
// channel: they share only the clock and the code parameters. The encoder
// (enc_* ports, reset active high) turns K message symbols into an N-symbol
// systematic codeword; the decoder (dec_* ports, reset active low) takes an
// N-symbol received word and outputs the corrected word with status flags.
// See rs_encoder and rs_decoder for the framing and timing of each side.
module rs_codec_top #(
  parameter int         M    = 8,
  parameter logic [M:0] POLY = 9'h11D,
  parameter int         N    = 255,
  parameter int         T    = 8
) (
  input  logic                  clk,
  // encoder
  input  logic                  enc_rst,
  input  logic                  enc_start,
  input  logic                  enc_enable,
  input  logic                  enc_bypass,
  input  logic [M-1:0]          enc_data_in,
  output logic [M-1:0]          enc_t_out,
  output logic                  enc_dvalid,
  output logic [1:0]            enc_status,
  output logic                  enc_g_ready,
  output logic [2*T-1:0][M-1:0] enc_q,
  // decoder
  input  logic                  dec_reset_n,
  input  logic                  dec_start,
  input  logic [M-1:0]          dec_recword,
  output logic [M-1:0]          dec_corr_recword,
  output logic                  dec_dataoutstart,
  output logic                  dec_dataoutend,
  output logic                  dec_ready,
  output logic                  dec_errfound,
  output logic                  dec_decode_fail
);

  rs_encoder #(.M(M), .POLY(POLY), .N(N), .T(T)) u_enc (
    .clk, .rst(enc_rst), .start(enc_start), .enable(enc_enable),
    .bypass(enc_bypass), .data_in(enc_data_in), .t_out(enc_t_out),
    .dvalid(enc_dvalid), .status(enc_status), .g_ready(enc_g_ready), .q(enc_q)
  );

  rs_decoder #(.M(M), .POLY(POLY), .N(N), .T(T)) u_dec (
    .clock(clk), .reset(dec_reset_n), .start(dec_start), .recword(dec_recword),
    .corr_recword(dec_corr_recword), .dataoutstart(dec_dataoutstart),
    .dataoutend(dec_dataoutend), .ready(dec_ready), .errfound(dec_errfound),
    .decode_fail(dec_decode_fail)
  );

endmodule
