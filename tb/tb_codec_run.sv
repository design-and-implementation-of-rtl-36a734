// tb_codec_run: drives one rs_codec_top instance of a given code through a
// list of words and checks it; used by tb_rs_workloads to run several code
// sizes side by side. For every word the encoder output must equal the
// reference codeword; the decoder must return it unchanged for up to T
// errors (errfound exactly when errors are present), and flag decode_fail
// with dataoutend, or decode to another valid codeword, beyond T errors.
// NERR0..NERR2 give the error counts of the first three words; EXTRA more
// words with NEXTRA errors follow. done rises when all words are through.
module tb_codec_run
  import tb_rs_model::*;
#(
  parameter int         M      = 5,
  parameter logic [M:0] POLY   = 6'h25,
  parameter int         N      = 31,
  parameter int         T      = 6,
  parameter int         NERR0  = 0,
  parameter int         NERR1  = 6,
  parameter int         NERR2  = 8,
  parameter int         EXTRA  = 10,
  parameter int         NEXTRA = 8
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_flagged
);
  localparam int K = N - 2*T;

  logic enc_rst = 1, enc_start = 0, enc_enable = 0, enc_bypass = 0;
  logic [M-1:0] enc_data_in = '0, enc_t_out;
  logic enc_dvalid, enc_g_ready;
  logic [1:0] enc_status;
  logic [2*T-1:0][M-1:0] enc_q;
  logic dec_reset_n = 0, dec_start = 0;
  logic [M-1:0] dec_recword = '0, dec_corr_recword;
  logic dec_dataoutstart, dec_dataoutend, dec_ready, dec_errfound, dec_decode_fail;
  int encq[$];

  rs_codec_top #(.M(M), .POLY(POLY), .N(N), .T(T)) dut (.*);

  always @(posedge clk) if (enc_dvalid) encq.push_back(int'(enc_t_out));

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL RS(%0d,%0d) GF(2^%0d): %s", N, K, M, msg);
    end
  endtask

  task automatic word(int nerr);
    int msg[], cw[], e[], outw[], s[];
    int n_out, n_df, n_ef, cyc;
    bit ended, same;
    gf_setup(M, int'(POLY));
    msg = new[K];
    foreach (msg[i]) msg[i] = int'($urandom_range((1 << M) - 1));
    encq = {};
    enc_start = 1; @(posedge clk); #1 enc_start = 0;
    for (int i = 0; i < K; i++) begin
      enc_enable = 1; enc_data_in = M'(msg[i]); @(posedge clk); #1;
    end
    enc_enable = 0;
    repeat (2*T + 3) @(posedge clk);
    #1;
    gf_setup(M, int'(POLY));
    encode(T, msg, cw);
    same = (encq.size() == N);
    if (same) foreach (cw[i]) if (encq[i] != cw[i]) same = 0;
    check(same, "encoder output equals reference codeword");
    make_errors(N, nerr, e);
    dec_start = 1; @(posedge clk); #1 dec_start = 0;
    for (int i = 0; i < N; i++) begin
      dec_recword = M'(cw[i] ^ e[i]); @(posedge clk); #1;
    end
    outw = new[N];
    n_out = 0; n_df = 0; n_ef = 0; ended = 0; cyc = 0;
    while (!ended && cyc < 4*N + 100) begin
      @(posedge clk); #1 cyc++;
      if (dec_errfound) n_ef++;
      if (dec_dataoutstart || (n_out > 0 && n_out < N)) begin
        if (n_out < N) outw[n_out] = int'(dec_corr_recword);
        n_out++;
      end
      if (dec_decode_fail) begin
        n_df++;
        check(dec_dataoutend, "decode_fail comes with dataoutend");
      end
      if (dec_dataoutend) ended = 1;
    end
    @(posedge clk); #1;
    check(n_out == N, $sformatf("%0d output symbols", n_out));
    check(n_ef == (nerr > 0 ? 1 : 0), "errfound");
    same = 1;
    foreach (cw[i]) if (outw[i] != cw[i]) same = 0;
    gf_setup(M, int'(POLY));
    if (nerr <= T) begin
      check(same && n_df == 0, $sformatf("%0d errors corrected", nerr));
    end else begin
      syndromes(T, outw, s);
      check(n_df == 1 || (all_zero(s) && !same), $sformatf("%0d errors flagged", nerr));
      n_flagged += n_df;
    end
  endtask

  initial begin
    done = 0; checks = 0; failures = 0; n_flagged = 0;
    repeat (2) @(posedge clk);
    #1 enc_rst = 0; dec_reset_n = 1;
    while (!enc_g_ready) @(posedge clk);
    #1;
    word(NERR0);
    word(NERR1);
    word(NERR2);
    for (int i = 0; i < EXTRA; i++) word(NEXTRA);
    done = 1;
  end
endmodule
