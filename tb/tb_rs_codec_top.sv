// tb_rs_codec_top: end-to-end test of the codec at its default parameters,
// RS(255,239) over GF(2^8). Each message goes through the encoder (with
// random input gaps on some words), the codeword is corrupted with a chosen
// number of random symbol errors and fed to the decoder, and the decoder
// output is compared with the encoder output. Mechanisms exercised and
// counted (each must occur): error-free pass-through with the solver
// skipped, correction of 1..T errors, decoding failure above T errors,
// encoder input gaps, encoder bypass, a decoder start ignored while busy,
// and overlapped decoding: a run of encoded words fed to the decoder as fast
// as ready allows, so that one word is received while the previous one is
// corrected and output.
`include "tb_check.svh"
module tb_rs_codec_top;
  import tb_rs_model::*;
  localparam int T = 8, N = 255, K = N - 2*T;
  int checks = 0, failures = 0;

  logic clk = 0;
  logic enc_rst = 1, enc_start = 0, enc_enable = 0, enc_bypass = 0;
  logic [7:0] enc_data_in = '0, enc_t_out;
  logic enc_dvalid, enc_g_ready;
  logic [1:0] enc_status;
  logic [2*T-1:0][7:0] enc_q;
  logic dec_reset_n = 0, dec_start = 0;
  logic [7:0] dec_recword = '0, dec_corr_recword;
  logic dec_dataoutstart, dec_dataoutend, dec_ready, dec_errfound, dec_decode_fail;

  int encq[$];
  int n_clean = 0, n_corr = 0, n_fail = 0, n_gap = 0, n_bypass = 0, n_busy_start = 0;
  int n_overlap = 0;
  bit dec_sending = 0, dec_collecting = 0;
  always @(posedge clk) if (dec_sending && dec_collecting) n_overlap <= n_overlap + 1;

  always #5 clk = ~clk;

  rs_codec_top dut (.*);

  always @(posedge clk) if (enc_dvalid) encq.push_back(int'(enc_t_out));

  task automatic encode_msg(const ref int msg[], input bit byp, input bit gaps);
    encq = {};
    enc_bypass = byp; enc_start = 1;
    @(posedge clk); #1 enc_start = 0; enc_bypass = 0;
    for (int i = 0; i < K; i++) begin
      if (gaps && $urandom_range(3) == 0) begin
        enc_enable = 0; n_gap++; @(posedge clk); #1;
      end
      enc_enable = 1; enc_data_in = 8'(msg[i]);
      @(posedge clk); #1;
    end
    enc_enable = 0;
    repeat (2*T + 3) @(posedge clk);
    #1;
  endtask

  task automatic codec_word(int nerr, bit gaps);
    int msg[], cw[], e[], outw[], s[];
    int n_out, n_df, cyc;
    bit ended, same;
    msg = new[K];
    foreach (msg[i]) msg[i] = int'($urandom_range(255));
    encode_msg(msg, 0, gaps);
    `CHECK(encq.size() == N, $sformatf("encoder produced %0d symbols", encq.size()))
    cw = new[N];
    foreach (cw[i]) cw[i] = encq[i];
    syndromes(T, cw, s);
    `CHECK(all_zero(s), "encoder output is a codeword")
    for (int i = 0; i < K; i++) `CHECK(cw[i] == msg[i], "systematic: message unchanged")
    make_errors(N, nerr, e);
    `CHECK(dec_ready, "decoder ready")
    dec_start = 1; @(posedge clk); #1 dec_start = 0;
    for (int i = 0; i < N; i++) begin
      dec_recword = 8'(cw[i] ^ e[i]);
      if (i == 100) begin dec_start = 1; n_busy_start++; end
      @(posedge clk); #1 dec_start = 0;
    end
    outw = new[N];
    n_out = 0; n_df = 0; ended = 0; cyc = 0;
    while (!ended && cyc < 2000) begin
      @(posedge clk); #1 cyc++;
      if (dec_dataoutstart || (n_out > 0 && n_out < N)) begin
        if (n_out < N) outw[n_out] = int'(dec_corr_recword);
        n_out++;
      end
      if (dec_decode_fail) n_df++;
      if (dec_dataoutend) ended = 1;
    end
    @(posedge clk); #1;
    `CHECK(n_out == N, $sformatf("decoder produced %0d symbols", n_out))
    same = 1;
    foreach (cw[i]) if (outw[i] != cw[i]) same = 0;
    if (nerr <= T) begin
      `CHECK(same && n_df == 0, $sformatf("%0d errors: decoded word equals encoded word", nerr))
      if (nerr == 0) n_clean++; else n_corr++;
    end else begin
      syndromes(T, outw, s);
      `CHECK(n_df == 1 || (all_zero(s) && !same), $sformatf("%0d errors: failure reported", nerr))
      if (n_df == 1) n_fail++;
    end
  endtask

  // Encode nw messages, then decode them back to back with the given error
  // counts while a separate process collects and checks the output words.
  task automatic codec_stream(int nerrs[]);
    int nw;
    int cws[][];
    nw = nerrs.size();
    cws = new[nw];
    for (int w = 0; w < nw; w++) begin
      int msg[];
      msg = new[K];
      foreach (msg[i]) msg[i] = int'($urandom_range(255));
      encode_msg(msg, 0, 0);
      cws[w] = new[N];
      foreach (cws[w][i]) cws[w][i] = encq[i];
    end
    fork
      for (int w = 0; w < nw; w++) begin
        int e[];
        make_errors(N, nerrs[w], e);
        while (!dec_ready) begin @(posedge clk); #1; end
        dec_start = 1; @(posedge clk); #1 dec_start = 0;
        dec_sending = 1;
        for (int i = 0; i < N; i++) begin
          dec_recword = 8'(cws[w][i] ^ e[i]);
          @(posedge clk); #1;
        end
        dec_sending = 0;
      end
      for (int w = 0; w < nw; w++) begin
        int outw[];
        int n, guard;
        bit same, df;
        outw = new[N];
        guard = 0;
        while (!dec_dataoutstart && guard < 5000) begin @(posedge clk); #1 guard++; end
        dec_collecting = 1;
        n = 0; df = 0;
        while (n < N) begin
          outw[n] = int'(dec_corr_recword);
          n++;
          if (dec_decode_fail) df = 1;
          if (dec_dataoutend) break;
          @(posedge clk); #1;
        end
        @(posedge clk); #1;
        dec_collecting = 0;
        same = (n == N);
        foreach (outw[i]) if (outw[i] != cws[w][i]) same = 0;
        `CHECK(same && !df, $sformatf("overlapped word %0d (%0d errors) decoded", w, nerrs[w]))
        if (same && !df) begin
          if (nerrs[w] == 0) n_clean++; else n_corr++;
        end
      end
    join
  endtask

  initial begin
    int msg[];
    gf_setup(8, 'h11D);
    repeat (2) @(posedge clk);
    #1 enc_rst = 0; dec_reset_n = 1;
    while (!enc_g_ready) @(posedge clk);
    #1;
    codec_word(0, 0);
    codec_word(1, 1);
    codec_word(T / 2, 0);
    codec_word(T, 1);
    codec_word(T + 1, 0);
    codec_word(T + 4, 0);
    codec_word(0, 1);
    codec_stream('{2, 0, T, 0});
    // bypass: message only, no parity
    msg = new[K];
    foreach (msg[i]) msg[i] = int'($urandom_range(255));
    encode_msg(msg, 1, 0);
    begin
      bit ok;
      ok = (encq.size() == K);
      if (ok) foreach (msg[i]) if (encq[i] != msg[i]) ok = 0;
      `CHECK(ok, $sformatf("bypass passes the message without parity (%0d symbols)", encq.size()))
      if (ok) n_bypass++;
    end
    $display("INFO mechanisms: clean=%0d corrected=%0d failed=%0d gaps=%0d bypass=%0d busy_start=%0d overlap=%0d",
             n_clean, n_corr, n_fail, n_gap, n_bypass, n_busy_start, n_overlap);
    `CHECK(n_clean > 0, "error-free pass-through exercised")
    `CHECK(n_corr > 0, "correction exercised")
    `CHECK(n_fail > 0, "decoding failure exercised")
    `CHECK(n_gap > 0, "encoder input gaps exercised")
    `CHECK(n_bypass > 0, "encoder bypass exercised")
    `CHECK(n_busy_start > 0, "start while busy exercised")
    `CHECK(n_overlap > 0, "overlapped decoding exercised")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
