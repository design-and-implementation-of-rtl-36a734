// tb_rs_decoder: RS(255,239) decoder at its default parameters.
// Words are reference codewords of random messages with 0, 1..T and T+1..T+3
// random symbol errors. First the words are sent one at a time. For each word
// it checks: ready low while receiving and high again once the last symbol is
// in, and a start while receiving ignored; exactly N output symbols framed by dataoutstart
// and dataoutend on consecutive clocks; the corrected word equals the sent
// codeword for up to T errors; errfound pulses once exactly when the word has
// errors; decode_fail only with dataoutend, never for <= T errors, and for
// more than T errors either decode_fail or (rarely) a different valid
// codeword; the start-to-dataoutstart latency (N+2 clocks for an error-free
// word, N+3T+4 with errors).
// Then a stream of words is sent as fast as ready allows, while a separate
// monitor collects the output. It checks every word in order, that reception
// of one word overlapped output of an earlier one, that a new word starts
// every N+1 clocks, and each latency: the values above, or, for an
// error-free word right behind a word with errors, the previous word's
// output start plus N (the output stage is still busy).
`include "tb_check.svh"
module tb_rs_decoder;
  import tb_rs_model::*;
  localparam int T = 8, N = 255, K = N - 2*T;
  int checks = 0, failures = 0;
  logic clock = 0, reset = 0, start = 0;
  logic [7:0] recword = '0, corr_recword;
  logic dataoutstart, dataoutend, ready, errfound, decode_fail;

  int n_corrected = 0, n_clean = 0, n_fail = 0;

  always #5 clock = ~clock;

  rs_decoder dut (.clock, .reset, .start, .recword, .corr_recword,
    .dataoutstart, .dataoutend, .ready, .errfound, .decode_fail);

  task automatic run_word(int nerr);
    int msg[], cw[], e[], rx[], outw[], s[];
    int lat, n_out, n_errf, n_dfail, cyc;
    bit started, ended, ok;
    msg = new[K];
    foreach (msg[i]) msg[i] = int'($urandom_range(255));
    encode(T, msg, cw);
    make_errors(N, nerr, e);
    rx = new[N];
    foreach (rx[i]) rx[i] = cw[i] ^ e[i];
    outw = new[N];
    `CHECK(ready, "ready before start")
    start = 1; @(posedge clock); #1 start = 0;
    for (int i = 0; i < N; i++) begin
      `CHECK(!ready, "not ready while receiving")
      recword = 8'(rx[i]);
      if (i == 5) start = 1;                    // ignored while busy
      @(posedge clock); #1 start = 0;
    end
    `CHECK(ready, "ready again after the last symbol")
    recword = 8'($urandom);
    n_out = 0; n_errf = 0; n_dfail = 0; started = 0; ended = 0; lat = N; cyc = 0;
    while (!ended && cyc < 2000) begin
      @(posedge clock); #1 cyc++;
      if (errfound) n_errf++;
      if (dataoutstart) begin started = 1; lat = N + cyc; end
      if (started) begin
        if (n_out < N) outw[n_out] = int'(corr_recword);
        n_out++;
        if (decode_fail) n_dfail++;
        if (dataoutend) ended = 1;
      end else if (decode_fail) n_dfail++;
      if (started && !ended) `CHECK(ready, "ready while outputting")
    end
    `CHECK(n_out == N, $sformatf("%0d errors: %0d output symbols framed", nerr, n_out))
    `CHECK(n_errf == (nerr > 0 ? 1 : 0), $sformatf("%0d errors: errfound pulses %0d", nerr, n_errf))
    `CHECK(lat == (nerr == 0 ? N + 2 : N + 3*T + 4), $sformatf("%0d errors: latency %0d", nerr, lat))
    @(posedge clock); #1;
    `CHECK(ready, "ready after the word")
    ok = 1;
    foreach (cw[i]) if (outw[i] != cw[i]) ok = 0;
    if (nerr <= T) begin
      `CHECK(ok, $sformatf("%0d errors corrected", nerr))
      `CHECK(n_dfail == 0, $sformatf("%0d errors: no decode_fail", nerr))
      if (nerr == 0) n_clean++; else n_corrected++;
    end else begin
      syndromes(T, outw, s);
      `CHECK(n_dfail == 1 || (all_zero(s) && !ok),
             $sformatf("%0d errors: failure flagged (%0d)", nerr, n_dfail))
      if (n_dfail == 1) n_fail++;
    end
  endtask

  // Streaming test.
  int cyc_now = 0;
  bit sending = 0, collecting = 0;
  int n_overlap = 0;
  always @(posedge clock) begin
    cyc_now <= cyc_now + 1;
    if (sending && collecting) n_overlap <= n_overlap + 1;
  end

  task automatic stream(int nerrs[]);
    int nw;
    int exp_cw[$][];
    int t_start[], t_dos[];
    nw = nerrs.size();
    t_start = new[nw];
    t_dos = new[nw];
    fork
      begin : drive
        for (int w = 0; w < nw; w++) begin
          int msg[], cw[], e[];
          msg = new[K];
          foreach (msg[i]) msg[i] = int'($urandom_range(255));
          encode(T, msg, cw);
          make_errors(N, nerrs[w], e);
          exp_cw.push_back(cw);
          while (!ready) begin @(posedge clock); #1; end
          start = 1; @(posedge clock); #1 start = 0;
          t_start[w] = cyc_now;
          sending = 1;
          for (int i = 0; i < N; i++) begin
            recword = 8'(cw[i] ^ e[i]);
            @(posedge clock); #1;
          end
          sending = 0;
          recword = 8'($urandom);
        end
      end
      begin : monitor
        for (int w = 0; w < nw; w++) begin
          int outw[], s[];
          int n, guard;
          bit ok, dfail;
          outw = new[N];
          guard = 0;
          while (!dataoutstart && guard < 5000) begin @(posedge clock); #1 guard++; end
          t_dos[w] = cyc_now;
          collecting = 1;
          n = 0; dfail = 0;
          while (n < N && guard < 5000) begin
            outw[n] = int'(corr_recword);
            n++;
            if (decode_fail) dfail = 1;
            if (dataoutend) break;
            @(posedge clock); #1;
          end
          `CHECK(n == N && dataoutend, $sformatf("stream word %0d framed (%0d)", w, n))
          @(posedge clock); #1;
          collecting = 0;
          while (exp_cw.size() <= w) begin @(posedge clock); #1; end
          ok = 1;
          foreach (outw[i]) if (outw[i] != exp_cw[w][i]) ok = 0;
          if (nerrs[w] <= T) begin
            `CHECK(ok && !dfail, $sformatf("stream word %0d (%0d errors) corrected", w, nerrs[w]))
          end else begin
            syndromes(T, outw, s);
            `CHECK(dfail || (all_zero(s) && !ok),
                   $sformatf("stream word %0d (%0d errors) flagged", w, nerrs[w]))
          end
        end
      end
    join
    for (int w = 0; w < nw; w++) begin
      int base, lat_exp;
      base = (nerrs[w] == 0) ? N + 2 : N + 3*T + 4;
      lat_exp = base;
      if (w > 0 && t_dos[w-1] + N - t_start[w] > base) lat_exp = t_dos[w-1] + N - t_start[w];
      `CHECK(t_dos[w] - t_start[w] == lat_exp,
             $sformatf("stream word %0d latency %0d, expected %0d", w, t_dos[w] - t_start[w], lat_exp))
      if (w > 0)
        `CHECK(t_start[w] - t_start[w-1] == N + 1,
               $sformatf("stream word %0d start spacing %0d", w, t_start[w] - t_start[w-1]))
    end
  endtask

  initial begin
    gf_setup(8, 'h11D);
    repeat (3) @(posedge clock);
    #1 reset = 1;
    repeat (2) @(posedge clock);
    #1;
    run_word(0);
    for (int n = 1; n <= T; n++) run_word(n);
    run_word(T);
    run_word(0);
    for (int n = 1; n <= 3; n++) run_word(T + n);
    run_word(2);
    stream('{0, 0, 3, T, 0, T + 1, 5, 0, 1, T + 3, 2, 0});
    `CHECK(n_overlap > 0, $sformatf("reception overlapped output on %0d clocks", n_overlap))
    `CHECK(n_clean == 2 && n_corrected == T + 2 && n_fail >= 2,
           $sformatf("cases: clean %0d corrected %0d failed %0d", n_clean, n_corrected, n_fail))
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
