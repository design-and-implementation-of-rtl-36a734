// tb_rs_workloads: the codec run at the code sizes the design is meant for,
// side by side (the reference tables are switched per call, so the
// instances share one simulation):
//   A  RS(31,19) over GF(2^5), p(x) = x^5+x^2+1, t = 6: words with 0, 6 and
//      8 errors, then ten more 8-error words (beyond t, must be flagged);
//   B  RS(255,223) over GF(2^8), t = 16: words with 0, 16 and 17 errors;
//   C  RS(255,191) over GF(2^8), t = 32 (a 64-tap encoder): 0, 32, 33 errors.
// Each word passes through the encoder and the decoder. The simulations
// with more than t errors must raise decode_fail at least once per size.
module tb_rs_workloads;
  logic clk = 0;
  logic done_a, done_b, done_c;
  int ca, fa, xa, cb, fb, xb, cc, fc, xc;
  int checks, failures;

  always #5 clk = ~clk;

  tb_codec_run #(.M(5), .POLY(6'h25), .N(31), .T(6),
                 .NERR0(0), .NERR1(6), .NERR2(8), .EXTRA(10), .NEXTRA(8))
    run_a (.clk, .done(done_a), .checks(ca), .failures(fa), .n_flagged(xa));
  tb_codec_run #(.M(8), .POLY(9'h11D), .N(255), .T(16),
                 .NERR0(0), .NERR1(16), .NERR2(17), .EXTRA(2), .NEXTRA(9))
    run_b (.clk, .done(done_b), .checks(cb), .failures(fb), .n_flagged(xb));
  tb_codec_run #(.M(8), .POLY(9'h11D), .N(255), .T(32),
                 .NERR0(0), .NERR1(32), .NERR2(33), .EXTRA(1), .NEXTRA(20))
    run_c (.clk, .done(done_c), .checks(cc), .failures(fc), .n_flagged(xc));

  initial begin
    wait (done_a && done_b && done_c);
    checks = ca + cb + cc + 3;
    failures = fa + fb + fc;
    if (xa == 0) failures++;
    if (xb == 0) failures++;
    if (xc == 0) failures++;
    $display("INFO flagged words: GF(2^5) t=6 %0d, t=16 %0d, t=32 %0d", xa, xb, xc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    $display("TB_RESULT checks=%0d failures=%0d", ca + cb + cc, fa + fb + fc + 1);
    $finish;
  end
endmodule
