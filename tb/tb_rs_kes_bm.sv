// tb_rs_kes_bm: key equation solver. For random error patterns of 1..T
// symbols it checks, with the reference tables, that deg = number of errors,
// that Lambda vanishes at the inverse of every error location and
// Lambda(0) != 0, and that the Forney quotient Omega(X^-1)/Lambda'(X^-1)
// reproduces every error value. Also the latency (done 3T+1 clocks after
// start) and that more than T errors give deg > T or a locator whose roots
// do not match. The syndrome inputs are scrambled right after start, so
// the solver must work from its own copy.
`include "tb_check.svh"
module tb_rs_kes_bm;
  import tb_rs_model::*;
  localparam int T = 8, N = 255;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  logic [2*T-1:0][7:0] synd;
  logic [T:0][7:0] lambda;
  logic [T-1:0][7:0] omega;
  logic [4:0] deg;
  logic done;

  always #5 clk = ~clk;

  rs_kes_bm dut (.clk, .rst_n, .start, .synd, .lambda, .omega, .deg, .done);

  task automatic run_case(int nerr);
    int e[], s[], lam[], om[], dl[];
    int lat, nroot;
    bit ok;
    make_errors(N, nerr, e);
    syndromes(T, e, s);            // syndromes of the error word alone
    for (int i = 0; i < 2*T; i++) synd[i] = 8'(s[i]);
    start = 1; @(posedge clk); #1 start = 0;
    for (int i = 0; i < 2*T; i++) synd[i] = 8'($urandom);   // copied at start
    lat = 1;
    while (!done && lat < 200) begin @(posedge clk); #1 lat++; end
    `CHECK(lat == 3*T + 2, $sformatf("latency %0d clocks", lat))
    lam = new[T+1]; om = new[T]; dl = new[T+1];
    foreach (lam[i]) lam[i] = int'(lambda[i]);
    foreach (om[i]) om[i] = int'(omega[i]);
    foreach (dl[i]) dl[i] = (i % 2 == 1) ? lam[i] : 0;   // x*Lambda'(x)
    if (nerr <= T) begin
      `CHECK(int'(deg) == nerr, $sformatf("deg %0d for %0d errors", deg, nerr))
      `CHECK(lam[0] != 0, "Lambda(0) nonzero")
      ok = 1;
      // e[i] is at degree N-1-i; X = alpha^(N-1-i)
      foreach (e[i]) if (e[i] != 0) begin
        int xinv, num, den;
        xinv = pw(-(N - 1 - i));
        if (eval_poly(lam, xinv) != 0) ok = 0;
        num = mul(eval_poly(om, xinv), xinv);           // x*Omega(x)
        den = eval_poly(dl, xinv);                       // x*Lambda'(x)
        if (den == 0 || mul(num, inv(den)) != e[i]) ok = 0;
      end
      `CHECK(ok, $sformatf("%0d errors: roots and Forney values", nerr))
    end else begin
      nroot = 0;
      for (int p = 0; p < N; p++) if (eval_poly(lam, pw(-p)) == 0) nroot++;
      `CHECK(int'(deg) > T || int'(deg) != nroot,
             $sformatf("%0d errors detected as uncorrectable (deg %0d, roots %0d)", nerr, deg, nroot))
    end
    @(posedge clk); #1;
  endtask

  initial begin
    gf_setup(8, 'h11D);
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 1; n <= T; n++) begin run_case(n); run_case(n); end
    for (int n = 0; n < 6; n++) run_case(T + 1 + n % 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
