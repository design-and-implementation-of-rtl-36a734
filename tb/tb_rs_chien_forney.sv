// tb_rs_chien_forney: Chien search and Forney values. The error locator is
// built directly from chosen error positions, Lambda(x) = c * prod(1 + X_k x)
// with a random scale c, and Omega(x) = Lambda(x) S(x) mod x^2T from the
// syndromes of the error pattern (reference tables). After load, the block
// is stepped through all N positions; at each one is_root and err_val must
// equal the error pattern, and root_cnt must end at the number of errors.
// Run for RS(255,239) and for a shortened code (N = 200) in the same field.
`include "tb_check.svh"
module tb_rs_chien_forney;
  import tb_rs_model::*;
  localparam int T = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, load = 0, step = 0;
  logic [T:0][7:0] lambda;
  logic [T-1:0][7:0] omega;
  logic [7:0] ev_a, ev_b;
  logic root_a, root_b;
  logic [7:0] cnt_a;
  logic [7:0] cnt_b;

  always #5 clk = ~clk;

  rs_chien_forney dut_a (.clk, .rst_n, .load, .lambda, .omega, .step,
                         .err_val(ev_a), .is_root(root_a), .root_cnt(cnt_a));
  rs_chien_forney #(.N(200)) dut_b (.clk, .rst_n, .load, .lambda, .omega, .step,
                         .err_val(ev_b), .is_root(root_b), .root_cnt(cnt_b));

  task automatic run_case(int n, int nerr);
    int e[], s[], lam[], om[];
    int c, bad_v, bad_r;
    make_errors(n, nerr, e);
    syndromes(T, e, s);
    c = 1 + int'($urandom_range(254));
    lam = new[T+1];
    foreach (lam[i]) lam[i] = 0;
    lam[0] = c;
    foreach (e[i]) if (e[i] != 0) begin
      int x, nl[];
      x = pw(n - 1 - i);
      nl = new[T+1];
      for (int j = 0; j <= T; j++) nl[j] = lam[j] ^ ((j > 0) ? mul(lam[j-1], x) : 0);
      lam = nl;
    end
    om = new[T];
    for (int i = 0; i < T; i++) begin
      om[i] = 0;
      for (int j = 0; j <= i; j++) om[i] ^= mul(lam[j], s[i-j]);
    end
    for (int j = 0; j <= T; j++) lambda[j] = 8'(lam[j]);
    for (int j = 0; j < T; j++) omega[j] = 8'(om[j]);
    load = 1; @(posedge clk); #1 load = 0;
    bad_v = 0; bad_r = 0;
    for (int i = 0; i < n; i++) begin
      if (n == 255) begin
        if (int'(ev_a) != e[i]) bad_v++;
        if (root_a != (e[i] != 0)) bad_r++;
      end else begin
        if (int'(ev_b) != e[i]) bad_v++;
        if (root_b != (e[i] != 0)) bad_r++;
      end
      step = 1; @(posedge clk); #1 step = 0;
    end
    `CHECK(bad_v == 0, $sformatf("N=%0d %0d errors: %0d wrong error values", n, nerr, bad_v))
    `CHECK(bad_r == 0, $sformatf("N=%0d %0d errors: %0d wrong root flags", n, nerr, bad_r))
    if (n == 255) `CHECK(int'(cnt_a) == nerr, $sformatf("root count %0d", cnt_a))
    else          `CHECK(int'(cnt_b) == nerr, $sformatf("root count %0d", cnt_b))
  endtask

  initial begin
    gf_setup(8, 'h11D);
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n <= T; n++) run_case(255, n);
    for (int n = 1; n <= T; n += 3) run_case(200, n);
    run_case(255, T);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
