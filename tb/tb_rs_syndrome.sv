// tb_rs_syndrome: syndromes of random received words (valid codewords plus
// 0..10 random symbol errors) against direct evaluation R(alpha^i) with the
// reference tables; zero flag; restart on first; hold while in_valid is low.
`include "tb_check.svh"
module tb_rs_syndrome;
  import tb_rs_model::*;
  localparam int T = 8, N = 255, K = N - 2*T;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, first = 0, in_valid = 0;
  logic [7:0] sym = '0;
  logic [2*T-1:0][7:0] synd;
  logic zero;

  always #5 clk = ~clk;

  rs_syndrome dut (.clk, .rst_n, .first, .in_valid, .sym, .synd, .zero);

  initial begin
    int msg[], cw[], e[], s[];
    gf_setup(8, 'h11D);
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int w = 0; w < 12; w++) begin
      msg = new[K];
      foreach (msg[i]) msg[i] = int'($urandom_range(255));
      encode(T, msg, cw);
      make_errors(N, (w < 3) ? 0 : w - 2, e);
      foreach (cw[i]) cw[i] ^= e[i];
      syndromes(T, cw, s);
      for (int i = 0; i < N; i++) begin
        if (i > 0 && $urandom_range(4) == 0) begin
          in_valid = 0; first = 0; sym = 8'($urandom); @(posedge clk); #1;
        end
        in_valid = 1; first = (i == 0); sym = 8'(cw[i]);
        @(posedge clk); #1;
      end
      in_valid = 0; first = 0;
      for (int i = 0; i < 2*T; i++)
        `CHECK(int'(synd[i]) == s[i], $sformatf("word %0d S%0d = %h expected %h", w, i+1, synd[i], s[i]))
      `CHECK(zero == all_zero(s), $sformatf("word %0d zero flag", w))
      repeat (3) @(posedge clk);
      #1;
      `CHECK(int'(synd[0]) == s[0], "held while idle")
    end
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
