// tb_rs_parity: parity registers against the reference long-division
// remainder, for random messages presented with random gaps (valid low),
// then the hold behaviour and clr. Generator coefficients come from the
// reference model.
`include "tb_check.svh"
module tb_rs_parity;
  import tb_rs_model::*;
  localparam int T = 8, N = 255, K = N - 2*T;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, clr = 0, valid = 0;
  logic [7:0] datain = '0;
  logic [2*T-1:0][7:0] gin, q;

  always #5 clk = ~clk;

  rs_parity dut (.clk, .rst, .clr, .valid, .datain, .gin, .q);

  initial begin
    int g[], msg[], cw[];
    gf_setup(8, 'h11D);
    gen_poly(T, 1, g);
    for (int i = 0; i < 2*T; i++) gin[i] = 8'(g[i]);
    repeat (2) @(posedge clk);
    #1 rst = 0;
    `CHECK(q == '0, "reset clears parity")
    for (int w = 0; w < 6; w++) begin
      msg = new[K];
      foreach (msg[i]) msg[i] = (w == 0) ? 0 : int'($urandom_range(255));
      encode(T, msg, cw);
      clr = 1; @(posedge clk); #1 clr = 0;
      `CHECK(q == '0, "clr clears parity")
      for (int i = 0; i < K; i++) begin
        while ($urandom_range(3) == 0) begin
          valid = 0; datain = 8'($urandom); @(posedge clk); #1;
        end
        valid = 1; datain = 8'(msg[i]);
        @(posedge clk); #1;
      end
      valid = 0; datain = 8'($urandom);
      for (int i = 0; i < 2*T; i++)
        `CHECK(int'(q[i]) == cw[N - 1 - i], $sformatf("word %0d q%0d = %h expected %h", w, i, q[i], cw[N-1-i]))
      repeat (3) @(posedge clk);
      #1;
      for (int i = 0; i < 2*T; i++)
        `CHECK(int'(q[i]) == cw[N - 1 - i], $sformatf("word %0d q%0d held", w, i))
    end
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
