// tb_rs_code_gen: the computed generator coefficients against the product
// of (x + alpha^i) formed with the reference tables, for t = 8 in GF(2^8)
// and t = 6 in GF(2^5); also the 2T-cycle computation time.
`include "tb_check.svh"
module tb_rs_code_gen;
  import tb_rs_model::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic [7:0] root8;
  logic [4:0] root5;
  logic step8, step5, ready8, ready5;
  logic [15:0][7:0] g8;
  logic [11:0][4:0] g5;
  int ridx8, ridx5;

  always #5 clk = ~clk;

  rs_code_gen dut8 (.clk, .rst, .root(root8), .step(step8), .g(g8), .ready(ready8));
  rs_code_gen #(.M(5), .POLY(6'h25), .T(6)) dut5 (.clk, .rst, .root(root5),
      .step(step5), .g(g5), .ready(ready5));

  // Root sources: alpha^(1+i) from the reference model (separate fields).
  int e8[0:300], e5[0:300];
  always_ff @(posedge clk) begin
    if (rst) begin ridx8 <= 0; ridx5 <= 0; end
    else begin
      if (step8) ridx8 <= ridx8 + 1;
      if (step5) ridx5 <= ridx5 + 1;
    end
  end
  assign root8 = 8'(e8[ridx8]);
  assign root5 = 5'(e5[ridx5]);

  initial begin
    int g[];
    int cyc;
    gf_setup(5, 'h25);
    for (int i = 0; i < 300; i++) e5[i] = pw(1 + i);
    gf_setup(8, 'h11D);
    for (int i = 0; i < 300; i++) e8[i] = pw(1 + i);
    repeat (2) @(posedge clk);
    #1 rst = 0;
    cyc = 0;
    while (!ready8) begin @(posedge clk); #1 cyc++; end
    `CHECK(cyc == 16, $sformatf("GF256 t=8 ready after %0d cycles", cyc))
    gen_poly(8, 1, g);
    for (int i = 0; i < 16; i++)
      `CHECK(int'(g8[i]) == g[i], $sformatf("g%0d = %h, expected %h", i, g8[i], g[i]))
    `CHECK(g[16] == 1, "reference generator is monic")
    repeat (20) @(posedge clk);
    #1;
    for (int i = 0; i < 16; i++)
      `CHECK(int'(g8[i]) == g[i], $sformatf("g%0d held", i))
    `CHECK(ready5, "GF32 ready")
    gf_setup(5, 'h25);
    gen_poly(6, 1, g);
    for (int i = 0; i < 12; i++)
      `CHECK(int'(g5[i]) == g[i], $sformatf("GF32 g%0d = %h, expected %h", i, g5[i], g[i]))
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
