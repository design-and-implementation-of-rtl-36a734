// tb_rs_field_gen: the root sequence alpha^(H*(GEN_START+i)) after reset and
// after restart, with and without step, for the default field and for
// GEN_START = 0, H = 3.
`include "tb_check.svh"
module tb_rs_field_gen;
  import tb_rs_model::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, restart = 0, step = 0;
  logic [8:0] poly, poly2;
  logic [7:0] root, root2;

  always #5 clk = ~clk;

  rs_field_gen dut (.clk, .rst, .restart, .step, .poly, .root);
  rs_field_gen #(.GEN_START(0), .H(3)) dut2 (.clk, .rst, .restart, .step,
                                             .poly(poly2), .root(root2));

  initial begin
    gf_setup(8, 'h11D);
    @(posedge clk); @(posedge clk); #1 rst = 0;
    `CHECK(poly == 9'h11D, "poly output")
    `CHECK(int'(root) == pw(1), "first root alpha^1")
    `CHECK(int'(root2) == pw(0), "first root alpha^0 (GEN_START=0)")
    for (int i = 0; i < 300; i++) begin
      step = (i % 5 != 3);
      @(posedge clk); #1;
    end
    step = 0;
    // 300 cycles, 60 without step -> 240 steps
    `CHECK(int'(root) == pw(1 + 240), "root after 240 steps")
    `CHECK(int'(root2) == pw(3 * 240), "root (H=3) after 240 steps")
    restart = 1; @(posedge clk); #1 restart = 0;
    `CHECK(int'(root) == pw(1), "restart reloads first root")
    for (int i = 0; i < 20; i++) begin
      step = 1; @(posedge clk); #1;
      `CHECK(int'(root) == pw(2 + i), $sformatf("root %0d", i + 1))
      `CHECK(int'(root2) == pw(3 * (i + 1)), $sformatf("root2 %0d", i + 1))
    end
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
