// tb_gf_mult: exhaustive check of the GF(2^8) multiplier against log/antilog
// tables (all 65536 operand pairs), then random pairs in GF(2^5) with
// p(x) = x^5 + x^2 + 1.
`include "tb_check.svh"
module tb_gf_mult;
  import tb_rs_model::*;
  int checks = 0, failures = 0;

  logic [7:0] a8, b8, z8;
  logic [4:0] a5, b5, z5;

  gf_mult #(.M(8), .POLY(9'h11D)) dut8 (.a(a8), .b(b8), .z(z8));
  gf_mult #(.M(5), .POLY(6'h25))  dut5 (.a(a5), .b(b5), .z(z5));

  initial begin
    gf_setup(8, 'h11D);
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i); b8 = 8'(j);
        #1;
        `CHECK(int'(z8) == mul(i, j), $sformatf("GF256 %0d*%0d got %0d", i, j, z8))
      end
    gf_setup(5, 'h25);
    for (int i = 0; i < 32; i++)
      for (int j = 0; j < 32; j++) begin
        a5 = 5'(i); b5 = 5'(j);
        #1;
        `CHECK(int'(z5) == mul(i, j), $sformatf("GF32 %0d*%0d got %0d", i, j, z5))
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
