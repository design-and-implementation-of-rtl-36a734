// tb_gf_add: the GF adder against the polynomial-coefficient sum (each bit
// added modulo 2), plus the identities a + a = 0 and a + 0 = a.
`include "tb_check.svh"
module tb_gf_add;
  int checks = 0, failures = 0;
  logic [7:0] a, b, z;

  gf_add #(.M(8)) dut (.a(a), .b(b), .z(z));

  initial begin
    for (int n = 0; n < 2000; n++) begin
      logic [7:0] exp_z;
      a = 8'($urandom); b = (n % 4 == 0) ? a : 8'($urandom);
      if (n % 7 == 0) b = '0;
      #1;
      for (int i = 0; i < 8; i++) exp_z[i] = 1'((int'(a[i]) + int'(b[i])) % 2);
      `CHECK(z == exp_z, $sformatf("%h + %h got %h", a, b, z))
    end
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
