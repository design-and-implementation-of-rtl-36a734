// tb_rs_err_correct: corrected symbol = received + error value (bitwise
// modulo-2 sum), one clock later, and out_valid follows in_valid.
`include "tb_check.svh"
module tb_rs_err_correct;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [7:0] r_sym = '0, e_sym = '0, c_sym;

  always #5 clk = ~clk;

  rs_err_correct dut (.clk, .rst_n, .in_valid, .r_sym, .e_sym, .c_sym, .out_valid);

  initial begin
    logic [7:0] exp_c;
    logic exp_v;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    `CHECK(!out_valid && c_sym == 0, "reset")
    for (int n = 0; n < 1000; n++) begin
      r_sym = 8'($urandom); e_sym = (n % 3 == 0) ? 8'h00 : 8'($urandom);
      in_valid = (n % 5 != 4);
      exp_v = in_valid;
      for (int i = 0; i < 8; i++) exp_c[i] = 1'((int'(r_sym[i]) + int'(e_sym[i])) % 2);
      @(posedge clk); #1;
      `CHECK(out_valid == exp_v, "out_valid")
      if (exp_v) `CHECK(c_sym == exp_c, $sformatf("%h + %h got %h", r_sym, e_sym, c_sym))
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
