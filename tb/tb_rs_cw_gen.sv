// tb_rs_cw_gen: the codeword generator passes the message symbol, or the
// selected parity register, to t_out one clock later.
`include "tb_check.svh"
module tb_rs_cw_gen;
  localparam int T = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, sel_parity = 0;
  logic [7:0] data_in = '0, t_out;
  logic [2*T-1:0][7:0] r;
  logic [3:0] par_idx = '0;

  always #5 clk = ~clk;

  rs_cw_gen dut (.clk, .rst, .data_in, .r, .sel_parity, .par_idx, .t_out);

  initial begin
    logic [7:0] exp_v;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    `CHECK(t_out == '0, "reset")
    for (int n = 0; n < 500; n++) begin
      for (int i = 0; i < 2*T; i++) r[i] = 8'($urandom);
      data_in = 8'($urandom); sel_parity = 1'($urandom); par_idx = 4'($urandom);
      exp_v = sel_parity ? r[par_idx] : data_in;
      @(posedge clk); #1;
      `CHECK(t_out == exp_v, $sformatf("sel=%0d idx=%0d got %h exp %h", sel_parity, par_idx, t_out, exp_v))
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
