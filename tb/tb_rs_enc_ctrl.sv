// tb_rs_enc_ctrl: phase sequencing of the encoder control with a small code
// (N = 15, T = 2, K = 11): clr on start, enc_en only for message symbols,
// message phase waits for enable, 2T parity cycles with par_idx 2T-1..0,
// registered dvalid count per codeword, status values, and bypass (no
// parity phase, no LFSR enable).
`include "tb_check.svh"
module tb_rs_enc_ctrl;
  localparam int N = 15, T = 2, K = N - 2*T;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, enable = 0, bypass = 0, start = 0;
  logic [1:0] status;
  logic dvalid, clr, enc_en, sel_parity;
  logic [1:0] par_idx;

  int n_clr, n_en, n_dv, n_par, n_msgcyc;
  int par_seq[$];

  always #5 clk = ~clk;

  rs_enc_ctrl #(.N(N), .T(T)) dut (.clk, .rst, .enable, .bypass, .start,
    .status, .dvalid, .clr, .enc_en, .sel_parity, .par_idx);

  always @(posedge clk) if (!rst) begin
    if (clr) n_clr++;
    if (enc_en) n_en++;
    if (dvalid) n_dv++;
    if (sel_parity) begin n_par++; par_seq.push_back(int'(par_idx)); end
    if (status == 2'd1) n_msgcyc++;
  end

  task automatic run_word(bit byp, int gaps);
    n_clr = 0; n_en = 0; n_dv = 0; n_par = 0; n_msgcyc = 0; par_seq = {};
    bypass = byp; start = 1;
    @(posedge clk); #1 start = 0; bypass = 0;
    `CHECK(status == 2'd1, "status = message after start")
    for (int i = 0; i < K; i++) begin
      for (int g = 0; g < gaps; g++) begin enable = 0; @(posedge clk); #1; end
      enable = 1; @(posedge clk); #1;
    end
    enable = 0;
    if (!byp) `CHECK(status == 2'd2, "status = parity after K symbols")
    repeat (2*T + 3) @(posedge clk);
    #1;
    `CHECK(status == 2'd0, "status back to idle")
    `CHECK(n_clr == 1, $sformatf("clr pulses %0d", n_clr))
    `CHECK(n_en == (byp ? 0 : K), $sformatf("enc_en cycles %0d", n_en))
    `CHECK(n_msgcyc == K * (gaps + 1), $sformatf("message cycles %0d", n_msgcyc))
    `CHECK(n_par == (byp ? 0 : 2*T), $sformatf("parity cycles %0d", n_par))
    `CHECK(n_dv == (byp ? K : N), $sformatf("dvalid cycles %0d", n_dv))
    if (!byp)
      for (int i = 0; i < 2*T; i++)
        `CHECK(par_seq[i] == 2*T - 1 - i, $sformatf("par_idx[%0d] = %0d", i, par_seq[i]))
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    `CHECK(status == 2'd0 && !dvalid, "idle after reset")
    enable = 1; repeat (3) @(posedge clk); #1 enable = 0;
    `CHECK(status == 2'd0, "enable alone does not start")
    run_word(0, 0);
    run_word(0, 2);
    run_word(1, 1);
    run_word(0, 0);
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
