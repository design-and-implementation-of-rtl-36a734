// tb_rs_encoder: RS(255,239) encoder at its default parameters. Checks the
// generator set-up time (2T clocks), each output codeword against the
// reference encoder and against the code property (all 2T syndromes zero),
// the one-clock latency of message symbols, the 2T consecutive parity
// clocks, operation with input gaps, and bypass (message only, no parity).
`include "tb_check.svh"
module tb_rs_encoder;
  import tb_rs_model::*;
  localparam int T = 8, N = 255, K = N - 2*T;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, start = 0, enable = 0, bypass = 0;
  logic [7:0] data_in = '0, t_out;
  logic dvalid, g_ready;
  logic [1:0] status;
  logic [2*T-1:0][7:0] q;

  int outq[$];
  int out_cyc[$];
  int cyc = 0;

  always #5 clk = ~clk;
  always @(negedge clk) cyc++;   // cycle index, stable around posedge

  rs_encoder dut (.clk, .rst, .start, .enable, .bypass, .data_in, .t_out,
                  .dvalid, .status, .g_ready, .q);

  always @(posedge clk) if (dvalid) begin
    outq.push_back(int'(t_out));
    out_cyc.push_back(cyc);
  end

  task automatic encode_word(int w, bit byp, int gapmod);
    int msg[], cw[], s[];
    int in_cyc[$];
    msg = new[K];
    foreach (msg[i]) msg[i] = int'($urandom_range(255));
    encode(T, msg, cw);
    outq = {}; out_cyc = {};
    bypass = byp; start = 1;
    @(posedge clk); #1 start = 0; bypass = 0;
    for (int i = 0; i < K; i++) begin
      if (gapmod != 0) while ($urandom_range(gapmod) == 0) begin
        enable = 0; @(posedge clk); #1;
      end
      enable = 1; data_in = 8'(msg[i]);
      in_cyc.push_back(cyc);
      @(posedge clk); #1;
    end
    enable = 0;
    repeat (2*T + 3) @(posedge clk);
    #1;
    `CHECK(outq.size() == (byp ? K : N), $sformatf("word %0d: %0d output symbols", w, outq.size()))
    if (outq.size() == (byp ? K : N)) begin
      bit ok = 1;
      for (int i = 0; i < outq.size(); i++) if (outq[i] != cw[i]) ok = 0;
      `CHECK(ok, $sformatf("word %0d matches reference codeword", w))
      // a symbol driven in cycle c is sampled at the end of c; t_out shows it
      // in c+1 and the monitor samples it at the end of c+1
      ok = 1;
      for (int i = 0; i < K; i++) if (out_cyc[i] != in_cyc[i] + 2) ok = 0;
      `CHECK(ok, $sformatf("word %0d: message latency one clock", w))
      if (!byp) begin
        int w_arr[];
        w_arr = new[N];
        foreach (w_arr[i]) w_arr[i] = outq[i];
        syndromes(T, w_arr, s);
        `CHECK(all_zero(s), $sformatf("word %0d: codeword has zero syndromes", w))
        `CHECK(out_cyc[N-1] - out_cyc[K] == 2*T - 1, "parity on consecutive clocks")
        `CHECK(out_cyc[K] == out_cyc[K-1] + 1, "first parity right after message")
      end
    end
  endtask

  initial begin
    int c;
    gf_setup(8, 'h11D);
    repeat (2) @(posedge clk);
    #1 rst = 0;
    c = 0;
    while (!g_ready) begin @(posedge clk); #1 c++; end
    `CHECK(c == 2*T, $sformatf("generator ready after %0d clocks", c))
    encode_word(0, 0, 0);
    encode_word(1, 0, 3);
    encode_word(2, 1, 0);
    encode_word(3, 0, 0);
    `CHECK(status == 2'd0, "idle at end")
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
