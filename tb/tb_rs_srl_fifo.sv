// tb_rs_srl_fifo: the shift-register FIFO against a queue model under random
// reads and writes (including simultaneous ones), filling it to FULL,
// draining it to EMPTY, blocked writes/reads at the limits, and SINIT.
// Uses DEPTH = 16 (one SRL16) to reach the limits quickly.
`include "tb_check.svh"
module tb_rs_srl_fifo;
  localparam int W = 8, DEPTH = 16;
  int checks = 0, failures = 0;
  logic clk = 0, sinit = 1, wr_en = 0, rd_en = 0;
  logic [W-1:0] data_in = '0, data_out;
  logic [4:0] fifo_count;
  logic full, empty;
  int model[$];
  int n_full = 0, n_empty = 0;

  always #5 clk = ~clk;

  rs_srl_fifo #(.W(W), .DEPTH(DEPTH)) dut (.clk, .sinit, .data_in, .wr_en,
    .rd_en, .data_out, .fifo_count, .full, .empty);

  task automatic cycle(bit w, bit r);
    bit dw, dr;
    wr_en = w; rd_en = r; data_in = W'($urandom);
    dw = w && (model.size() < DEPTH);
    dr = r && (model.size() > 0);
    if (dr) `CHECK(int'(data_out) == model[0], $sformatf("read %h expected %h", data_out, model[0]))
    @(posedge clk); #1;
    if (dr) void'(model.pop_front());
    if (dw) model.push_back(int'(data_in));
    `CHECK(int'(fifo_count) == model.size(), $sformatf("count %0d expected %0d", fifo_count, model.size()))
    `CHECK(full == (model.size() == DEPTH), "full flag")
    `CHECK(empty == (model.size() == 0), "empty flag")
    if (full) n_full++;
    if (empty) n_empty++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 sinit = 0;
    `CHECK(empty && fifo_count == 0, "empty after sinit")
    for (int i = 0; i < 20; i++) cycle(1, 0);      // overfill
    for (int i = 0; i < 20; i++) cycle(0, 1);      // overdrain
    for (int i = 0; i < 3000; i++) begin
      int b;
      b = (i / 300) % 3;          // phases biased to write, balanced, read
      cycle($urandom_range(3) >= b, $urandom_range(3) >= 2 - b);
    end
    for (int i = 0; i < 5; i++) cycle(1, 0);
    sinit = 1; @(posedge clk); #1 sinit = 0; model = {};
    `CHECK(empty && fifo_count == 0, "sinit empties")
    `CHECK(n_full > 0 && n_empty > 0, "both limits reached")
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
