// rs_srl_fifo: synchronous FIFO in the style of an addressable shift
// register (SRL16 chain), used as the delay path of the received word.
//
// A write shifts every stored word one place up and puts DATA_IN at place 0;
// the address counter points at the oldest word, so it counts up on a write
// and down on a read (both at once: unchanged). data_out is the word at the
// address counter (first-word fall-through: valid whenever empty is low).
// fifo_count is the number of stored words; full and empty are derived from
// it. sinit empties the FIFO synchronously. The pin set and the shift
// register / address counter organisation follow the reference design; the
// depth and fall-through output are this design's choices. A write when full or a read when
// empty is ignored. Depth is a parameter; the decoder uses 512 for
// 255-symbol words (up to two words and a half are in flight).
module rs_srl_fifo #(
  parameter int W     = 8,
  parameter int DEPTH = 256
) (
  input  logic                         clk,
  input  logic                         sinit,
  input  logic [W-1:0]                 data_in,
  input  logic                         wr_en,
  input  logic                         rd_en,
  output logic [W-1:0]                 data_out,
  output logic [$clog2(DEPTH+1)-1:0]   fifo_count,
  output logic                         full,
  output logic                         empty
);

  localparam int CW = $clog2(DEPTH + 1);
  localparam int AW = $clog2(DEPTH);

  logic [W-1:0]  sr [DEPTH];
  logic [CW-1:0] cnt;
  logic          do_wr, do_rd;
  logic [AW-1:0] addr;

  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;

  // Shift register storage, no reset (as an SRL).
  always_ff @(posedge clk) begin
    if (do_wr) begin
      sr[0] <= data_in;
      for (int i = 1; i < DEPTH; i++) sr[i] <= sr[i-1];
    end
  end

  always_ff @(posedge clk) begin
    if (sinit) cnt <= '0;
    else if (do_wr && !do_rd) cnt <= cnt + 1'b1;
    else if (do_rd && !do_wr) cnt <= cnt - 1'b1;
  end

  assign addr       = empty ? '0 : AW'(cnt - 1'b1);
  assign data_out   = sr[addr];
  assign fifo_count = cnt;
  assign full       = (cnt == CW'(DEPTH));
  assign empty      = (cnt == '0);

endmodule
