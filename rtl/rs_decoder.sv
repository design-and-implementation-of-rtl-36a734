// rs_decoder: Reed-Solomon decoder, RS(N, N-2T) over GF(2^M).
//
// Data path: recword -> rs_syndrome -> rs_kes_bm -> rs_chien_forney ->
// rs_err_correct -> corr_recword, with the received word held meanwhile in
// rs_srl_fifo (the delay path). Three stages work on different words at the
// same time:
//   receive  start (one clock, while ready) begins a word; the N symbols on
//            the N clocks after start, R(N-1) first, go into the syndrome
//            cells and the FIFO.
//   solve    one clock to check the syndromes, which the solver copies. All
//            zero: the solver and Chien/Forney are skipped and the word is
//            passed through. Otherwise errfound pulses and the key equation
//            solver runs (3T+1 clocks). The result then waits, if need be,
//            until the output stage is free.
//   output   N clocks: Chien/Forney is loaded on entry, the FIFO is read and
//            the error value for the same position is added.
// The solve stage holds one word. A received word whose syndromes it cannot
// take yet stays in the syndrome cells, and ready stays low until it has been
// taken. Otherwise ready is high again on the clock after the last symbol, so
// a new word can start every N + 1 clocks: one word is received while the
// previous one is solved and the one before it is output. The FIFO holds up
// to about two words and a half, so its depth is the next power of two
// above 2N + 1.
// corr_recword carries the N corrected symbols on N consecutive clocks;
// dataoutstart marks the first, dataoutend the last. decode_fail is valid
// together with dataoutend: it is set when the degree of Lambda exceeds T or
// differs from the number of roots found. Because that is known only after
// the last position, a failing word is output with whatever corrections were
// computed.
// Latency from start to dataoutstart, when the output stage is free: N + 2
// clocks for an error-free word, N + 3T + 4 otherwise; longer when the word
// waits for the output stage (an error-free word right behind a word with
// errors). reset is synchronous
// and active low.
// The pin set, the syndrome / key equation / Chien-Forney / delay-FIFO split,
// the three overlapped stages, the zero-syndrome bypass and the
// end-of-word failure flag follow the reference FPGA design; the exact
// hand-over rule, the framing of start and the pulse widths of the flags are
// this design's choices.
module rs_decoder #(
  parameter int         M    = 8,
  parameter logic [M:0] POLY = 9'h11D,
  parameter int         N    = 255,
  parameter int         T    = 8
) (
  input  logic         clock,
  input  logic         reset,          // active low
  input  logic         start,
  input  logic [M-1:0] recword,
  output logic [M-1:0] corr_recword,
  output logic         dataoutstart,
  output logic         dataoutend,
  output logic         ready,
  output logic         errfound,
  output logic         decode_fail
);

  localparam int CW    = $clog2(N + 1);
  localparam int LW    = $clog2(2*T + 1);
  localparam int DEPTH = 1 << $clog2(2*N + 2);

  typedef enum logic [1:0] {SV_EMPTY, SV_CHECK, SV_KES, SV_WAIT} sv_state_t;

  logic                    rst_n;
  // receive stage
  logic                    rx_busy;
  logic [CW-1:0]           rx_cnt;
  logic                    in_valid, first, rx_last;
  logic                    synd_wait;    // received word not yet taken
  // solve stage
  sv_state_t               sv_st;
  logic                    sv_zero, sv_zero_now, sv_rdy, handoff;
  // output stage
  logic                    out_busy;
  logic [CW-1:0]           out_cnt;
  logic                    out_en, out_first, out_last, out_free;
  logic                    zero_q;
  logic [LW-1:0]           deg_q;

  logic [2*T-1:0][M-1:0]   synd;
  logic                    synd_zero;
  logic                    kes_start, kes_done;
  logic [T:0][M-1:0]       lambda;
  logic [T-1:0][M-1:0]     omega;
  logic [LW-1:0]           deg;
  logic                    cf_load, cf_step;
  logic [M-1:0]            err_val, e_sym;
  logic                    is_root;
  logic [CW-1:0]           root_cnt;
  logic [M-1:0]            fifo_out;
  logic                    fail_now;
  logic                    corr_valid;
  logic                    fifo_full, fifo_empty;
  logic [$clog2(DEPTH+1)-1:0] fifo_cnt;

  assign rst_n    = reset;

  assign ready    = !rx_busy && !synd_wait;
  assign in_valid = rx_busy;
  assign first    = rx_busy && (rx_cnt == '0);
  assign rx_last  = rx_busy && (rx_cnt == CW'(N - 1));

  assign kes_start   = (sv_st == SV_CHECK) && !synd_zero;
  assign sv_zero_now = (sv_st == SV_CHECK) ? synd_zero : sv_zero;
  assign sv_rdy      = ((sv_st == SV_CHECK) && synd_zero) ||
                       ((sv_st == SV_KES) && kes_done) ||
                       (sv_st == SV_WAIT);
  assign out_en    = out_busy;
  assign out_first = out_busy && (out_cnt == '0);
  assign out_last  = out_busy && (out_cnt == CW'(N - 1));
  assign out_free  = !out_busy || out_last;
  assign handoff   = sv_rdy && out_free;

  assign cf_load  = handoff && !sv_zero_now;
  assign cf_step  = out_en && !zero_q;
  assign e_sym    = zero_q ? '0 : err_val;

  // Failure: more than T errors indicated, or the locator's degree does not
  // match the number of roots found (counting the last position, evaluated in
  // this cycle).
  assign fail_now = !zero_q &&
                    ((int'(deg_q) > T) ||
                     (int'(deg_q) != int'(root_cnt) + int'(is_root)));

  rs_syndrome #(.M(M), .POLY(POLY), .T(T)) u_synd (
    .clk(clock), .rst_n, .first, .in_valid, .sym(recword), .synd, .zero(synd_zero)
  );

  rs_kes_bm #(.M(M), .POLY(POLY), .T(T)) u_kes (
    .clk(clock), .rst_n, .start(kes_start), .synd, .lambda, .omega, .deg,
    .done(kes_done)
  );

  rs_chien_forney #(.M(M), .POLY(POLY), .N(N), .T(T)) u_cf (
    .clk(clock), .rst_n, .load(cf_load), .lambda, .omega, .step(cf_step),
    .err_val, .is_root, .root_cnt
  );

  rs_srl_fifo #(.W(M), .DEPTH(DEPTH)) u_fifo (
    .clk(clock), .sinit(!rst_n), .data_in(recword), .wr_en(in_valid),
    .rd_en(out_en), .data_out(fifo_out), .fifo_count(fifo_cnt), .full(fifo_full),
    .empty(fifo_empty)
  );

  rs_err_correct #(.M(M)) u_corr (
    .clk(clock), .rst_n, .in_valid(out_en), .r_sym(fifo_out), .e_sym,
    .c_sym(corr_recword), .out_valid(corr_valid)
  );

  // Receive stage.
  always_ff @(posedge clock) begin
    if (!rst_n) begin
      rx_busy <= 1'b0;
      rx_cnt  <= '0;
    end else if (!rx_busy) begin
      if (start && ready) begin
        rx_busy <= 1'b1;
        rx_cnt  <= '0;
      end
    end else if (rx_last) begin
      rx_busy <= 1'b0;
      rx_cnt  <= '0;
    end else begin
      rx_cnt <= rx_cnt + 1'b1;
    end
  end

  // Solve stage.
  always_ff @(posedge clock) begin
    if (!rst_n) begin
      sv_st     <= SV_EMPTY;
      sv_zero   <= 1'b0;
      synd_wait <= 1'b0;
      errfound  <= 1'b0;
    end else begin
      errfound <= 1'b0;
      if (rx_last && sv_st != SV_EMPTY) synd_wait <= 1'b1;
      unique case (sv_st)
        SV_EMPTY: if (rx_last || synd_wait) begin
          sv_st     <= SV_CHECK;
          synd_wait <= 1'b0;
        end
        SV_CHECK: begin
          sv_zero  <= synd_zero;
          errfound <= !synd_zero;
          if (handoff)        sv_st <= SV_EMPTY;
          else if (synd_zero) sv_st <= SV_WAIT;
          else                sv_st <= SV_KES;
        end
        SV_KES:  if (kes_done) sv_st <= handoff ? SV_EMPTY : SV_WAIT;
        SV_WAIT: if (handoff)  sv_st <= SV_EMPTY;
        default: sv_st <= SV_EMPTY;
      endcase
    end
  end

  // Output stage.
  always_ff @(posedge clock) begin
    if (!rst_n) begin
      out_busy     <= 1'b0;
      out_cnt      <= '0;
      zero_q       <= 1'b0;
      deg_q        <= '0;
      dataoutstart <= 1'b0;
      dataoutend   <= 1'b0;
      decode_fail  <= 1'b0;
    end else begin
      dataoutstart <= out_first;
      dataoutend   <= out_last;
      decode_fail  <= out_last && fail_now;
      if (handoff) begin
        out_busy <= 1'b1;
        out_cnt  <= '0;
        zero_q   <= sv_zero_now;
        deg_q    <= sv_zero_now ? '0 : deg;
      end else if (out_last) begin
        out_busy <= 1'b0;
        out_cnt  <= '0;
      end else if (out_busy) begin
        out_cnt <= out_cnt + 1'b1;
      end
    end
  end

  // The delay path never overflows or underflows, and holds at least the
  // word about to be output when the output stage starts.
  assert property (@(posedge clock) disable iff (!rst_n) in_valid |-> !fifo_full);
  assert property (@(posedge clock) disable iff (!rst_n) out_en |-> !fifo_empty);
  assert property (@(posedge clock) disable iff (!rst_n)
                   out_first |-> (int'(fifo_cnt) >= N));

  // A word is only received while the syndrome cells are free.
  assert property (@(posedge clock) disable iff (!rst_n)
                   rx_last |-> !synd_wait);

  // The corrected symbol stream is exactly the N clocks framed by the flags.
  assert property (@(posedge clock) disable iff (!rst_n)
                   dataoutstart |-> corr_valid);

endmodule
