// rs_enc_ctrl: control block of the RS encoder.
//
// Sequences one codeword of N symbols:
//   IDLE : waits for start; on start the parity registers are cleared (clr)
//          and bypass is sampled.
//   MSG  : K = N - 2T message symbols, each accepted when enable is high.
//          They are passed to the codeword generator and, unless bypassed,
//          fed to the parity LFSR (enc_en).
//   PAR  : 2T cycles, the codeword generator outputs parity register
//          par_idx = 2T-1 down to 0. Skipped when bypass was set, so a bypassed
//          block is the K message symbols only.
// status shows the phase; dvalid is registered so that it lines up with the
// registered codeword output of rs_cw_gen. The phase structure, the meaning
// of bypass and the status encoding are this design's choices; the block's
// pin names (Clk, Reset, Enable, Bypass, Start, Status, Dvalid) are the
// classic ones.
module rs_enc_ctrl #(
  parameter int N = 255,
  parameter int T = 8
) (
  input  logic                      clk,
  input  logic                      rst,        // synchronous, active high
  input  logic                      enable,
  input  logic                      bypass,
  input  logic                      start,
  output logic [1:0]                status,     // 0 idle, 1 message, 2 parity
  output logic                      dvalid,
  output logic                      clr,
  output logic                      enc_en,
  output logic                      sel_parity,
  output logic [$clog2(2*T)-1:0]    par_idx
);

  localparam int K  = N - 2*T;
  localparam int CW = $clog2(N + 1);
  localparam int PW = $clog2(2*T);

  typedef enum logic [1:0] {S_IDLE = 2'd0, S_MSG = 2'd1, S_PAR = 2'd2} state_t;

  state_t        st;
  logic [CW-1:0] cnt;
  logic          byp;

  assign status     = st;
  assign clr        = (st == S_IDLE) && start;
  assign enc_en     = (st == S_MSG) && enable && !byp;
  assign sel_parity = (st == S_PAR);
  assign par_idx    = PW'(2*T - 1) - PW'(cnt);

  always_ff @(posedge clk) begin
    if (rst) begin
      st     <= S_IDLE;
      cnt    <= '0;
      byp    <= 1'b0;
      dvalid <= 1'b0;
    end else begin
      dvalid <= ((st == S_MSG) && enable) || (st == S_PAR);
      unique case (st)
        S_IDLE: if (start) begin
          st  <= S_MSG;
          cnt <= '0;
          byp <= bypass;
        end
        S_MSG: if (enable) begin
          if (cnt == CW'(K - 1)) begin
            cnt <= '0;
            st  <= byp ? S_IDLE : S_PAR;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_PAR: begin
          if (cnt == CW'(2*T - 1)) begin
            cnt <= '0;
            st  <= S_IDLE;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
