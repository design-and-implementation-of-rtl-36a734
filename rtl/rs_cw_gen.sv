// rs_cw_gen: codeword generator of the RS encoder.
//
// Builds the systematic codeword T(x) = data * x^2T + R(x): while the
// control selects the message, the input symbol is copied to the output
// unchanged; during the parity phase the parity register r[par_idx] is
// output (the control counts par_idx from 2T-1 down to 0, highest degree
// first). The output is registered: t_out appears one clock after the
// symbol or index that produced it.
module rs_cw_gen #(
  parameter int M = 8,
  parameter int T = 8
) (
  input  logic                    clk,
  input  logic                    rst,        // synchronous, active high
  input  logic [M-1:0]            data_in,
  input  logic [2*T-1:0][M-1:0]   r,
  input  logic                    sel_parity,
  input  logic [$clog2(2*T)-1:0]  par_idx,
  output logic [M-1:0]            t_out
);

  always_ff @(posedge clk) begin
    if (rst)             t_out <= '0;
    else if (sel_parity) t_out <= r[par_idx];
    else                 t_out <= data_in;
  end

endmodule
