// rs_err_correct: error correction stage of the RS decoder.
//
// Adds (GF addition, XOR) the error value from the Chien/Forney block to the
// received symbol coming out of the delay path, and registers the sum:
// c_sym and out_valid appear one clock after r_sym/e_sym/in_valid.
module rs_err_correct #(
  parameter int M = 8
) (
  input  logic         clk,
  input  logic         rst_n,      // synchronous, active low
  input  logic         in_valid,
  input  logic [M-1:0] r_sym,
  input  logic [M-1:0] e_sym,
  output logic [M-1:0] c_sym,
  output logic         out_valid
);

  logic [M-1:0] sum;

  gf_add #(.M(M)) u_add (.a(r_sym), .b(e_sym), .z(sum));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      c_sym     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) c_sym <= sum;
    end
  end

endmodule
