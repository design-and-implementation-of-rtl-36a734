// rs_chien_forney: combined Chien search and Forney error-value block.
//
// Chien search: T+1 stages, stage j holding the term Lambda_j x^j for the
// current trial point x. load (the stage multiplexer) takes the Lambda
// coefficients, pre-scaled so that the first point is x = alpha^-(N-1), i.e.
// the position of the first received symbol; every step multiplies stage j by
// the constant alpha^j, moving one position on (N-1, N-2, ..., 0). The sum of
// all stages is Lambda(x); is_root flags a zero, i.e. an error at the current
// position. root_cnt counts the roots seen on steps since load.
// Forney: the sum of the odd stages is x*Lambda'(x). T more stages evaluate
// x*Omega(x) in the same way (stage j holds Omega_j x^(j+1), stepping by
// alpha^(j+1)). The error value is
//   e = x*Omega(x) * inv(x*Lambda'(x))    when is_root, else 0,
// with inv() a 2^M-entry lookup table computed from p(x) at elaboration.
// err_val and is_root are combinational from the stage registers, so they
// refer to the position the registers currently stand on.
// Positions are visited in received order so the received word only needs a
// first-in first-out delay; this, and the pre-scaling for shortened codes,
// are this design's choices. Requires generator roots alpha^1..alpha^2T.
module rs_chien_forney
  import rs_pkg::*;
#(
  parameter int         M    = 8,
  parameter logic [M:0] POLY = 9'h11D,
  parameter int         N    = 255,
  parameter int         T    = 8
) (
  input  logic                      clk,
  input  logic                      rst_n,    // synchronous, active low
  input  logic                      load,
  input  logic [T:0][M-1:0]         lambda,
  input  logic [T-1:0][M-1:0]       omega,
  input  logic                      step,
  output logic [M-1:0]              err_val,
  output logic                      is_root,
  output logic [$clog2(N+1)-1:0]    root_cnt
);

  localparam int Q  = (1 << M) - 1;
  localparam int E0 = Q - N + 1;      // first trial point alpha^E0 = alpha^-(N-1)
  localparam int CW = $clog2(N + 1);

  logic [T:0][M-1:0]   lr, lr_step, lr_load;
  logic [T-1:0][M-1:0] orr, or_step, or_load;
  logic [M-1:0]        lsum, odd_sum, numer, den_inv, quot;
  logic [M-1:0]        inv_rom [2**M];

  // Inverse lookup table: inv_rom[a] = a^-1 (inv_rom[0] = 0).
  for (genvar a = 0; a < 2**M; a++) begin : g_inv
    localparam logic [M-1:0] INV = M'(gf_inv(gfw_t'(a), M, polyw_t'(POLY)));
    assign inv_rom[a] = INV;
  end

  for (genvar j = 0; j <= T; j++) begin : g_lstage
    localparam logic [M-1:0] SC = M'(gf_pow(j, M, polyw_t'(POLY)));
    localparam logic [M-1:0] LC = M'(gf_pow(j * E0, M, polyw_t'(POLY)));
    gf_mult #(.M(M), .POLY(POLY)) u_step (.a(lr[j]),     .b(SC), .z(lr_step[j]));
    gf_mult #(.M(M), .POLY(POLY)) u_load (.a(lambda[j]), .b(LC), .z(lr_load[j]));
  end

  for (genvar j = 0; j < T; j++) begin : g_ostage
    localparam logic [M-1:0] SC = M'(gf_pow(j + 1, M, polyw_t'(POLY)));
    localparam logic [M-1:0] LC = M'(gf_pow((j + 1) * E0, M, polyw_t'(POLY)));
    gf_mult #(.M(M), .POLY(POLY)) u_step (.a(orr[j]),   .b(SC), .z(or_step[j]));
    gf_mult #(.M(M), .POLY(POLY)) u_load (.a(omega[j]), .b(LC), .z(or_load[j]));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lr       <= '0;
      orr      <= '0;
      root_cnt <= '0;
    end else if (load) begin
      lr       <= lr_load;
      orr      <= or_load;
      root_cnt <= '0;
    end else if (step) begin
      lr  <= lr_step;
      orr <= or_step;
      if (is_root) root_cnt <= root_cnt + CW'(1);
    end
  end

  always_comb begin
    lsum    = '0;
    odd_sum = '0;
    numer   = '0;
    for (int j = 0; j <= T; j++) begin
      lsum = lsum ^ lr[j];
      if (j % 2 == 1) odd_sum = odd_sum ^ lr[j];
    end
    for (int j = 0; j < T; j++) numer = numer ^ orr[j];
  end

  assign is_root = (lsum == '0);
  assign den_inv = inv_rom[odd_sum];

  gf_mult #(.M(M), .POLY(POLY)) u_forney (.a(numer), .b(den_inv), .z(quot));

  assign err_val = is_root ? quot : '0;

endmodule
