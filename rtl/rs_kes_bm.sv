// rs_kes_bm: key equation solver, inversion-free Berlekamp-Massey.
//
// From the 2T syndromes S_1..S_2T it finds the error locator Lambda(x) and
// then the error evaluator Omega(x) = Lambda(x) S(x) mod x^2T, where
// S(x) = S_1 + S_2 x + ... + S_2T x^(2T-1).
// Iteration r = 0 .. 2T-1, one per clock:
//   d        = sum_j Lambda_j S_(r+1-j)                 (discrepancy)
//   Lambda  <= gamma*Lambda + d*x*B
//   if d != 0 and 2L <= r:  B <= Lambda, L <= r+1-L, gamma <= d
//   else                    B <= x*B
// Then T more clocks reuse the same dot-product unit to form
// Omega_i = sum_{j<=i} Lambda_j S_(i+1-j), i = 0..T-1.
// Lambda and Omega carry the same nonzero scale factor, which cancels in the
// Forney quotient, so no field inversion is needed here.
// Timing: start (one clock) while idle; synd is copied at that edge and may
// change afterwards (the decoder receives the next word meanwhile). done is
// high for one clock, 3T+1 clock edges after the edge that samples start, and
// lambda/omega/deg hold until the next start. deg = L; L > T means the word
// has more errors than the code can correct. The choice of this algorithm
// variant and its schedule belong to this design.
module rs_kes_bm #(
  parameter int         M    = 8,
  parameter logic [M:0] POLY = 9'h11D,
  parameter int         T    = 8
) (
  input  logic                      clk,
  input  logic                      rst_n,    // synchronous, active low
  input  logic                      start,
  input  logic [2*T-1:0][M-1:0]     synd,     // synd[i] = S_(i+1)
  output logic [T:0][M-1:0]         lambda,
  output logic [T-1:0][M-1:0]       omega,
  output logic [$clog2(2*T+1)-1:0]  deg,
  output logic                      done
);

  localparam int LW = $clog2(2*T + 1);
  localparam int RW = $clog2(2*T + 1);

  typedef enum logic [1:0] {K_IDLE, K_ITER, K_OMEGA, K_DONE} kstate_t;

  kstate_t            st;
  logic [2*T-1:0][M-1:0] sreg;  // syndromes copied at start
  logic [RW-1:0]      r;
  logic [T:0][M-1:0]  b;
  logic [M-1:0]       gamma;
  logic [M-1:0]       d;
  logic [T:0][M-1:0]  sterm;    // S_(r+1-j), 0 where r-j < 0
  logic [T:0][M-1:0]  dprod;    // Lambda_j * S_(r+1-j)
  logic [T:0][M-1:0]  gprod;    // gamma * Lambda_j
  logic [T:0][M-1:0]  bprod;    // d * B_(j-1)
  logic [T:0][M-1:0]  bsh;      // x*B

  always_comb begin
    for (int j = 0; j <= T; j++) begin
      if (int'(r) - j >= 0 && int'(r) - j < 2*T) sterm[j] = sreg[int'(r) - j];
      else                                       sterm[j] = '0;
    end
    bsh[0] = '0;
    for (int j = 1; j <= T; j++) bsh[j] = b[j-1];
  end

  for (genvar j = 0; j <= T; j++) begin : g_mul
    gf_mult #(.M(M), .POLY(POLY)) u_d (.a(lambda[j]), .b(sterm[j]), .z(dprod[j]));
    gf_mult #(.M(M), .POLY(POLY)) u_g (.a(lambda[j]), .b(gamma),    .z(gprod[j]));
    gf_mult #(.M(M), .POLY(POLY)) u_b (.a(bsh[j]),    .b(d),        .z(bprod[j]));
  end

  always_comb begin
    d = '0;
    for (int j = 0; j <= T; j++) d = d ^ dprod[j];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st     <= K_IDLE;
      sreg   <= '0;
      r      <= '0;
      lambda <= '0;
      b      <= '0;
      gamma  <= '0;
      omega  <= '0;
      deg    <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        K_IDLE: if (start) begin
          sreg      <= synd;
          lambda    <= '0;
          lambda[0] <= M'(1);
          b         <= '0;
          b[0]      <= M'(1);
          gamma     <= M'(1);
          deg       <= '0;
          omega     <= '0;
          r         <= '0;
          st        <= K_ITER;
        end
        K_ITER: begin
          for (int j = 0; j <= T; j++) lambda[j] <= gprod[j] ^ bprod[j];
          if (d != '0 && (2 * int'(deg) <= int'(r))) begin
            b     <= lambda;
            deg   <= LW'(int'(r) + 1 - int'(deg));
            gamma <= d;
          end else begin
            b <= bsh;
          end
          if (r == RW'(2*T - 1)) begin
            r  <= '0;
            st <= K_OMEGA;
          end else begin
            r <= r + 1'b1;
          end
        end
        K_OMEGA: begin
          for (int j = 0; j < T; j++) if (int'(r) == j) omega[j] <= d;
          if (r == RW'(T - 1)) begin
            st   <= K_DONE;
          end else begin
            r <= r + 1'b1;
          end
        end
        K_DONE: begin
          done <= 1'b1;
          r    <= '0;
          st   <= K_IDLE;
        end
        default: st <= K_IDLE;
      endcase
    end
  end

endmodule
