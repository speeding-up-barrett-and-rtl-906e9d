// gf2m_montgomery_mul: digit-serial Montgomery multiplication in GF(2^n),
// Z = A*B*x^(-w*NW) mod M, for field polynomials with M(x) = 1 mod x^w,
// i.e. M(x) = x^n + D(x) + 1 with D having no terms below x^w.
//
// Algorithm: A is consumed one w-bit digit at a time, lowest first. Each step
// forms T = Z + A_i*B (carry-less), takes the quotient as the low w
// coefficients of T, q = T mod x^w (M' = M^-1 mod x^w is 1 for such M, so no
// multiplication by M' is needed), and sets Z = (T + q*M) / x^w, which is an
// exact shift because the low w coefficients cancel. Z keeps degree < n, so
// no final correction is needed. One step is done per clock cycle with a
// w x n and a w x (n+1) carry-less multiplier.
//
// The source gives this algorithm but no architecture for it; the
// one-digit-per-cycle datapath is this design's own.
//
// Interface and timing: `m` holds the coefficients m_(n-1)..m_0 of M (the
// x^n term is implied); m_0 must be 1 and m_1..m_(w-1) zero. Pulse `start`
// with a, b, m valid; they are registered. `done` pulses NW+1 cycles after
// the start cycle (NW = ceil(n/w)) with the result on `z`, held until the
// next start.
module gf2m_montgomery_mul
  import modmul_pkg::*;
#(
  parameter int unsigned N = 256,  // field degree n
  parameter int unsigned W = 32    // digit size w
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] m,
  output logic         busy,
  output logic         done,
  output logic [N-1:0] z
);

  localparam int unsigned NW = num_digits(N, W);
  localparam int unsigned IW = (NW > 1) ? $clog2(NW) : 1;

  logic           run;
  logic [N-1:0]   a_r, b_r, m_r, z_r;
  logic [IW-1:0]  aidx;

  logic [NW*W-1:0] a_pad;
  logic [W-1:0]    a_dig;
  assign a_pad = {{(NW*W-N){1'b0}}, a_r};
  always_comb begin
    a_dig = '0;
    for (int j = 0; j < NW; j++)
      if (aidx == IW'(j)) a_dig = a_pad[j*W +: W];
  end

  // T = Z + A_i*B ; q = T mod x^w ; Z' = (T + q*M) / x^w.
  logic [N+W-1:0] t;
  logic [W-1:0]   q;
  logic [N+W-1:0] u;
  logic [N-1:0]   z_next;
  always_comb begin
    t = (N+W)'(z_r);
    for (int k = 0; k < W; k++)
      if (a_dig[k]) t = t ^ ((N+W)'(b_r) << k);
    q = t[W-1:0];
    u = t;
    for (int k = 0; k < W; k++)
      if (q[k]) u = u ^ ((N+W)'({1'b1, m_r}) << k);
    z_next = u[N+W-1:W];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run  <= 1'b0;
      a_r  <= '0;
      b_r  <= '0;
      m_r  <= '0;
      z_r  <= '0;
      aidx <= '0;
      done <= 1'b0;
      z    <= '0;
    end else begin
      done <= 1'b0;
      if (!run) begin
        if (start) begin
          a_r  <= a;
          b_r  <= b;
          m_r  <= m;
          z_r  <= '0;
          aidx <= '0;
          run  <= 1'b1;
        end
      end else begin
        z_r  <= z_next;
        aidx <= aidx + 1'b1;
        if (aidx == IW'(NW-1)) begin
          z    <= z_next;
          done <= 1'b1;
          run  <= 1'b0;
        end
      end
    end
  end

  assign busy = run;

  // The low digit of T + q*M must vanish: M = 1 mod x^w.
  a_exact_div: assert property (@(posedge clk) disable iff (!rst_n)
    run |-> (u[W-1:0] == '0));

endmodule
