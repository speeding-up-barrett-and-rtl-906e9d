// gf2m_barrett_mul: digit-serial multiplication in GF(2^n), Z = A*B mod M,
// with Barrett reduction that needs no precomputed value, for field
// polynomials M(x) = x^n + D(x) with deg D <= n - w.
//
// Algorithm: B is consumed one w-bit digit at a time, highest first. Each
// step forms T = Z*x^w + A*B_i (carry-less), takes the quotient as the top
// w coefficients of T, q = floor(T / x^n), and sets Z = T + q*M. Because
// deg D <= n - w, the Barrett constant floor(x^(n+w-1)/M) is x^(w-1) and
// q*M cancels the top of T exactly, so Z keeps degree < n and no final
// correction is needed. One step is done per clock cycle with an n x w and
// a w x (n-w+1) carry-less multiplier (AND/XOR arrays).
//
// The source gives this algorithm but no architecture for it; the
// one-digit-per-cycle datapath is this design's own. The source writes the
// quotient as floor(T/x^(n-1)); this design uses floor(T/x^n), which is the
// value its own derivation (Barrett constant x^(w-1) applied to floor(T/x^n))
// produces and the only one for which Z keeps degree < n.
//
// Interface and timing: `m` holds the coefficients m_(n-1)..m_0 of M (the
// x^n term is implied); bits n-1 .. n-w+1 must be zero. Pulse `start` with
// a, b, m valid; they are registered. `done` pulses NW+1 cycles after the
// start cycle (NW = ceil(n/w)) with the result on `z`, held until the next
// start.
module gf2m_barrett_mul
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
  logic [IW-1:0]  bidx;

  logic [NW*W-1:0] b_pad;
  logic [W-1:0]    b_dig;
  assign b_pad = {{(NW*W-N){1'b0}}, b_r};
  always_comb begin
    b_dig = '0;
    for (int j = 0; j < NW; j++)
      if (bidx == IW'(j)) b_dig = b_pad[j*W +: W];
  end

  // T = Z*x^w + A*B_i ; q = top w coefficients ; Z' = low n of T + q*D.
  logic [N+W-1:0] t;
  logic [W-1:0]   q;
  logic [N+W-1:0] qd;
  logic [N-1:0]   z_next;
  always_comb begin
    t = {z_r, {W{1'b0}}};
    for (int k = 0; k < W; k++)
      if (b_dig[k]) t = t ^ ((N+W)'(a_r) << k);
    q  = t[N+W-1:N];
    qd = '0;
    for (int k = 0; k < W; k++)
      if (q[k]) qd = qd ^ ((N+W)'(m_r) << k);
    z_next = t[N-1:0] ^ qd[N-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run  <= 1'b0;
      a_r  <= '0;
      b_r  <= '0;
      m_r  <= '0;
      z_r  <= '0;
      bidx <= '0;
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
          bidx <= IW'(NW-1);
          run  <= 1'b1;
        end
      end else begin
        z_r  <= z_next;
        bidx <= bidx - 1'b1;
        if (bidx == '0) begin
          z    <= z_next;
          done <= 1'b1;
          run  <= 1'b0;
        end
      end
    end
  end

  assign busy = run;

  // Reduction is exact only when deg D <= n - w.
  if (W > 1) begin : g_chk
    a_delta_deg: assert property (@(posedge clk) disable iff (!rst_n)
      (start && !run) |-> (m[N-1:N-W+1] == '0));
  end

endmodule
