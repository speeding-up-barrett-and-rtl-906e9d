// modmul_top: the four proposed multipliers side by side.
//
// The design offers two integer modular multipliers built on the same
// two-multiplier datapath (pi1 for X*Y_i, pi2 for q*M, one Z adder) and two
// multipliers for binary fields GF(2^n). Each of them avoids the
// precomputed Barrett reciprocal or Montgomery inverse by restricting the
// modulus to a set where that constant is a power of two (or one less), so
// the quotient digit is read directly off the running remainder:
//   barrett   : Z = X*Y mod M,           M in S1 or S2
//   montgomery: Z = X*Y*2^(-w*NW) mod M, M in S3 or S4
//   gf_barrett: Z = A*B mod M(x),        M(x) = x^n + D(x), deg D <= n-w
//   gf_mont   : Z = A*B*x^(-w*NW) mod M(x), M(x) = 1 mod x^w
// The source evaluates the integer units as separate designs; here each unit
// keeps its own start/done handshake and operand ports and they run
// independently on a shared clock and reset. See each unit's header for its
// timing.
module modmul_top #(
  parameter int unsigned N    = 256,  // integer operand / modulus width n
  parameter int unsigned W    = 32,   // integer digit size w
  parameter int unsigned GF_N = 256,  // binary field degree
  parameter int unsigned GF_W = 32    // binary field digit size
) (
  input  logic            clk,
  input  logic            rst_n,
  // Barrett unit (Algorithm of the S1/S2 moduli)
  input  logic            bar_start,
  input  logic [N-1:0]    bar_x,
  input  logic [N-1:0]    bar_y,
  input  logic [N-1:0]    bar_m,
  output logic            bar_busy,
  output logic            bar_done,
  output logic [N-1:0]    bar_z,
  output logic            bar_set_s2,
  output logic [1:0]      bar_corr_adds,
  output logic [1:0]      bar_corr_subs,
  // Montgomery unit (S3/S4 moduli)
  input  logic            mon_start,
  input  logic [N-1:0]    mon_x,
  input  logic [N-1:0]    mon_y,
  input  logic [N-1:0]    mon_m,
  output logic            mon_busy,
  output logic            mon_done,
  output logic [N-1:0]    mon_z,
  output logic            mon_set_s4,
  output logic            mon_corr_sub,
  // GF(2^n) Barrett unit
  input  logic            gfb_start,
  input  logic [GF_N-1:0] gfb_a,
  input  logic [GF_N-1:0] gfb_b,
  input  logic [GF_N-1:0] gfb_m,
  output logic            gfb_busy,
  output logic            gfb_done,
  output logic [GF_N-1:0] gfb_z,
  // GF(2^n) Montgomery unit
  input  logic            gfm_start,
  input  logic [GF_N-1:0] gfm_a,
  input  logic [GF_N-1:0] gfm_b,
  input  logic [GF_N-1:0] gfm_m,
  output logic            gfm_busy,
  output logic            gfm_done,
  output logic [GF_N-1:0] gfm_z
);

  barrett_modmul #(.N(N), .W(W)) u_barrett (
    .clk, .rst_n, .start(bar_start), .x(bar_x), .y(bar_y), .m(bar_m),
    .busy(bar_busy), .done(bar_done), .z(bar_z), .set_s2(bar_set_s2),
    .corr_adds(bar_corr_adds), .corr_subs(bar_corr_subs)
  );

  montgomery_modmul #(.N(N), .W(W)) u_montgomery (
    .clk, .rst_n, .start(mon_start), .x(mon_x), .y(mon_y), .m(mon_m),
    .busy(mon_busy), .done(mon_done), .z(mon_z), .set_s4(mon_set_s4),
    .corr_sub(mon_corr_sub)
  );

  gf2m_barrett_mul #(.N(GF_N), .W(GF_W)) u_gf_barrett (
    .clk, .rst_n, .start(gfb_start), .a(gfb_a), .b(gfb_b), .m(gfb_m),
    .busy(gfb_busy), .done(gfb_done), .z(gfb_z)
  );

  gf2m_montgomery_mul #(.N(GF_N), .W(GF_W)) u_gf_montgomery (
    .clk, .rst_n, .start(gfm_start), .a(gfm_a), .b(gfm_b), .m(gfm_m),
    .busy(gfm_busy), .done(gfm_done), .z(gfm_z)
  );

endmodule
