// barrett_modmul: interleaved digit-serial modular multiplier Z = X*Y mod M
// with the shift-only Barrett quotient, for moduli in the sets S1 and S2.
//
// Algorithm: Y is consumed one w-bit digit at a time, most significant first.
// Each step does Z <- Z*2^w + X*Y_i, then subtracts q*M where the quotient
// estimate needs no precomputed reciprocal:
//   M in S1 (M = 2^n - D, D <= floor(2^n/(1+2^a)), a = w+3): q = floor(Z/2^n)
//   M in S2 (M = 2^(n-1) + D, D <= floor(2^(n-1)/(2^(a+1)-1))): q = floor(Z/2^(n-1))
// The estimate may overshoot, so Z is a signed number and can go negative.
// After the last digit at most one subtraction of M or two additions of M
// bring Z into [0, M). The set is recognised from bit n-2 of M (1 for S1,
// 0 for S2, which follows from the set definitions); M must lie in S1 or S2.
//
// Datapath (as in the proposed architecture): pi1 forms X*Y_i with a w x w
// multiplier, pi2 forms q*M with a lambda x lambda multiplier, lambda = w+4,
// and one adder updates the (n+lambda+1)-bit Z register with either result.
// The quotient digit goes straight from the top of Z into pi2, with no
// multiplication by a precomputed value; this is the path the design shortens.
// pi1 works on the next digit of Y while pi2 reduces with the current one.
//
// Choices of this design, not fixed by the source: the sequencing below,
// lambda = w+4 for the quotient digit width (the width the standard Barrett
// design uses; the estimate needs w+3 bits for S1 and w+4 for S2), and doing
// the final correction steps through pi2 with a quotient digit of -1 or +1.
//
// Interface and timing: pulse `start` with x, y, m valid (x, y < m); they are
// registered. `done` pulses for one cycle with the result on `z`, which is
// held until the next start. With NW = ceil(n/w) and NL = ceil(n/lambda), an
// operation takes NW + 2 + (NW-1)*(1 + max(NL+1, NW)) + (k+1)*(NL+2) cycles
// from the start cycle to the done cycle, k being the number of correction
// steps (0..2); for n = 256, w = 32 that is 90 + 10k cycles.
// `corr_adds`/`corr_subs` report the corrections of the last
// operation, `set_s2` which quotient rule was used.
module barrett_modmul
  import modmul_pkg::*;
#(
  parameter int unsigned N = 256,  // modulus width n in bits
  parameter int unsigned W = 32    // digit size w in bits
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  input  logic [N-1:0] m,
  output logic         busy,
  output logic         done,
  output logic [N-1:0] z,
  output logic         set_s2,
  output logic [1:0]   corr_adds,
  output logic [1:0]   corr_subs
);

  localparam int unsigned LAMBDA = W + 4;
  localparam int unsigned NW     = num_digits(N, W);
  localparam int unsigned ZW     = N + LAMBDA + 1;
  localparam int unsigned IW     = (NW > 1) ? $clog2(NW) : 1;

  typedef enum logic [2:0] {S_IDLE, S_P1_GO, S_ADD, S_P2_GO, S_RED, S_CORR} state_e;

  state_e               state;
  logic [N-1:0]         x_r, y_r, m_r;
  logic signed [ZW-1:0] z_r;
  logic [IW-1:0]        yidx;
  logic                 more;       // further Y digits remain after the current one
  logic                 in_corr;    // final correction phase
  logic [LAMBDA-1:0]    q_force;    // +1 or -1 during corrections

  // Operand digit for pi1.
  logic [NW*W-1:0] y_pad;
  logic [W-1:0]    y_dig;
  assign y_pad = {{(NW*W-N){1'b0}}, y_r};
  always_comb begin
    y_dig = '0;
    for (int j = 0; j < NW; j++)
      if (yidx == IW'(j)) y_dig = y_pad[j*W +: W];
  end

  // Quotient estimate: an arithmetic shift of Z, no multiplication.
  logic                     s2;
  logic signed [ZW-1:0]     z_shr;
  logic [LAMBDA-1:0]        q_hat;
  logic [LAMBDA-1:0]        q_dig;
  assign s2    = ~m_r[N-2];
  assign z_shr = s2 ? (z_r >>> (N-1)) : (z_r >>> N);
  assign q_hat = z_shr[LAMBDA-1:0];
  assign q_dig = in_corr ? q_force : q_hat;

  // pi1: X * Y_i, pi2: q * M.
  logic              p1_start, p1_valid, p2_start, p2_valid;
  logic [N+W-1:0]    p1;
  logic [N+LAMBDA-1:0] p2;

  pi_multiplier #(.N(N), .DW(W), .SIGNED_B(1'b0)) u_pi1 (
    .clk, .rst_n, .start(p1_start), .a(x_r), .b(y_dig), .valid(p1_valid), .p(p1)
  );

  pi_multiplier #(.N(N), .DW(LAMBDA), .SIGNED_B(1'b1)) u_pi2 (
    .clk, .rst_n, .start(p2_start), .a(m_r), .b(q_dig), .valid(p2_valid), .p(p2)
  );

  // Z-register adder: shift-and-add the pi1 result or subtract the pi2 result.
  zop_e                 zop;
  logic signed [ZW-1:0] z_next;
  always_comb begin
    unique case (zop)
      ZOP_CLEAR:   z_next = '0;
      ZOP_SHL_ADD: z_next = (z_r <<< W) + $signed(ZW'(p1));
      ZOP_SUB:     z_next = z_r - ZW'($signed(p2));
      default:     z_next = z_r;
    endcase
  end

  logic z_neg, z_ge_m;
  assign z_neg  = z_r[ZW-1];
  assign z_ge_m = !z_neg && (z_r >= $signed(ZW'(m_r)));

  // Controller.
  always_comb begin
    zop      = ZOP_HOLD;
    p1_start = 1'b0;
    p2_start = 1'b0;
    unique case (state)
      S_IDLE:  if (start) zop = ZOP_CLEAR;
      S_P1_GO: p1_start = 1'b1;
      S_ADD:   if (p1_valid) zop = ZOP_SHL_ADD;
      S_P2_GO: begin
        p2_start = 1'b1;
        p1_start = more && !in_corr;
      end
      S_RED:   if (p2_valid) zop = ZOP_SUB;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      x_r       <= '0;
      y_r       <= '0;
      m_r       <= '0;
      z_r       <= '0;
      yidx      <= '0;
      more      <= 1'b0;
      in_corr   <= 1'b0;
      q_force   <= '0;
      done      <= 1'b0;
      z         <= '0;
      corr_adds <= '0;
      corr_subs <= '0;
    end else begin
      z_r  <= z_next;
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          x_r       <= x;
          y_r       <= y;
          m_r       <= m;
          yidx      <= IW'(NW-1);
          in_corr   <= 1'b0;
          corr_adds <= '0;
          corr_subs <= '0;
          state     <= S_P1_GO;
        end
        S_P1_GO: state <= S_ADD;
        S_ADD: if (p1_valid) begin
          more  <= (yidx != '0);
          if (yidx != '0) yidx <= yidx - 1'b1;
          state <= S_P2_GO;
        end
        S_P2_GO: state <= S_RED;
        S_RED: if (p2_valid) begin
          if (in_corr || !more) begin
            in_corr <= 1'b1;
            state   <= S_CORR;
          end else begin
            state   <= S_ADD;
          end
        end
        S_CORR: begin
          if (z_neg) begin
            q_force   <= '1;                 // -1: Z <- Z + M
            corr_adds <= corr_adds + 1'b1;
            state     <= S_P2_GO;
          end else if (z_ge_m) begin
            q_force   <= LAMBDA'(1);         // +1: Z <- Z - M
            corr_subs <= corr_subs + 1'b1;
            state     <= S_P2_GO;
          end else begin
            z     <= z_r[N-1:0];
            done  <= 1'b1;
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy   = (state != S_IDLE);
  assign set_s2 = s2;

  // The quotient estimate must fit the lambda-bit pi2 digit, and the
  // shift by w must not lose significant bits of Z.
  a_q_fits: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_P2_GO && !in_corr) |-> (z_shr == ZW'($signed(q_hat))));
  logic [W:0] z_top;
  assign z_top = z_r[ZW-1:ZW-W-1];
  a_shift_safe: assert property (@(posedge clk) disable iff (!rst_n)
    (zop == ZOP_SHL_ADD) |-> ((&z_top) || !(|z_top)));
  // At most two additions or one subtraction of M at the end.
  a_corr_bound: assert property (@(posedge clk) disable iff (!rst_n)
    (corr_adds <= 2'd2) && (corr_subs <= 2'd1) && !(corr_adds != 0 && corr_subs != 0));

endmodule
