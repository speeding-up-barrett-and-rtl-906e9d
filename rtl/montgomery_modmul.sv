// montgomery_modmul: interleaved digit-serial Montgomery multiplier
// Z = X*Y*r^(-NW) mod M, r = 2^w, for moduli in the sets S3 and S4.
//
// Algorithm: Y is consumed one w-bit digit at a time, least significant
// first. Each step does Z <- Z + X*Y_i, then Z <- (Z + q*M) / 2^w, where the
// quotient digit needs no precomputed M' = -M^-1 mod 2^w:
//   M in S3 (M = D*2^w + 1, M = 1 mod 2^w, M' = -1): q = -Z mod 2^w
//   M in S4 (M = D*2^w - 1, M = -1 mod 2^w, M' = +1): q =  Z mod 2^w
// Z stays below 2M, so one conditional subtraction of M at the end gives the
// result in [0, M). The set is recognised from bit 1 of M (0 for S3, 1 for
// S4; for w = 1 both rules give the same q). M must lie in S3 or S4.
//
// Datapath (as in the proposed architecture): pi1 forms X*Y_i with a w x w
// multiplier, pi2 forms q*M with a lambda x lambda multiplier, lambda = w,
// and one adder updates the (n+lambda+1)-bit Z register. The quotient digit
// goes from the low w bits of Z (negated for S3) straight into pi2. pi1
// works on the next digit of Y while pi2 reduces with the current one.
//
// Choices of this design, not fixed by the source: the sequencing below, the
// divide-by-2^w done as a shift in the Z adder, and the final subtraction
// done through pi2 with a quotient digit of 1.
//
// Interface and timing: pulse `start` with x, y, m valid (x, y < m); they are
// registered. `done` pulses for one cycle with the result on `z`, held until
// the next start. With NW = ceil(n/w), an operation takes
// NW + 2 + NW*(NW+2) + k*(NW+2) cycles from the start cycle to the done cycle,
// k (0 or 1) being the final subtraction, reported on `corr_sub`. `set_s4`
// tells which quotient rule was used.
module montgomery_modmul
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
  output logic         set_s4,
  output logic         corr_sub
);

  localparam int unsigned LAMBDA = W;
  localparam int unsigned NW     = num_digits(N, W);
  localparam int unsigned ZW     = N + LAMBDA + 1;
  localparam int unsigned IW     = (NW > 1) ? $clog2(NW) : 1;

  typedef enum logic [2:0] {S_IDLE, S_P1_GO, S_ADD, S_P2_GO, S_RED, S_CORR} state_e;

  state_e            state;
  logic [N-1:0]      x_r, y_r, m_r;
  logic [ZW-1:0]     z_r;
  logic [IW-1:0]     yidx;
  logic              more;
  logic              in_corr;

  // Operand digit for pi1.
  logic [NW*W-1:0] y_pad;
  logic [W-1:0]    y_dig;
  assign y_pad = {{(NW*W-N){1'b0}}, y_r};
  always_comb begin
    y_dig = '0;
    for (int j = 0; j < NW; j++)
      if (yidx == IW'(j)) y_dig = y_pad[j*W +: W];
  end

  // Quotient digit: the low digit of Z, negated for S3. No multiplication.
  logic              s4;
  logic [W-1:0]      q_mont;
  logic [LAMBDA-1:0] q_dig;
  assign s4     = (W == 1) ? 1'b1 : m_r[(W == 1) ? 0 : 1];
  assign q_mont = s4 ? z_r[W-1:0] : (W'(0) - z_r[W-1:0]);
  assign q_dig  = in_corr ? LAMBDA'(1) : q_mont;

  logic                 p1_start, p1_valid, p2_start, p2_valid;
  logic [N+W-1:0]       p1;
  logic [N+LAMBDA-1:0]  p2;

  pi_multiplier #(.N(N), .DW(W), .SIGNED_B(1'b0)) u_pi1 (
    .clk, .rst_n, .start(p1_start), .a(x_r), .b(y_dig), .valid(p1_valid), .p(p1)
  );

  pi_multiplier #(.N(N), .DW(LAMBDA), .SIGNED_B(1'b0)) u_pi2 (
    .clk, .rst_n, .start(p2_start), .a(m_r), .b(q_dig), .valid(p2_valid), .p(p2)
  );

  // Z-register adder.
  zop_e          zop;
  logic [ZW-1:0] z_sum;
  logic [ZW-1:0] z_next;
  assign z_sum = z_r + ZW'(p2);
  always_comb begin
    unique case (zop)
      ZOP_CLEAR:   z_next = '0;
      ZOP_ADD:     z_next = z_r + ZW'(p1);
      ZOP_ADD_SHR: z_next = z_sum >> W;
      ZOP_SUB:     z_next = z_r - ZW'(p2);
      default:     z_next = z_r;
    endcase
  end

  logic z_ge_m;
  assign z_ge_m = (z_r >= ZW'(m_r));

  // Controller.
  always_comb begin
    zop      = ZOP_HOLD;
    p1_start = 1'b0;
    p2_start = 1'b0;
    unique case (state)
      S_IDLE:  if (start) zop = ZOP_CLEAR;
      S_P1_GO: p1_start = 1'b1;
      S_ADD:   if (p1_valid) zop = ZOP_ADD;
      S_P2_GO: begin
        p2_start = 1'b1;
        p1_start = more && !in_corr;
      end
      S_RED:   if (p2_valid) zop = in_corr ? ZOP_SUB : ZOP_ADD_SHR;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      x_r      <= '0;
      y_r      <= '0;
      m_r      <= '0;
      z_r      <= '0;
      yidx     <= '0;
      more     <= 1'b0;
      in_corr  <= 1'b0;
      done     <= 1'b0;
      z        <= '0;
      corr_sub <= 1'b0;
    end else begin
      z_r  <= z_next;
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          x_r      <= x;
          y_r      <= y;
          m_r      <= m;
          yidx     <= '0;
          in_corr  <= 1'b0;
          corr_sub <= 1'b0;
          state    <= S_P1_GO;
        end
        S_P1_GO: state <= S_ADD;
        S_ADD: if (p1_valid) begin
          more  <= (yidx != IW'(NW-1));
          if (yidx != IW'(NW-1)) yidx <= yidx + 1'b1;
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
          if (z_ge_m && !corr_sub) begin
            corr_sub <= 1'b1;
            state    <= S_P2_GO;
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
  assign set_s4 = s4;

  // The reduction step must leave the low digit zero (exact division by 2^w),
  // and one final subtraction must be enough.
  a_exact_div: assert property (@(posedge clk) disable iff (!rst_n)
    (zop == ZOP_ADD_SHR) |-> (z_sum[W-1:0] == '0));
  a_one_sub: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_CORR && corr_sub) |-> !z_ge_m);

endmodule
