// tb_barrett_modmul: self-checking test of the shift-quotient Barrett
// modular multiplier.
//
// Two instances: the default size (n = 256, w = 32) and a small one
// (n = 61, w = 8, where n is not a whole number of digits). Moduli are drawn
// at random from S1 (M = 2^n - D) and S2 (M = 2^(n-1) + D), with D up to the
// largest value the set allows, including the extreme values of D. Operands
// are random values below M, plus the corner cases 0, 1 and M-1. Each result
// is compared with X*Y mod M computed by the simulator's wide arithmetic, and
// the cycle count from start to done is checked against
// NW + 2 + (NW-1)*(1 + max(NL+1, NW)) + (k+1)*(NL+2), k = number of final
// corrections, NW = ceil(n/w), NL = ceil(n/(w+4)).
// The number of operations that needed a final addition (twice) or
// subtraction is reported.
module tb_barrett_modmul;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int n_s1 = 0, n_s2 = 0, n_add = 0, n_add2 = 0, n_sub = 0;

  typedef logic [1023:0] big_t;

  // Default-size instance.
  localparam int N0 = 256, W0 = 32;
  logic          st0, busy0, done0, s2_0;
  logic [N0-1:0] x0, y0, m0, z0;
  logic [1:0]    ca0, cs0;
  barrett_modmul #(.N(N0), .W(W0)) dut0 (
    .clk, .rst_n, .start(st0), .x(x0), .y(y0), .m(m0), .busy(busy0), .done(done0),
    .z(z0), .set_s2(s2_0), .corr_adds(ca0), .corr_subs(cs0));

  // Small instance.
  localparam int N1 = 61, W1 = 8;
  logic          st1, busy1, done1, s2_1;
  logic [N1-1:0] x1, y1, m1, z1;
  logic [1:0]    ca1, cs1;
  barrett_modmul #(.N(N1), .W(W1)) dut1 (
    .clk, .rst_n, .start(st1), .x(x1), .y(y1), .m(m1), .busy(busy1), .done(done1),
    .z(z1), .set_s2(s2_1), .corr_adds(ca1), .corr_subs(cs1));

  function automatic big_t rand_big();
    big_t r;
    for (int i = 0; i < 32; i++) r[i*32 +: 32] = $urandom();
    return r;
  endfunction

  // Random modulus of n bits in S1 (s2 = 0) or S2 (s2 = 1), alpha = w + 3.
  // mode 0: random D, 1: largest D, 2: D = 1.
  function automatic big_t gen_mod(int n, int w, bit s2, int mode);
    big_t one = 1;
    big_t dmax, d;
    int alpha = w + 3;
    if (!s2) dmax = (one << n) / ((one << alpha) + 1);
    else     dmax = (one << (n - 1)) / ((one << (alpha + 1)) - 1);
    case (mode)
      1:       d = dmax;
      2:       d = 1;
      default: d = rand_big() % dmax + 1;
    endcase
    return s2 ? (one << (n - 1)) + d : (one << n) - d;
  endfunction

  function automatic big_t pick_operand(big_t m, int k);
    case (k)
      0: return 0;
      1: return 1;
      2: return m - 1;
      default: return rand_big() % m;
    endcase
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int expected_cycles(int n, int w, int k);
    int nw = (n + w - 1) / w;
    int nl = (n + w + 4 - 1) / (w + 4);
    int per = 1 + ((nl + 1 > nw) ? nl + 1 : nw);
    return nw + 2 + (nw - 1) * per + (nl + 2) + k * (nl + 2);
  endfunction

  task automatic note_mech(bit s2, logic [1:0] ca, logic [1:0] cs);
    if (s2) n_s2++; else n_s1++;
    if (ca != 0) n_add++;
    if (ca == 2) n_add2++;
    if (cs != 0) n_sub++;
  endtask

  task automatic run0(big_t m, big_t x, big_t y, bit s2);
    int cyc;
    big_t e;
    @(negedge clk);
    m0 = m[N0-1:0]; x0 = x[N0-1:0]; y0 = y[N0-1:0]; st0 = 1'b1;
    @(negedge clk); st0 = 1'b0; cyc = 1;
    while (!done0) begin @(negedge clk); cyc++; end
    e = (x * y) % m;
    check(z0 == e[N0-1:0], $sformatf("n=256 z=%h expected %h", z0, e[N0-1:0]));
    check(s2_0 == s2, "n=256 set detection");
    check(cyc == expected_cycles(N0, W0, int'(ca0) + int'(cs0)),
          $sformatf("n=256 latency %0d", cyc));
    note_mech(s2_0, ca0, cs0);
  endtask

  task automatic run1(big_t m, big_t x, big_t y, bit s2);
    int cyc;
    big_t e;
    @(negedge clk);
    m1 = m[N1-1:0]; x1 = x[N1-1:0]; y1 = y[N1-1:0]; st1 = 1'b1;
    @(negedge clk); st1 = 1'b0; cyc = 1;
    while (!done1) begin @(negedge clk); cyc++; end
    e = (x * y) % m;
    check(z1 == e[N1-1:0], $sformatf("n=61 z=%h expected %h", z1, e[N1-1:0]));
    check(s2_1 == s2, "n=61 set detection");
    check(cyc == expected_cycles(N1, W1, int'(ca1) + int'(cs1)),
          $sformatf("n=61 latency %0d", cyc));
    note_mech(s2_1, ca1, cs1);
  endtask

  initial begin
    big_t m, x, y;
    bit s2;
    st0 = 0; st1 = 0; x0 = '0; y0 = '0; m0 = '0; x1 = '0; y1 = '0; m1 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 400; t++) begin
      s2 = t[0];
      m = gen_mod(N0, W0, s2, (t < 4) ? 1 : (t < 8) ? 2 : 0);
      x = pick_operand(m, (t % 13 < 3) ? t % 13 : 3);
      y = pick_operand(m, (t % 11 < 3) ? t % 11 : 3);
      run0(m, x, y, s2);
      m = gen_mod(N1, W1, s2, (t < 4) ? 1 : (t < 8) ? 2 : 0);
      x = pick_operand(m, (t % 13 < 3) ? t % 13 : 3);
      y = pick_operand(m, (t % 11 < 3) ? t % 11 : 3);
      run1(m, x, y, s2);
    end
    $display("operations: S1=%0d S2=%0d with final addition=%0d (two additions=%0d) with final subtraction=%0d",
             n_s1, n_s2, n_add, n_add2, n_sub);
    check(n_add > 0, "final addition never exercised");
    check(n_sub > 0, "final subtraction never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
