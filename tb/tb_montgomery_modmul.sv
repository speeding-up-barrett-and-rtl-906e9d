// tb_montgomery_modmul: self-checking test of the Montgomery multiplier for
// moduli with M = +1 or -1 mod 2^w.
//
// Two instances: the default size (n = 256, w = 32) and a small one
// (n = 61, w = 8). Moduli are drawn at random from S3 (M = D*2^w + 1) and S4
// (M = D*2^w - 1) over the full allowed range of D, including its ends, and
// the default instance is also run with the NIST P-256 prime
// 2^256 - 2^224 + 2^192 + 2^96 - 1, which lies in S4 for w = 32.
// The result Z must satisfy Z < M and Z * 2^(w*NW) = X*Y (mod M); this is
// checked with the simulator's wide arithmetic, which avoids computing a
// modular inverse. The cycle count from start to done is checked against
// NW + 2 + (NW+k)*(NW+2), k = 1 when the final subtraction was needed.
module tb_montgomery_modmul;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int n_s3 = 0, n_s4 = 0, n_sub = 0, n_p256 = 0;

  typedef logic [1023:0] big_t;

  localparam int N0 = 256, W0 = 32;
  logic          st0, busy0, done0, s4_0, cs0;
  logic [N0-1:0] x0, y0, m0, z0;
  montgomery_modmul #(.N(N0), .W(W0)) dut0 (
    .clk, .rst_n, .start(st0), .x(x0), .y(y0), .m(m0), .busy(busy0), .done(done0),
    .z(z0), .set_s4(s4_0), .corr_sub(cs0));

  localparam int N1 = 61, W1 = 8;
  logic          st1, busy1, done1, s4_1, cs1;
  logic [N1-1:0] x1, y1, m1, z1;
  montgomery_modmul #(.N(N1), .W(W1)) dut1 (
    .clk, .rst_n, .start(st1), .x(x1), .y(y1), .m(m1), .busy(busy1), .done(done1),
    .z(z1), .set_s4(s4_1), .corr_sub(cs1));

  function automatic big_t rand_big();
    big_t r;
    for (int i = 0; i < 32; i++) r[i*32 +: 32] = $urandom();
    return r;
  endfunction

  // mode 0: random D, 1: smallest D, 2: largest D.
  function automatic big_t gen_mod(int n, int w, bit s4, int mode);
    big_t one = 1;
    big_t lo, span, d;
    lo   = (one << (n - w - 1)) + (s4 ? 1 : 0);   // smallest allowed D
    span = one << (n - w - 1);                    // number of allowed D
    case (mode)
      1:       d = lo;
      2:       d = lo + span - 1;
      default: d = lo + rand_big() % span;
    endcase
    return s4 ? (d << w) - 1 : (d << w) + 1;
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
    return nw + 2 + (nw + k) * (nw + 2);
  endfunction

  task automatic run0(big_t m, big_t x, big_t y, bit s4);
    int cyc;
    big_t zz;
    @(negedge clk);
    m0 = m[N0-1:0]; x0 = x[N0-1:0]; y0 = y[N0-1:0]; st0 = 1'b1;
    @(negedge clk); st0 = 1'b0; cyc = 1;
    while (!done0) begin @(negedge clk); cyc++; end
    zz = big_t'(z0);
    check(zz < m, "n=256 result not below M");
    check(((zz << (W0 * ((N0 + W0 - 1) / W0))) % m) == ((x * y) % m),
          $sformatf("n=256 Z*R != XY mod M, z=%h", z0));
    check(s4_0 == s4, "n=256 set detection");
    check(cyc == expected_cycles(N0, W0, int'(cs0)), $sformatf("n=256 latency %0d", cyc));
    if (s4_0) n_s4++; else n_s3++;
    if (cs0) n_sub++;
  endtask

  task automatic run1(big_t m, big_t x, big_t y, bit s4);
    int cyc;
    big_t zz;
    @(negedge clk);
    m1 = m[N1-1:0]; x1 = x[N1-1:0]; y1 = y[N1-1:0]; st1 = 1'b1;
    @(negedge clk); st1 = 1'b0; cyc = 1;
    while (!done1) begin @(negedge clk); cyc++; end
    zz = big_t'(z1);
    check(zz < m, "n=61 result not below M");
    check(((zz << (W1 * ((N1 + W1 - 1) / W1))) % m) == ((x * y) % m),
          $sformatf("n=61 Z*R != XY mod M, z=%h", z1));
    check(s4_1 == s4, "n=61 set detection");
    check(cyc == expected_cycles(N1, W1, int'(cs1)), $sformatf("n=61 latency %0d", cyc));
    if (s4_1) n_s4++; else n_s3++;
    if (cs1) n_sub++;
  endtask

  initial begin
    big_t m, x, y, one, p256;
    bit s4;
    one = 1;
    p256 = (one << 256) - (one << 224) + (one << 192) + (one << 96) - 1;
    st0 = 0; st1 = 0; x0 = '0; y0 = '0; m0 = '0; x1 = '0; y1 = '0; m1 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 400; t++) begin
      s4 = t[0];
      m = gen_mod(N0, W0, s4, (t < 4) ? 1 : (t < 8) ? 2 : 0);
      x = pick_operand(m, (t % 13 < 3) ? t % 13 : 3);
      y = pick_operand(m, (t % 11 < 3) ? t % 11 : 3);
      run0(m, x, y, s4);
      m = gen_mod(N1, W1, s4, (t < 4) ? 1 : (t < 8) ? 2 : 0);
      x = pick_operand(m, (t % 13 < 3) ? t % 13 : 3);
      y = pick_operand(m, (t % 11 < 3) ? t % 11 : 3);
      run1(m, x, y, s4);
    end
    for (int t = 0; t < 50; t++) begin
      x = pick_operand(p256, (t < 3) ? t : 3);
      y = pick_operand(p256, (t < 3) ? 2 - t : 3);
      run0(p256, x, y, 1'b1);
      n_p256++;
    end
    $display("operations: S3=%0d S4=%0d (P-256: %0d) with final subtraction=%0d",
             n_s3, n_s4, n_p256, n_sub);
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
