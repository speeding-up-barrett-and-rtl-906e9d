// tb_modmul_top: end-to-end test of the whole design at its default sizes
// (integer units n = 256, w = 32; binary-field units n = 256, w = 32).
//
// Four threads drive the four units at the same time, each with its own
// stream of random operations, and compare every result with a reference
// computed in the testbench:
//   Barrett (S1 and S2 moduli)   : Z = X*Y mod M
//   Montgomery (S3, S4, P-256)   : Z < M and Z*2^256 = X*Y mod M
//   GF(2^n) Barrett              : Z = A*B mod M(x)
//   GF(2^n) Montgomery           : Z*x^256 = A*B mod M(x)
// It counts how often each mechanism of the design occurred: the S1 and S2
// quotient rules, the final additions (including two in one operation) and
// the final subtraction of the Barrett unit, the S3 and S4 quotient rules
// and the final subtraction of the Montgomery unit, and cycles with all four
// units busy. A mechanism that never occurred counts as a failure, except
// the double final addition, which is only reported: for the default
// sizes the remainder left by the loop never falls below -M (each estimate
// overshoots by at most one), so one addition always suffices, although
// the hardware would repeat it. One operation is given operands chosen so
// that a final addition is needed.
module tb_modmul_top;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int N = 256, W = 32, NW = 8;

  int checks = 0;
  int failures = 0;
  int n_s1 = 0, n_s2 = 0, n_badd = 0, n_badd2 = 0, n_bsub = 0;
  int n_s3 = 0, n_s4 = 0, n_msub = 0, n_gfb = 0, n_gfm = 0, n_all_busy = 0;

  typedef logic [1023:0] big_t;

  logic         bar_start, bar_busy, bar_done, bar_set_s2;
  logic [N-1:0] bar_x, bar_y, bar_m, bar_z;
  logic [1:0]   bar_corr_adds, bar_corr_subs;
  logic         mon_start, mon_busy, mon_done, mon_set_s4, mon_corr_sub;
  logic [N-1:0] mon_x, mon_y, mon_m, mon_z;
  logic         gfb_start, gfb_busy, gfb_done;
  logic [N-1:0] gfb_a, gfb_b, gfb_m, gfb_z;
  logic         gfm_start, gfm_busy, gfm_done;
  logic [N-1:0] gfm_a, gfm_b, gfm_m, gfm_z;

  modmul_top dut (.*);

  function automatic big_t rand_big();
    big_t r;
    for (int i = 0; i < 32; i++) r[i*32 +: 32] = $urandom();
    return r;
  endfunction

  function automatic big_t mask(int nb);
    big_t one = 1;
    return (one << nb) - 1;
  endfunction

  function automatic big_t gf_mulmod(big_t a, big_t b, big_t m, int n);
    big_t p = 0;
    for (int i = 0; i < 512; i++) if (b[i]) p ^= a << i;
    for (int i = 1023; i >= n; i--) if (p[i]) p ^= m << (i - n);
    return p;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk)
    if (bar_busy && mon_busy && gfb_busy && gfm_busy) n_all_busy++;

  // Remainder left by the digit loop of the S1/S2 Barrett algorithm,
  // before the final corrections.
  function automatic logic signed [1023:0] barrett_end(big_t x, big_t y, big_t m);
    logic signed [1023:0] zs, q;
    bit s2 = !m[N-2];
    zs = 0;
    for (int i = NW - 1; i >= 0; i--) begin
      zs = (zs <<< W) + $signed(x * big_t'(y[i*W +: W]));
      q  = s2 ? (zs >>> (N - 1)) : (zs >>> N);
      zs = zs - q * $signed(m);
    end
    return zs;
  endfunction

  // Barrett unit.
  task automatic barrett_thread(int ops);
    big_t one = 1;
    big_t m, x, y, e, dmax;
    bit s2;
    for (int t = 0; t < ops; t++) begin
      s2 = t[0];
      dmax = s2 ? (one << (N - 1)) / ((one << (W + 4)) - 1)
                : (one << N) / ((one << (W + 3)) + 1);
      m = s2 ? (one << (N - 1)) + rand_big() % dmax + 1 : (one << N) - (rand_big() % dmax + 1);
      x = rand_big() % m;
      y = rand_big() % m;
      // Once, pick operands whose remainder ends negative, so the final
      // addition of M is exercised for certain: search random Y with a
      // restatement of the algorithm until the estimate overshoots at the end.
      if (t == ops - 1) begin
        for (int k = 0; k < 5000 && barrett_end(x, y, m) >= 0; k++) y = rand_big() % m;
      end
      @(negedge clk);
      bar_m = m[N-1:0]; bar_x = x[N-1:0]; bar_y = y[N-1:0]; bar_start = 1'b1;
      @(negedge clk); bar_start = 1'b0;
      while (!bar_done) @(negedge clk);
      e = (x * y) % m;
      check(bar_z == e[N-1:0], $sformatf("barrett t=%0d z=%h expected %h", t, bar_z, e[N-1:0]));
      if (bar_set_s2) n_s2++; else n_s1++;
      if (bar_corr_adds != 0) n_badd++;
      if (bar_corr_adds == 2) n_badd2++;
      if (bar_corr_subs != 0) n_bsub++;
    end
  endtask

  // Montgomery unit.
  task automatic montgomery_thread(int ops);
    big_t one = 1;
    big_t m, x, y, d, zz, p256;
    bit s4;
    p256 = (one << 256) - (one << 224) + (one << 192) + (one << 96) - 1;
    for (int t = 0; t < ops; t++) begin
      s4 = t[0];
      d = (one << (N - W - 1)) + (s4 ? 1 : 0) + rand_big() % (one << (N - W - 1));
      m = s4 ? (d << W) - 1 : (d << W) + 1;
      if (t % 4 == 3) m = p256;
      x = rand_big() % m;
      y = rand_big() % m;
      @(negedge clk);
      mon_m = m[N-1:0]; mon_x = x[N-1:0]; mon_y = y[N-1:0]; mon_start = 1'b1;
      @(negedge clk); mon_start = 1'b0;
      while (!mon_done) @(negedge clk);
      zz = big_t'(mon_z);
      check(zz < m && ((zz << (W * NW)) % m) == ((x * y) % m),
            $sformatf("montgomery t=%0d z=%h", t, mon_z));
      if (mon_set_s4) n_s4++; else n_s3++;
      if (mon_corr_sub) n_msub++;
    end
  endtask

  task automatic gf_barrett_thread(int ops);
    big_t one = 1;
    big_t d, a, b, e;
    for (int t = 0; t < ops; t++) begin
      d = rand_big() & mask(N - W + 1);
      a = rand_big() & mask(N);
      b = rand_big() & mask(N);
      @(negedge clk);
      gfb_m = d[N-1:0]; gfb_a = a[N-1:0]; gfb_b = b[N-1:0]; gfb_start = 1'b1;
      @(negedge clk); gfb_start = 1'b0;
      while (!gfb_done) @(negedge clk);
      e = gf_mulmod(a, b, (one << N) | d, N);
      check(gfb_z == e[N-1:0], $sformatf("gf barrett t=%0d", t));
      n_gfb++;
    end
  endtask

  task automatic gf_montgomery_thread(int ops);
    big_t one = 1;
    big_t d, a, b, e, zr;
    for (int t = 0; t < ops; t++) begin
      d = (rand_big() & mask(N) & ~mask(W)) | 1;
      a = rand_big() & mask(N);
      b = rand_big() & mask(N);
      @(negedge clk);
      gfm_m = d[N-1:0]; gfm_a = a[N-1:0]; gfm_b = b[N-1:0]; gfm_start = 1'b1;
      @(negedge clk); gfm_start = 1'b0;
      while (!gfm_done) @(negedge clk);
      e  = gf_mulmod(a, b, (one << N) | d, N);
      zr = gf_mulmod(big_t'(gfm_z), one << (W * NW), (one << N) | d, N);
      check(zr == e, $sformatf("gf montgomery t=%0d", t));
      n_gfm++;
    end
  endtask

  initial begin
    bar_start = 0; mon_start = 0; gfb_start = 0; gfm_start = 0;
    bar_x = '0; bar_y = '0; bar_m = '0; mon_x = '0; mon_y = '0; mon_m = '0;
    gfb_a = '0; gfb_b = '0; gfb_m = '0; gfm_a = '0; gfm_b = '0; gfm_m = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    fork
      barrett_thread(300);
      montgomery_thread(300);
      gf_barrett_thread(600);
      gf_montgomery_thread(600);
    join
    $display("barrett: S1=%0d S2=%0d final add=%0d (twice=%0d) final sub=%0d",
             n_s1, n_s2, n_badd, n_badd2, n_bsub);
    $display("montgomery: S3=%0d S4=%0d final sub=%0d", n_s3, n_s4, n_msub);
    $display("gf: barrett=%0d montgomery=%0d; cycles with all units busy=%0d",
             n_gfb, n_gfm, n_all_busy);
    check(n_s1 > 0,  "S1 quotient rule never used");
    check(n_s2 > 0,  "S2 quotient rule never used");
    check(n_badd > 0, "Barrett final addition never happened");
    check(n_bsub > 0, "Barrett final subtraction never happened");
    check(n_s3 > 0,  "S3 quotient rule never used");
    check(n_s4 > 0,  "S4 quotient rule never used");
    check(n_msub > 0, "Montgomery final subtraction never happened");
    check(n_gfb > 0 && n_gfm > 0, "binary-field units never ran");
    check(n_all_busy > 0, "units never ran concurrently");
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
