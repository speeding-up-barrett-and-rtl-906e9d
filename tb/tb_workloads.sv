// tb_workloads: the integer multipliers at every size the evaluation covers.
//
// The Barrett and Montgomery units are instantiated for n = 192, 256 and 512
// bits with w = 8, 16 and 32 (the synthesis configurations of the two
// comparison tables), and additionally for n = 224, 384 and 521 so that all
// five NIST prime-field moduli can be used:
//   P-192 = 2^192 - 2^64 - 1          P-224 = 2^224 - 2^96 + 1
//   P-256 = 2^256 - 2^224 + 2^192 + 2^96 - 1
//   P-384 = 2^384 - 2^128 - 2^96 + 2^32 - 1     P-521 = 2^521 - 1
// Each instance runs a few products with random moduli from its sets
// (S1/S2 or S3/S4) and with every NIST prime of its width that lies in one
// of its sets, all instances in parallel. Results are checked against the
// simulator's wide arithmetic. The testbench also checks the claim that for
// w <= 28 every one of the five primes lies in at least one of S1..S4, for
// w = 8 and 16, and counts a failure for a prime that no unit could take.
module tb_workloads;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  typedef logic [1151:0] big_t;

  localparam int NSIZE = 6, NDIG = 3;
  localparam int NS[NSIZE] = '{192, 224, 256, 384, 512, 521};
  localparam int WS[NDIG]  = '{8, 16, 32};
  localparam int RAND_OPS  = 4;

  int checks = 0;
  int failures = 0;
  int finished = 0;
  int prime_runs[5];

  function automatic big_t rand_big();
    big_t r;
    for (int i = 0; i < 36; i++) r[i*32 +: 32] = $urandom();
    return r;
  endfunction

  function automatic big_t nist_prime(int k);
    big_t one = 1;
    case (k)
      0: return (one << 192) - (one << 64) - 1;
      1: return (one << 224) - (one << 96) + 1;
      2: return (one << 256) - (one << 224) + (one << 192) + (one << 96) - 1;
      3: return (one << 384) - (one << 128) - (one << 96) + (one << 32) - 1;
      default: return (one << 521) - 1;
    endcase
  endfunction

  function automatic int nist_bits(int k);
    case (k)
      0: return 192;
      1: return 224;
      2: return 256;
      3: return 384;
      default: return 521;
    endcase
  endfunction

  // Set membership, alpha = w + 3.
  function automatic bit in_s1(big_t m, int n, int w);
    big_t one = 1;
    big_t d;
    if (m >= (one << n)) return 0;
    d = (one << n) - m;
    return d > 0 && d <= (one << n) / ((one << (w + 3)) + 1);
  endfunction
  function automatic bit in_s2(big_t m, int n, int w);
    big_t one = 1;
    big_t d;
    if (m <= (one << (n - 1)) || m >= (one << n)) return 0;
    d = m - (one << (n - 1));
    return d <= (one << (n - 1)) / ((one << (w + 4)) - 1);
  endfunction
  function automatic bit in_s3(big_t m, int n, int w);
    big_t one = 1;
    big_t d = m >> w;
    return (m & ((one << w) - 1)) == 1 && d >= (one << (n - w - 1)) && d < (one << (n - w));
  endfunction
  function automatic bit in_s4(big_t m, int n, int w);
    big_t one = 1;
    big_t d = (m + 1) >> w;
    return ((m + 1) & ((one << w) - 1)) == 0 && d > (one << (n - w - 1)) && d <= (one << (n - w));
  endfunction

  function automatic big_t gen_barrett_mod(int n, int w, bit s2);
    big_t one = 1;
    big_t dmax;
    if (!s2) dmax = (one << n) / ((one << (w + 3)) + 1);
    else     dmax = (one << (n - 1)) / ((one << (w + 4)) - 1);
    return s2 ? (one << (n - 1)) + rand_big() % dmax + 1 : (one << n) - (rand_big() % dmax + 1);
  endfunction

  function automatic big_t gen_mont_mod(int n, int w, bit s4);
    big_t one = 1;
    big_t d = (one << (n - w - 1)) + (s4 ? 1 : 0) + rand_big() % (one << (n - w - 1));
    return s4 ? (d << w) - 1 : (d << w) + 1;
  endfunction

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endfunction

  for (genvar si = 0; si < NSIZE; si++) begin : g_n
    for (genvar wi = 0; wi < NDIG; wi++) begin : g_w
      localparam int N  = NS[si];
      localparam int W  = WS[wi];
      localparam int NW = (N + W - 1) / W;

      logic         bst, bbusy, bdone, bs2, mst, mbusy, mdone, ms4, mcs;
      logic [N-1:0] bx, by, bm, bz, mx, my, mm, mz;
      logic [1:0]   bca, bcs;

      barrett_modmul #(.N(N), .W(W)) u_bar (
        .clk, .rst_n, .start(bst), .x(bx), .y(by), .m(bm), .busy(bbusy), .done(bdone),
        .z(bz), .set_s2(bs2), .corr_adds(bca), .corr_subs(bcs));
      montgomery_modmul #(.N(N), .W(W)) u_mon (
        .clk, .rst_n, .start(mst), .x(mx), .y(my), .m(mm), .busy(mbusy), .done(mdone),
        .z(mz), .set_s4(ms4), .corr_sub(mcs));

      task automatic run_bar(big_t m);
        big_t x, y, e;
        x = rand_big() % m;
        y = rand_big() % m;
        @(negedge clk);
        bm = m[N-1:0]; bx = x[N-1:0]; by = y[N-1:0]; bst = 1'b1;
        @(negedge clk); bst = 1'b0;
        while (!bdone) @(negedge clk);
        e = (x * y) % m;
        check(bz == e[N-1:0], $sformatf("barrett n=%0d w=%0d m=%h", N, W, m));
      endtask

      task automatic run_mon(big_t m);
        big_t x, y, zz;
        x = rand_big() % m;
        y = rand_big() % m;
        @(negedge clk);
        mm = m[N-1:0]; mx = x[N-1:0]; my = y[N-1:0]; mst = 1'b1;
        @(negedge clk); mst = 1'b0;
        while (!mdone) @(negedge clk);
        zz = big_t'(mz);
        check(zz < m && ((zz << (W * NW)) % m) == ((x * y) % m),
              $sformatf("montgomery n=%0d w=%0d m=%h", N, W, m));
      endtask

      initial begin
        bst = 0; mst = 0; bx = '0; by = '0; bm = '0; mx = '0; my = '0; mm = '0;
        @(posedge rst_n);
        fork
          begin
            for (int t = 0; t < RAND_OPS; t++) run_bar(gen_barrett_mod(N, W, t[0]));
            for (int k = 0; k < 5; k++)
              if (nist_bits(k) == N && (in_s1(nist_prime(k), N, W) || in_s2(nist_prime(k), N, W))) begin
                run_bar(nist_prime(k));
                run_bar(nist_prime(k));
                prime_runs[k]++;
              end
          end
          begin
            for (int t = 0; t < RAND_OPS; t++) run_mon(gen_mont_mod(N, W, t[0]));
            for (int k = 0; k < 5; k++)
              if (nist_bits(k) == N && (in_s3(nist_prime(k), N, W) || in_s4(nist_prime(k), N, W))) begin
                run_mon(nist_prime(k));
                run_mon(nist_prime(k));
                prime_runs[k]++;
              end
          end
        join
        finished++;
      end
    end
  end

  initial begin
    big_t p;
    int n;
    for (int k = 0; k < 5; k++) prime_runs[k] = 0;
    // Each NIST prime lies in at least one set for w = 8 and w = 16.
    for (int k = 0; k < 5; k++)
      for (int wi = 0; wi < 2; wi++) begin
        p = nist_prime(k);
        n = nist_bits(k);
        check(in_s1(p, n, WS[wi]) || in_s2(p, n, WS[wi]) || in_s3(p, n, WS[wi]) || in_s4(p, n, WS[wi]),
              $sformatf("prime %0d not in any set for w=%0d", k, WS[wi]));
      end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (finished == NSIZE * NDIG);
    for (int k = 0; k < 5; k++) begin
      $display("P-%0d ran on %0d unit configurations", nist_bits(k), prime_runs[k]);
      check(prime_runs[k] > 0, $sformatf("P-%0d never ran", nist_bits(k)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
