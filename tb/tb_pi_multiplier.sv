// tb_pi_multiplier: self-checking test of the digit-serial multiplier.
//
// Three instances are driven with random operands: the pi1 shape (256-bit
// operand, 32-bit unsigned digit), the pi2 shape of the Barrett unit
// (256-bit operand, 36-bit signed digit, so the operand is not a whole number
// of digits) and a small signed one (20-bit operand, 6-bit digit). Each
// product is compared with a product computed by the simulator's own wide
// arithmetic, and the number of cycles from start to valid is checked
// against ceil(N/DW).
module tb_pi_multiplier;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  // Instance A: unsigned, N=256, DW=32.
  logic          sa, va;
  logic [255:0]  aa;
  logic [31:0]   ba;
  logic [287:0]  pa;
  pi_multiplier #(.N(256), .DW(32), .SIGNED_B(1'b0)) dut_a (
    .clk, .rst_n, .start(sa), .a(aa), .b(ba), .valid(va), .p(pa));

  // Instance B: signed, N=256, DW=36.
  logic          sb, vb;
  logic [255:0]  ab;
  logic [35:0]   bb;
  logic [291:0]  pb;
  pi_multiplier #(.N(256), .DW(36), .SIGNED_B(1'b1)) dut_b (
    .clk, .rst_n, .start(sb), .a(ab), .b(bb), .valid(vb), .p(pb));

  // Instance C: signed, N=20, DW=6.
  logic          sc, vc;
  logic [19:0]   ac;
  logic [5:0]    bc;
  logic [25:0]   pc;
  pi_multiplier #(.N(20), .DW(6), .SIGNED_B(1'b1)) dut_c (
    .clk, .rst_n, .start(sc), .a(ac), .b(bc), .valid(vc), .p(pc));

  function automatic logic [255:0] rand256();
    logic [255:0] r;
    for (int i = 0; i < 8; i++) r[i*32 +: 32] = $urandom();
    return r;
  endfunction

  // Wait for valid and return the cycle count since the start cycle.
  task automatic run_a(output int cyc);
    @(negedge clk); sa = 1'b1;
    @(negedge clk); sa = 1'b0; cyc = 1;
    while (!va) begin @(negedge clk); cyc++; end
  endtask
  task automatic run_b(output int cyc);
    @(negedge clk); sb = 1'b1;
    @(negedge clk); sb = 1'b0; cyc = 1;
    while (!vb) begin @(negedge clk); cyc++; end
  endtask
  task automatic run_c(output int cyc);
    @(negedge clk); sc = 1'b1;
    @(negedge clk); sc = 1'b0; cyc = 1;
    while (!vc) begin @(negedge clk); cyc++; end
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int cyc;
    logic [287:0] ea;
    logic signed [291:0] eb;
    logic signed [25:0] ec;
    sa = 0; sb = 0; sc = 0; aa = '0; ba = '0; ab = '0; bb = '0; ac = '0; bc = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      aa = rand256();
      ba = (t == 0) ? '1 : $urandom();
      if (t == 1) aa = '1;
      run_a(cyc);
      ea = 288'(aa) * 288'(ba);
      check(pa == ea, $sformatf("unsigned product t=%0d", t));
      check(cyc == 8, $sformatf("unsigned latency %0d != 8", cyc));

      ab = rand256();
      bb = {$urandom(), 4'($urandom())};
      if (t == 2) bb = {1'b1, 35'd0};      // most negative digit
      if (t == 3) begin bb = '1; ab = '1; end
      run_b(cyc);
      eb = $signed(292'($signed(bb))) * $signed({36'd0, ab});
      check(pb == eb, $sformatf("signed 256x36 product t=%0d", t));
      check(cyc == 8, $sformatf("signed latency %0d != 8", cyc));

      ac = 20'($urandom());
      bc = 6'($urandom());
      run_c(cyc);
      ec = $signed(26'($signed(bc))) * $signed({6'd0, ac});
      check(pc == ec, $sformatf("small signed product t=%0d a=%h b=%h p=%h e=%h", t, ac, bc, pc, ec));
      check(cyc == 4, $sformatf("small latency %0d != 4", cyc));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
