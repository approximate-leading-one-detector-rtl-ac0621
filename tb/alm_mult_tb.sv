// alm_mult_tb: end-to-end test of the approximate Mitchell multiplier.
//
// Two multipliers see the same operands: one at its defaults (Design I
// detector, 16 approximated adder bits) and one built with the Design II
// detector. Every product is compared with the arithmetic reference model.
// Directed cases: the worked 45 x 147 example scaled by 2^16 per operand
// (k = 21 + 23 = 44, m = .1000111, so 6368 * 2^32 plus the adder pattern),
// zero operands, and small operands that hit each low-half bias. Random
// pairs of every magnitude follow, and then 10^4 uniform 32-bit pairs whose
// mean relative error distance must lie near the 0.0385 expected for a
// Mitchell multiplier. Counted mechanisms, each of which must occur: zero
// operand, Design I fixed bias, each of the four Design II biases, exact
// detection (operand >= 2^16), carry from the mantissa into k.
module alm_mult_tb;
  import alm_pkg::*;
  import alm_ref_pkg::*;

  logic [31:0] a, b;
  logic [63:0] p1, p2;
  int checks = 0, failures = 0;
  int n_zero = 0, n_bias1 = 0, n_exact = 0, n_carry = 0;
  int n_bias2 [4] = '{0, 0, 0, 0};
  real red1 = 0.0, red2 = 0.0;

  alm_mult dut1 (.a(a), .b(b), .p(p1));
  alm_mult #(.DESIGN(LOD_DESIGN_II)) dut2 (.a(a), .b(b), .p(p2));

  task automatic count_operand(input logic [31:0] v);
    int p;
    if (v == 0) n_zero++;
    else if (v >= 32'h1_0000) n_exact++;
    else begin
      n_bias1++;
      p = est_pos(v, 2);
      n_bias2[p / 4]++;
    end
  endtask

  task automatic check(input logic [31:0] va, vb);
    logic [63:0] e1, e2;
    a = va;
    b = vb;
    e1 = mult(va, vb, 1, 16);
    e2 = mult(va, vb, 2, 16);
    #1;
    checks += 2;
    count_operand(va);
    count_operand(vb);
    if (va != 0 && vb != 0 &&
        log_of(va, est_pos(va, 1)) % (64'd1 << 31) + log_of(vb, est_pos(vb, 1)) % (64'd1 << 31)
          >= (64'd1 << 31))
      n_carry++;
    if (p1 !== e1) begin
      failures++;
      if (failures < 10) $display("FAIL D1 %0d x %0d = %0d expected %0d", va, vb, p1, e1);
    end
    if (p2 !== e2) begin
      failures++;
      if (failures < 10) $display("FAIL D2 %0d x %0d = %0d expected %0d", va, vb, p2, e2);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real mred1, mred2, exact;
    // Worked example, scaled so that both operands take the exact path.
    check(32'd45 << 16, 32'd147 << 16);
    checks++;
    if (p1 !== (64'd6368 << 32) + (64'hAAAA << 13)) begin
      failures++;
      $display("FAIL worked example p=%h", p1);
    end
    // Zero operands and one operand per low-half field.
    check(0, 32'd12345); check(32'hFFFF_FFFF, 0); check(0, 0);
    check(32'hF000, 32'h1_0000); check(32'h0900, 32'h30);
    check(32'h7, 32'h8000_0000); check(32'h1, 32'h1); check(32'hFFFF, 32'hFFFF);
    check(32'hFFFF_FFFF, 32'hFFFF_FFFF);
    for (int i = 0; i < 20000; i++) check(rand_operand(), rand_operand());

    for (int i = 0; i < 10000; i++) begin
      check($urandom, $urandom);
      exact = real'(a) * real'(b);
      if (exact > 0.0) begin
        red1 += ((real'(p1) > exact) ? real'(p1) - exact : exact - real'(p1)) / exact;
        red2 += ((real'(p2) > exact) ? real'(p2) - exact : exact - real'(p2)) / exact;
      end
    end
    mred1 = red1 / 10000.0;
    mred2 = red2 / 10000.0;
    $display("MRED over 1e4 uniform pairs: Design I %f, Design II %f", mred1, mred2);
    checks += 2;
    if (mred1 < 0.035 || mred1 > 0.042) failures++;
    if (mred2 < 0.035 || mred2 > 0.042) failures++;

    $display("mechanisms: zero=%0d biasI=%0d biasII(x4000,x0400,x0040,x0004)=%0d,%0d,%0d,%0d exact=%0d carry=%0d",
             n_zero, n_bias1, n_bias2[3], n_bias2[2], n_bias2[1], n_bias2[0], n_exact, n_carry);
    checks += 8;
    if (n_zero == 0) failures++;
    if (n_bias1 == 0) failures++;
    for (int i = 0; i < 4; i++) if (n_bias2[i] == 0) failures++;
    if (n_exact == 0) failures++;
    if (n_carry == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
