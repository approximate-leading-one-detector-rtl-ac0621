// alm_mult_mred_tb: accuracy run of the multiplier at its default
// parameters (Design I detector, 16 approximated adder bits).
//
// 10^6 uniformly random pairs of 32-bit positive integers are applied. Each
// product is compared with the arithmetic reference model, and the mean
// relative error distance |p - a*b| / (a*b) is accumulated for the design
// and for a conventional Mitchell multiplier (exact detector, exact adder,
// computed by the reference model). The design's MRED must be within
// 0.0385 +- 0.002 and within 10^-4 of the conventional one.
module alm_mult_mred_tb;
  import alm_ref_pkg::*;

  localparam int N = 1000000;

  logic [31:0] a, b;
  logic [63:0] p;
  int checks = 0, failures = 0;
  real red = 0.0, red_ref = 0.0;

  alm_mult dut (.a(a), .b(b), .p(p));

  function automatic real rel_err(input logic [63:0] approx, input real exact);
    real d;
    d = real'(approx) - exact;
    return ((d < 0.0) ? -d : d) / exact;
  endfunction

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real mred, mred_ref, exact;
    int n = 0;
    for (int i = 0; i < N; i++) begin
      a = $urandom;
      b = $urandom;
      if (a == 0) a = 1;
      if (b == 0) b = 1;
      #1;
      checks++;
      if (p !== mult(a, b, 1, 16)) begin
        failures++;
        if (failures < 10) $display("FAIL %0d x %0d = %0d expected %0d", a, b, p, mult(a, b, 1, 16));
      end
      exact = real'(a) * real'(b);
      red += rel_err(p, exact);
      red_ref += rel_err(mult(a, b, 0, 0), exact);
      n++;
    end
    mred = red / real'(n);
    mred_ref = red_ref / real'(n);
    $display("MRED over %0d pairs: design %f, conventional Mitchell %f", n, mred, mred_ref);
    checks += 2;
    if (mred < 0.0365 || mred > 0.0405) failures++;
    if (mred - mred_ref > 1.0e-4 || mred_ref - mred > 1.0e-4) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
