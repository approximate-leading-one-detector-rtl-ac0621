// alm_log_error_tb: error of the approximate logarithm for N = 1 .. 2^20-1.
//
// Each N goes through both approximate detectors and a log converter. For
// N >= 2^16 both logarithms must equal the conventional Mitchell log
// k + m (k the exact leading-one index). Below 2^16 the approximation is
// coarser: there each log must match the reference model, and the test
// prints the largest absolute error |N - 2^(k+m)| of each design next to
// the largest error of the conventional Mitchell log over [2^16, 2^20). It
// also counts operands below 2^16 whose estimate overshoots (2^(k+m) > N)
// and undershoots, since the approximation errs in both directions.
module alm_log_error_tb;
  import alm_ref_pkg::*;

  logic [31:0] n, oh1, oh2;
  logic        z1, z2;
  logic [35:0] log1, log2;
  int checks = 0, failures = 0;

  alod_d1  u_lod1 (.a(n), .onehot(oh1), .zero(z1));
  alod_d2  u_lod2 (.a(n), .onehot(oh2), .zero(z2));
  log_conv u_log1 (.a(n), .onehot(oh1), .log(log1));
  log_conv u_log2 (.a(n), .onehot(oh2), .log(log2));

  function automatic real abs_err(input logic [35:0] l, input real v);
    real e;
    e = v - 2.0 ** (real'(l[35:31]) + real'(l[30:0]) / 2147483648.0);
    return (e < 0.0) ? -e : e;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real max_lo1 = 0.0, max_lo2 = 0.0, max_hi = 0.0, e1, e2, v;
    int over = 0, under = 0;
    for (int i = 1; i < (1 << 20); i++) begin
      logic [35:0] ml;
      n = 32'(i);
      #1;
      v  = real'(i);
      ml = log_of(n, lead_pos(n));
      e1 = abs_err(log1, v);
      e2 = abs_err(log2, v);
      if (i >= 32'h1_0000) begin
        checks += 2;
        if (log1 !== ml) failures++;
        if (log2 !== ml) failures++;
        if (abs_err(ml, v) > max_hi) max_hi = abs_err(ml, v);
      end else begin
        checks += 2;
        if (log1 !== log_of(n, est_pos(n, 1))) failures++;
        if (log2 !== log_of(n, est_pos(n, 2))) failures++;
        if (e1 > max_lo1) max_lo1 = e1;
        if (e2 > max_lo2) max_lo2 = e2;
        if (v - 2.0 ** (real'(log1[35:31]) + real'(log1[30:0]) / 2147483648.0) < 0.0) over++;
        else under++;
      end
    end
    $display("max |N - 2^log| below 2^16: Design I %0.1f, Design II %0.1f; Mitchell on [2^16,2^20): %0.1f",
             max_lo1, max_lo2, max_hi);
    $display("Design I below 2^16: %0d overestimates, %0d underestimates", over, under);
    checks++;
    if (over == 0 || under == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
