// approx_log_add_tb: test of the approximate log adder at its default
// APPROX = 16 and, in a second instance, with APPROX = 0 (a plain adder).
// Expected sums: the upper bits added with no carry from below, the low 16
// bits 16'hAAAA. Counts sums in which the mantissa field carries into k.
module approx_log_add_tb;
  import alm_ref_pkg::*;
  logic [35:0] la, lb;
  logic [36:0] sum16, sum0;
  int checks = 0, failures = 0;
  int n_carry = 0;

  approx_log_add dut (.la(la), .lb(lb), .sum(sum16));
  approx_log_add #(.APPROX(0)) dut_exact (.la(la), .lb(lb), .sum(sum0));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      la = {$urandom, 4'($urandom)};
      lb = {$urandom, 4'($urandom)};
      if (i == 0) begin la = '1; lb = '1; end
      #1;
      if (32'(la[30:0]) + 32'(lb[30:0]) >= 32'h8000_0000) n_carry++;
      checks += 3;
      if (sum16 !== log_add(la, lb, 16)) begin
        failures++;
        if (failures < 10) $display("FAIL %h + %h = %h expected %h", la, lb, sum16, log_add(la, lb, 16));
      end
      if (sum16[15:0] !== 16'hAAAA) failures++;
      if (sum0 !== 37'(la) + 37'(lb)) begin
        failures++;
        if (failures < 10) $display("FAIL exact %h + %h = %h", la, lb, sum0);
      end
    end
    checks++;
    if (n_carry == 0) begin
      failures++;
      $display("FAIL no mantissa carry seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
