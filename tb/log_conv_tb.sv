// log_conv_tb: test of the logarithm converter. Starts with the worked
// example 45 -> k = 5, m = .01101 (top mantissa bits 0110100), then random
// operands with a one-hot word at the true leading one or at an arbitrary
// position (as an approximate detector may give). The expected {k, m} is
// computed arithmetically: k * 2^31 + (a mod 2^k) * 2^(31-k), mod 2^31 in m.
module log_conv_tb;
  import alm_ref_pkg::*;
  logic [31:0] a, onehot;
  logic [35:0] log, exp_log;
  int checks = 0, failures = 0;

  log_conv dut (.a(a), .onehot(onehot), .log(log));

  task automatic check(input logic [31:0] v, input int k);
    a = v;
    onehot = 32'd1 << k;
    exp_log = log_of(v, k);
    #1;
    checks++;
    if (log !== exp_log) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h k=%0d log=%h expected %h", v, k, log, exp_log);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'd45, 5);
    checks++;
    if (log[35:31] !== 5'd5 || log[30:24] !== 7'b0110100) begin
      failures++;
      $display("FAIL worked example 45: k=%0d m=%b", log[35:31], log[30:24]);
    end
    check(32'd147, 7);
    checks++;
    if (log[35:31] !== 5'd7 || log[30:24] !== 7'b0010011) begin
      failures++;
      $display("FAIL worked example 147: k=%0d m=%b", log[35:31], log[30:24]);
    end
    for (int i = 0; i < 20000; i++) begin
      logic [31:0] v;
      v = rand_operand();
      if (i % 2 == 0 && v != 0) check(v, lead_pos(v));
      else check(v, int'($urandom % 32));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
