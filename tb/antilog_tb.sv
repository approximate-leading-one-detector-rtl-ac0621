// antilog_tb: test of the antilogarithm unit. First the worked example:
// k = 12, m = .1000111 must give 2^12 + 1000111b * 2^5 = 6368. Then every
// k from 0 to 63 with random mantissas, against (2^31 + m) * 2^k / 2^31.
module antilog_tb;
  import alm_ref_pkg::*;
  logic [36:0] sum;
  logic [63:0] p;
  int checks = 0, failures = 0;

  antilog dut (.sum(sum), .p(p));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sum = {6'd12, 7'b1000111, 24'd0};
    #1;
    checks++;
    if (p !== 64'd6368) begin
      failures++;
      $display("FAIL worked example p=%0d expected 6368", p);
    end
    for (int k = 0; k < 64; k++) begin
      for (int i = 0; i < 200; i++) begin
        sum = {6'(k), 31'($urandom)};
        if (i == 0) sum[30:0] = '0;
        if (i == 1) sum[30:0] = '1;
        #1;
        checks++;
        if (p !== antilog_of(sum)) begin
          failures++;
          if (failures < 10) $display("FAIL sum=%h p=%h expected %h", sum, p, antilog_of(sum));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
