// lod4_tb: exhaustive test of the 4-bit leading one detector slice. All 16
// inputs are applied and the output is compared with a one-hot word built
// from a scan for the highest set bit.
module lod4_tb;
  logic [3:0] a, d, exp_d;
  int checks = 0, failures = 0;

  lod4 dut (.a(a), .d(d));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      a = 4'(v);
      exp_d = '0;
      for (int i = 0; i < 4; i++) if (a[i]) exp_d = 4'b1 << i;
      #1;
      checks++;
      if (d !== exp_d) begin
        failures++;
        $display("FAIL a=%b d=%b expected %b", a, d, exp_d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
