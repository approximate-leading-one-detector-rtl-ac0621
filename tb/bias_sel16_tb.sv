// bias_sel16_tb: exhaustive test of the Design II low-half bias selector.
// For every 16-bit input the expected bias is the one-hot word at bit 14,
// 10, 6 or 2 of the most significant non-zero 4-bit field (0 for a zero
// input or a 0 select). Counts how often each of the four biases occurs.
module bias_sel16_tb;
  import alm_ref_pkg::*;
  logic [15:0] a, o, exp_o;
  logic en, nz;
  int checks = 0, failures = 0;
  int seen [4] = '{0, 0, 0, 0};

  bias_sel16 dut (.a(a), .en(en), .o(o), .nz(nz));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++) begin
      for (int v = 0; v < 65536; v++) begin
        int p;
        a  = 16'(v);
        en = 1'(e);
        p  = est_pos({16'h0, a}, 2);
        exp_o = (en && p >= 0) ? (16'd1 << p) : 16'd0;
        #1;
        checks++;
        if (en && p >= 0) seen[p / 4]++;
        if (o !== exp_o || nz !== (a != 0)) begin
          failures++;
          if (failures < 10)
            $display("FAIL a=%h en=%b o=%h nz=%b expected %h", a, en, o, nz, exp_o);
        end
      end
    end
    // 4096 inputs have a[15:12] != 0, 3840 start in a[11:8], and so on.
    checks++;
    if (seen[3] != 61440 || seen[2] != 3840 || seen[1] != 240 || seen[0] != 15) begin
      failures++;
      $display("FAIL bias counts %0d %0d %0d %0d", seen[3], seen[2], seen[1], seen[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
