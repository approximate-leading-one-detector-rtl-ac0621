// lod16_tb: exhaustive test of one 16-bit half of the LOD tree. Every
// 16-bit input is applied with the stage-3 select at 1 and at 0; the
// one-hot output must mark the highest set bit (or be 0 when the select is
// 0 or the input is 0), and nz must be the OR of the input.
module lod16_tb;
  import alm_ref_pkg::*;
  logic [15:0] a, o, exp_o;
  logic en, nz;
  int checks = 0, failures = 0;

  lod16 dut (.a(a), .en(en), .o(o), .nz(nz));

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
        p  = lead_pos({16'h0, a});
        exp_o = (en && p >= 0) ? (16'd1 << p) : 16'd0;
        #1;
        checks++;
        if (o !== exp_o || nz !== (a != 0)) begin
          failures++;
          if (failures < 10)
            $display("FAIL a=%h en=%b o=%h nz=%b expected %h", a, en, o, nz, exp_o);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
