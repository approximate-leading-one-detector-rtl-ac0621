// lod2_tb: all four input combinations of the stage-3 2-bit LOD.
module lod2_tb;
  logic hi_nz, lo_nz;
  logic [1:0] sel;
  int checks = 0, failures = 0;

  lod2 dut (.hi_nz(hi_nz), .lo_nz(lo_nz), .sel(sel));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] expected [4];
    // index {hi_nz, lo_nz}: none, low only, high only, both
    expected = '{2'b00, 2'b01, 2'b10, 2'b10};
    for (int v = 0; v < 4; v++) begin
      {hi_nz, lo_nz} = 2'(v);
      #1;
      checks++;
      if (sel !== expected[v]) begin
        failures++;
        $display("FAIL hi=%b lo=%b sel=%b expected %b", hi_nz, lo_nz, sel, expected[v]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
