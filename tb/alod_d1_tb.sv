// alod_d1_tb: test of the 32-bit approximate LOD, Design I.
// Random operands of every magnitude plus edge values. Operands of 2^16
// and above must give the exact one-hot leading-one word; smaller ones the
// approximate position of the reference model; zero gives 0 and zero = 1.
module alod_d1_tb;
  import alm_ref_pkg::*;
  logic [31:0] a, onehot, exp_oh;
  logic zero;
  int checks = 0, failures = 0;
  int n_low = 0, n_high = 0;

  alod_d1 dut (.a(a), .onehot(onehot), .zero(zero));

  task automatic check(input logic [31:0] v);
    int p;
    a = v;
    p = est_pos(v, 1);
    exp_oh = (p >= 0) ? (32'd1 << p) : 32'd0;
    #1;
    checks++;
    if (v != 0 && v < 32'h1_0000) n_low++;
    if (v >= 32'h1_0000) n_high++;
    if (onehot !== exp_oh || zero !== (v == 0)) begin
      failures++;
      if (failures < 10)
        $display("FAIL a=%h onehot=%h zero=%b expected %h", v, onehot, zero, exp_oh);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'h0); check(32'h1); check(32'h8); check(32'h10); check(32'h400);
    check(32'hFFFF); check(32'h1_0000); check(32'h8000_0000); check(32'hFFFF_FFFF);
    for (int i = 0; i < 20000; i++) check(rand_operand());
    checks++;
    if (n_low == 0 || n_high == 0) begin
      failures++;
      $display("FAIL coverage low=%0d high=%0d", n_low, n_high);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
