// alod_d1: 32-bit approximate leading one detector, Design I.
//
// The upper 16 bits go through the exact two-stage tree (lod16). The four
// low 4-bit slices and their second-stage detector are removed: when the
// leading one lies in the low half, the low 16 output bits are the fixed
// word x"0400", i.e. the leading one is taken to be at bit 10 whatever the
// low bits are. The stage-3 2-bit LOD still sees the OR of the low half, so
// a zero operand gives an all-zero output and zero = 1. For operands of
// 2^16 and above the output equals the exact LOD's. The fixed bias and the
// tree follow the paper; keeping the low-half OR gates for the zero case is
// this design's choice. Combinational.
//
// Ports: a (operand), onehot (estimated leading-one word), zero (a == 0).
module alod_d1
  import alm_pkg::*;
(
  input  logic [WIDTH-1:0] a,
  output logic [WIDTH-1:0] onehot,
  output logic             zero
);

  logic       hi_nz, lo_nz;
  logic [1:0] sel;

  lod16 u_hi (.a(a[31:16]), .en(sel[1]), .o(onehot[31:16]), .nz(hi_nz));
  lod2  u_sel (.hi_nz(hi_nz), .lo_nz(lo_nz), .sel(sel));

  always_comb begin
    lo_nz          = |a[15:0];
    onehot[15:0]   = sel[0] ? BIAS_D1 : 16'h0000;
    zero           = (sel == 2'b00);
  end

endmodule
