// alod_d2: 32-bit approximate leading one detector, Design II.
//
// The upper 16 bits go through the exact two-stage tree (lod16). The low
// half uses bias_sel16 instead of four 4-bit slices and a second-stage
// detector: the leading one is taken to be at bit 14, 10, 6 or 2 of the
// most significant non-zero 4-bit field of a[15:0]. The stage-3 2-bit LOD
// chooses between the halves; a zero operand gives an all-zero output and
// zero = 1. Operands of 2^16 and above get the exact answer. The structure
// follows the paper. Combinational.
//
// Ports: a (operand), onehot (estimated leading-one word), zero (a == 0).
module alod_d2
  import alm_pkg::*;
(
  input  logic [WIDTH-1:0] a,
  output logic [WIDTH-1:0] onehot,
  output logic             zero
);

  logic       hi_nz, lo_nz;
  logic [1:0] sel;

  lod16      u_hi  (.a(a[31:16]), .en(sel[1]), .o(onehot[31:16]), .nz(hi_nz));
  bias_sel16 u_lo  (.a(a[15:0]),  .en(sel[0]), .o(onehot[15:0]),  .nz(lo_nz));
  lod2       u_sel (.hi_nz(hi_nz), .lo_nz(lo_nz), .sel(sel));

  assign zero = (sel == 2'b00);

endmodule
