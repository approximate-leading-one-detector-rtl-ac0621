// lod2: the 2-bit leading one detector of the third LOD stage.
//
// Given "the upper half holds a 1" (hi_nz) and "the lower half holds a 1"
// (lo_nz), it returns sel = 2'b10 when the leading one is in the upper
// half, 2'b01 when it is only in the lower half and 2'b00 when the whole
// word is zero. sel[1] enables the upper half's multiplexers and sel[0] the
// lower half's. Combinational.
module lod2 (
  input  logic       hi_nz,
  input  logic       lo_nz,
  output logic [1:0] sel
);

  always_comb begin
    sel[1] = hi_nz;
    sel[0] = lo_nz & ~hi_nz;
  end

endmodule
