// lod16: one 16-bit half of the exact 32-bit leading one detector tree.
//
// Stage 1: four lod4 slices find the leading one inside each 4-bit field
// and an OR per field says whether the field holds any 1. Stage 2: a lod4
// over those four ORs picks the most significant non-zero field. The
// stage-2 result z passes through a group of four multiplexers only when
// the stage-3 select en is 1 (otherwise it becomes 0000). Last stage: each
// bit of z gates the 4-bit word of its field, so the 16-bit output o holds
// at most one 1, at the leading one of a. nz (the OR of the four field
// ORs) goes to the stage-3 2-bit LOD. This is the structure of the paper's
// 32-bit tree; the port names are this design's own. Combinational.
//
// Ports: a (16-bit half), en (stage-3 select for this half),
//        o (one-hot output, zero if en is 0 or a is 0), nz (a is non-zero).
module lod16 (
  input  logic [15:0] a,
  input  logic        en,
  output logic [15:0] o,
  output logic        nz
);

  logic [15:0] d;       // stage-1 one-hot words, one per field
  logic [3:0]  fld_or;  // OR of each 4-bit field
  logic [3:0]  z_raw;   // stage-2 leading non-zero field
  logic [3:0]  z;       // after the stage-3 gating multiplexers

  for (genvar f = 0; f < 4; f++) begin : g_stage1
    lod4 u_lod (.a(a[4*f +: 4]), .d(d[4*f +: 4]));
    assign fld_or[f] = |a[4*f +: 4];
  end

  lod4 u_stage2 (.a(fld_or), .d(z_raw));

  always_comb begin
    z  = en ? z_raw : 4'b0000;
    nz = |fld_or;
    for (int f = 0; f < 4; f++) begin
      o[4*f +: 4] = z[f] ? d[4*f +: 4] : 4'b0000;
    end
  end

endmodule
