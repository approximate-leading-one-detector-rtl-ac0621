// bias_sel16: low-half leading-one estimate of approximate LOD Design II.
//
// The exact low-half detector is replaced by one OR per 4-bit field
// (OR4 over a[15:12] down to OR1 over a[3:0]). A priority choice over
// the four ORs picks one of four one-hot biases through a multiplexer:
//   OR4 = 1                  -> x"4000"
//   OR4 = 0, OR3 = 1         -> x"0400"
//   OR4 = OR3 = 0, OR2 = 1   -> x"0040"
//   only OR1 = 1             -> x"0004"
// The bias words and the priority follow the paper. When all four ORs are
// 0 the output is 0 (a case the paper's table leaves open). nz is the OR
// of the four field ORs, for the stage-3 2-bit LOD. en gates the output
// like the stage-3 multiplexers of the exact tree. Combinational.
module bias_sel16
  import alm_pkg::*;
(
  input  logic [15:0] a,
  input  logic        en,
  output logic [15:0] o,
  output logic        nz
);

  logic [4:1] fld_or;
  logic [15:0] bias;

  always_comb begin
    for (int f = 1; f <= 4; f++) fld_or[f] = |a[4*(f-1) +: 4];
    nz = |fld_or;
    unique casez (fld_or)
      4'b1???: bias = BIAS_FIELD4;
      4'b01??: bias = BIAS_FIELD3;
      4'b001?: bias = BIAS_FIELD2;
      4'b0001: bias = BIAS_FIELD1;
      default: bias = '0;
    endcase
    o = en ? bias : '0;
  end

endmodule
