// alm_pkg: widths, bias words and the design selector shared by the
// approximate Mitchell multiplier.
//
// The multiplier takes two 32-bit unsigned operands. An operand's
// approximate logarithm is k & m: a 5-bit leading-one position k followed
// by a 31-bit mantissa m (the bits right of the leading one, left-aligned).
// The sum of two logarithms carries one extra bit in k, so it is 37 bits
// wide, and the product is 64 bits.
//
// The 32-bit operand width, the 4-bit LOD slice, the four low-half biases
// and the 16-bit approximate adder field follow the paper; the
// enumeration names are this design's own.
package alm_pkg;

  localparam int unsigned WIDTH = 32;           // operand width
  localparam int unsigned KW    = 5;            // leading-one position bits
  localparam int unsigned MW    = WIDTH - 1;    // mantissa bits
  localparam int unsigned LOGW  = KW + MW;      // one logarithm, k & m
  localparam int unsigned SUMW  = LOGW + 1;     // sum of two logarithms
  localparam int unsigned PW    = 2 * WIDTH;    // product width

  // Which approximation of the low 16 LOD bits is built.
  typedef enum logic {
    LOD_DESIGN_I  = 1'b0,   // single fixed bias
    LOD_DESIGN_II = 1'b1    // one of four biases, chosen by OR of the fields
  } lod_design_e;

  // Low-half LOD outputs used in place of the exact 16-bit detector.
  localparam logic [15:0] BIAS_D1     = 16'h0400;  // Design I
  localparam logic [15:0] BIAS_FIELD4 = 16'h4000;  // Design II, a[15:12] non-zero
  localparam logic [15:0] BIAS_FIELD3 = 16'h0400;  // Design II, a[11:8] first non-zero
  localparam logic [15:0] BIAS_FIELD2 = 16'h0040;  // Design II, a[7:4] first non-zero
  localparam logic [15:0] BIAS_FIELD1 = 16'h0004;  // Design II, only a[3:0] non-zero

endpackage
