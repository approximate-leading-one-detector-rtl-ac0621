// antilog: antilogarithm of a Mitchell log sum, 2^k * (1 + m).
//
// sum = {k, m} with a 6-bit k and a 31-bit fraction m. The result has a 1
// at bit k, the mantissa m right below it, and zeros in the remaining
// least significant bits; mantissa bits that fall below bit 0 (k < 31) are
// dropped. Built as the 32-bit word {1, m} shifted left by k into a 95-bit
// field, keeping bits [94:31]. The paper describes the result; the shifter
// is this design's choice. Combinational.
//
// Ports: sum (log of the product), p (product).
module antilog
  import alm_pkg::*;
(
  input  logic [SUMW-1:0] sum,
  output logic [PW-1:0]   p
);

  localparam int unsigned XW = PW + MW;  // 95-bit shift field

  logic [KW:0]   k;
  logic [MW-1:0] m;
  logic [XW-1:0] wide;

  always_comb begin
    k    = sum[SUMW-1:MW];
    m    = sum[MW-1:0];
    wide = XW'({1'b1, m}) << k;
    p    = PW'(wide >> MW);
  end

endmodule
