// approx_log_add: approximate adder for two Mitchell logarithms.
//
// Each input is {k, m} (5-bit characteristic, 31-bit mantissa). The sum is
// one bit wider, so the carry out of the mantissa field flows into the
// characteristic as in the exact Mitchell adder. The APPROX least
// significant bits are not added: they are set to a fixed pattern of
// alternating ones and zeros (1 in the odd bit positions, so 16'hAAAA for
// APPROX = 16) and no carry leaves them. Only bits [LOGW-1:APPROX] go
// through a real adder. The 16-bit field and the alternating pattern follow
// the paper; which phase of the pattern is used, and the absence of a carry
// from the fixed field, are this design's choice. Combinational.
//
// Parameters: APPROX (approximated LSBs, 0 .. LOGW-1).
// Ports: la, lb (logarithms), sum ({k, m} of the product, k 6 bits).
module approx_log_add
  import alm_pkg::*;
#(
  parameter int unsigned APPROX = 16
) (
  input  logic [LOGW-1:0] la,
  input  logic [LOGW-1:0] lb,
  output logic [SUMW-1:0] sum
);

  // Alternating bias: bit i is 1 when i is odd.
  function automatic logic [SUMW-1:0] alt_bias();
    logic [SUMW-1:0] pat;
    for (int i = 0; i < SUMW; i++) pat[i] = (i % 2 == 1) && (i < APPROX);
    return pat;
  endfunction

  localparam logic [SUMW-1:0] BIAS = alt_bias();

  logic [SUMW-1:0] upper;

  always_comb begin
    upper = (SUMW'(la >> APPROX) + SUMW'(lb >> APPROX)) << APPROX;
    sum   = upper | BIAS;
  end

endmodule
