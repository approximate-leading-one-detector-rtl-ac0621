// log_conv: Mitchell logarithm of one operand, log2(N) ~ k + m.
//
// onehot marks the (possibly approximated) leading one. k is its bit
// index, found by OR-ing, for each bit of k, the one-hot bits whose index
// has that bit set. m is the operand shifted left by 31-k (= ~k) and
// truncated to 31 bits: the bits right of the marked position, left-aligned
// as a binary fraction. Bits at or above the marked position are dropped,
// which only happens when the approximate detector marks a position below
// the true leading one. The result is log = {k, m}. The paper gives the
// k & m format; the encoder and the shifter are this design's choice.
// Combinational.
//
// Ports: a (operand), onehot (leading-one word), log ({k, m}).
module log_conv
  import alm_pkg::*;
(
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] onehot,
  output logic [LOGW-1:0]  log
);

  logic [KW-1:0]    k;

  always_comb begin
    k = '0;
    for (int i = 0; i < WIDTH; i++) begin
      if (onehot[i]) k = k | KW'(i);
    end
    log = {k, MW'(a << (~k))};
  end

endmodule
