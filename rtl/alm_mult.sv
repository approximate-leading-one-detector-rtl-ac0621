// alm_mult: 32 x 32-bit approximate Mitchell logarithmic multiplier.
//
// The product of a and b is approximated as 2^(k1+k2) * (1 + m1 + m2),
// computed as the antilogarithm of the sum of the two approximate
// logarithms {k, m}. Each operand goes through an approximate leading one
// detector (Design I: fixed low-half bias x"0400"; Design II: one of four
// biases chosen by the OR of the low 4-bit fields), then log_conv. The two
// logarithms are summed by approx_log_add, whose ADD_APPROX LSBs are a
// fixed alternating 1/0 pattern, and antilog forms the 64-bit product.
// Operands of 2^16 and above get the same logarithm as the conventional
// Mitchell multiplier; smaller operands get the coarser approximation.
//
// The paper gives the two detector designs, the 16-bit approximate adder
// field and the k & m data path. This design adds a zero rule: if either
// operand is 0 (the stage-3 LOD of either detector reports no one) the
// product is forced to 0, since a logarithm of zero does not exist. The
// default DESIGN is Design I, the smaller of the two. The multiplier is
// purely combinational: p follows a and b with no clock and no latency.
//
// Parameters: DESIGN (LOD_DESIGN_I or LOD_DESIGN_II),
//             ADD_APPROX (approximated adder LSBs).
// Ports: a, b (unsigned operands), p (approximate product).
module alm_mult
  import alm_pkg::*;
#(
  parameter lod_design_e DESIGN     = LOD_DESIGN_I,
  parameter int unsigned ADD_APPROX = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [PW-1:0]    p
);

  logic [WIDTH-1:0] oh_a, oh_b;
  logic             zero_a, zero_b;
  logic [LOGW-1:0]  log_a, log_b;
  logic [SUMW-1:0]  log_p;
  logic [PW-1:0]    p_raw;

  if (DESIGN == LOD_DESIGN_I) begin : g_lod
    alod_d1 u_lod_a (.a(a), .onehot(oh_a), .zero(zero_a));
    alod_d1 u_lod_b (.a(b), .onehot(oh_b), .zero(zero_b));
  end else begin : g_lod
    alod_d2 u_lod_a (.a(a), .onehot(oh_a), .zero(zero_a));
    alod_d2 u_lod_b (.a(b), .onehot(oh_b), .zero(zero_b));
  end

  log_conv u_log_a (.a(a), .onehot(oh_a), .log(log_a));
  log_conv u_log_b (.a(b), .onehot(oh_b), .log(log_b));

  approx_log_add #(.APPROX(ADD_APPROX)) u_add (
    .la(log_a), .lb(log_b), .sum(log_p)
  );

  antilog u_antilog (.sum(log_p), .p(p_raw));

  assign p = (zero_a || zero_b) ? '0 : p_raw;

endmodule
