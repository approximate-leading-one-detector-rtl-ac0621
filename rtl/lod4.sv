// lod4: 4-bit leading one detector slice.
//
// d has a single 1 at the position of the most significant 1 of a, and is
// all zeros when a is zero. As in the paper's slice, a "no one seen yet"
// signal ripples down from bit 3: each bit is passed to d only while no
// higher bit of a is set, and each set bit kills the ripple for the bits
// below it. The slice is purely combinational.
//
// Ports: a (4-bit field), d (one-hot leading-one word).
module lod4 (
  input  logic [3:0] a,
  output logic [3:0] d
);

  logic [3:0] none_above;  // none_above[i]: a[3:i+1] are all zero

  assign none_above[3] = 1'b1;
  for (genvar i = 2; i >= 0; i--) begin : g_ripple
    assign none_above[i] = none_above[i+1] & ~a[i+1];
  end

  assign d = a & none_above;

endmodule
