// hsg: Half Sum Generator of the carry-select adder.
//
// For every bit position it forms the half-sum s0 = a XOR b and the carry
// (generate) word c0 = a AND b: one half adder per bit, no carry chain.
// Both words feed the two carry generators (cg0, cg1) and s0 also feeds the
// final sum generator (fsg). Purely combinational.
//
// Ports: a, b (W bits) in; s0, c0 (W bits) out.
module hsg #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s0,
  output logic [W-1:0] c0
);

  always_comb begin
    s0 = a ^ b;
    c0 = a & b;
  end

endmodule
