// cg1: Carry Generator for an input carry of 1.
//
// From the half-sum word s0 and the carry word c0 it computes the full-carry
// word Carry11: bit i is the carry out of bit position i when the group's
// input carry is 1. With the input carry fixed at 1 the first stage becomes
// an OR, and the rest of the chain is the usual generate/propagate ripple:
//   c1(0) = c0(0) OR s0(0),   c1(i) = c0(i) OR (s0(i) AND c1(i-1)).
// The gate-level form is this design's own reading of the carry generator
// the adder specifies. Purely combinational, evaluated in parallel with cg0.
//
// Ports: s0, c0 (W bits) in; c1 (W bits) out.
module cg1 #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] s0,
  input  logic [W-1:0] c0,
  output logic [W-1:0] c1
);

  always_comb begin
    logic carry;
    carry = 1'b1;
    for (int unsigned i = 0; i < W; i++) begin
      carry = c0[i] | (s0[i] & carry);
      c1[i] = carry;
    end
  end

endmodule
