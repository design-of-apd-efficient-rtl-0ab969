// cg0: Carry Generator for an input carry of 0.
//
// From the half-sum word s0 and the carry word c0 it computes the full-carry
// word Carry01: bit i is the carry out of bit position i when the group's
// input carry is 0. Because the input carry is known to be 0, the carry into
// bit 0 vanishes and the chain reduces to
//   c1(0) = c0(0),   c1(i) = c0(i) OR (s0(i) AND c1(i-1)).
// The gate-level form of this unit is this design's own reading of the
// carry generator the adder specifies; it is the fixed-carry ripple chain
// with the constant folded in. Purely combinational; the chain is W
// AND-OR stages long and runs in parallel with cg1 and before the input
// carry of the group is known.
//
// Ports: s0, c0 (W bits) in; c1 (W bits) out.
module cg0 #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] s0,
  input  logic [W-1:0] c0,
  output logic [W-1:0] c1
);

  always_comb begin
    logic carry;
    carry = 1'b0;
    for (int unsigned i = 0; i < W; i++) begin
      carry = c0[i] | (s0[i] & carry);
      c1[i] = carry;
    end
  end

endmodule
