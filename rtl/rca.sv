// rca: W-bit ripple-carry adder.
//
// A chain of full adders; the carry out of bit i is the carry into bit i+1.
// In the SQRT-CSLA it adds the two least significant bits (W = 2), where a
// ripple chain is as fast as a carry-select group and smaller. The full-adder
// cell is a textbook one; the adder specifies only that a 2-bit RCA is used.
//
// Ports: a, b (W bits), cin in; s (W bits), cout out. Purely combinational.
module rca #(
  parameter int unsigned W = 2
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  // carry[i] is the carry into bit i; carry[W] is the output carry.
  logic [W:0] carry;

  assign carry[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (carry[i]),
      .s   (s[i]),
      .cout(carry[i+1])
    );
  end

  assign cout = carry[W];

endmodule
