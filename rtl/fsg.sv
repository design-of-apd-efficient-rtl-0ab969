// fsg: Final Sum Generator of the carry-select adder.
//
// Forms the sum word from the half-sum word s0 and the selected carry word c:
// the LSB of the sum is s0(0) XOR cin, and each upper bit i is
// s0(i) XOR c(i-1). The MSB of c is not used here; it is the group's output
// carry. Purely combinational, one XOR per bit after the carry-select unit.
//
// Ports: s0, c (W bits), cin in; s (W bits) out.
module fsg #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] s0,
  input  logic [W-1:0] c,
  input  logic         cin,
  output logic [W-1:0] s
);

  always_comb begin
    logic carry;  // carry into bit i: cin for bit 0, c(i-1) above it
    carry = cin;
    for (int unsigned i = 0; i < W; i++) begin
      s[i]  = s0[i] ^ carry;
      carry = c[i];
    end
  end

endmodule
