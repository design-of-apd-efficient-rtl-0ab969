// cs: Carry Select unit of the carry-select adder.
//
// Selects the final carry word c: Carry01 (c10) when cin = 0, Carry11 (c11)
// when cin = 1. A carry that is produced with an input carry of 0 is also
// produced with an input carry of 1 (c10(i) = 1 implies c11(i) = 1), so each
// 2:1 multiplexer reduces to one AND-OR gate:
//   c(i) = c10(i) OR (cin AND c11(i)).
// The output carry of the group is the MSB of c. Along the SQRT-CSLA carry
// chain the input carry passes through a single AND-OR per group, which is
// what makes the group's output carry fast. Purely combinational.
//
// Ports: c10, c11 (W bits), cin in; c (W bits), cout out.
module cs #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] c10,
  input  logic [W-1:0] c11,
  input  logic         cin,
  output logic [W-1:0] c,
  output logic         cout
);

  always_comb begin
    c    = c10 | ({W{cin}} & c11);
    cout = c[W-1];
  end

endmodule
