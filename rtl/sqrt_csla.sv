// sqrt_csla: N-bit square-root carry-select adder built from the
// area-delay-power efficient carry-select groups (csla).
//
// Structure: a 2-bit ripple-carry adder (rca) adds bits 1:0 with the input
// carry r. Above it, carry-select groups of width 2, 3, 4, ... cover the
// remaining bits, the last group taking only what is left (csla_pkg gives the
// layout; for the default N = 32 it is 2 | 2 3 4 5 6 7 3, bits 1:0 in the
// RCA). Every group produces its half-sum and both carry words from its own
// operand bits alone, so all groups work in parallel; the carry from below
// then passes through one AND-OR gate per group (the group's carry-select
// unit) to the group above. Growing group widths balance the time a group
// needs for its carry words against the time the carry needs to arrive.
// The group layout for N = 32 and N = 16 follows the adder's definition; the
// rule that extends it to other N is this design's own.
//
// Ports: p, q (N bits) addends, r input carry; sum (N bits), cout output
// carry. Purely combinational: no clock, no reset, no latency.
module sqrt_csla
  import csla_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] p,
  input  logic [N-1:0] q,
  input  logic         r,
  output logic [N-1:0] sum,
  output logic         cout
);

  localparam int unsigned NG = num_groups(N);

  // group_carry[g] is the carry into group g; group_carry[NG] is cout.
  logic [NG:0] group_carry;

  rca #(.W(RCA_WIDTH)) u_rca (
    .a   (p[RCA_WIDTH-1:0]),
    .b   (q[RCA_WIDTH-1:0]),
    .cin (r),
    .s   (sum[RCA_WIDTH-1:0]),
    .cout(group_carry[0])
  );

  for (genvar g = 0; g < NG; g++) begin : g_group
    localparam int unsigned GW  = group_width(N, g);
    localparam int unsigned LSB = group_lsb(N, g);

    csla #(.W(GW)) u_csla (
      .a   (p[LSB+GW-1:LSB]),
      .b   (q[LSB+GW-1:LSB]),
      .cin (group_carry[g]),
      .s   (sum[LSB+GW-1:LSB]),
      .cout(group_carry[g+1])
    );
  end

  assign cout = group_carry[NG];

  // The layout must cover all N bits with at least one carry-select group.
  initial begin : check_layout
    assert (N > RCA_WIDTH && group_lsb(N, NG) == N)
      else $error("sqrt_csla: N = %0d does not give a valid group layout", N);
  end

endmodule
