// csla: area-delay-power efficient carry-select adder group of W bits.
//
// Instead of two complete ripple-carry adders (one per possible input carry)
// and a multiplexer on the sums, the group computes the half-sum and carry
// words once (hsg), derives two carry words from them with the input carry
// fixed at 0 (cg0) and at 1 (cg1), selects one carry word once the real input
// carry is known (cs) and forms the sum with one XOR per bit (fsg). The input
// carry therefore enters only the last two stages; the carry generators work
// while the carry from lower groups is still on its way. The wiring follows
// the adder's block diagram exactly.
//
// Ports: a, b (W bits), cin in; s (W bits), cout out. Purely combinational.
module csla #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  logic [W-1:0] s0;   // half-sum word
  logic [W-1:0] c0;   // carry word
  logic [W-1:0] c10;  // full-carry word for input carry 0
  logic [W-1:0] c11;  // full-carry word for input carry 1
  logic [W-1:0] c;    // selected carry word

  hsg #(.W(W)) u_hsg (.a(a), .b(b), .s0(s0), .c0(c0));
  cg0 #(.W(W)) u_cg0 (.s0(s0), .c0(c0), .c1(c10));
  cg1 #(.W(W)) u_cg1 (.s0(s0), .c0(c0), .c1(c11));
  cs  #(.W(W)) u_cs  (.c10(c10), .c11(c11), .cin(cin), .c(c), .cout(cout));
  fsg #(.W(W)) u_fsg (.s0(s0), .c(c), .cin(cin), .s(s));

endmodule
