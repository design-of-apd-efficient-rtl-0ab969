// tb_sqrt_csla: end-to-end self-checking test of the 32-bit square-root
// carry-select adder at its default parameters.
//
// Applies directed vectors (zero, all ones, a carry that ripples through all
// 32 bits, the 2^17 + 2^17 example) and random operands, and compares
// {cout, sum} with a 33-bit reference sum p + q + r. It also watches the
// adder's inner carries and counts how often each mechanism occurs:
//   - the RCA passing a carry into the first carry-select group,
//   - each group receiving an input carry of 0 and of 1,
//   - a group whose output carry is decided by the carry select: an input
//     carry of 1 while the group's carry-0 and carry-1 words differ at the MSB,
//   - a carry entering at r and leaving at cout (full-length propagation).
// A mechanism that never occurs is counted as a failure.
module tb_sqrt_csla;
  import csla_pkg::*;

  localparam int unsigned N  = 32;
  localparam int unsigned NG = num_groups(N);
  localparam int unsigned NRANDOM = 20000;

  logic [N-1:0] p, q, sum;
  logic         r, cout;
  logic         clk;
  int           checks = 0, failures = 0;

  sqrt_csla dut (.p(p), .q(q), .r(r), .sum(sum), .cout(cout));

  initial begin : clock
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin : watchdog
    repeat (NRANDOM + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters. Each is derived from the operands alone: the carry
  // into a group is bit LSB of the partial sum of the bits below it, and a
  // group's output carry is decided by its carry-1 word (and differs from its
  // carry-0 word) exactly when every bit of the group propagates.
  int rca_carry_out = 0;
  int full_propagate = 0;
  int group_cin0 [NG];
  int group_cin1 [NG];
  int group_select [NG];

  task automatic apply(input logic [N-1:0] a, input logic [N-1:0] b, input logic ci);
    logic [N:0] expected;
    p = a;
    q = b;
    r = ci;
    expected = {1'b0, a} + {1'b0, b} + {{N{1'b0}}, ci};
    @(posedge clk);
    checks++;
    if ({cout, sum} !== expected) begin
      failures++;
      $display("FAIL p=%h q=%h r=%b: got %b_%h expected %b_%h", a, b, ci, cout, sum, expected[N], expected[N-1:0]);
    end
    for (int g = 0; g < int'(NG); g++) begin
      int unsigned lsb, gw;
      logic [N:0] low_mask, low_sum, grp_mask;
      logic       gcin;
      lsb      = group_lsb(N, g);
      gw       = group_width(N, g);
      low_mask = (N+1)'((64'd1 << lsb) - 1);
      low_sum  = ({1'b0, a} & low_mask) + ({1'b0, b} & low_mask) + {{N{1'b0}}, ci};
      gcin     = low_sum[lsb];
      grp_mask = (N+1)'(((64'd1 << gw) - 1) << lsb);
      if (g == 0 && gcin) rca_carry_out++;
      if (gcin) group_cin1[g]++; else group_cin0[g]++;
      if (gcin && ((({1'b0, a} ^ {1'b0, b}) & grp_mask) == grp_mask)) group_select[g]++;
    end
    if (ci && ((a ^ b) == '1)) full_propagate++;
  endtask

  initial begin
    for (int g = 0; g < int'(NG); g++) begin
      group_cin0[g] = 0;
      group_cin1[g] = 0;
      group_select[g] = 0;
    end
    // Directed vectors.
    apply('0, '0, 1'b0);
    apply('1, '1, 1'b1);
    apply('1, '0, 1'b1);                          // carry ripples r -> cout
    apply(32'h5555_5555, 32'hAAAA_AAAA, 1'b1);    // same, alternating bits
    apply(32'd131072, 32'd131072, 1'b0);          // 2^17 + 2^17 = 262144
    apply(32'hFFFF_FFFF, 32'd1, 1'b0);
    // Carry entering each group boundary from below.
    for (int g = 0; g <= int'(NG); g++) begin
      int unsigned lsb;
      lsb = group_lsb(N, g);
      apply((N'(1) << lsb) - 1, N'(1), 1'b0);
      apply(~((N'(1) << lsb) - 1), (N'(1) << lsb), 1'b1);
    end
    // Random operands.
    for (int unsigned k = 0; k < NRANDOM; k++) begin
      logic [N-1:0] a, b;
      a = N'($urandom());
      b = N'($urandom());
      if (k % 4 == 1) b = ~a ^ N'(1 << ($urandom() % N));   // long propagate runs
      apply(a, b, 1'($urandom()));
    end

    // Mechanism report.
    $display("rca carry out: %0d, full-length propagation: %0d", rca_carry_out, full_propagate);
    checks += 2;
    if (rca_carry_out == 0) begin failures++; $display("FAIL no RCA carry out"); end
    if (full_propagate == 0) begin failures++; $display("FAIL no full-length propagation"); end
    for (int g = 0; g < int'(NG); g++) begin
      $display("group %0d (width %0d): cin=0 %0d, cin=1 %0d, carry-1 word selected %0d",
               g, group_width(N, g), group_cin0[g], group_cin1[g], group_select[g]);
      checks += 3;
      if (group_cin0[g] == 0) begin failures++; $display("FAIL group %0d never saw cin=0", g); end
      if (group_cin1[g] == 0) begin failures++; $display("FAIL group %0d never saw cin=1", g); end
      if (group_select[g] == 0) begin failures++; $display("FAIL group %0d never selected by cin", g); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
