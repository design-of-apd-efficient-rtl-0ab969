// tb_cg0: exhaustive self-checking test of the carry generator for an input
// carry of 0. For every operand pair the half-sum and carry words are formed
// here, applied to the unit, and each bit of the full-carry word is compared
// with the carry out of that bit position taken from an integer addition
// a + b + 0.
module tb_cg0;
  localparam int unsigned W = 4;

  logic [W-1:0] a, b, s0, c0, c1;
  logic         clk;
  int           checks = 0, failures = 0;

  cg0 #(.W(W)) dut (.s0(s0), .c0(c0), .c1(c1));

  initial begin : clock
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << W); i++) begin
      for (int j = 0; j < (1 << W); j++) begin
        a  = W'(i);
        b  = W'(j);
        s0 = a ^ b;
        c0 = a & b;
        #1;
        for (int k = 0; k < int'(W); k++) begin
          int mask, total;
          logic expected;
          mask     = (2 << k) - 1;          // bits k:0
          total    = (i & mask) + (j & mask) + 0;
          expected = ((total >> (k + 1)) & 1) != 0;
          checks++;
          if (c1[k] !== expected) begin
            failures++;
            $display("FAIL a=%h b=%h bit %0d: c1=%b expected %b", a, b, k, c1[k], expected);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
