// tb_fsg: exhaustive self-checking test of the Final Sum Generator.
// For every operand pair and input carry the half-sum word and the true
// carry word (carry out of each bit position of a + b + cin) are formed here;
// the unit's sum must equal the low W bits of the integer sum.
module tb_fsg;
  localparam int unsigned W = 4;

  logic [W-1:0] a, b, s0, c, s;
  logic         cin;
  logic         clk;
  int           checks = 0, failures = 0;

  fsg #(.W(W)) dut (.s0(s0), .c(c), .cin(cin), .s(s));

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
        for (int ci = 0; ci < 2; ci++) begin
          int total;
          a   = W'(i);
          b   = W'(j);
          cin = ci[0];
          s0  = a ^ b;
          for (int k = 0; k < int'(W); k++) begin
            int mask;
            mask = (2 << k) - 1;
            c[k] = ((((i & mask) + (j & mask) + ci) >> (k + 1)) & 1) != 0;
          end
          total = i + j + ci;
          #1;
          checks++;
          if (s !== W'(total)) begin
            failures++;
            $display("FAIL a=%h b=%h cin=%b: s=%h expected %h", a, b, cin, s, W'(total));
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
