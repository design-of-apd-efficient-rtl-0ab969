// tb_cs: exhaustive self-checking test of the Carry Select unit.
// Every pair of carry words that can occur (a carry present for input carry
// 0 is also present for input carry 1) is applied with both input carries;
// the output must equal a plain 2:1 selection of the two words, and cout its
// MSB.
module tb_cs;
  localparam int unsigned W = 4;

  logic [W-1:0] c10, c11, c;
  logic         cin, cout;
  logic         clk;
  int           checks = 0, failures = 0;

  cs #(.W(W)) dut (.c10(c10), .c11(c11), .cin(cin), .c(c), .cout(cout));

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
        if ((i & ~j) != 0) continue;   // c10(k) = 1 implies c11(k) = 1
        for (int ci = 0; ci < 2; ci++) begin
          logic [W-1:0] expected;
          c10 = W'(i);
          c11 = W'(j);
          cin = ci[0];
          expected = (ci != 0) ? W'(j) : W'(i);
          #1;
          checks++;
          if (c !== expected || cout !== expected[W-1]) begin
            failures++;
            $display("FAIL c10=%h c11=%h cin=%b: c=%h cout=%b expected %h", c10, c11, cin, c, cout, expected);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
