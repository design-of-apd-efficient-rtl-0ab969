// tb_hsg: exhaustive self-checking test of the Half Sum Generator.
// Every pair of W-bit operands is applied; the half-sum and carry words are
// checked bit by bit against a per-bit truth-table evaluation done here.
module tb_hsg;
  localparam int unsigned W = 4;

  logic [W-1:0] a, b, s0, c0;
  logic         clk;
  int           checks = 0, failures = 0;

  hsg #(.W(W)) dut (.a(a), .b(b), .s0(s0), .c0(c0));

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
        a = W'(i);
        b = W'(j);
        #1;
        for (int k = 0; k < int'(W); k++) begin
          // half adder truth table: sum is 1 for one set input, carry for two
          int ones;
          ones = int'(a[k]) + int'(b[k]);
          checks++;
          if (s0[k] !== (ones == 1) || c0[k] !== (ones == 2)) begin
            failures++;
            $display("FAIL a=%h b=%h bit %0d: s0=%b c0=%b", a, b, k, s0[k], c0[k]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
