// tb_csla: exhaustive self-checking test of the csla adder at W = 4 and W = 1..6
// for width coverage. Every operand pair and input carry is applied and
// {cout, s} is compared with the integer sum a + b + cin.
module tb_csla;
  logic clk;
  int   checks = 0, failures = 0;

  initial begin : clock
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One instance per width; each is driven exhaustively by the task below.
  localparam int unsigned NW = 6;
  logic [5:0] a [NW], b [NW], s [NW];
  logic       cin [NW], cout [NW];

  for (genvar w = 1; w <= NW; w++) begin : g_w
    if (w == 4) begin : g_default
      // default parameters
      csla dut (.a(a[w-1][w-1:0]), .b(b[w-1][w-1:0]), .cin(cin[w-1]),
              .s(s[w-1][w-1:0]), .cout(cout[w-1]));
    end else begin : g_other
      csla #(.W(w)) dut (.a(a[w-1][w-1:0]), .b(b[w-1][w-1:0]), .cin(cin[w-1]),
                       .s(s[w-1][w-1:0]), .cout(cout[w-1]));
    end
    if (w < 6) begin : g_pad
      assign s[w-1][5:w] = '0;
    end
  end

  initial begin
    for (int w = 1; w <= int'(NW); w++) begin
      for (int i = 0; i < (1 << w); i++) begin
        for (int j = 0; j < (1 << w); j++) begin
          for (int ci = 0; ci < 2; ci++) begin
            int total, got;
            a[w-1]   = 6'(i);
            b[w-1]   = 6'(j);
            cin[w-1] = ci[0];
            total    = i + j + ci;
            #1;
            got = (int'(cout[w-1]) << w) | int'(s[w-1]);
            checks++;
            if (got != total) begin
              failures++;
              $display("FAIL W=%0d a=%0d b=%0d cin=%0d: got %0d expected %0d", w, i, j, ci, got, total);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
