// tb_sqrt_csla_widths: the square-root carry-select adder at the other
// widths it is evaluated at, 16, 64 and 128 bits (the 32-bit default is
// covered by tb_sqrt_csla). Each instance gets directed vectors (the
// 2^15 + 2^15 + 1 example for 16 bits, all-ones operands, a carry that
// ripples from the input carry to the output carry) and random operands,
// and {cout, sum} is compared with a reference sum one bit wider than the
// adder. Group layouts: 16 = 2 | 2 3 4 5, 64 = 2 | 2..10 8,
// 128 = 2 | 2..15 7.
module tb_sqrt_csla_widths;
  localparam int unsigned NRANDOM = 5000;

  logic clk;
  int   checks = 0, failures = 0;

  initial begin : clock
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin : watchdog
    repeat (3 * NRANDOM + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0]  p16, q16, s16;
  logic [63:0]  p64, q64, s64;
  logic [127:0] p128, q128, s128;
  logic         r16, r64, r128, c16, c64, c128;

  sqrt_csla #(.N(16))  u16  (.p(p16),  .q(q16),  .r(r16),  .sum(s16),  .cout(c16));
  sqrt_csla #(.N(64))  u64  (.p(p64),  .q(q64),  .r(r64),  .sum(s64),  .cout(c64));
  sqrt_csla #(.N(128)) u128 (.p(p128), .q(q128), .r(r128), .sum(s128), .cout(c128));

  // Applies one operand triple (given at 128 bits, truncated per width) to
  // all three adders and checks each.
  task automatic apply(input logic [127:0] a, input logic [127:0] b, input logic ci);
    logic [16:0]  e16;
    logic [64:0]  e64;
    logic [128:0] e128;
    p16  = a[15:0];  q16  = b[15:0];  r16  = ci;
    p64  = a[63:0];  q64  = b[63:0];  r64  = ci;
    p128 = a;        q128 = b;        r128 = ci;
    e16  = {1'b0, a[15:0]} + {1'b0, b[15:0]} + 17'(ci);
    e64  = {1'b0, a[63:0]} + {1'b0, b[63:0]} + 65'(ci);
    e128 = {1'b0, a} + {1'b0, b} + 129'(ci);
    @(posedge clk);
    checks += 3;
    if ({c16, s16} !== e16) begin
      failures++;
      $display("FAIL 16: p=%h q=%h r=%b got %b_%h expected %h", p16, q16, ci, c16, s16, e16);
    end
    if ({c64, s64} !== e64) begin
      failures++;
      $display("FAIL 64: p=%h q=%h r=%b got %b_%h expected %h", p64, q64, ci, c64, s64, e64);
    end
    if ({c128, s128} !== e128) begin
      failures++;
      $display("FAIL 128: p=%h q=%h r=%b got %b_%h expected %h", p128, q128, ci, c128, s128, e128);
    end
  endtask

  initial begin
    // 16-bit example: 32768 + 32768 + 1 = 65537, i.e. sum 1 with carry out.
    apply(128'd32768, 128'd32768, 1'b1);
    checks++;
    if ({c16, s16} !== 17'd65537) begin
      failures++;
      $display("FAIL 16-bit example: got %0d", {c16, s16});
    end
    apply('0, '0, 1'b0);
    apply('1, '1, 1'b1);
    apply('1, '0, 1'b1);
    for (int unsigned k = 0; k < NRANDOM; k++) begin
      logic [127:0] a, b;
      a = {$urandom(), $urandom(), $urandom(), $urandom()};
      b = {$urandom(), $urandom(), $urandom(), $urandom()};
      if (k % 4 == 1) b = ~a ^ (128'd1 << ($urandom() % 128));
      apply(a, b, 1'($urandom()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
