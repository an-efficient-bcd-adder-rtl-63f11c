// tb_vedic_mul: self-checking test of the recursive Vedic multiplier. The
// default 64x64 instance gets random operands and the corners 0, 1 and
// 2**64-1; an 8x8 instance is tested exhaustively. The reference is the
// product computed by the simulator at full 128-bit width. Watchdog: 200,000
// clock cycles.
module tb_vedic_mul;
  logic         clk = 1'b0;
  logic [63:0]  a, b;
  logic [127:0] p;
  logic [7:0]   a8, b8;
  logic [15:0]  p8;
  int           checks = 0, failures = 0;

  always #5 clk = ~clk;

  vedic_mul dut (.a(a), .b(b), .p(p));
  vedic_mul #(.N(8)) dut8 (.a(a8), .b(b8), .p(p8));

  task automatic apply(input logic [63:0] x, input logic [63:0] y);
    logic [127:0] ref_p;
    a = x; b = y;
    @(posedge clk);
    ref_p = 128'(x) * 128'(y);
    checks++;
    if (p !== ref_p) begin
      failures++;
      $display("FAIL %h * %h: got %h expected %h", x, y, p, ref_p);
    end
  endtask

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a8 = '0; b8 = '0;
    apply('1, '1);
    apply('1, 64'd1);
    apply(64'd0, '1);
    apply(64'h8000_0000_0000_0000, 64'h8000_0000_0000_0001);
    apply(64'hFFFF_FFFF_0000_0000, 64'h0000_0000_FFFF_FFFF);
    for (int n = 0; n < 20_000; n++) apply({$urandom, $urandom}, {$urandom, $urandom});
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i); b8 = 8'(j);
        #1;
        checks++;
        if (p8 !== 16'(i * j)) begin
          failures++;
          $display("FAIL 8x8 %0d*%0d: got %0d", i, j, p8);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
