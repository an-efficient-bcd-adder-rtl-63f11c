// tb_vedic_mul_2x2: exhaustive self-checking test of the 2x2-bit multiplier
// leaf against the integer product. Watchdog: 1,000 clock cycles.
module tb_vedic_mul_2x2;
  logic       clk = 1'b0;
  logic [1:0] a, b;
  logic [3:0] p;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  vedic_mul_2x2 dut (.a(a), .b(b), .p(p));

  initial begin
    repeat (1_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        a = 2'(i); b = 2'(j);
        @(posedge clk);
        checks++;
        if (p !== 4'(i * j)) begin
          failures++;
          $display("FAIL %0d*%0d: got %0d", i, j, p);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
