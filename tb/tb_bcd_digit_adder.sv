// tb_bcd_digit_adder: exhaustive self-checking test of the one-digit BCD adder.
// Every pair of legal digits (0..9) with carry in 0 and 1 is applied, and the
// result is compared with the decimal sum worked out with integer division:
// digit = (a + b + cin) % 10, carry = (a + b + cin) / 10. A watchdog ends the
// run with a failure if it has not finished after 10,000 clock cycles.
module tb_bcd_digit_adder;
  logic       clk = 1'b0;
  logic [3:0] a, b, sum;
  logic       cin, cout;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  bcd_digit_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    repeat (10_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ci = 0; ci < 2; ci++)
      for (int i = 0; i < 10; i++)
        for (int j = 0; j < 10; j++) begin
          int total;
          a = 4'(i); b = 4'(j); cin = 1'(ci);
          @(posedge clk);
          total = i + j + ci;
          checks++;
          if (sum !== 4'(total % 10) || cout !== 1'(total / 10)) begin
            failures++;
            $display("FAIL %0d+%0d+%0d: got carry %0d digit %0d", i, j, ci, cout, sum);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
