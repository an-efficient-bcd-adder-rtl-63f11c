// tb_approx_hr_mul: self-checking test of the approximate hybrid high-radix
// multiplier. The default instance (N = 16, K = 6) gets 200,000 random operand
// pairs plus the extreme values; a small instance (N = 8, K = 4) is tested
// exhaustively.
//
// The reference works from the operand values only: the low K bits of b, read
// as a K-bit signed number y0, are replaced by the power of two nearest to
// |y0| (searched over all candidates, ties to the larger, sign kept), and the
// expected result is a*(b - y0) + a*round(y0). The test also counts operands
// whose digit was exact, rounded up and rounded down (each must occur), and
// reports the mean error relative to the exact product, which should be close
// to zero. Watchdog: 400,000 clock cycles.
module tb_approx_hr_mul;
  logic               clk = 1'b0;
  logic signed [15:0] a, b;
  logic signed [31:0] p;
  logic signed [7:0]  a8, b8;
  logic signed [15:0] p8;
  int                 checks = 0, failures = 0;
  int                 n_exact = 0, n_up = 0, n_down = 0;
  real                err_sum = 0.0, mag_sum = 0.0;

  always #5 clk = ~clk;

  approx_hr_mul dut (.a(a), .b(b), .p(p));
  approx_hr_mul #(.N(8), .K(4)) dut8 (.a(a8), .b(b8), .p(p8));

  // Expected approximate product of x * y with a K-bit high-radix digit.
  function automatic longint expected(input longint x, input longint y, input int k,
                                      input bit count);
    longint y0, mag, best, rest;
    y0   = y & ((64'sd1 << k) - 1);
    if (y0 >= (64'sd1 << (k - 1))) y0 -= (64'sd1 << k);
    rest = y - y0;
    mag  = (y0 < 0) ? -y0 : y0;
    best = 0;
    if (mag != 0) begin
      best = 1;
      for (int i = 1; i <= k; i++) begin
        longint c = 64'sd1 << i;
        longint dc = (c > mag) ? c - mag : mag - c;
        longint db = (best > mag) ? best - mag : mag - best;
        if (dc <= db) best = c;
      end
    end
    if (count) begin
      if (best == mag) n_exact++;
      else if (best > mag) n_up++;
      else n_down++;
    end
    return x * rest + x * ((y0 < 0) ? -best : best);
  endfunction

  task automatic apply(input logic signed [15:0] x, input logic signed [15:0] y);
    longint e;
    a = x; b = y;
    @(posedge clk);
    e = expected(longint'(x), longint'(y), 6, 1'b1);
    checks++;
    if (longint'(p) !== e) begin
      failures++;
      $display("FAIL %0d * %0d: got %0d expected %0d", x, y, p, e);
    end
    err_sum += real'(longint'(p) - longint'(x) * longint'(y));
    mag_sum += (x * y < 0) ? -real'(longint'(x) * longint'(y)) : real'(longint'(x) * longint'(y));
  endtask

  initial begin
    repeat (400_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a8 = '0; b8 = '0;
    apply(16'sh7FFF, 16'sh7FFF);
    apply(-16'sh8000, -16'sh8000);
    apply(-16'sh8000, 16'sh7FFF);
    apply(16'sd0, 16'sd1234);
    apply(16'sd1234, 16'sd0);
    for (int n = 0; n < 200_000; n++) apply(16'($urandom), 16'($urandom));
    for (int i = -128; i < 128; i++)
      for (int j = -128; j < 128; j++) begin
        longint e;
        a8 = 8'(i); b8 = 8'(j);
        #1;
        e = expected(longint'(i), longint'(j), 4, 1'b0);
        checks++;
        if (longint'(p8) !== e) begin
          failures++;
          $display("FAIL 8-bit %0d * %0d: got %0d expected %0d", i, j, p8, e);
        end
      end
    $display("high-radix digit exact %0d, rounded up %0d, rounded down %0d", n_exact, n_up, n_down);
    $display("mean error / mean |exact product| = %f", err_sum / mag_sum);
    if (n_exact == 0 || n_up == 0 || n_down == 0) begin
      failures++; $display("FAIL a rounding case was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
