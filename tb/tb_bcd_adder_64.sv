// tb_bcd_adder_64: self-checking test of the 16-digit BCD adder with its two
// carry flip-flops, at the default 6/5/5-digit split.
//
// Operands change on the falling clock edge. The test checks
//  * the cycle timing: with a carry rippling from digit 0 to digit 15, the low
//    six digits are right before any clock edge, the middle five after one
//    rising edge and the top five and cout only after the second;
//  * random legal operands (including long runs of nines), each held for two
//    rising edges, whatever the previous operands left in the carry flip-flops.
// The reference converts both operands to integers, adds them and converts
// the sum back to BCD by repeated division by ten. A watchdog ends the run
// with a failure after 100,000 clock cycles.
module tb_bcd_adder_64;
  localparam int unsigned DIGITS = 16;

  logic        clk = 1'b0;
  logic        rst_n;
  logic [63:0] a, b, sum;
  logic        cout;
  int          checks = 0, failures = 0;
  int          n_lo_carry = 0, n_mid_carry = 0, n_cout = 0;

  always #5 clk = ~clk;

  bcd_adder_64 dut (.clk(clk), .rst_n(rst_n), .a(a), .b(b), .sum(sum), .cout(cout));

  function automatic longint unsigned to_int(input logic [63:0] v, input int lo, input int n);
    longint unsigned r = 0;
    for (int i = lo + n - 1; i >= lo; i--) r = r * 10 + v[4*i +: 4];
    return r;
  endfunction

  function automatic longint unsigned pow10(input int n);
    longint unsigned r = 1;
    for (int i = 0; i < n; i++) r *= 10;
    return r;
  endfunction

  function automatic logic [63:0] to_bcd(input longint unsigned v);
    logic [63:0] r;
    for (int i = 0; i < DIGITS; i++) begin
      r[4*i +: 4] = 4'(v % 10);
      v = v / 10;
    end
    return r;
  endfunction

  function automatic logic [63:0] rand_bcd();
    logic [63:0] r;
    for (int i = 0; i < DIGITS; i++)
      r[4*i +: 4] = ($urandom_range(3) == 0) ? 4'd9 : 4'($urandom_range(9));
    return r;
  endfunction

  // Compare digits lo..lo+n-1 of sum with those of the exact sum a + b.
  task automatic check_digits(input string what, input int lo, input int n);
    logic [63:0] ref_sum, mask;
    ref_sum = to_bcd(to_int(a, 0, DIGITS) + to_int(b, 0, DIGITS));
    mask = '0;
    for (int i = lo; i < lo + n; i++) mask[4*i +: 4] = 4'hF;
    checks++;
    if ((sum & mask) !== (ref_sum & mask)) begin
      failures++;
      $display("FAIL %s: digits %0d..%0d of %h + %h: got %h expected %h",
               what, lo, lo + n - 1, a, b, sum, ref_sum);
    end
  endtask

  task automatic check_full();
    longint unsigned total;
    total = to_int(a, 0, DIGITS) + to_int(b, 0, DIGITS);
    checks++;
    if (sum !== to_bcd(total) || cout !== (total >= pow10(DIGITS))) begin
      failures++;
      $display("FAIL %h + %h: got %0d %h", a, b, cout, sum);
    end
    if (to_int(a, 0, 6) + to_int(b, 0, 6) >= pow10(6)) n_lo_carry++;
    if ((to_int(a, 0, 11) + to_int(b, 0, 11)) / pow10(6) >= pow10(5)) n_mid_carry++;
    if (cout) n_cout++;
  endtask

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; a = '0; b = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;

    // Carry ripple timing: 9999999999999999 + 1, from cleared carry flip-flops.
    a = to_bcd(64'd9999999999999999); b = to_bcd(64'd1);
    #1;
    check_digits("before any edge", 0, 6);
    checks++;
    if (sum[4*6 +: 20] !== 20'h99999) begin
      failures++;
      $display("FAIL middle digits changed before the first clock edge");
    end
    @(posedge clk); @(negedge clk);
    check_digits("after one edge", 0, 11);
    checks++;
    if (sum[4*11 +: 20] !== 20'h99999 || cout !== 1'b0) begin
      failures++;
      $display("FAIL top digits changed after only one clock edge");
    end
    @(posedge clk); @(negedge clk);
    check_full();

    for (int n = 0; n < 3000; n++) begin
      a = rand_bcd(); b = rand_bcd();
      @(posedge clk); @(posedge clk); @(negedge clk);
      check_full();
    end

    if (n_lo_carry == 0 || n_mid_carry == 0 || n_cout == 0) begin
      failures++;
      $display("FAIL a carry path was never exercised");
    end
    $display("carries low->mid %0d, mid->high %0d, cout %0d", n_lo_carry, n_mid_carry, n_cout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
