// tb_bcd_adder_seg: self-checking test of the multi-digit ripple BCD adder at
// its default size (6 digits). Random legal operands and carries, plus the
// corner cases 999999 + 1 (carry through every digit) and 999999 + 999999 + 1,
// are compared with a reference that converts the BCD operands to integers,
// adds them and converts the result back by repeated division by ten. A
// watchdog ends the run with a failure after 100,000 clock cycles.
module tb_bcd_adder_seg;
  localparam int unsigned DIGITS = 6;

  logic                clk = 1'b0;
  logic [4*DIGITS-1:0] a, b, sum;
  logic                cin, cout;
  int                  checks = 0, failures = 0;

  always #5 clk = ~clk;

  bcd_adder_seg dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  function automatic longint unsigned to_int(input logic [4*DIGITS-1:0] v);
    longint unsigned r = 0;
    for (int i = DIGITS - 1; i >= 0; i--) r = r * 10 + v[4*i +: 4];
    return r;
  endfunction

  function automatic logic [4*DIGITS-1:0] to_bcd(input longint unsigned v);
    logic [4*DIGITS-1:0] r;
    for (int i = 0; i < DIGITS; i++) begin
      r[4*i +: 4] = 4'(v % 10);
      v = v / 10;
    end
    return r;
  endfunction

  function automatic logic [4*DIGITS-1:0] rand_bcd();
    logic [4*DIGITS-1:0] r;
    for (int i = 0; i < DIGITS; i++) r[4*i +: 4] = 4'($urandom_range(9));
    return r;
  endfunction

  task automatic apply(input logic [4*DIGITS-1:0] x, input logic [4*DIGITS-1:0] y,
                       input logic c);
    longint unsigned total, modulus;
    a = x; b = y; cin = c;
    @(posedge clk);
    modulus = 1;
    for (int i = 0; i < DIGITS; i++) modulus *= 10;
    total = to_int(x) + to_int(y) + longint'(c);
    checks++;
    if (sum !== to_bcd(total % modulus) || cout !== (total >= modulus)) begin
      failures++;
      $display("FAIL %h + %h + %0d: got %0d %h", x, y, c, cout, sum);
    end
  endtask

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(to_bcd(999999), to_bcd(1), 1'b0);
    apply(to_bcd(999999), to_bcd(0), 1'b1);
    apply(to_bcd(999999), to_bcd(999999), 1'b1);
    apply(to_bcd(0), to_bcd(0), 1'b0);
    apply(to_bcd(505050), to_bcd(494949), 1'b1);
    for (int n = 0; n < 5000; n++) apply(rand_bcd(), rand_bcd(), 1'($urandom_range(1)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
