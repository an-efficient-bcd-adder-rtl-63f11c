// tb_cla_adder: self-checking test of the carry look-ahead adder. The default
// 32-bit instance gets random operands and carry-chain corner cases (all ones
// plus one, alternating patterns); a 6-bit instance, whose last group is only
// two bits wide, is tested exhaustively. The reference is the sum computed
// with the simulator's own wider arithmetic. Watchdog: 200,000 clock cycles.
module tb_cla_adder;
  logic        clk = 1'b0;
  logic [31:0] a, b, s;
  logic        cin, cout;
  logic [5:0]  a6, b6, s6;
  logic        cin6, cout6;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  cla_adder dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));
  cla_adder #(.W(6)) dut6 (.a(a6), .b(b6), .cin(cin6), .s(s6), .cout(cout6));

  task automatic apply(input logic [31:0] x, input logic [31:0] y, input logic c);
    logic [32:0] ref_sum;
    a = x; b = y; cin = c;
    @(posedge clk);
    ref_sum = {1'b0, x} + {1'b0, y} + 33'(c);
    checks++;
    if ({cout, s} !== ref_sum) begin
      failures++;
      $display("FAIL %h + %h + %0d: got %0d %h", x, y, c, cout, s);
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
    a6 = '0; b6 = '0; cin6 = 1'b0;
    apply(32'hFFFF_FFFF, 32'h0000_0001, 1'b0);
    apply(32'hFFFF_FFFF, 32'h0000_0000, 1'b1);
    apply(32'hFFFF_FFFF, 32'hFFFF_FFFF, 1'b1);
    apply(32'hAAAA_AAAA, 32'h5555_5555, 1'b1);
    apply(32'h0FFF_FFF0, 32'h0000_0010, 1'b0);
    for (int n = 0; n < 20_000; n++) apply($urandom, $urandom, 1'($urandom_range(1)));
    for (int i = 0; i < 64; i++)
      for (int j = 0; j < 64; j++)
        for (int c = 0; c < 2; c++) begin
          a6 = 6'(i); b6 = 6'(j); cin6 = 1'(c);
          @(posedge clk);
          checks++;
          if ({cout6, s6} !== 7'(i + j + c)) begin
            failures++;
            $display("FAIL W=6 %0d+%0d+%0d: got %0d", i, j, c, {cout6, s6});
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
