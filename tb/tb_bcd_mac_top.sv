// tb_bcd_mac_top: end-to-end test of the whole design at its default sizes
// (16-digit BCD adder with a 6/5/5 split, 64x64 MAC with 128-bit accumulator,
// 16x16 approximate multiplier with a six-bit high-radix digit).
//
// Both datapaths run at once from one clock. Every third cycle new BCD
// operands are applied and the full 16-digit sum is checked two rising edges
// later; every cycle the MAC gets new operands and a random mode (accumulate,
// clear, idle), and its product and accumulator are checked against a
// reference model. References are integer arithmetic in the testbench: BCD to
// integer and back by division by ten, and the full-width product a*b.
//
// The run counts each mechanism of the design and fails if one never
// happened: the decimal correction of a digit (a digit sum above nine), a
// carry held in the low->middle and in the middle->high flip-flop, the
// decimal carry out, and the MAC's accumulate, clear, idle and wrap-around.
// A mid-run reset checks that both carry flip-flops and the accumulator clear.
// The approximate 16x16 multiplier gets new signed operands every cycle; its
// reference replaces the low six bits of b, read as a signed digit, by the
// nearest power of two (ties up), and the run counts digits that were exact,
// rounded up and rounded down.
// Watchdog: 50,000 clock cycles.
module tb_bcd_mac_top;
  logic         clk = 1'b0;
  logic         rst_n;
  logic [63:0]  bcd_a, bcd_b, bcd_sum;
  logic         bcd_cout;
  logic         mac_clear, mac_en;
  logic [63:0]  mac_a, mac_b;
  logic [127:0] mac_prod, mac_acc, acc_ref;
  logic signed [15:0] am_a, am_b;
  logic signed [31:0] am_p;
  int           checks = 0, failures = 0;
  int           n_corr = 0, n_lo_carry = 0, n_mid_carry = 0, n_cout = 0;
  int           n_acc = 0, n_clear = 0, n_hold = 0, n_wrap = 0, n_reset = 0;
  int           n_am_exact = 0, n_am_up = 0, n_am_down = 0;

  always #5 clk = ~clk;

  bcd_mac_top dut (
    .clk(clk), .rst_n(rst_n),
    .bcd_a(bcd_a), .bcd_b(bcd_b), .bcd_sum(bcd_sum), .bcd_cout(bcd_cout),
    .mac_clear(mac_clear), .mac_en(mac_en), .mac_a(mac_a), .mac_b(mac_b),
    .mac_prod(mac_prod), .mac_acc(mac_acc),
    .am_a(am_a), .am_b(am_b), .am_p(am_p)
  );

  function automatic longint unsigned to_int(input logic [63:0] v, input int n);
    longint unsigned r = 0;
    for (int i = n - 1; i >= 0; i--) r = r * 10 + v[4*i +: 4];
    return r;
  endfunction

  function automatic longint unsigned pow10(input int n);
    longint unsigned r = 1;
    for (int i = 0; i < n; i++) r *= 10;
    return r;
  endfunction

  function automatic logic [63:0] to_bcd(input longint unsigned v);
    logic [63:0] r;
    for (int i = 0; i < 16; i++) begin
      r[4*i +: 4] = 4'(v % 10);
      v = v / 10;
    end
    return r;
  endfunction

  function automatic logic [63:0] rand_bcd();
    logic [63:0] r;
    for (int i = 0; i < 16; i++)
      r[4*i +: 4] = ($urandom_range(2) == 0) ? 4'd9 : 4'($urandom_range(9));
    return r;
  endfunction

  // MAC reference model.
  always @(posedge clk) begin
    logic [128:0] next;
    if (!rst_n) acc_ref <= '0;
    else if (mac_en) begin
      next = {1'b0, 128'(mac_a) * 128'(mac_b)};
      if (!mac_clear) next += {1'b0, acc_ref};
      if (next[128]) n_wrap++;
      if (mac_clear) n_clear++; else n_acc++;
      acc_ref <= next[127:0];
    end else n_hold++;
  end

  task automatic check_bcd();
    longint unsigned total;
    total = to_int(bcd_a, 16) + to_int(bcd_b, 16);
    checks++;
    if (bcd_sum !== to_bcd(total) || bcd_cout !== (total >= pow10(16))) begin
      failures++;
      $display("FAIL BCD %h + %h: got %0d %h", bcd_a, bcd_b, bcd_cout, bcd_sum);
    end
    for (int i = 0; i < 16; i++) begin
      // digit sum including the carry from below, as the reference sees it
      longint unsigned below;
      below = (i == 0) ? 0 : (to_int(bcd_a, i) + to_int(bcd_b, i)) / pow10(i);
      if (bcd_a[4*i +: 4] + bcd_b[4*i +: 4] + below > 9) n_corr++;
    end
    if (to_int(bcd_a, 6) + to_int(bcd_b, 6) >= pow10(6)) n_lo_carry++;
    if ((to_int(bcd_a, 11) + to_int(bcd_b, 11)) / pow10(6) >= pow10(5)) n_mid_carry++;
    if (bcd_cout) n_cout++;
  endtask

  task automatic check_mac();
    checks++;
    if (mac_prod !== 128'(mac_a) * 128'(mac_b)) begin
      failures++; $display("FAIL product %h * %h = %h", mac_a, mac_b, mac_prod);
    end
    checks++;
    if (mac_acc !== acc_ref) begin
      failures++; $display("FAIL acc %h expected %h", mac_acc, acc_ref);
    end
  endtask

  task automatic check_amul();
    longint y0, mag, best, e;
    y0 = longint'(am_b) & 63;
    if (y0 >= 32) y0 -= 64;
    mag  = (y0 < 0) ? -y0 : y0;
    best = 0;
    if (mag != 0) begin
      best = 1;
      for (int i = 1; i <= 6; i++) begin
        longint c = 64'sd1 << i;
        longint dc = (c > mag) ? c - mag : mag - c;
        longint db = (best > mag) ? best - mag : mag - best;
        if (dc <= db) best = c;
      end
    end
    if (best == mag) n_am_exact++; else if (best > mag) n_am_up++; else n_am_down++;
    e = longint'(am_a) * (longint'(am_b) - y0) + longint'(am_a) * ((y0 < 0) ? -best : best);
    checks++;
    if (longint'(am_p) !== e) begin
      failures++; $display("FAIL approx %0d * %0d: got %0d expected %0d", am_a, am_b, am_p, e);
    end
  endtask

  task automatic mac_step();
    int mode;
    mode      = $urandom_range(7);
    mac_en    = (mode != 0);
    mac_clear = (mode == 1);
    if ($urandom_range(2) == 0) begin mac_a = '1; mac_b = '1 - 64'($urandom_range(3)); end
    else begin mac_a = {$urandom, $urandom}; mac_b = {$urandom, $urandom}; end
  endtask

  initial begin
    repeat (50_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; bcd_a = '0; bcd_b = '0;
    mac_clear = 1'b0; mac_en = 1'b0; mac_a = '0; mac_b = '0;
    am_a = '0; am_b = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;

    for (int n = 0; n < 2000; n++) begin
      bcd_a = rand_bcd(); bcd_b = rand_bcd();
      for (int k = 0; k < 3; k++) begin
        mac_step();
        am_a = 16'($urandom); am_b = 16'($urandom);
        #1 check_mac();
        check_amul();
        @(negedge clk);
        check_mac();
        if (k == 1) check_bcd();   // two rising edges after the new operands
      end

      if (n == 1000) begin
        // Reset with carries pending in both flip-flops and a non-zero sum.
        bcd_a = to_bcd(64'd9999999999999999); bcd_b = to_bcd(64'd1);
        mac_en = 1'b1; mac_clear = 1'b1; mac_a = '1; mac_b = '1;
        repeat (2) @(negedge clk);
        rst_n = 1'b0; mac_en = 1'b0;
        @(negedge clk);
        n_reset++;
        checks++;
        if (mac_acc !== '0 || dut.u_bcd.c_lo_q !== 1'b0 || dut.u_bcd.c_mid_q !== 1'b0) begin
          failures++; $display("FAIL reset did not clear the registers");
        end
        rst_n = 1'b1;
      end
    end

    $display("BCD: digit corrections %0d, carry low->mid %0d, mid->high %0d, cout %0d",
             n_corr, n_lo_carry, n_mid_carry, n_cout);
    $display("MAC: accumulate %0d, clear %0d, idle %0d, wrap %0d, reset %0d",
             n_acc, n_clear, n_hold, n_wrap, n_reset);
    $display("approximate multiplier: digit exact %0d, rounded up %0d, rounded down %0d",
             n_am_exact, n_am_up, n_am_down);
    if (n_corr == 0 || n_lo_carry == 0 || n_mid_carry == 0 || n_cout == 0 ||
        n_acc == 0 || n_clear == 0 || n_hold == 0 || n_wrap == 0 || n_reset == 0 ||
        n_am_exact == 0 || n_am_up == 0 || n_am_down == 0) begin
      failures++; $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
