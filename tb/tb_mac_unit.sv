// tb_mac_unit: self-checking test of the multiply-accumulate unit at its
// default size (64x64 multiplier, 128-bit accumulator).
//
// Inputs change on the falling clock edge. A reference model keeps its own
// accumulator, updated at each rising edge from the full-width product a*b
// computed by the simulator (clear loads it, en adds it, wrap modulo 2**128).
// Every cycle the combinational product and the registered sum are compared;
// the test also checks that acc changes exactly one rising edge after the
// inputs, and counts clears, idle cycles and accumulator wrap-arounds, each
// of which must occur. Watchdog: 100,000 clock cycles.
module tb_mac_unit;
  logic         clk = 1'b0;
  logic         rst_n, clear, en;
  logic [63:0]  a, b;
  logic [127:0] prod, acc;
  logic [127:0] acc_ref;
  int           checks = 0, failures = 0;
  int           n_clear = 0, n_hold = 0, n_wrap = 0, n_acc = 0;

  always #5 clk = ~clk;

  mac_unit dut (.clk(clk), .rst_n(rst_n), .clear(clear), .en(en), .a(a), .b(b),
                .prod(prod), .acc(acc));

  // Reference accumulator.
  always @(posedge clk) begin
    logic [128:0] next;
    if (!rst_n) acc_ref <= '0;
    else if (en) begin
      next = clear ? {1'b0, 128'(a) * 128'(b)} : {1'b0, acc_ref} + {1'b0, 128'(a) * 128'(b)};
      if (next[128]) n_wrap++;
      if (clear) n_clear++; else n_acc++;
      acc_ref <= next[127:0];
    end else n_hold++;
  end

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; clear = 1'b0; en = 1'b0; a = '0; b = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    checks++;
    if (acc !== '0) begin failures++; $display("FAIL acc not cleared by reset"); end

    // Latency: one product, visible after exactly one rising edge.
    a = 64'd12345; b = 64'd678; en = 1'b1; clear = 1'b1;
    #1;
    checks++;
    if (acc !== '0 || prod !== 128'(12345 * 678)) begin
      failures++; $display("FAIL latency: acc changed early or wrong product");
    end
    @(negedge clk);
    checks++;
    if (acc !== 128'(12345 * 678)) begin failures++; $display("FAIL one-cycle accumulate"); end

    for (int n = 0; n < 5000; n++) begin
      int mode;
      mode  = $urandom_range(9);
      en    = (mode != 0);
      clear = (mode == 1);
      if ($urandom_range(3) == 0) begin a = '1; b = '1 - 64'($urandom_range(7)); end
      else begin a = {$urandom, $urandom}; b = {$urandom, $urandom}; end
      #1;
      checks++;
      if (prod !== 128'(a) * 128'(b)) begin
        failures++; $display("FAIL product %h * %h = %h", a, b, prod);
      end
      @(negedge clk);
      checks++;
      if (acc !== acc_ref) begin
        failures++; $display("FAIL acc %h expected %h", acc, acc_ref);
      end
    end

    if (n_clear == 0 || n_hold == 0 || n_wrap == 0 || n_acc == 0) begin
      failures++; $display("FAIL a MAC mode was never exercised");
    end
    $display("accumulate %0d, clear %0d, hold %0d, wrap %0d", n_acc, n_clear, n_hold, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
