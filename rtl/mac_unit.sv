// mac_unit: multiply-accumulate unit, F = sum of Ai * Bi.
//
// Each clock cycle with en high, the Vedic multiplier forms Ai * Bi and a carry
// look-ahead adder adds the product to the accumulator register, so one
// multiply and one accumulate complete in a single clock cycle. With clear
// also high the accumulator is loaded with the product alone, which starts a
// new sum. prod is the combinational product of the current inputs; acc is
// the registered sum and changes on the rising clock edge. rst_n (active low,
// synchronous) zeroes the accumulator.
//
// Interface and timing: inputs are sampled at the rising edge; acc shows the
// new sum after that edge, i.e. one cycle of latency and one new term per
// cycle. The accumulator wraps modulo 2**ACC_W.
//
// The single-cycle multiply-then-accumulate follows the design. The
// accumulator width, the clear/enable controls and the reset are this
// implementation's choices; the operand and result memories the unit reads
// from and writes to are outside this module (a and b in, acc out).
module mac_unit #(
  parameter int unsigned N     = 64,
  parameter int unsigned ACC_W = 2 * N
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             en,
  input  logic [N-1:0]     a,
  input  logic [N-1:0]     b,
  output logic [2*N-1:0]   prod,
  output logic [ACC_W-1:0] acc
);
  logic [ACC_W-1:0] prod_ext, addend, acc_next;
  logic             acc_cout_unused;   // wrap-around is intended

  if (ACC_W < 2 * N) begin : g_bad_width
    $error("mac_unit: ACC_W must be at least 2*N");
  end

  vedic_mul #(.N(N)) u_mul (.a(a), .b(b), .p(prod));

  assign prod_ext = ACC_W'(prod);
  assign addend   = clear ? '0 : acc;

  cla_adder #(.W(ACC_W)) u_acc_add (
    .a   (addend),
    .b   (prod_ext),
    .cin (1'b0),
    .s   (acc_next),
    .cout(acc_cout_unused)
  );

  always_ff @(posedge clk) begin
    if (!rst_n)  acc <= '0;
    else if (en) acc <= acc_next;
  end
endmodule
