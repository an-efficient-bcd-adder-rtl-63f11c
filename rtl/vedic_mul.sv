// vedic_mul: N x N-bit unsigned Vedic multiplier, built recursively.
//
// With H = N/2, the operands are split into halves aH:aL and bH:bL and four
// H x H multipliers form q0 = aL*bL, q1 = aH*bL, q2 = aL*bH and q3 = aH*bH
// (each N bits wide). Three carry look-ahead adders combine them:
//   s1 = q1 + q2                        N-bit adder, carry kept as bit N
//   s2 = s1 + q0[N-1:H]                 3H-bit adder, inputs zero-extended
//   s3 = s2 + (q3 << H)                 3H-bit adder
//   p  = {s3, q0[H-1:0]}
// For N = 2 the module is the 2x2 leaf (vedic_mul_2x2). N must be a power of
// two. Purely combinational.
//
// The recursion (2x2 -> 4x4 -> ... -> 64x64, each level of four half-size
// multipliers) and the adder line-up of one N-bit and two 3N/2-bit adders per
// level (add_32_bit and two add_48_bit in a 32x32 stage) follow the design.
// Which partial products each adder takes is this implementation's reading.
//
// Lint note: when this module is linted as its own top, Verilator reports
// q0..q3 as undriven. The report comes from the unelaborated copy Verilator
// keeps of a module that instantiates itself; in every elaborated level q0..q3
// are driven by the four sub-multipliers, as the exhaustive 8x8 and random
// 64x64 tests confirm.
module vedic_mul #(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  if (N == 2) begin : g_leaf
    vedic_mul_2x2 u_leaf (.a(a), .b(b), .p(p));
  end else begin : g_split
    localparam int unsigned H = N / 2;

    logic [N-1:0]   q0, q1, q2, q3;
    logic [N-1:0]   s1;
    logic           c1;
    logic [3*H-1:0] s2, s3;
    logic           c2_unused, c3_unused;   // always 0: the product fits 2N bits

    vedic_mul #(.N(H)) u_q0 (.a(a[H-1:0]), .b(b[H-1:0]), .p(q0));
    vedic_mul #(.N(H)) u_q1 (.a(a[N-1:H]), .b(b[H-1:0]), .p(q1));
    vedic_mul #(.N(H)) u_q2 (.a(a[H-1:0]), .b(b[N-1:H]), .p(q2));
    vedic_mul #(.N(H)) u_q3 (.a(a[N-1:H]), .b(b[N-1:H]), .p(q3));

    cla_adder #(.W(N)) u_add_mid (
      .a(q1), .b(q2), .cin(1'b0), .s(s1), .cout(c1)
    );

    cla_adder #(.W(3*H)) u_add_low (
      .a   ({{(3*H-N-1){1'b0}}, c1, s1}),
      .b   ({{(2*H){1'b0}}, q0[N-1:H]}),
      .cin (1'b0),
      .s   (s2),
      .cout(c2_unused)
    );

    cla_adder #(.W(3*H)) u_add_high (
      .a   (s2),
      .b   ({q3, {H{1'b0}}}),
      .cin (1'b0),
      .s   (s3),
      .cout(c3_unused)
    );

    assign p = {s3, q0[H-1:0]};
  end
endmodule
