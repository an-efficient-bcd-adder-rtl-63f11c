// bcd_mac_top: the two datapaths of the design side by side.
//
// 1. A 16-digit (64-bit) BCD adder (bcd_adder_64): three ripple segments of
//    6, 5 and 5 one-digit BCD adders, with the decimal carry between segments
//    held in a flip-flop. The full sum is valid after the second clock edge
//    with the operands held.
// 2. A multiply-accumulate unit (mac_unit) on a 64x64 recursive Vedic
//    multiplier: mac_prod is the combinational 128-bit product, mac_acc the
//    accumulated sum, updated once per clock cycle while mac_en is high.
// 3. An approximate signed 16x16 multiplier (approx_hr_mul): radix-4 Booth
//    digits for the upper multiplier bits, one radix-64 digit rounded to a
//    power of two for the lowest six. Combinational, am_* ports.
//
// The datapaths are independent; the first two share only clk and rst_n (active low, synchronous). The memories
// that feed the MAC and receive its result are outside; their data appear as
// the mac_* ports.
module bcd_mac_top (
  input  logic          clk,
  input  logic          rst_n,
  // BCD adder
  input  logic [63:0]   bcd_a,
  input  logic [63:0]   bcd_b,
  output logic [63:0]   bcd_sum,
  output logic          bcd_cout,
  // MAC unit
  input  logic          mac_clear,
  input  logic          mac_en,
  input  logic [63:0]   mac_a,
  input  logic [63:0]   mac_b,
  output logic [127:0]  mac_prod,
  output logic [127:0]  mac_acc,
  // approximate multiplier
  input  logic signed [15:0] am_a,
  input  logic signed [15:0] am_b,
  output logic signed [31:0] am_p
);
  bcd_adder_64 u_bcd (
    .clk  (clk),
    .rst_n(rst_n),
    .a    (bcd_a),
    .b    (bcd_b),
    .sum  (bcd_sum),
    .cout (bcd_cout)
  );

  mac_unit u_mac (
    .clk  (clk),
    .rst_n(rst_n),
    .clear(mac_clear),
    .en   (mac_en),
    .a    (mac_a),
    .b    (mac_b),
    .prod (mac_prod),
    .acc  (mac_acc)
  );

  approx_hr_mul u_amul (
    .a(am_a),
    .b(am_b),
    .p(am_p)
  );
endmodule
