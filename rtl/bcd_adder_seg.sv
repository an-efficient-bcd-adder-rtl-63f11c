// bcd_adder_seg: ripple-carry BCD adder of DIGITS decimal digits.
//
// One bcd_digit_adder per digit; the decimal carry of each digit feeds the
// next more significant one. Operands and sum are packed BCD, digit 0 in
// bits 3:0. Purely combinational; the delay grows linearly with DIGITS.
//
// This is the "proposed BCD adder" segment of the 64-bit adder: the design uses
// a 6-digit (24-bit) and 5-digit (20-bit) instance. Rippling the carry from
// digit to digit is this implementation's reading of how the digit adders are
// joined.
module bcd_adder_seg #(
  parameter int unsigned DIGITS = 6
) (
  input  logic [4*DIGITS-1:0] a,
  input  logic [4*DIGITS-1:0] b,
  input  logic                cin,
  output logic [4*DIGITS-1:0] sum,
  output logic                cout
);
  logic [DIGITS:0] c;   // c[i] is the carry into digit i

  assign c[0] = cin;

  for (genvar i = 0; i < DIGITS; i++) begin : g_digit
    bcd_digit_adder u_digit (
      .a   (a[4*i +: 4]),
      .b   (b[4*i +: 4]),
      .cin (c[i]),
      .sum (sum[4*i +: 4]),
      .cout(c[i+1])
    );
  end

  assign cout = c[DIGITS];
endmodule
