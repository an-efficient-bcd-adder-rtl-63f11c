// bcd_pkg: types and constants shared by the BCD adder modules.
// A BCD digit is a 4-bit binary number in the range 0..9. Multi-digit operands
// are packed with digit 0 (least significant) in bits 3:0.
package bcd_pkg;
  typedef logic [3:0] bcd_digit_t;

  // Largest legal digit, and the correction added when a digit sum exceeds it.
  localparam bcd_digit_t BCD_MAX  = 4'd9;
  localparam bcd_digit_t BCD_CORR = 4'd6;
endpackage
