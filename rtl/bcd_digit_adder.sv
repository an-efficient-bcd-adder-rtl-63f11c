// bcd_digit_adder: one-digit decimal (BCD) adder.
//
// Adds two BCD digits and a carry in. The 5-bit binary sum z = a + b + cin
// (0..19) is corrected by adding 6 whenever it exceeds 9; the decimal carry is
// set exactly then (cout = z > 9, i.e. z[4] | z[3]&z[2] | z[3]&z[1]) and the
// corrected low four bits are the result digit. Purely combinational.
//
// The design builds this digit adder from reversible ASK gates and New Gates.
// Their netlist is not available here, so this module implements the same
// function (a BCD digit plus decimal carry, result always in 0..9) with plain
// logic; the gate-level reversible structure, its ancilla inputs and garbage
// outputs are not modelled. Inputs above 9 are outside the contract.
module bcd_digit_adder
  import bcd_pkg::*;
(
  input  bcd_digit_t a,
  input  bcd_digit_t b,
  input  logic       cin,
  output bcd_digit_t sum,
  output logic       cout
);
  logic [4:0] z;   // uncorrected binary sum

  always_comb begin
    z    = {1'b0, a} + {1'b0, b} + {4'd0, cin};
    cout = (z > {1'b0, BCD_MAX});
    sum  = cout ? z[3:0] + BCD_CORR : z[3:0];
  end
endmodule
