// vedic_mul_2x2: 2x2-bit unsigned multiplier, the leaf of the Vedic
// (Urdhva-Tiryagbhyam, "vertically and crosswise") multiplier.
//
// p[0] is the vertical product a0.b0; the two crosswise products a1.b0 and
// a0.b1 are added by a half adder into p[1]; its carry and the vertical
// product a1.b1 are added by a second half adder into p[2] (sum) and p[3]
// (carry). Purely combinational.
//
// The 2x2 block as the basic module follows the design; its half-adder form is
// the usual one for this sutra.
module vedic_mul_2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);
  logic x0, x1, c1, v1;

  assign x0 = a[1] & b[0];
  assign x1 = a[0] & b[1];
  assign v1 = a[1] & b[1];
  assign c1 = x0 & x1;

  assign p[0] = a[0] & b[0];
  assign p[1] = x0 ^ x1;
  assign p[2] = v1 ^ c1;
  assign p[3] = v1 & c1;
endmodule
