// cla_adder: W-bit binary carry look-ahead adder.
//
// Each bit forms a generate g = a & b and a propagate p = a ^ b. Bits are
// grouped by four; inside a group every carry is computed directly from the
// group's carry in and the g/p terms (two-level look-ahead, no ripple), and the
// carry out of one group is the carry in of the next. s = a + b + cin, cout is
// the carry out of bit W-1. Purely combinational. A last group shorter than
// four bits is allowed, so any W >= 1 works.
//
// The multiplier uses this adder for the partial-product sums (32- and 48-bit
// instances inside a 32x32 multiplier). The four-bit grouping is this
// implementation's choice; the fault-tolerant (parity-preserving) reversible
// form of the adder is not modelled.
module cla_adder #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  localparam int unsigned GROUP  = 4;
  localparam int unsigned NGROUP = (W + GROUP - 1) / GROUP;

  logic [W-1:0] g, p;
  logic [W:0]   c;        // c[i] is the carry into bit i
  logic [NGROUP:0] gc;    // gc[k] is the carry into group k

  assign g = a & b;
  assign p = a ^ b;
  assign gc[0] = cin;

  for (genvar k = 0; k < NGROUP; k++) begin : g_group
    localparam int unsigned BASE = k * GROUP;
    localparam int unsigned LEN  = (W - BASE < GROUP) ? (W - BASE) : GROUP;

    logic [LEN:0] cg;     // carries local to this group, cg[0] = group carry in

    always_comb begin
      cg[0] = gc[k];
      for (int unsigned j = 0; j < LEN; j++) begin
        // carry out of bit BASE+j: all bits 0..j propagate the group carry in,
        // or some bit m generates and bits m+1..j propagate it
        logic t, all_p;
        all_p = 1'b1;
        for (int unsigned m = 0; m <= j; m++) all_p &= p[BASE+m];
        cg[j+1] = all_p & gc[k];
        for (int unsigned m = 0; m <= j; m++) begin
          t = g[BASE+m];
          for (int unsigned n = m + 1; n <= j; n++) t &= p[BASE+n];
          cg[j+1] |= t;
        end
      end
    end

    assign c[BASE +: LEN] = cg[LEN-1:0];
    assign gc[k+1]        = cg[LEN];
  end

  assign c[W] = gc[NGROUP];
  assign s    = p ^ c[W-1:0];
  assign cout = c[W];
endmodule
