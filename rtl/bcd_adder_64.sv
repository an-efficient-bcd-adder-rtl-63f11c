// bcd_adder_64: 16-digit (64-bit) BCD adder split into three carry-registered
// segments.
//
// Digits 0..DIG_LO-1 are added by the low segment, the next DIG_MID digits by
// the middle segment and the top DIG_HI digits by the high segment (6, 5 and 5
// digits by default). The decimal carry out of the low segment and of the
// middle segment each pass through a D flip-flop clocked by clk before entering
// the next segment; the carry into digit 0 is zero. Everything else is
// combinational.
//
// Timing: the low DIG_LO sum digits are valid combinationally. The middle
// digits use the low segment's carry from the previous clock edge, and the high
// digits and cout the middle segment's carry from the edge before. With the
// operands held steady, the whole 16-digit sum is therefore valid after the
// second rising clock edge. rst_n (active low, synchronous) clears both carry
// registers.
//
// The segment sizes and the two carry flip-flops follow the block diagram of
// the design. The diagram labels the high segment "24 Bit", but it receives
// only five digits (a11..a15), which with 6 + 5 digits below makes up the 64
// bits; the five-digit reading is used here. The reset is this
// implementation's addition.
module bcd_adder_64 #(
  parameter int unsigned DIG_LO  = 6,
  parameter int unsigned DIG_MID = 5,
  parameter int unsigned DIG_HI  = 5
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic [4*(DIG_LO+DIG_MID+DIG_HI)-1:0]   a,
  input  logic [4*(DIG_LO+DIG_MID+DIG_HI)-1:0]   b,
  output logic [4*(DIG_LO+DIG_MID+DIG_HI)-1:0]   sum,
  output logic                                   cout
);
  localparam int unsigned LO_W  = 4*DIG_LO;
  localparam int unsigned MID_W = 4*DIG_MID;
  localparam int unsigned HI_W  = 4*DIG_HI;

  logic c_lo, c_mid;       // segment carry outs
  logic c_lo_q, c_mid_q;   // registered carries

  bcd_adder_seg #(.DIGITS(DIG_LO)) u_lo (
    .a   (a[LO_W-1:0]),
    .b   (b[LO_W-1:0]),
    .cin (1'b0),
    .sum (sum[LO_W-1:0]),
    .cout(c_lo)
  );

  bcd_adder_seg #(.DIGITS(DIG_MID)) u_mid (
    .a   (a[LO_W +: MID_W]),
    .b   (b[LO_W +: MID_W]),
    .cin (c_lo_q),
    .sum (sum[LO_W +: MID_W]),
    .cout(c_mid)
  );

  bcd_adder_seg #(.DIGITS(DIG_HI)) u_hi (
    .a   (a[LO_W+MID_W +: HI_W]),
    .b   (b[LO_W+MID_W +: HI_W]),
    .cin (c_mid_q),
    .sum (sum[LO_W+MID_W +: HI_W]),
    .cout(cout)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      c_lo_q  <= 1'b0;
      c_mid_q <= 1'b0;
    end else begin
      c_lo_q  <= c_lo;
      c_mid_q <= c_mid;
    end
  end
endmodule
