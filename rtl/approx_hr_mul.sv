// approx_hr_mul: approximate signed multiplier with hybrid high-radix encoding
// of the multiplier operand.
//
// The N-bit two's-complement multiplier b is recoded into signed digits:
//  * the K least significant bits form one radix-2**K digit
//      y0 = signed value of b[K-1:0]                 (-2**(K-1) .. 2**(K-1)-1)
//  * the N-K most significant bits form (N-K)/2 ordinary radix-4 (modified
//    Booth) digits yj = -2*b[2j+1] + b[2j] + b[2j-1], for j = K/2 .. N/2-1,
//    the first of which overlaps bit K-1.
// Then b = y0 + sum(yj * 4**j) exactly. The radix-4 partial products a*yj are
// exact (0, +-a, +-2a). The high-radix digit is approximated: its magnitude is
// rounded to the nearest power of two (a tie such as 3 * 2**(p-1) rounds up,
// zero stays zero), so its partial product is a single shifted, possibly
// negated copy of a instead of a full multiple. The partial products are then
// added exactly. K = 0 would give an exact Booth multiplier; larger K trades
// accuracy for a smaller partial-product array.
//
// Interface: a, b signed N-bit; p signed 2N-bit approximate product. Purely
// combinational.
//
// The hybrid split (exact radix-4 for the high bits, approximate high radix
// rounded to a power of two for the low bits) follows the design description.
// N = 16, K = 6, the tie rule and the summation by plain adders are this
// implementation's choices. N and K must be even, with 2 <= K < N.
module approx_hr_mul #(
  parameter int unsigned N = 16,
  parameter int unsigned K = 6
) (
  input  logic signed [N-1:0]   a,
  input  logic signed [N-1:0]   b,
  output logic signed [2*N-1:0] p
);
  localparam int unsigned NDIG = (N - K) / 2;   // radix-4 digits
  localparam int unsigned PW   = 2 * N;         // product width

  logic signed [K-1:0]   y0;        // exact high-radix digit
  logic        [K-1:0]   y0_mag;    // |y0|, at most 2**(K-1)
  logic        [K:0]     y0_rnd;    // |y0| rounded to a power of two
  logic signed [2*N-1:0] pp0;       // approximate high-radix partial product
  logic signed [2*N-1:0] pp [NDIG]; // exact radix-4 partial products, shifted

  if (N % 2 != 0 || K % 2 != 0 || K < 2 || K >= N) begin : g_bad_param
    $error("approx_hr_mul: N and K must be even with 2 <= K < N");
  end

  // High-radix digit and its power-of-two approximation.
  always_comb begin
    int msb;
    y0     = b[K-1:0];
    y0_mag = y0[K-1] ? K'(-y0) : K'(y0);
    msb    = -1;
    for (int i = 0; i < K; i++) if (y0_mag[i]) msb = i;
    if (msb < 0)                          y0_rnd = '0;
    else if (msb > 0 && y0_mag[msb - 1])  y0_rnd = (K+1)'(1) << (msb + 1);
    else                                  y0_rnd = (K+1)'(1) << msb;
  end

  always_comb begin
    logic signed [2*N-1:0] a_ext;
    a_ext = PW'(a);
    pp0   = '0;
    for (int i = 0; i <= K; i++) if (y0_rnd[i]) pp0 = a_ext <<< i;
    if (y0[K-1]) pp0 = -pp0;
  end

  // Exact radix-4 digits of the upper bits.
  for (genvar d = 0; d < NDIG; d++) begin : g_r4
    localparam int unsigned LSB = K + 2 * d;   // weight 2**LSB
    logic [2:0]            trip;               // b[LSB+1], b[LSB], b[LSB-1]
    logic signed [2*N-1:0] mult;

    always_comb begin
      trip = b[LSB+1 -: 3];
      case (trip)
        3'b001, 3'b010: mult = PW'(a);
        3'b011:         mult = PW'(a) <<< 1;
        3'b100:         mult = -(PW'(a) <<< 1);
        3'b101, 3'b110: mult = -(PW'(a));
        default:        mult = '0;
      endcase
      pp[d] = mult <<< LSB;
    end
  end

  always_comb begin
    p = pp0;
    for (int d = 0; d < NDIG; d++) p += pp[d];
  end
endmodule
