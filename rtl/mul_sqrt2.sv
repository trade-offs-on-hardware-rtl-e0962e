// mul_sqrt2: multiplies a signed number by sqrt(2)/2 using only shifters
// and adders, as used for the W8^1 and W8^3 twiddle factors of the 8-point
// FFT.
//
// sqrt(2)/2 is approximated by 46341/65536 = 0.7071075 (error 1.1e-6).
// 46341 = 2^15 + 2^13 + 2^12 + 2^10 + 2^8 + 2^2 + 2^0, so the product is the
// sum of seven shifted copies of the input; the 16 fractional bits are then
// removed with round-half-up. The number of fractional bits of the constant
// is a choice of this design. |y| <= |x|, so the output has the input width.
//
// Purely combinational.
module mul_sqrt2 #(
  parameter int W = 18
) (
  input  logic signed [W-1:0] x,
  output logic signed [W-1:0] y
);

  localparam int AW = W + 17;

  logic signed [AW-1:0] xe;
  logic signed [AW-1:0] acc;

  always_comb begin
    xe  = AW'(x);
    acc = (xe <<< 15) + (xe <<< 13) + (xe <<< 12) + (xe <<< 10)
        + (xe <<< 8) + (xe <<< 2) + xe;
    acc = acc + AW'(32768);
    y   = W'(acc >>> 16);
  end

endmodule
