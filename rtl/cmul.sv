// cmul: complex multiplier built from four real multiplications and two
// real additions: (a + jb)(c + jd) = (ac - bd) + j(bc + ad).
//
// AW is the width of the data operand parts, CW the width of the
// coefficient parts. The product is kept at full precision, AW+CW+1 bits,
// so that no rounding happens here. In the 8-point FFT the coefficient is
// the constant (1 - j) or (-1 - j) of the W8^1 / W8^3 rotations, so the
// multiplications fold down to additions when synthesized.
//
// Purely combinational.
module cmul #(
  parameter int AW = 16,
  parameter int CW = 16
) (
  input  logic signed [AW-1:0]    a_re,
  input  logic signed [AW-1:0]    a_im,
  input  logic signed [CW-1:0]    c_re,
  input  logic signed [CW-1:0]    c_im,
  output logic signed [AW+CW:0]   p_re,
  output logic signed [AW+CW:0]   p_im
);

  localparam int PW = AW + CW + 1;

  logic signed [PW-1:0] ac, bd, bc, ad;

  always_comb begin
    ac   = PW'(a_re) * PW'(c_re);
    bd   = PW'(a_im) * PW'(c_im);
    bc   = PW'(a_im) * PW'(c_re);
    ad   = PW'(a_re) * PW'(c_im);
    p_re = ac - bd;
    p_im = bc + ad;
  end

endmodule
