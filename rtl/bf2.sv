// bf2: radix-2 butterfly, the basic element of the decimation-in-frequency
// FFT. From two complex inputs a and b it forms the sum a+b and the
// difference a-b. Outputs are one bit wider than the inputs so that no
// overflow can occur; the caller decides where to scale.
//
// Purely combinational. W is the width of each real or imaginary input
// part; the outputs are W+1 bits.
module bf2 #(
  parameter int W = 16
) (
  input  logic signed [W-1:0] a_re,
  input  logic signed [W-1:0] a_im,
  input  logic signed [W-1:0] b_re,
  input  logic signed [W-1:0] b_im,
  output logic signed [W:0]   s_re,   // a + b
  output logic signed [W:0]   s_im,
  output logic signed [W:0]   d_re,   // a - b
  output logic signed [W:0]   d_im
);

  always_comb begin
    s_re = (W+1)'(a_re) + (W+1)'(b_re);
    s_im = (W+1)'(a_im) + (W+1)'(b_im);
    d_re = (W+1)'(a_re) - (W+1)'(b_re);
    d_im = (W+1)'(a_im) - (W+1)'(b_im);
  end

endmodule
