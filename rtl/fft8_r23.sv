// fft8_r23: 8-point FFT hardware branch, radix-2^3 decimation in frequency.
//
// All eight complex inputs are presented in one cycle and all eight outputs
// appear together FFT_LATENCY (3) cycles later; a new block can be accepted
// every cycle. The 8-point DFT is split by a radix-2 index map into three
// butterfly steps:
//   step 1: a[n] = x[n] + x[n+4],  a[n+4] = (x[n] - x[n+4]) * W8^n, n = 0..3
//   step 2: the same on each half with W4^n (W4^1 = -j)
//   step 3: plain 2-point butterflies
// The only non-trivial twiddles, W8^1 = (sqrt2/2)(1 - j) and
// W8^3 = (sqrt2/2)(-1 - j), are done as a complex multiplication by the
// constant (1 - j) or (-1 - j) (cmul, folds to adders) followed by a real
// multiplication by sqrt2/2 built from shifters and adders (mul_sqrt2).
// Multiplication by -j is a swap of real and imaginary part and a negation.
//
// Word growth is kept inside the datapath (18, 20 and 21 bits after the
// three steps). The output is the DFT divided by 2^OUT_SHIFT (default 3, a
// factor 1/8, one half per radix-2 step), rounded half-up and saturated to
// 16 bits. The scaling and rounding are choices of this design. Outputs are
// in natural order: out_data[k] = X[k] / 2^OUT_SHIFT.
//
// Timing: in_valid with in_data at clock edge t gives out_valid with
// out_data after edge t+3. Synchronous active-low reset clears the valid
// pipeline only.
module fft8_r23
  import fft_pkg::*;
#(
  parameter int OUT_SHIFT = 3
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  cplx_t  in_data  [FFT_N],
  output logic   out_valid,
  output cplx_t  out_data [FFT_N]
);

  localparam int W1 = DW + 2;   // after step 1
  localparam int W2 = W1 + 2;   // after step 2
  localparam int W3 = W2 + 1;   // after step 3

  // ---------------------------------------------------------------- step 1
  logic signed [DW:0]   s1_re [4], s1_im [4], d1_re [4], d1_im [4];
  logic signed [DW+3:0] r1_re [2], r1_im [2];   // (1-j) / (-1-j) products
  logic signed [DW+3:0] q1_re [2], q1_im [2];   // after sqrt2/2
  logic signed [W1-1:0] a_re_c [FFT_N], a_im_c [FFT_N];
  logic signed [W1-1:0] a_re   [FFT_N], a_im   [FFT_N];

  for (genvar n = 0; n < 4; n++) begin : g_step1
    bf2 #(.W(DW)) u_bf (
      .a_re(in_data[n].re), .a_im(in_data[n].im),
      .b_re(in_data[n+4].re), .b_im(in_data[n+4].im),
      .s_re(s1_re[n]), .s_im(s1_im[n]), .d_re(d1_re[n]), .d_im(d1_im[n])
    );
  end

  // W8^1 on lane 5 and W8^3 on lane 7
  for (genvar i = 0; i < 2; i++) begin : g_rot
    localparam logic signed [1:0] C_RE = (i == 0) ? 2'sb01 : 2'sb11;
    cmul #(.AW(DW+1), .CW(2)) u_cmul (
      .a_re(d1_re[2*i+1]), .a_im(d1_im[2*i+1]),
      .c_re(C_RE), .c_im(2'sb11),
      .p_re(r1_re[i]), .p_im(r1_im[i])
    );
    mul_sqrt2 #(.W(DW+4)) u_sq_re (.x(r1_re[i]), .y(q1_re[i]));
    mul_sqrt2 #(.W(DW+4)) u_sq_im (.x(r1_im[i]), .y(q1_im[i]));
  end

  always_comb begin
    for (int n = 0; n < 4; n++) begin
      a_re_c[n] = W1'(s1_re[n]);
      a_im_c[n] = W1'(s1_im[n]);
    end
    a_re_c[4] = W1'(d1_re[0]);            // W8^0
    a_im_c[4] = W1'(d1_im[0]);
    a_re_c[5] = W1'(q1_re[0]);            // W8^1
    a_im_c[5] = W1'(q1_im[0]);
    a_re_c[6] = W1'(d1_im[2]);            // W8^2 = -j : (x+jy)(-j) = y - jx
    a_im_c[6] = -W1'(d1_re[2]);
    a_re_c[7] = W1'(q1_re[1]);            // W8^3
    a_im_c[7] = W1'(q1_im[1]);
  end

  // ---------------------------------------------------------------- step 2
  logic signed [W1:0]   s2_re [4], s2_im [4], d2_re [4], d2_im [4];
  logic signed [W2-1:0] b_re_c [FFT_N], b_im_c [FFT_N];
  logic signed [W2-1:0] b_re   [FFT_N], b_im   [FFT_N];

  // butterfly k pairs lane p with lane p+2, p = {0,1,4,5}
  for (genvar k = 0; k < 4; k++) begin : g_step2
    localparam int P = (k < 2) ? k : k + 2;
    bf2 #(.W(W1)) u_bf (
      .a_re(a_re[P]), .a_im(a_im[P]), .b_re(a_re[P+2]), .b_im(a_im[P+2]),
      .s_re(s2_re[k]), .s_im(s2_im[k]), .d_re(d2_re[k]), .d_im(d2_im[k])
    );
  end

  always_comb begin
    for (int h = 0; h < 2; h++) begin
      b_re_c[4*h+0] = W2'(s2_re[2*h]);
      b_im_c[4*h+0] = W2'(s2_im[2*h]);
      b_re_c[4*h+1] = W2'(s2_re[2*h+1]);
      b_im_c[4*h+1] = W2'(s2_im[2*h+1]);
      b_re_c[4*h+2] = W2'(d2_re[2*h]);          // W4^0
      b_im_c[4*h+2] = W2'(d2_im[2*h]);
      b_re_c[4*h+3] = W2'(d2_im[2*h+1]);        // W4^1 = -j
      b_im_c[4*h+3] = -W2'(d2_re[2*h+1]);
    end
  end

  // ---------------------------------------------------------------- step 3
  logic signed [W2:0]   s3_re [4], s3_im [4], d3_re [4], d3_im [4];
  logic signed [W3-1:0] c_re [FFT_N], c_im [FFT_N];

  for (genvar m = 0; m < 4; m++) begin : g_step3
    bf2 #(.W(W2)) u_bf (
      .a_re(b_re[2*m]), .a_im(b_im[2*m]), .b_re(b_re[2*m+1]), .b_im(b_im[2*m+1]),
      .s_re(s3_re[m]), .s_im(s3_im[m]), .d_re(d3_re[m]), .d_im(d3_im[m])
    );
  end

  always_comb begin
    for (int m = 0; m < 4; m++) begin
      c_re[2*m]   = s3_re[m];
      c_im[2*m]   = s3_im[m];
      c_re[2*m+1] = d3_re[m];
      c_im[2*m+1] = d3_im[m];
    end
  end

  // Scale by 2^-OUT_SHIFT with round-half-up and saturate to DW bits.
  function automatic logic signed [DW-1:0] scale_sat(input logic signed [W3-1:0] v);
    logic signed [W3:0] t;
    t = (W3+1)'(v);
    if (OUT_SHIFT > 0) t = (t + ((W3+1)'(1) <<< (OUT_SHIFT - 1))) >>> OUT_SHIFT;
    if (t > (W3+1)'(2**(DW-1) - 1))       return DW'(2**(DW-1) - 1);
    else if (t < -(W3+1)'(2**(DW-1)))     return DW'(-(2**(DW-1)));
    else                                  return DW'(t);
  endfunction

  // Output order: X[k] sits in lane bitrev3(k).
  function automatic int bitrev3(input int k);
    return ((k & 1) << 2) | (k & 2) | ((k >> 2) & 1);
  endfunction

  // ---------------------------------------------------------------- registers
  logic [1:0] vld;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      vld       <= '0;
      out_valid <= 1'b0;
    end else begin
      vld       <= {vld[0], in_valid};
      out_valid <= vld[1];
    end
  end

  always_ff @(posedge clk) begin
    a_re <= a_re_c;
    a_im <= a_im_c;
    b_re <= b_re_c;
    b_im <= b_im_c;
    for (int k = 0; k < FFT_N; k++) begin
      out_data[k].re <= scale_sat(c_re[bitrev3(k)]);
      out_data[k].im <= scale_sat(c_im[bitrev3(k)]);
    end
  end

endmodule
