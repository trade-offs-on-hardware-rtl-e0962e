// tw_mul: twiddle-factor multiplier between the two radix-8 stages of the
// 64-point hardware branch. It multiplies one complex sample by
// W_N^k = exp(-j 2 pi k / N) taken from a constant table.
//
// The table holds cos and -sin of 2 pi k / N, rounded to Q1.15 (1.0 is
// stored as 32767), and is computed when the design is elaborated. The
// product comes from the four-multiplier complex multiplier (cmul), is
// rounded half-up back to 16 bits and saturated. Table precision and
// rounding are choices of this design.
//
// Purely combinational: y follows x and k.
module tw_mul
  import fft_pkg::*;
#(
  parameter int N  = 64,
  parameter int KW = $clog2(N)
) (
  input  cplx_t         x,
  input  logic [KW-1:0] k,
  output cplx_t         y
);

  localparam real PI = 3.14159265358979323846;

  function automatic logic [2*DW-1:0] tw_word(input int i);
    int c, s;
    c = int'($floor(32767.0 * $cos(2.0 * PI * i / N) + 0.5));
    s = int'($floor(-32767.0 * $sin(2.0 * PI * i / N) + 0.5));
    return {DW'(c), DW'(s)};
  endfunction

  logic [2*DW-1:0] rom [N];
  for (genvar i = 0; i < N; i++) begin : g_rom
    localparam logic [2*DW-1:0] TW = tw_word(i);
    assign rom[i] = TW;
  end

  logic signed [DW-1:0]   w_re, w_im;
  logic signed [2*DW:0]   p_re, p_im;

  assign w_re = rom[k][2*DW-1:DW];
  assign w_im = rom[k][DW-1:0];

  cmul #(.AW(DW), .CW(DW)) u_cmul (
    .a_re(x.re), .a_im(x.im), .c_re(w_re), .c_im(w_im), .p_re, .p_im
  );

  function automatic logic signed [DW-1:0] round_sat(input logic signed [2*DW:0] p);
    logic signed [2*DW:0] t;
    t = (p + (2*DW+1)'(1 << (DW - 2))) >>> (DW - 1);
    if (t > (2*DW+1)'(2**(DW-1) - 1))    return DW'(2**(DW-1) - 1);
    else if (t < -(2*DW+1)'(2**(DW-1)))  return DW'(-(2**(DW-1)));
    else                                 return DW'(t);
  endfunction

  always_comb begin
    y.re = round_sat(p_re);
    y.im = round_sat(p_im);
  end

endmodule
