// tb_tw_mul: checks the twiddle multiplier for every table entry of W64^k
// against a real-number product x * exp(-j 2 pi k / 64), with random and
// full-scale inputs. Allowed error: 2 LSB per part (table rounding plus
// result rounding).
module tb_tw_mul;
  import fft_pkg::*;
  localparam real PI = 3.14159265358979323846;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  cplx_t      x, y;
  logic [5:0] k;
  int checks = 0, failures = 0;

  tw_mul #(.N(64)) dut (.x, .k, .y);

  task automatic check(input int xr, xi, input int kk);
    real er, ei, c, s;
    x.re = DW'(xr); x.im = DW'(xi); k = 6'(kk);
    @(posedge clk);
    c = $cos(2.0 * PI * kk / 64.0);
    s = $sin(2.0 * PI * kk / 64.0);
    er = xr * c + xi * s;
    ei = xi * c - xr * s;
    if (er > 32767.0) er = 32767.0;
    if (er < -32768.0) er = -32768.0;
    if (ei > 32767.0) ei = 32767.0;
    if (ei < -32768.0) ei = -32768.0;
    checks++;
    if (real'(y.re) - er > 2.0 || er - real'(y.re) > 2.0 ||
        real'(y.im) - ei > 2.0 || ei - real'(y.im) > 2.0) begin
      failures++;
      $display("FAIL x=(%0d,%0d) k=%0d y=(%0d,%0d) expected (%f,%f)", xr, xi, kk, y.re, y.im, er, ei);
    end
  endtask

  initial begin
    for (int kk = 0; kk < 64; kk++) begin
      check(32767, 0, kk);
      check(0, -32768, kk);
      check(23170, 23170, kk);
      for (int i = 0; i < 20; i++)
        check(int'($urandom_range(65535)) - 32768, int'($urandom_range(65535)) - 32768, kk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
