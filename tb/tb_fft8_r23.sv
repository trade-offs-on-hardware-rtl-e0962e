// tb_fft8_r23: checks the 8-point FFT against a direct DFT computed with
// real arithmetic, scaled by 1/8. Blocks are fed back to back, one per
// cycle, so the test also checks the 3-cycle latency and the one-block-
// per-cycle throughput. Allowed error: 1.5 LSB per output part.
module tb_fft8_r23;
  import fft_pkg::*;

  localparam int NBLK = 200;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic  rst_n = 1'b0;
  logic  in_valid = 1'b0;
  cplx_t in_data [FFT_N];
  logic  out_valid;
  cplx_t out_data [FFT_N];

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(negedge clk) cycle++;

  fft8_r23 dut (.*);

  // stimulus store
  int xr [NBLK][FFT_N], xi [NBLK][FFT_N];
  int in_cycle [NBLK];
  int nout = 0;

  function automatic int rnd(input int amp);
    return int'($urandom_range(2 * amp)) - amp;
  endfunction

  initial begin
    for (int b = 0; b < NBLK; b++) begin
      int amp;
      amp = (b % 4 == 0) ? 32767 : (b % 4 == 1) ? 20000 : (b % 4 == 2) ? 3000 : 100;
      for (int n = 0; n < FFT_N; n++) begin
        xr[b][n] = rnd(amp);
        xi[b][n] = rnd(amp);
      end
    end
    // a few structured blocks: impulse, constant, single tones
    for (int n = 0; n < FFT_N; n++) begin
      xr[0][n] = (n == 0) ? 32767 : 0;      xi[0][n] = 0;
      xr[1][n] = 32767;                      xi[1][n] = -32768;
      xr[2][n] = int'(30000.0 * $cos(2.0 * PI * n / 8.0));
      xi[2][n] = int'(30000.0 * $sin(2.0 * PI * n / 8.0));
      xr[3][n] = int'(30000.0 * $cos(2.0 * PI * 3 * n / 8.0));
      xi[3][n] = int'(-30000.0 * $sin(2.0 * PI * 3 * n / 8.0));
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int b = 0; b < NBLK; b++) begin
      in_valid <= 1'b1;
      for (int n = 0; n < FFT_N; n++) begin
        in_data[n].re <= DW'(xr[b][n]);
        in_data[n].im <= DW'(xi[b][n]);
      end
      @(posedge clk);
      // a gap now and then
      if (b % 17 == 16) begin
        in_valid <= 1'b0;
        @(posedge clk);
      end
    end
    in_valid <= 1'b0;
    repeat (10) @(posedge clk);
    checks++;
    if (nout != NBLK) begin
      failures++;
      $display("FAIL: %0d output blocks, expected %0d", nout, NBLK);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // edge at which each block is taken in
  int nin = 0;
  always @(posedge clk) if (rst_n && in_valid) begin
    if (nin < NBLK) in_cycle[nin] = cycle;
    nin++;
  end

  // checker: a downstream register takes the result FFT_LATENCY edges later
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      if (nout < NBLK) begin
        checks++;
        if (cycle - in_cycle[nout] != FFT_LATENCY) begin
          failures++;
          $display("FAIL block %0d latency %0d", nout, cycle - in_cycle[nout]);
        end
        for (int k = 0; k < FFT_N; k++) begin
          real er, ei;
          er = 0.0; ei = 0.0;
          for (int n = 0; n < FFT_N; n++) begin
            real c, s;
            c = $cos(2.0 * PI * n * k / 8.0);
            s = $sin(2.0 * PI * n * k / 8.0);
            er += (xr[nout][n] * c + xi[nout][n] * s);
            ei += (xi[nout][n] * c - xr[nout][n] * s);
          end
          er /= 8.0; ei /= 8.0;
          if (er > 32767.0) er = 32767.0;
          if (er < -32768.0) er = -32768.0;
          if (ei > 32767.0) ei = 32767.0;
          if (ei < -32768.0) ei = -32768.0;
          checks++;
          if (real'(out_data[k].re) - er > 1.5 || er - real'(out_data[k].re) > 1.5 ||
              real'(out_data[k].im) - ei > 1.5 || ei - real'(out_data[k].im) > 1.5) begin
            failures++;
            $display("FAIL block %0d X[%0d] = (%0d,%0d) expected (%f,%f)",
                     nout, k, out_data[k].re, out_data[k].im, er, ei);
          end
        end
      end
      nout++;
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
