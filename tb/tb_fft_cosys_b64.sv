// tb_fft_cosys_b64: the accelerator built with the 64-point hardware branch
// (BRANCH_N = 64, one SRAM bank).
// Part 1: a 64-point FFT done completely in hardware (IEEE 802.11n size):
// 64 samples in natural order, one start, results X(a + 8b)/64 at word
// 8a + b, compared with a direct DFT. The hardware must be busy for 353
// cycles (output enable 354 cycles after the start).
// Part 2: a 512-point FFT (IEEE 802.16e, 5 MHz size) filling the whole
// bank: the processor model does the first radix-8 stage in software
// (n = n1 + 64 n2, y(n1,k2) stored at word 64 k2 + n1, scaled by 1/8),
// then starts the hardware on each 64-word block; X(k2 + 8 k1)/512 is found
// at word 64 k2 + 8a + b with k1 = a + 8b.
module tb_fft_cosys_b64;
  import fft_pkg::*;

  localparam real PI      = 3.14159265358979323846;
  localparam int  HW_BUSY = 353;
  localparam real TOL     = 3.0;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        OPB_Rst = 1, OPB_RNW = 1, OPB_select = 0, OPB_seqAddr = 0;
  logic [31:0] OPB_ABus = 0, OPB_DBus = 0;
  logic [3:0]  OPB_BE = 4'hF;
  logic [31:0] Sl_DBus;
  logic        Sl_xferAck, Sl_errAck, Sl_retry, Sl_toutSup, fft_busy, fft_done;

  fft_cosys_top #(.BRANCH_N(64)) dut (.OPB_Clk(clk), .*);

  int checks = 0, failures = 0;
  int n_start = 0, n_done = 0;
  int busy_len = 0, pass_len [$];
  always @(posedge clk) begin
    if (fft_busy && !OPB_Rst) busy_len++;
    if (fft_done && !OPB_Rst) begin
      n_done++;
      pass_len.push_back(busy_len);
      busy_len = 0;
    end
  end

  task automatic xfer(input logic rnw, input logic [31:0] addr, input logic [31:0] wd,
                      output logic [31:0] rd, output logic err);
    int cycles;
    logic acked;
    @(negedge clk);
    OPB_select = 1; OPB_RNW = rnw; OPB_ABus = addr; OPB_DBus = rnw ? 32'h0 : wd;
    cycles = 0; acked = 0; err = 0; rd = 0;
    while (!acked && cycles < 16) begin
      @(posedge clk);
      cycles++;
      if (Sl_xferAck) begin acked = 1; err = Sl_errAck; rd = Sl_DBus; end
    end
    @(negedge clk);
    OPB_select = 0; OPB_DBus = 0;
    checks++;
    if (!acked) begin failures++; $display("FAIL no acknowledge for %h", addr); end
  endtask

  function automatic int sat16(input real v);
    int r;
    r = (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return r;
  endfunction

  task automatic hw_run(input int base);
    logic [31:0] rd; logic err;
    int polls;
    xfer(0, BUS_BASE + CTRL_OFFSET, 32'(base), rd, err);
    n_start++;
    polls = 0;
    do begin
      xfer(1, BUS_BASE + CTRL_OFFSET + 4, 0, rd, err);
      polls++;
    end while (!rd[0] && polls < 1000);
    checks++;
    if (!rd[0]) begin failures++; $display("FAIL output enable never set"); end
  endtask

  task automatic compare(input int n_pts, input int word, input int k, input logic [31:0] rd,
                         input real xr [], input real xi []);
    real er, ei, c, s, gr, gi;
    er = 0.0; ei = 0.0;
    for (int n = 0; n < n_pts; n++) begin
      c = $cos(2.0 * PI * ((n * k) % n_pts) / n_pts);
      s = $sin(2.0 * PI * ((n * k) % n_pts) / n_pts);
      er += xr[n] * c + xi[n] * s;
      ei += xi[n] * c - xr[n] * s;
    end
    er /= n_pts; ei /= n_pts;
    gr = real'($signed(rd[31:16]));
    gi = real'($signed(rd[15:0]));
    checks++;
    if (gr - er > TOL || er - gr > TOL || gi - ei > TOL || ei - gi > TOL) begin
      failures++;
      $display("FAIL %0d-point X[%0d] (word %0d) = (%0.0f,%0.0f) expected (%0.2f,%0.2f)",
               n_pts, k, word, gr, gi, er, ei);
    end
  endtask

  initial begin
    logic [31:0] rd; logic err;
    real xr [], xi [];
    repeat (3) @(negedge clk);
    OPB_Rst = 0;

    // ---- part 1: 64 points in hardware
    xr = new[64]; xi = new[64];
    for (int n = 0; n < 64; n++) begin
      xr[n] = real'(int'($urandom_range(40000)) - 20000);
      xi[n] = real'(int'($urandom_range(40000)) - 20000);
      xfer(0, BUS_BASE + 32'(4 * n), {16'(int'(xr[n])), 16'(int'(xi[n]))}, rd, err);
    end
    hw_run(0);
    for (int a = 0; a < 8; a++)
      for (int b = 0; b < 8; b++) begin
        xfer(1, BUS_BASE + 32'(4 * (8 * a + b)), 0, rd, err);
        compare(64, 8 * a + b, a + 8 * b, rd, xr, xi);
      end

    // ---- part 2: 512 points, software radix-8 stage + 8 hardware 64-point FFTs
    xr = new[512]; xi = new[512];
    for (int n = 0; n < 512; n++) begin
      xr[n] = real'(int'($urandom_range(30000)) - 15000);
      xi[n] = real'(int'($urandom_range(30000)) - 15000);
    end
    for (int k2 = 0; k2 < 8; k2++)
      for (int n1 = 0; n1 < 64; n1++) begin
        real ar, ai, c, s;
        ar = 0.0; ai = 0.0;
        for (int n2 = 0; n2 < 8; n2++) begin
          c = $cos(2.0 * PI * (((n1 + 64 * n2) * k2) % 512) / 512.0);
          s = $sin(2.0 * PI * (((n1 + 64 * n2) * k2) % 512) / 512.0);
          ar += xr[n1 + 64 * n2] * c + xi[n1 + 64 * n2] * s;
          ai += xi[n1 + 64 * n2] * c - xr[n1 + 64 * n2] * s;
        end
        xfer(0, BUS_BASE + 32'(4 * (64 * k2 + n1)),
             {16'(sat16(ar / 8.0)), 16'(sat16(ai / 8.0))}, rd, err);
      end
    for (int k2 = 0; k2 < 8; k2++) hw_run(64 * k2);
    for (int k2 = 0; k2 < 8; k2++)
      for (int a = 0; a < 8; a++)
        for (int b = 0; b < 8; b++) begin
          int w;
          w = 64 * k2 + 8 * a + b;
          xfer(1, BUS_BASE + 32'(4 * w), 0, rd, err);
          compare(512, w, k2 + 8 * (a + 8 * b), rd, xr, xi);
        end

    repeat (5) @(negedge clk);
    foreach (pass_len[i]) begin
      checks++;
      if (pass_len[i] != HW_BUSY) begin failures++; $display("FAIL run %0d busy %0d cycles", i, pass_len[i]); end
    end
    $display("hardware starts %0d, output enables %0d", n_start, n_done);
    checks++;
    if (n_start != 9 || n_done != 9) begin failures++; $display("FAIL start/done count"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
