// tb_fft_cosys_top: end-to-end test of the accelerator at its default
// configuration (one SRAM bank). A bus-master model plays the processor:
// for each OFDM symbol it computes the first radix-8 stage of a 64-point
// DIF FFT in software (with the 1/8 scaling the hardware also uses), writes
// the 64 intermediate samples into the SRAM over the OPB, then starts the
// hardware once per 8-sample group and polls the read register for the
// output enable. Finally it reads the 64 results and compares them with a
// directly computed 64-point DFT (scaled by 1/64).
//
// Mapping: intermediate y(n1, k2) = (1/8) sum_n2 x(n1 + 8 n2) W8^(n2 k2)
// W64^(n1 k2) is stored at word 8*k2 + n1; the hardware's output X1 of
// group k2 is X(k2 + 8*k1), found at word 8*k2 + k1.
//
// Mechanisms that must occur: hardware start, output enable, a processor
// access refused while the hardware owns the bank, a start request ignored
// while busy, a start naming a bank that does not exist (taken as bank 0).
// The hardware must be busy for 23 cycles per pass. The signal-to-
// quantisation-noise ratio of each symbol is printed, and the full-scale
// symbol must reach SQNR_MIN.
module tb_fft_cosys_top;
  import fft_pkg::*;

  localparam int  N       = 64;
  localparam int  NSYM    = 3;
  localparam real PI      = 3.14159265358979323846;
  localparam int  HW_BUSY = 23;   // busy cycles per pass (output enable 24 cycles after start)
  localparam real TOL     = 2.5;
  localparam real SQNR_MIN = 66.0;  // 71.7 dB expected, less a 6 dB margin

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        OPB_Rst = 1, OPB_RNW = 1, OPB_select = 0, OPB_seqAddr = 0;
  logic [31:0] OPB_ABus = 0, OPB_DBus = 0;
  logic [3:0]  OPB_BE = 4'hF;
  logic [31:0] Sl_DBus;
  logic        Sl_xferAck, Sl_errAck, Sl_retry, Sl_toutSup, fft_busy, fft_done;

  fft_cosys_top dut (.OPB_Clk(clk), .*);

  int checks = 0, failures = 0;
  int n_start = 0, n_done = 0, n_blocked = 0, n_ignored = 0, n_badbank = 0;

  // busy-time measurement per hardware pass
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

  real xr [N], xi [N];
  real sig_e [NSYM], err_e [NSYM];   // output energy and error energy per symbol

  task automatic run_symbol(input int sym, input int amp);
    logic [31:0] rd, wr_reg; logic err;
    int yr [N], yi [N];
    sig_e[sym] = 0.0; err_e[sym] = 0.0;
    // input samples
    for (int n = 0; n < N; n++) begin
      xr[n] = real'(int'($urandom_range(2 * amp)) - amp);
      xi[n] = real'(int'($urandom_range(2 * amp)) - amp);
    end
    // software part: first radix-8 DIF stage with twiddles, scaled by 1/8
    for (int n1 = 0; n1 < 8; n1++)
      for (int k2 = 0; k2 < 8; k2++) begin
        real ar, ai, c, s;
        ar = 0.0; ai = 0.0;
        for (int n2 = 0; n2 < 8; n2++) begin
          c = $cos(2.0 * PI * ((n1 + 8 * n2) * k2) / 64.0);
          s = $sin(2.0 * PI * ((n1 + 8 * n2) * k2) / 64.0);
          ar += xr[n1 + 8 * n2] * c + xi[n1 + 8 * n2] * s;
          ai += xi[n1 + 8 * n2] * c - xr[n1 + 8 * n2] * s;
        end
        yr[8 * k2 + n1] = sat16(ar / 8.0);
        yi[8 * k2 + n1] = sat16(ai / 8.0);
      end
    for (int a = 0; a < N; a++)
      xfer(0, BUS_BASE + 32'(4 * a), {16'(yr[a]), 16'(yi[a])}, rd, err);
    // hardware part: one start per 8-sample group
    for (int g = 0; g < 8; g++) begin
      int polls;
      // the last group names bank 1, which a one-bank system maps to bank 0
      wr_reg = 32'(8 * g) | ((g == 7) ? 32'h0001_0000 : 32'h0);
      if (g == 7) n_badbank++;
      xfer(0, BUS_BASE + CTRL_OFFSET, wr_reg, rd, err);
      n_start++;
      // while busy: a memory access is refused, a second start is ignored
      if (g == sym) begin
        xfer(1, BUS_BASE + 32'(4 * 8 * g), 0, rd, err);
        checks++;
        if (err && rd == 0) n_blocked++;
        else begin failures++; $display("FAIL access during hardware pass not refused"); end
        xfer(0, BUS_BASE + CTRL_OFFSET, 32'h1F0, rd, err);
        xfer(1, BUS_BASE + CTRL_OFFSET, 0, rd, err);
        checks++;
        if (rd == wr_reg) n_ignored++;
        else begin failures++; $display("FAIL start during busy not ignored: %h", rd); end
      end
      polls = 0;
      do begin
        xfer(1, BUS_BASE + CTRL_OFFSET + 4, 0, rd, err);
        polls++;
      end while (!rd[0] && polls < 100);
      checks++;
      if (!rd[0]) begin failures++; $display("FAIL output enable never set"); end
    end
    // read back and compare with the direct DFT
    for (int k2 = 0; k2 < 8; k2++)
      for (int k1 = 0; k1 < 8; k1++) begin
        int k;
        real er, ei, c, s, gr, gi;
        k = k2 + 8 * k1;
        xfer(1, BUS_BASE + 32'(4 * (8 * k2 + k1)), 0, rd, err);
        er = 0.0; ei = 0.0;
        for (int n = 0; n < N; n++) begin
          c = $cos(2.0 * PI * (n * k) / 64.0);
          s = $sin(2.0 * PI * (n * k) / 64.0);
          er += xr[n] * c + xi[n] * s;
          ei += xi[n] * c - xr[n] * s;
        end
        er /= 64.0; ei /= 64.0;
        gr = real'($signed(rd[31:16]));
        gi = real'($signed(rd[15:0]));
        sig_e[sym] += er * er + ei * ei;
        err_e[sym] += (gr - er) * (gr - er) + (gi - ei) * (gi - ei);
        checks++;
        if (gr - er > TOL || er - gr > TOL || gi - ei > TOL || ei - gi > TOL || err) begin
          failures++;
          $display("FAIL symbol %0d X[%0d] = (%0.0f,%0.0f) expected (%0.2f,%0.2f)", sym, k, gr, gi, er, ei);
        end
      end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    OPB_Rst = 0;
    for (int s = 0; s < NSYM; s++) run_symbol(s, (s == 0) ? 32767 : (s == 1) ? 8000 : 500);
    repeat (5) @(negedge clk);
    // accuracy of the full-scale symbol against the reference: the expected
    // quantisation noise of a 16-bit, 64-point fixed-point FFT is
    // 2^(2B) / (5N - 4 log2 N - 3) = 2^32 / 293, i.e. 71.7 dB
    for (int s = 0; s < NSYM; s++)
      $display("symbol %0d: SQNR %0.1f dB (20*log10 of the energy ratio: %0.1f)",
               s, 10.0 * $log10(sig_e[s] / err_e[s]), 20.0 * $log10(sig_e[s] / err_e[s]));
    checks++;
    if (10.0 * $log10(sig_e[0] / err_e[0]) < SQNR_MIN) begin
      failures++; $display("FAIL full-scale SQNR below %0.1f dB", SQNR_MIN);
    end
    foreach (pass_len[i]) begin
      checks++;
      if (pass_len[i] != HW_BUSY) begin failures++; $display("FAIL pass %0d busy %0d cycles", i, pass_len[i]); end
    end
    $display("hardware starts %0d, output enables %0d, refused accesses %0d, ignored starts %0d, starts naming a missing bank %0d",
             n_start, n_done, n_blocked, n_ignored, n_badbank);
    checks++;
    if (n_start == 0 || n_done != n_start || n_blocked == 0 || n_ignored == 0 || n_badbank == 0) begin
      failures++; $display("FAIL a mechanism did not occur as expected");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
