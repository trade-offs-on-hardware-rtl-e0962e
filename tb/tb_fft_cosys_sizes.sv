// tb_fft_cosys_sizes: the accelerator with its 8-point branch running every
// transform length of the two target standards: 128, 512, 1024 and 2048
// points (64 points is covered by tb_fft_cosys_top). The accelerator is
// built with four SRAM banks, which together hold 2048 words, so the longer
// transforms spread over several banks.
//
// For N = 8*M the input index is split as n = n1 + 8*n2 (n1 < 8, n2 < M)
// and the output index as k = k2 + M*k1 (k2 < M, k1 < 8). The processor
// model computes the software part
//   y(n1, k2) = (1/M) * W_N^(n1*k2) * sum_n2 x(n1 + 8*n2) * W_M^(n2*k2)
// and stores it at global word 8*k2 + n1 (bank = word / 512). The hardware
// is started once per group k2 and leaves X(k2 + M*k1) / N at word
// 8*k2 + k1. All N results are read back and compared with a direct DFT.
//
// Checks: every output within TOL of the reference, every start answered by
// an output enable, 23 busy cycles per start, and starts in every bank.
module tb_fft_cosys_sizes;
  import fft_pkg::*;

  localparam int  NB      = 4;
  localparam int  NMAX    = 2048;
  localparam real PI      = 3.14159265358979323846;
  localparam real TOL     = 2.5;
  localparam int  HW_BUSY = 23;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        OPB_Rst = 1, OPB_RNW = 1, OPB_select = 0, OPB_seqAddr = 0;
  logic [31:0] OPB_ABus = 0, OPB_DBus = 0;
  logic [3:0]  OPB_BE = 4'hF;
  logic [31:0] Sl_DBus;
  logic        Sl_xferAck, Sl_errAck, Sl_retry, Sl_toutSup, fft_busy, fft_done;

  fft_cosys_top #(.NUM_BANKS(NB)) dut (.OPB_Clk(clk), .*);

  int checks = 0, failures = 0;
  int n_start = 0, n_done = 0;
  int bank_starts [NB];
  always @(posedge clk) if (fft_done && !OPB_Rst) n_done++;

  // busy length of every start
  int busy_run = 0, bad_busy = 0, n_runs = 0;
  always @(posedge clk) begin
    if (OPB_Rst) busy_run <= 0;
    else if (fft_busy) busy_run <= busy_run + 1;
    else if (busy_run != 0) begin
      n_runs++;
      if (busy_run != HW_BUSY) bad_busy++;
      busy_run <= 0;
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
    if (!acked || err) begin failures++; $display("FAIL transfer to %h: ack %0d err %0d", addr, acked, err); end
  endtask

  function automatic int sat16(input real v);
    int r;
    r = (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return r;
  endfunction

  real xr [NMAX], xi [NMAX];
  real cw [NMAX], sw [NMAX];   // cos and sin of 2*pi*m/N for the current N

  task automatic run_size(input int N);
    logic [31:0] rd; logic err;
    int M, nerr;
    real max_err;
    M = N / 8; nerr = 0; max_err = 0.0;
    for (int m = 0; m < N; m++) begin
      cw[m] = $cos(2.0 * PI * m / N);
      sw[m] = $sin(2.0 * PI * m / N);
    end
    for (int n = 0; n < N; n++) begin
      xr[n] = real'(int'($urandom_range(65534)) - 32767);
      xi[n] = real'(int'($urandom_range(65534)) - 32767);
    end
    // software part, written over the bus
    for (int k2 = 0; k2 < M; k2++)
      for (int n1 = 0; n1 < 8; n1++) begin
        real ar, ai, br, bi;
        int  t;
        ar = 0.0; ai = 0.0;
        for (int n2 = 0; n2 < M; n2++) begin
          t = ((n2 * k2) % M) * 8;           // W_M^(n2*k2) = W_N^(8*n2*k2)
          ar += xr[n1 + 8 * n2] * cw[t] + xi[n1 + 8 * n2] * sw[t];
          ai += xi[n1 + 8 * n2] * cw[t] - xr[n1 + 8 * n2] * sw[t];
        end
        t = (n1 * k2) % N;
        br = ar * cw[t] + ai * sw[t];
        bi = ai * cw[t] - ar * sw[t];
        xfer(0, BUS_BASE + 32'(4 * (8 * k2 + n1)),
             {16'(sat16(br / M)), 16'(sat16(bi / M))}, rd, err);
      end
    // hardware part: one start per group, wait for the output enable
    for (int k2 = 0; k2 < M; k2++) begin
      int word, polls;
      word = 8 * k2;
      xfer(0, BUS_BASE + CTRL_OFFSET, {14'b0, 2'(word / MEM_DEPTH), 7'b0, 9'(word % MEM_DEPTH)}, rd, err);
      n_start++;
      bank_starts[word / MEM_DEPTH]++;
      polls = 0;
      do begin
        xfer(1, BUS_BASE + CTRL_OFFSET + 4, 0, rd, err);
        polls++;
      end while (!rd[0] && polls < 100);
      checks++;
      if (!rd[0]) begin failures++; $display("FAIL N=%0d group %0d: no output enable", N, k2); end
    end
    // read back and compare
    for (int k2 = 0; k2 < M; k2++)
      for (int k1 = 0; k1 < 8; k1++) begin
        int k;
        real er, ei, gr, gi, d;
        k = k2 + M * k1;
        xfer(1, BUS_BASE + 32'(4 * (8 * k2 + k1)), 0, rd, err);
        er = 0.0; ei = 0.0;
        for (int n = 0; n < N; n++) begin
          er += xr[n] * cw[(n * k) % N] + xi[n] * sw[(n * k) % N];
          ei += xi[n] * cw[(n * k) % N] - xr[n] * sw[(n * k) % N];
        end
        er /= N; ei /= N;
        gr = real'($signed(rd[31:16]));
        gi = real'($signed(rd[15:0]));
        d = (gr > er) ? gr - er : er - gr;
        if (d > max_err) max_err = d;
        d = (gi > ei) ? gi - ei : ei - gi;
        if (d > max_err) max_err = d;
        checks++;
        if (gr - er > TOL || er - gr > TOL || gi - ei > TOL || ei - gi > TOL) begin
          failures++; nerr++;
          if (nerr <= 5)
            $display("FAIL N=%0d X[%0d] = (%0.0f,%0.0f) expected (%0.2f,%0.2f)", N, k, gr, gi, er, ei);
        end
      end
    $display("N=%0d: %0d hardware starts, largest error %0.2f LSB", N, M, max_err);
  endtask

  initial begin
    foreach (bank_starts[b]) bank_starts[b] = 0;
    repeat (3) @(negedge clk);
    OPB_Rst = 0;
    run_size(128);
    run_size(512);
    run_size(1024);
    run_size(2048);
    repeat (5) @(negedge clk);
    $display("starts %0d, output enables %0d, busy runs %0d (wrong length %0d), starts per bank %0d %0d %0d %0d",
             n_start, n_done, n_runs, bad_busy, bank_starts[0], bank_starts[1], bank_starts[2], bank_starts[3]);
    checks++;
    if (n_done != n_start || n_runs != n_start || bad_busy != 0) begin
      failures++; $display("FAIL start, output enable and busy counts disagree");
    end
    foreach (bank_starts[b]) begin
      checks++;
      if (bank_starts[b] == 0) begin failures++; $display("FAIL no start in bank %0d", b); end
    end
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
