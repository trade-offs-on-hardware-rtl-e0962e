// tb_fft_cosys_siso2: the double-buffered single-antenna schedule on the
// accelerator built with two SRAM banks. Bank 1 belongs to the hardware
// stage, bank 0 is the processor's workspace. While the hardware works on
// symbol 0 in bank 1, the processor model writes symbol 1's intermediate
// samples into bank 0; those accesses must succeed while the hardware is
// busy, and an access to bank 1 must be refused. Symbol 1 is then copied
// into bank 1 and transformed. Both 64-point results are compared with a
// direct DFT; the data path is the same as in tb_fft_cosys_top.
module tb_fft_cosys_siso2;
  import fft_pkg::*;

  localparam int  NB   = 2;
  localparam int  N    = 64;
  localparam real PI   = 3.14159265358979323846;
  localparam real TOL  = 2.5;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        OPB_Rst = 1, OPB_RNW = 1, OPB_select = 0, OPB_seqAddr = 0;
  logic [31:0] OPB_ABus = 0, OPB_DBus = 0;
  logic [3:0]  OPB_BE = 4'hF;
  logic [31:0] Sl_DBus;
  logic        Sl_xferAck, Sl_errAck, Sl_retry, Sl_toutSup, fft_busy, fft_done;

  fft_cosys_top #(.NUM_BANKS(NB)) dut (.OPB_Clk(clk), .*);

  int checks = 0, failures = 0;
  int n_start = 0, n_done = 0, n_overlap = 0, n_blocked = 0;
  always @(posedge clk) if (fft_done && !OPB_Rst) n_done++;

  logic busy_at_ack;

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
      if (Sl_xferAck) begin acked = 1; err = Sl_errAck; rd = Sl_DBus; busy_at_ack = fft_busy; end
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

  function automatic logic [31:0] addr_of(input int bank, input int word);
    return BUS_BASE + 32'(bank) * BANK_BYTES + 32'(4 * word);
  endfunction

  real xr [2][N], xi [2][N];
  logic [31:0] ywd [2][N];

  // software part for stream a: first radix-8 stage, scaled by 1/8
  task automatic software_stage(input int a, input int amp);
    for (int n = 0; n < N; n++) begin
      xr[a][n] = real'(int'($urandom_range(2 * amp)) - amp);
      xi[a][n] = real'(int'($urandom_range(2 * amp)) - amp);
    end
    for (int n1 = 0; n1 < 8; n1++)
      for (int k2 = 0; k2 < 8; k2++) begin
        real ar, ai, c, s;
        ar = 0.0; ai = 0.0;
        for (int n2 = 0; n2 < 8; n2++) begin
          c = $cos(2.0 * PI * ((n1 + 8 * n2) * k2) / 64.0);
          s = $sin(2.0 * PI * ((n1 + 8 * n2) * k2) / 64.0);
          ar += xr[a][n1 + 8 * n2] * c + xi[a][n1 + 8 * n2] * s;
          ai += xi[a][n1 + 8 * n2] * c - xr[a][n1 + 8 * n2] * s;
        end
        ywd[a][8 * k2 + n1] = {16'(sat16(ar / 8.0)), 16'(sat16(ai / 8.0))};
      end
  endtask

  task automatic check_result(input int a, input int word, input logic [31:0] rd, input logic err);
    int k2, k1, k;
    real er, ei, c, s, gr, gi;
    k2 = word / 8; k1 = word % 8; k = k2 + 8 * k1;
    er = 0.0; ei = 0.0;
    for (int n = 0; n < N; n++) begin
      c = $cos(2.0 * PI * (n * k) / 64.0);
      s = $sin(2.0 * PI * (n * k) / 64.0);
      er += xr[a][n] * c + xi[a][n] * s;
      ei += xi[a][n] * c - xr[a][n] * s;
    end
    er /= 64.0; ei /= 64.0;
    gr = real'($signed(rd[31:16]));
    gi = real'($signed(rd[15:0]));
    checks++;
    if (gr - er > TOL || er - gr > TOL || gi - ei > TOL || ei - gi > TOL || err) begin
      failures++;
      $display("FAIL symbol %0d X[%0d] = (%0.0f,%0.0f) expected (%0.2f,%0.2f)", a, k, gr, gi, er, ei);
    end
  endtask

  task automatic note_overlap(input logic err);
    checks++;
    if (err) begin failures++; $display("FAIL access to a free bank refused"); end
    if (busy_at_ack) n_overlap++;
  endtask

  // start group g of hardware bank hb; while it runs do the given 8 accesses
  // (mode 0: write stream oa's samples to bank ob, 1: read and check
  // stream oa's results from bank ob, 2: nothing)
  task automatic hw_group(input int hb, input int g, input int mode, input int oa, input int ob);
    logic [31:0] rd; logic err;
    int polls;
    xfer(0, BUS_BASE + CTRL_OFFSET, {14'b0, 2'(hb), 16'(8 * g)}, rd, err);
    n_start++;
    if (g == 3) begin
      xfer(0, addr_of(hb, 8 * g), 32'h0, rd, err);
      checks++;
      if (err) n_blocked++;
      else begin failures++; $display("FAIL access to the hardware's bank not refused"); end
    end
    for (int i = 0; i < 8; i++) begin
      if (mode == 0) begin
        xfer(0, addr_of(ob, 8 * g + i), ywd[oa][8 * g + i], rd, err);
        note_overlap(err);
      end else if (mode == 1) begin
        xfer(1, addr_of(ob, 8 * g + i), 0, rd, err);
        note_overlap(err);
        check_result(oa, 8 * g + i, rd, err);
      end
    end
    polls = 0;
    do begin
      xfer(1, BUS_BASE + CTRL_OFFSET + 4, 0, rd, err);
      polls++;
    end while (!rd[0] && polls < 100);
    checks++;
    if (!rd[0]) begin failures++; $display("FAIL output enable never set"); end
  endtask

  initial begin
    logic [31:0] rd; logic err;
    repeat (3) @(negedge clk);
    OPB_Rst = 0;
    software_stage(0, 20000);
    software_stage(1, 3000);
    for (int w = 0; w < N; w++) xfer(0, addr_of(1, w), ywd[0][w], rd, err);
    // symbol 0 in hardware (bank 1) while symbol 1 is prepared in bank 0
    for (int g = 0; g < 8; g++) hw_group(1, g, 0, 1, 0);
    for (int w = 0; w < N; w++) begin
      xfer(1, addr_of(1, w), 0, rd, err);
      check_result(0, w, rd, err);
    end
    // hand symbol 1 over to the hardware bank
    for (int w = 0; w < N; w++) begin
      xfer(1, addr_of(0, w), 0, rd, err);
      checks++;
      if (rd !== ywd[1][w]) begin failures++; $display("FAIL workspace word %0d", w); end
      xfer(0, addr_of(1, w), rd, rd, err);
    end
    for (int g = 0; g < 8; g++) hw_group(1, g, 2, 0, 0);
    for (int w = 0; w < N; w++) begin
      xfer(1, addr_of(1, w), 0, rd, err);
      check_result(1, w, rd, err);
    end
    repeat (5) @(negedge clk);
    $display("hardware starts %0d, output enables %0d, overlapped accesses %0d, refused %0d",
             n_start, n_done, n_overlap, n_blocked);
    checks++;
    if (n_start != 16 || n_done != 16 || n_overlap == 0 || n_blocked == 0) begin
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
