// tb_hw_fsm: runs the state machine against a memory model and a stand-in
// FFT (a fixed lane permutation with the real pipeline latency). Checks that
// the eight words are read, sent to the FFT in one start pulse, and written
// back in place; that no other word changes; that only the requested bank
// is owned while busy; that addresses wrap inside the bank; and that one
// pass from input enable to output enable takes the documented 24 cycles.
module tb_hw_fsm;
  import fft_pkg::*;
  localparam int NB = 2, BW = 1;
  localparam int HW_CYCLES = 24;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic              rst_n = 0, in_en = 0;
  logic [MEM_AW-1:0] start_addr = 0;
  logic [BW-1:0]     start_bank = 0;
  logic              busy, out_en, m_en, m_we, fft_start, fft_valid;
  logic [NB-1:0]     hw_owns;
  logic [BW-1:0]     m_bank;
  logic [MEM_AW-1:0] m_addr;
  logic [MEM_DW-1:0] m_wdata, m_rdata;
  cplx_t             fft_in [FFT_N], fft_out [FFT_N];
  int checks = 0, failures = 0;

  hw_fsm #(.NUM_BANKS(NB)) dut (.*);

  // memory model
  logic [MEM_DW-1:0] mem [NB][MEM_DEPTH];
  logic [MEM_DW-1:0] gold [NB][MEM_DEPTH];
  always @(posedge clk) if (m_en) begin
    if (m_we) mem[m_bank][m_addr] <= m_wdata;
    else      m_rdata <= mem[m_bank][m_addr];
  end

  // stand-in FFT: out[k] = in[7-k] with the imaginary part inverted
  cplx_t pipe [FFT_LATENCY][FFT_N];
  logic [FFT_LATENCY-1:0] vpipe = '0;
  int n_start = 0;
  always @(posedge clk) begin
    vpipe <= {vpipe[FFT_LATENCY-2:0], fft_start};
    for (int k = 0; k < FFT_N; k++) begin
      pipe[0][k].re <= fft_in[FFT_N-1-k].re;
      pipe[0][k].im <= ~fft_in[FFT_N-1-k].im;
    end
    for (int s = 1; s < FFT_LATENCY; s++) pipe[s] <= pipe[s-1];
    if (fft_start) n_start++;
  end
  assign fft_valid = vpipe[FFT_LATENCY-1];
  assign fft_out   = pipe[FFT_LATENCY-1];

  // ownership check while busy
  always @(negedge clk) if (rst_n) begin
    checks++;
    if (hw_owns !== (busy ? NB'(1) << start_bank : NB'(0)) || (m_en && m_bank !== start_bank)) begin
      failures++; $display("FAIL ownership busy=%0d owns=%b", busy, hw_owns);
    end
  end

  task automatic run(input int bank, input int addr);
    int t0, t1, starts0;
    starts0 = n_start;
    for (int i = 0; i < FFT_N; i++) begin
      cplx_t w;
      w = cplx_t'(mem[bank][(addr + i) % MEM_DEPTH]);
      gold[bank][(addr + FFT_N - 1 - i) % MEM_DEPTH] = {w.re, ~w.im};
    end
    @(negedge clk);
    in_en = 1; start_addr = MEM_AW'(addr); start_bank = BW'(bank);
    t0 = 0;
    @(negedge clk); in_en = 0;
    t1 = 1;
    while (!out_en && t1 < 200) begin @(negedge clk); t1++; end
    checks++;
    if (t1 != HW_CYCLES) begin failures++; $display("FAIL pass took %0d cycles", t1); end
    @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL still busy after out_en"); end
    checks++;
    if (n_start - starts0 != 1) begin failures++; $display("FAIL %0d start pulses", n_start - starts0); end
    for (int b = 0; b < NB; b++)
      for (int a = 0; a < MEM_DEPTH; a++) begin
        checks++;
        if (mem[b][a] !== gold[b][a]) begin
          failures++; $display("FAIL mem[%0d][%0d] = %h expected %h", b, a, mem[b][a], gold[b][a]);
        end
      end
  endtask

  initial begin
    for (int b = 0; b < NB; b++)
      for (int a = 0; a < MEM_DEPTH; a++) begin
        mem[b][a] = $urandom; gold[b][a] = mem[b][a];
      end
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(0, 0);
    run(0, 8);
    run(1, 64);
    run(1, MEM_DEPTH - 4);   // wraps inside the bank
    run(0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
