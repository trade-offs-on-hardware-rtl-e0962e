// hw_fsm: the state machine that runs one 8-point hardware FFT on data in
// the SRAM.
//
// When in_en (input enable) arrives it takes ownership of the requested
// bank and walks through the steps of one hardware pass:
//   READ   fetch the eight words start_addr .. start_addr+7 over the
//          hardware port (one per cycle, data one cycle later)
//   START  present the eight samples to the FFT together with a start
//          (in_valid) pulse
//   WAIT   wait for the FFT's out_valid and capture the eight results
//   WRITE  store X[0..7] back to start_addr .. start_addr+7 (in place,
//          natural order), one word per cycle
//   DONE   pulse out_en (output enable) and release the bank
// Addresses wrap inside the bank; a bank number that does not exist is
// taken as bank 0. busy is high from the cycle after in_en
// until DONE. out_en rises 2*FFT_N + FFT_LATENCY + 5 = 24 clock cycles
// after in_en (in_en seen at edge t, out_en seen at edge t+24). The exact state sequence is this design's own; the
// document gives the start / output-enable behaviour and the order
// read - load - FFT - write back.
//
// BRANCH_N = 64 turns the 8-point hardware into a 64-point branch by running
// it 16 times per start, in place on the 64 words start_addr .. +63:
//   passes 0..7  (first radix-8 stage) group g reads words g + 8*m, m = 0..7,
//                and writes result k, multiplied by the twiddle W64^(g*k)
//                (tw_mul), to word g + 8*k;
//   passes 8..15 (second stage) group g reads words 8*g .. 8*g+7 and writes
//                its 8-point result there in natural order.
// Afterwards word 8*a + b holds X(a + 8*b) / 64. A pass takes 22 cycles, the
// whole 64-point branch 16 * 22 + 2 = 354 cycles from in_en to out_en. The
// 64-point mode is this design's composition of the 8-point datapath; with
// BRANCH_N = 8 the twiddle multiplier is present but never selected.
// Synchronous active-low reset returns to IDLE.
module hw_fsm
  import fft_pkg::*;
#(
  parameter int NUM_BANKS = 1,
  parameter int BRANCH_N  = 8,
  parameter int BW        = (NUM_BANKS > 1) ? $clog2(NUM_BANKS) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_en,
  input  logic [MEM_AW-1:0]    start_addr,
  input  logic [BW-1:0]        start_bank,
  output logic                 busy,
  output logic                 out_en,
  output logic [NUM_BANKS-1:0] hw_owns,
  // memory, hardware side
  output logic                 m_en,
  output logic                 m_we,
  output logic [BW-1:0]        m_bank,
  output logic [MEM_AW-1:0]    m_addr,
  output logic [MEM_DW-1:0]    m_wdata,
  input  logic [MEM_DW-1:0]    m_rdata,
  // FFT datapath
  output logic                 fft_start,
  output cplx_t                fft_in  [FFT_N],
  input  logic                 fft_valid,
  input  cplx_t                fft_out [FFT_N]
);

  typedef enum logic [2:0] {S_IDLE, S_READ, S_START, S_WAIT, S_WRITE, S_DONE} state_t;

  localparam int NPASS = (BRANCH_N == 64) ? 2 * FFT_N : 1;

  state_t             state;
  logic [3:0]         cnt;
  logic [4:0]         pass;
  logic               stride;
  logic [2:0]         grp;
  cplx_t              tw_out;
  logic [MEM_AW-1:0]  base;
  logic [BW-1:0]      bank;
  cplx_t              res [FFT_N];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cnt       <= '0;
      pass      <= '0;
      base      <= '0;
      bank      <= '0;
      fft_start <= 1'b0;
      out_en    <= 1'b0;
    end else begin
      fft_start <= 1'b0;
      out_en    <= 1'b0;
      unique case (state)
        S_IDLE: if (in_en) begin
          base  <= start_addr;
          // a bank number beyond NUM_BANKS falls back to bank 0
          bank  <= (int'(start_bank) < NUM_BANKS) ? start_bank : '0;
          cnt   <= '0;
          pass  <= '0;
          state <= S_READ;
        end
        S_READ: begin
          // address cnt issued this cycle; word cnt-1 arrives now
          if (cnt != 0) fft_in[cnt-1] <= cplx_t'(m_rdata);
          cnt <= cnt + 1'b1;
          if (cnt == 4'(FFT_N)) state <= S_START;
        end
        S_START: begin
          fft_start <= 1'b1;
          state     <= S_WAIT;
        end
        S_WAIT: if (fft_valid) begin
          res   <= fft_out;
          cnt   <= '0;
          state <= S_WRITE;
        end
        S_WRITE: begin
          cnt <= cnt + 1'b1;
          if (cnt == 4'(FFT_N - 1)) begin
            if (pass == 5'(NPASS - 1)) state <= S_DONE;
            else begin
              pass  <= pass + 1'b1;
              cnt   <= '0;
              state <= S_READ;
            end
          end
        end
        S_DONE: begin
          out_en <= 1'b1;
          state  <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    busy    = (state != S_IDLE);
    hw_owns = '0;
    if (busy) hw_owns[bank] = 1'b1;
    m_bank  = bank;
    m_en    = (state == S_READ && cnt < 4'(FFT_N)) || (state == S_WRITE);
    m_we    = (state == S_WRITE);
    stride  = (BRANCH_N == 64) && (pass < 5'(FFT_N));
    grp     = pass[2:0];
    if (stride)             m_addr = base + MEM_AW'(grp) + MEM_AW'({cnt[2:0], 3'b000});
    else if (BRANCH_N == 64) m_addr = base + MEM_AW'({grp, 3'b000}) + MEM_AW'(cnt);
    else                    m_addr = base + MEM_AW'(cnt);
    m_wdata = stride ? tw_out : res[cnt[2:0]];
  end

  // twiddle W64^(grp * k) on the word being written in a first-stage pass
  tw_mul #(.N(64)) u_tw (
    .x(res[cnt[2:0]]), .k(6'(grp * cnt[2:0])), .y(tw_out)
  );

endmodule
