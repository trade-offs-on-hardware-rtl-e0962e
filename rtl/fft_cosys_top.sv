// fft_cosys_top: hardware half of a processor + accelerator FFT.
//
// A processor computes the first stages of an N-point FFT in software and
// leaves groups of eight samples in an on-chip SRAM; this block computes
// the last radix-8 stage, one 8-point FFT at a time, in hardware. The
// processor reaches the SRAM and a control register over the OPB bus:
//   1. it writes its intermediate samples into the SRAM,
//   2. it writes the word address (and bank) of an 8-sample group into the
//      write register, which starts the state machine,
//   3. the state machine reads the eight words, runs them through the
//      8-point FFT, writes the eight results back in place and sets the
//      output-enable bit of the read register, which the processor polls.
// Structure: opb_slave -> ctrl_reg -> hw_fsm -> fft8_r23, with the SRAM
// banks (dpram, port A processor, port B hardware) switched between the two
// sides by mem_mux.
//
// NUM_BANKS selects the buffering of the timing schedules: 1 bank for the
// basic single-antenna schedule (software and hardware take turns within a
// symbol), 2 banks for the double-buffered schedule (hardware works on one
// bank while the processor fills the other), 4 banks for the 2x2 MIMO
// schedule. The default is the single-bank system.
//
// BRANCH_N sets the length of the hardware branch FFT: 8 (default; one
// 8-point FFT per start, 24 cycles) or 64 (one 64-point FFT per start on 64
// consecutive words, made of 16 passes through the same 8-point datapath
// with a twiddle multiplication between the two radix-8 stages, 354
// cycles; results in word 8*a + b = X(a + 8*b) / 64).
//
// Ports: the OPB slave signals, plus fft_busy and fft_done (the hardware's
// busy flag and its one-cycle output-enable pulse) for monitoring. One
// clock, OPB_Clk; OPB_Rst is a synchronous active-high reset.
module fft_cosys_top
  import fft_pkg::*;
#(
  parameter int NUM_BANKS = 1,
  parameter int BRANCH_N  = 8
) (
  input  logic        OPB_Clk,
  input  logic        OPB_Rst,
  input  logic [31:0] OPB_ABus,
  input  logic [3:0]  OPB_BE,
  input  logic [31:0] OPB_DBus,
  input  logic        OPB_RNW,
  input  logic        OPB_select,
  input  logic        OPB_seqAddr,
  output logic [31:0] Sl_DBus,
  output logic        Sl_xferAck,
  output logic        Sl_errAck,
  output logic        Sl_retry,
  output logic        Sl_toutSup,
  output logic        fft_busy,
  output logic        fft_done
);

  localparam int BW = (NUM_BANKS > 1) ? $clog2(NUM_BANKS) : 1;

  logic rst_n;
  assign rst_n = !OPB_Rst;

  // processor-side memory request
  logic              p_en, p_we, p_blocked;
  logic [BW-1:0]     p_bank;
  logic [MEM_AW-1:0] p_addr;
  logic [MEM_DW-1:0] p_wdata, p_rdata;
  // control register
  logic              reg_we, reg_sel;
  logic [31:0]       reg_wdata, reg_rdata;
  logic              in_en, busy, out_en;
  logic [MEM_AW-1:0] start_addr;
  logic [BW-1:0]     start_bank;
  // hardware-side memory request
  logic [NUM_BANKS-1:0] hw_owns;
  logic              h_en, h_we;
  logic [BW-1:0]     h_bank;
  logic [MEM_AW-1:0] h_addr;
  logic [MEM_DW-1:0] h_wdata, h_rdata;
  // FFT
  logic              fft_start, fft_valid;
  cplx_t             fft_in  [FFT_N];
  cplx_t             fft_out [FFT_N];
  // banks
  logic              ena [NUM_BANKS], wea [NUM_BANKS], enb [NUM_BANKS], web [NUM_BANKS];
  logic [MEM_AW-1:0] addra [NUM_BANKS], addrb [NUM_BANKS];
  logic [MEM_DW-1:0] dia [NUM_BANKS], doa [NUM_BANKS], dib [NUM_BANKS], dob [NUM_BANKS];

  opb_slave #(.NUM_BANKS(NUM_BANKS), .BW(BW)) u_opb (
    .OPB_Clk, .OPB_Rst, .OPB_ABus, .OPB_BE, .OPB_DBus, .OPB_RNW, .OPB_select,
    .OPB_seqAddr, .Sl_DBus, .Sl_xferAck, .Sl_errAck, .Sl_retry, .Sl_toutSup,
    .mem_en(p_en), .mem_we(p_we), .mem_bank(p_bank), .mem_addr(p_addr),
    .mem_wdata(p_wdata), .mem_rdata(p_rdata), .mem_blocked(p_blocked),
    .reg_we, .reg_sel, .reg_wdata, .reg_rdata
  );

  ctrl_reg #(.BW(BW)) u_ctrl (
    .clk(OPB_Clk), .rst_n, .reg_we, .reg_sel, .reg_wdata, .reg_rdata,
    .in_en, .start_addr, .start_bank, .busy, .out_en
  );

  hw_fsm #(.NUM_BANKS(NUM_BANKS), .BRANCH_N(BRANCH_N), .BW(BW)) u_fsm (
    .clk(OPB_Clk), .rst_n, .in_en, .start_addr, .start_bank, .busy, .out_en,
    .hw_owns, .m_en(h_en), .m_we(h_we), .m_bank(h_bank), .m_addr(h_addr),
    .m_wdata(h_wdata), .m_rdata(h_rdata),
    .fft_start, .fft_in, .fft_valid, .fft_out
  );

  fft8_r23 u_fft (
    .clk(OPB_Clk), .rst_n, .in_valid(fft_start), .in_data(fft_in),
    .out_valid(fft_valid), .out_data(fft_out)
  );

  mem_mux #(.NUM_BANKS(NUM_BANKS), .AW(MEM_AW), .WIDTH(MEM_DW), .BW(BW)) u_mux (
    .clk(OPB_Clk), .hw_owns,
    .p_en, .p_we, .p_bank, .p_addr, .p_wdata, .p_rdata, .p_blocked,
    .h_en, .h_we, .h_bank, .h_addr, .h_wdata, .h_rdata,
    .ena, .wea, .addra, .dia, .doa, .enb, .web, .addrb, .dib, .dob
  );

  for (genvar b = 0; b < NUM_BANKS; b++) begin : g_bank
    dpram #(.DEPTH(MEM_DEPTH), .WIDTH(MEM_DW)) u_ram (
      .clk(OPB_Clk),
      .ena(ena[b]), .wea(wea[b]), .ssra(OPB_Rst), .addra(addra[b]), .dia(dia[b]), .doa(doa[b]),
      .enb(enb[b]), .web(web[b]), .ssrb(OPB_Rst), .addrb(addrb[b]), .dib(dib[b]), .dob(dob[b])
    );
  end

  assign fft_busy = busy;
  assign fft_done = out_en;

endmodule
