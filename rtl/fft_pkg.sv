// fft_pkg: types and constants shared by the co-design FFT accelerator.
//
// Data samples are 16-bit two's-complement fixed point, real and imaginary
// part each, as in the 16-bit word length the design is built for. One
// complex sample occupies one 32-bit memory word: real part in bits 31:16,
// imaginary part in bits 15:0 (this packing is a choice of this design).
// The memory window of the accelerator and the offset of its control
// register on the processor bus are collected here too.
package fft_pkg;

  // Word length of a real or imaginary part.
  parameter int DW = 16;

  // Points of the hardware branch FFT.
  parameter int FFT_N = 8;

  // One complex sample, packed so that it maps 1:1 onto a 32-bit memory word.
  typedef struct packed {
    logic signed [DW-1:0] re;
    logic signed [DW-1:0] im;
  } cplx_t;

  // Dual-port block RAM geometry: 512 words of 32 bits.
  parameter int MEM_DEPTH = 512;
  parameter int MEM_AW    = 9;
  parameter int MEM_DW    = 32;

  // Processor bus map. The SRAM banks start at the base address; each bank
  // takes MEM_DEPTH 32-bit words (0x800 bytes). The control registers sit at
  // CTRL_OFFSET above the base.
  parameter logic [31:0] BUS_BASE    = 32'h0180_0000;
  parameter logic [31:0] BANK_BYTES  = 32'h0000_0800;
  parameter logic [31:0] CTRL_OFFSET = 32'h0000_4000;

  // Register word offsets inside the control register block.
  parameter logic REG_WRITE = 1'b0;  // write register: start address, bank
  parameter logic REG_READ  = 1'b1;  // read register: output enable, busy

  // Pipeline depth of the 8-point FFT datapath (one register per radix-2 step).
  parameter int FFT_LATENCY = 3;

endpackage
