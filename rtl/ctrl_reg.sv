// ctrl_reg: the control register through which the processor starts the
// hardware FFT and checks that it has finished.
//
// Two 32-bit registers, selected by reg_sel:
//   write register (REG_WRITE), read/write:
//     bits  8:0   word address of the first of the eight samples
//     bits 17:16  SRAM bank that holds them
//     Writing it while the hardware is idle latches the address and raises
//     in_en (the input enable) for one cycle, which starts the state
//     machine. A write while the hardware is busy is ignored.
//   read register (REG_READ), read only:
//     bit 0  output enable: the last requested 8-point FFT has been written
//            back. Set by the state machine's out_en pulse, cleared by the
//            next accepted write to the write register.
//     bit 1  busy
// The bit layout is a choice of this design. Read data is combinational
// (reg_rdata follows reg_sel); writes take effect on the clock edge.
// Synchronous active-low reset clears both registers.
module ctrl_reg
  import fft_pkg::*;
#(
  parameter int BW = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              reg_we,
  input  logic              reg_sel,
  input  logic [31:0]       reg_wdata,
  output logic [31:0]       reg_rdata,
  // to / from the state machine
  output logic              in_en,
  output logic [MEM_AW-1:0] start_addr,
  output logic [BW-1:0]     start_bank,
  input  logic              busy,
  input  logic              out_en
);

  logic done;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      in_en      <= 1'b0;
      start_addr <= '0;
      start_bank <= '0;
      done       <= 1'b0;
    end else begin
      in_en <= 1'b0;
      if (reg_we && reg_sel == REG_WRITE && !busy && !in_en) begin
        start_addr <= reg_wdata[MEM_AW-1:0];
        start_bank <= reg_wdata[16 +: BW];
        in_en      <= 1'b1;
        done       <= 1'b0;
      end else if (out_en) begin
        done <= 1'b1;
      end
    end
  end

  always_comb begin
    reg_rdata = '0;
    if (reg_sel == REG_WRITE) begin
      reg_rdata[MEM_AW-1:0] = start_addr;
      reg_rdata[16 +: BW]   = start_bank;
    end else begin
      reg_rdata[0] = done;
      reg_rdata[1] = busy || in_en;
    end
  end

endmodule
