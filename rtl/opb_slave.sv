// opb_slave: processor-bus slave of the FFT accelerator. It maps the SRAM
// banks and the control register into the processor's address space and
// performs the bus handshake for them.
//
// Signal names follow the On-chip Peripheral Bus (OPB): the master drives
// OPB_select with address, data and OPB_RNW; the slave answers with a
// one-cycle Sl_xferAck, putting read data on Sl_DBus during that cycle only
// (Sl_DBus is zero otherwise so that it can be OR-ed onto the bus).
// Every access takes two cycles: in the first the request goes to the
// SRAM or register, in the second the slave acknowledges. Address map
// (byte addresses, 32-bit word accesses only, byte enables not used):
//   BASE + 0x0000 + b*0x800 + 4*i   word i of SRAM bank b
//   BASE + CTRL_OFFSET + 0x0        write register
//   BASE + CTRL_OFFSET + 0x4        read register
// An SRAM access to a bank the hardware FFT currently owns is refused:
// writes are dropped, reads return zero, and Sl_errAck comes with
// Sl_xferAck. Addresses outside the map are not answered (another slave's).
// Sl_retry and Sl_toutSup are never used. The base address follows the
// document; the register offsets and the error response are this design's.
// Synchronous active-high reset (OPB_Rst), as on the OPB.
module opb_slave
  import fft_pkg::*;
#(
  parameter int          NUM_BANKS = 1,
  parameter int          BW        = (NUM_BANKS > 1) ? $clog2(NUM_BANKS) : 1,
  parameter logic [31:0] BASEADDR  = BUS_BASE
) (
  input  logic              OPB_Clk,
  input  logic              OPB_Rst,
  input  logic [31:0]       OPB_ABus,
  input  logic [3:0]        OPB_BE,
  input  logic [31:0]       OPB_DBus,
  input  logic              OPB_RNW,
  input  logic              OPB_select,
  input  logic              OPB_seqAddr,
  output logic [31:0]       Sl_DBus,
  output logic              Sl_xferAck,
  output logic              Sl_errAck,
  output logic              Sl_retry,
  output logic              Sl_toutSup,
  // SRAM, processor side
  output logic              mem_en,
  output logic              mem_we,
  output logic [BW-1:0]     mem_bank,
  output logic [MEM_AW-1:0] mem_addr,
  output logic [MEM_DW-1:0] mem_wdata,
  input  logic [MEM_DW-1:0] mem_rdata,
  input  logic              mem_blocked,
  // control register
  output logic              reg_we,
  output logic              reg_sel,
  output logic [31:0]       reg_wdata,
  input  logic [31:0]       reg_rdata
);

  logic [31:0] off;
  logic        hit_mem, hit_reg, issue;
  logic        ack_q, rd_q, is_mem_q, err_q;
  logic [31:0] reg_q;

  always_comb begin
    off     = OPB_ABus - BASEADDR;
    hit_mem = (off < 32'(NUM_BANKS) * BANK_BYTES) && (off[1:0] == 2'b00);
    hit_reg = (off[31:3] == CTRL_OFFSET[31:3]) && (off[1:0] == 2'b00);
    issue   = OPB_select && !ack_q && (hit_mem || hit_reg);

    mem_en    = issue && hit_mem;
    mem_we    = !OPB_RNW;
    mem_bank  = BW'(off >> 11);
    mem_addr  = off[MEM_AW+1:2];
    mem_wdata = OPB_DBus;

    reg_we    = issue && hit_reg && !OPB_RNW;
    reg_sel   = off[2];
    reg_wdata = OPB_DBus;
  end

  always_ff @(posedge OPB_Clk) begin
    if (OPB_Rst) begin
      ack_q    <= 1'b0;
      rd_q     <= 1'b0;
      is_mem_q <= 1'b0;
      err_q    <= 1'b0;
      reg_q    <= '0;
    end else begin
      ack_q    <= issue;
      rd_q     <= OPB_RNW;
      is_mem_q <= hit_mem;
      err_q    <= issue && hit_mem && mem_blocked;
      reg_q    <= reg_rdata;
    end
  end

  always_comb begin
    Sl_xferAck = ack_q;
    Sl_errAck  = ack_q && err_q;
    Sl_retry   = 1'b0;
    Sl_toutSup = 1'b0;
    Sl_DBus    = '0;
    if (ack_q && rd_q && !err_q) Sl_DBus = is_mem_q ? mem_rdata : reg_q;
  end

  // Handshake rules: an acknowledge answers a selected transfer, and data
  // is only driven while acknowledging.
  a_ack_needs_select: assert property (@(posedge OPB_Clk) disable iff (OPB_Rst)
    Sl_xferAck |-> OPB_select);
  a_ack_one_cycle: assert property (@(posedge OPB_Clk) disable iff (OPB_Rst)
    Sl_xferAck |=> !Sl_xferAck);
  a_dbus_idle_zero: assert property (@(posedge OPB_Clk) disable iff (OPB_Rst)
    !Sl_xferAck |-> (Sl_DBus == '0));

endmodule
