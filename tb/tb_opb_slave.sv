// tb_opb_slave: drives the OPB slave with a bus-master model and checks the
// handshake and the address decode: two-cycle transfers with a one-cycle
// acknowledge, read data only during the acknowledge, SRAM bank and word
// index derived from the address, register writes, error acknowledge for a
// bank owned by the hardware, and no answer outside the address map.
module tb_opb_slave;
  import fft_pkg::*;
  localparam int NB = 2, BW = 1;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        OPB_Rst = 1, OPB_RNW = 1, OPB_select = 0, OPB_seqAddr = 0;
  logic [31:0] OPB_ABus = 0, OPB_DBus = 0;
  logic [3:0]  OPB_BE = 4'hF;
  logic [31:0] Sl_DBus;
  logic        Sl_xferAck, Sl_errAck, Sl_retry, Sl_toutSup;
  logic              mem_en, mem_we, mem_blocked, reg_we, reg_sel;
  logic [BW-1:0]     mem_bank;
  logic [MEM_AW-1:0] mem_addr;
  logic [MEM_DW-1:0] mem_wdata, mem_rdata;
  logic [31:0]       reg_wdata, reg_rdata;
  int checks = 0, failures = 0;

  opb_slave #(.NUM_BANKS(NB)) dut (.OPB_Clk(clk), .*);

  // memory and register models; bank 1 is owned by the hardware
  logic [31:0] mem [NB][MEM_DEPTH];
  logic [31:0] regs [2];
  assign mem_blocked = mem_en && (mem_bank == 1'b1);
  always @(posedge clk) begin
    if (mem_en && !mem_blocked) begin
      if (mem_we) mem[mem_bank][mem_addr] <= mem_wdata;
      mem_rdata <= mem[mem_bank][mem_addr];
    end
    if (reg_we) regs[reg_sel] <= reg_wdata;
  end
  assign reg_rdata = regs[reg_sel] ^ 32'h5A5A_0000;

  task automatic xfer(input logic rnw, input logic [31:0] addr, input logic [31:0] wd,
                      output logic [31:0] rd, output logic acked, output logic err,
                      output int cycles);
    @(negedge clk);
    OPB_select = 1; OPB_RNW = rnw; OPB_ABus = addr; OPB_DBus = rnw ? 32'h0 : wd;
    cycles = 0; acked = 0; err = 0; rd = 0;
    while (!acked && cycles < 16) begin
      // sample as the master does: the values present at the clock edge
      @(posedge clk);
      cycles++;
      if (Sl_xferAck) begin acked = 1; err = Sl_errAck; rd = Sl_DBus; end
      else if (Sl_DBus != 0) begin
        failures++; $display("FAIL data driven without acknowledge");
      end
    end
    @(negedge clk);
    OPB_select = 0; OPB_DBus = 0;
  endtask

  task automatic expect_eq(input string what, input logic [31:0] got, exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h expected %h", what, got, exp); end
  endtask

  initial begin
    logic [31:0] rd; logic ack, err; int cyc;
    logic [31:0] shadow [MEM_DEPTH];
    repeat (2) @(negedge clk);
    OPB_Rst = 0;
    // write and read back bank 0
    for (int i = 0; i < 64; i++) begin
      shadow[i] = $urandom;
      xfer(0, BUS_BASE + 32'(4 * i), shadow[i], rd, ack, err, cyc);
      expect_eq("write ack", {ack, err}, 2'b10);
      expect_eq("write cycles", 32'(cyc), 32'd2);
    end
    for (int i = 63; i >= 0; i--) begin
      xfer(1, BUS_BASE + 32'(4 * i), 0, rd, ack, err, cyc);
      expect_eq("read data", rd, shadow[i]);
      expect_eq("read cycles", 32'(cyc), 32'd2);
    end
    expect_eq("model bank 0 word 5", mem[0][5], shadow[5]);
    // top word of bank 0
    xfer(0, BUS_BASE + 32'h7FC, 32'hCAFE_F00D, rd, ack, err, cyc);
    expect_eq("last word", mem[0][MEM_DEPTH-1], 32'hCAFE_F00D);
    // bank 1 is owned by the hardware: error acknowledge, write dropped
    mem[1][3] = 32'h1111_2222;
    xfer(0, BUS_BASE + BANK_BYTES + 32'hC, 32'hDEAD_BEEF, rd, ack, err, cyc);
    expect_eq("blocked write errAck", {ack, err}, 2'b11);
    expect_eq("blocked write dropped", mem[1][3], 32'h1111_2222);
    xfer(1, BUS_BASE + BANK_BYTES + 32'hC, 0, rd, ack, err, cyc);
    expect_eq("blocked read", {ack, err, rd}, {2'b11, 32'h0});
    // control registers
    xfer(0, BUS_BASE + CTRL_OFFSET, 32'h0001_0040, rd, ack, err, cyc);
    expect_eq("reg write", regs[0], 32'h0001_0040);
    xfer(1, BUS_BASE + CTRL_OFFSET, 0, rd, ack, err, cyc);
    expect_eq("reg read 0", rd, 32'h0001_0040 ^ 32'h5A5A_0000);
    xfer(0, BUS_BASE + CTRL_OFFSET + 4, 32'h0000_0003, rd, ack, err, cyc);
    xfer(1, BUS_BASE + CTRL_OFFSET + 4, 0, rd, ack, err, cyc);
    expect_eq("reg read 1", rd, 32'h0000_0003 ^ 32'h5A5A_0000);
    // outside the map: no acknowledge
    xfer(1, BUS_BASE + 32'(NB) * BANK_BYTES, 0, rd, ack, err, cyc);
    expect_eq("unmapped above banks", 32'(ack), 0);
    xfer(0, BUS_BASE - 4, 32'h1, rd, ack, err, cyc);
    expect_eq("unmapped below base", 32'(ack), 0);
    xfer(1, 32'h0000_0000, 0, rd, ack, err, cyc);
    expect_eq("unmapped zero", 32'(ack), 0);
    expect_eq("retry/toutSup", {Sl_retry, Sl_toutSup}, 2'b00);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
