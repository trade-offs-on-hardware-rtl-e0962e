// tb_ctrl_reg: checks the write register (address/bank latch, one-cycle
// input enable, writes ignored while busy) and the read register (output
// enable set by the state machine, cleared by the next start; busy bit).
module tb_ctrl_reg;
  import fft_pkg::*;
  localparam int BW = 2;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic              rst_n = 0, reg_we = 0, reg_sel = 0, busy = 0, out_en = 0;
  logic [31:0]       reg_wdata = 0, reg_rdata;
  logic              in_en;
  logic [MEM_AW-1:0] start_addr;
  logic [BW-1:0]     start_bank;
  int checks = 0, failures = 0;
  int n_in_en = 0;

  ctrl_reg #(.BW(BW)) dut (.*);

  always @(negedge clk) if (in_en) n_in_en++;

  task automatic expect_eq(input string what, input logic [31:0] got, exp);
    checks++;
    if (got !== exp) begin
      failures++; $display("FAIL %s: %h expected %h", what, got, exp);
    end
  endtask

  task automatic wr(input logic sel, input logic [31:0] d);
    @(negedge clk); reg_we = 1; reg_sel = sel; reg_wdata = d;
    @(negedge clk); reg_we = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    reg_sel = REG_READ; #1;
    expect_eq("status after reset", reg_rdata, 32'h0);
    // start at address 0x48 in bank 2
    wr(REG_WRITE, 32'h0002_0048);
    expect_eq("in_en", 32'(in_en), 32'h1);
    expect_eq("start_addr", 32'(start_addr), 32'h48);
    expect_eq("start_bank", 32'(start_bank), 32'h2);
    reg_sel = REG_WRITE; #1;
    expect_eq("write reg readback", reg_rdata, 32'h0002_0048);
    busy = 1;
    @(negedge clk);
    expect_eq("in_en one cycle", 32'(in_en), 32'h0);
    // write while busy is ignored
    wr(REG_WRITE, 32'h0001_0010);
    expect_eq("busy write ignored", 32'(start_addr), 32'h48);
    reg_sel = REG_READ; #1;
    expect_eq("status busy", reg_rdata, 32'h2);
    // hardware finishes
    @(negedge clk); busy = 0; out_en = 1;
    @(negedge clk); out_en = 0; reg_sel = REG_READ; #1;
    expect_eq("status done", reg_rdata, 32'h1);
    repeat (3) @(negedge clk);
    expect_eq("done sticky", reg_rdata, 32'h1);
    // writes to the read register do nothing
    wr(REG_READ, 32'hFFFF_FFFF);
    reg_sel = REG_READ; #1;
    expect_eq("read reg is read only", reg_rdata, 32'h1);
    // next start clears done
    wr(REG_WRITE, 32'h0000_01F8);
    reg_sel = REG_READ; #1;
    expect_eq("done cleared", reg_rdata[0], 1'b0);
    expect_eq("start_addr 2", 32'(start_addr), 32'h1F8);
    expect_eq("in_en count", 32'(n_in_en), 32'h2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
