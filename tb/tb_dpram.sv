// tb_dpram: random reads and writes on both ports of the dual-port RAM,
// compared with a reference array; checks the one-cycle read latency,
// write-first output, the enables and the synchronous output reset.
module tb_dpram;
  localparam int DEPTH = 512, WIDTH = 32, AW = 9;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic             ena = 0, wea = 0, ssra = 0, enb = 0, web = 0, ssrb = 0;
  logic [AW-1:0]    addra = 0, addrb = 0;
  logic [WIDTH-1:0] dia = 0, dib = 0, doa, dob;
  int checks = 0, failures = 0;

  dpram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  logic [WIDTH-1:0] ref_mem [DEPTH];
  logic [WIDTH-1:0] exp_a, exp_b;
  logic             chk_a, chk_b;

  initial begin
    // fill through port A
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      ena = 1; wea = 1; addra = AW'(i); dia = $urandom; ref_mem[i] = dia;
    end
    @(negedge clk); ena = 0; wea = 0;
    // random traffic on both ports; ports never write the same address
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      ena = $urandom_range(3) != 0; wea = $urandom_range(1); addra = AW'($urandom);
      dia = $urandom;
      enb = $urandom_range(3) != 0; web = $urandom_range(1); addrb = AW'($urandom);
      dib = $urandom;
      if (addrb == addra) addrb = addra + 1'b1;
      ssra = ($urandom_range(31) == 0); ssrb = ($urandom_range(31) == 0);
      chk_a = ena || ssra; chk_b = enb || ssrb;
      exp_a = ssra ? '0 : (wea ? dia : ref_mem[addra]);
      exp_b = ssrb ? '0 : (web ? dib : ref_mem[addrb]);
      if (ena && wea) ref_mem[addra] = dia;
      if (enb && web) ref_mem[addrb] = dib;
      @(posedge clk); #1;
      if (chk_a) begin
        checks++;
        if (doa !== exp_a) begin failures++; $display("FAIL A addr %0d: %h vs %h", addra, doa, exp_a); end
      end
      if (chk_b) begin
        checks++;
        if (dob !== exp_b) begin failures++; $display("FAIL B addr %0d: %h vs %h", addrb, dob, exp_b); end
      end
    end
    // output holds while the port is disabled
    @(negedge clk); ena = 1; wea = 0; ssra = 0; addra = 5; enb = 0; ssrb = 0;
    @(negedge clk); ena = 0; addra = 6;
    repeat (3) @(negedge clk);
    checks++;
    if (doa !== ref_mem[5]) begin failures++; $display("FAIL hold"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
