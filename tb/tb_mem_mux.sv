// tb_mem_mux: four banks behind the memory switch. For random ownership
// patterns and requests it checks that only the addressed bank's port is
// enabled, that a bank owned by the hardware is closed to the processor
// (and the request flagged), and that read data comes back from the bank
// that was read one cycle earlier.
module tb_mem_mux;
  localparam int NB = 4, AW = 9, WIDTH = 32, BW = 2;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [NB-1:0]    hw_owns;
  logic             p_en, p_we, p_blocked, h_en, h_we;
  logic [BW-1:0]    p_bank, h_bank;
  logic [AW-1:0]    p_addr, h_addr;
  logic [WIDTH-1:0] p_wdata, p_rdata, h_wdata, h_rdata;
  logic             ena [NB], wea [NB], enb [NB], web [NB];
  logic [AW-1:0]    addra [NB], addrb [NB];
  logic [WIDTH-1:0] dia [NB], doa [NB], dib [NB], dob [NB];
  int checks = 0, failures = 0;

  mem_mux #(.NUM_BANKS(NB), .AW(AW), .WIDTH(WIDTH)) dut (.*);

  logic [BW-1:0] pb_q, hb_q;

  initial begin
    p_en = 0; h_en = 0; hw_owns = '0;
    @(negedge clk);
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      hw_owns = NB'($urandom);
      p_en = $urandom_range(1); p_we = $urandom_range(1); p_bank = BW'($urandom);
      p_addr = AW'($urandom); p_wdata = $urandom;
      h_en = $urandom_range(1); h_we = $urandom_range(1); h_bank = BW'($urandom);
      h_addr = AW'($urandom); h_wdata = $urandom;
      for (int b = 0; b < NB; b++) begin
        doa[b] = {8'hA0 + 8'(b), 24'(t)};
        dob[b] = {8'hB0 + 8'(b), 24'(t)};
      end
      #1;
      // read steering for the request of the previous cycle
      if (t > 0) begin
        checks++;
        if (p_rdata !== doa[pb_q] || h_rdata !== dob[hb_q]) begin
          failures++; $display("FAIL read steering t=%0d", t);
        end
      end
      for (int b = 0; b < NB; b++) begin
        logic xa, xb;
        xa = p_en && (p_bank == BW'(b)) && !hw_owns[b];
        xb = h_en && (h_bank == BW'(b)) && hw_owns[b];
        checks++;
        if (ena[b] !== xa || enb[b] !== xb ||
            (xa && (addra[b] !== p_addr || dia[b] !== p_wdata || wea[b] !== p_we)) ||
            (xb && (addrb[b] !== h_addr || dib[b] !== h_wdata || web[b] !== h_we))) begin
          failures++; $display("FAIL bank %0d t=%0d", b, t);
        end
      end
      checks++;
      if (p_blocked !== (p_en && hw_owns[p_bank])) begin
        failures++; $display("FAIL blocked t=%0d", t);
      end
      @(posedge clk);
      if (p_en) pb_q = p_bank;
      if (h_en) hb_q = h_bank;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
