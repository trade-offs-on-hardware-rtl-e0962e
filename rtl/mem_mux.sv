// mem_mux: hands each SRAM bank either to the processor (software
// environment) or to the hardware FFT (hardware environment).
//
// Every bank is a dual-port RAM whose port A belongs to the processor and
// port B to the hardware side. hw_owns[b] (from the state machine) says
// that bank b is being worked on by the hardware FFT: its port B is then
// enabled for the hardware requests and its port A is closed, so that the
// processor can not disturb the data in flight. A processor request to
// such a bank is refused and flagged on p_blocked in the same cycle.
// Banks not owned by the hardware stay open to the processor, which is
// what lets the processor prepare the next symbol in one bank while the
// hardware works on another (two banks for the double-buffered schedule,
// four for the 2x2 MIMO schedule; one bank for the basic schedule).
//
// Read data returns one cycle after the request; the mux remembers which
// bank each side read and steers that bank's output back. Purely
// combinational apart from those two bank registers.
module mem_mux #(
  parameter int NUM_BANKS = 1,
  parameter int AW        = 9,
  parameter int WIDTH     = 32,
  parameter int BW        = (NUM_BANKS > 1) ? $clog2(NUM_BANKS) : 1
) (
  input  logic                clk,
  input  logic [NUM_BANKS-1:0] hw_owns,
  // processor side (A1 / D1)
  input  logic                p_en,
  input  logic                p_we,
  input  logic [BW-1:0]       p_bank,
  input  logic [AW-1:0]       p_addr,
  input  logic [WIDTH-1:0]    p_wdata,
  output logic [WIDTH-1:0]    p_rdata,
  output logic                p_blocked,
  // hardware side (A2 / D2)
  input  logic                h_en,
  input  logic                h_we,
  input  logic [BW-1:0]       h_bank,
  input  logic [AW-1:0]       h_addr,
  input  logic [WIDTH-1:0]    h_wdata,
  output logic [WIDTH-1:0]    h_rdata,
  // to the banks
  output logic                ena   [NUM_BANKS],
  output logic                wea   [NUM_BANKS],
  output logic [AW-1:0]       addra [NUM_BANKS],
  output logic [WIDTH-1:0]    dia   [NUM_BANKS],
  input  logic [WIDTH-1:0]    doa   [NUM_BANKS],
  output logic                enb   [NUM_BANKS],
  output logic                web   [NUM_BANKS],
  output logic [AW-1:0]       addrb [NUM_BANKS],
  output logic [WIDTH-1:0]    dib   [NUM_BANKS],
  input  logic [WIDTH-1:0]    dob   [NUM_BANKS]
);

  logic [BW-1:0] p_bank_q, h_bank_q;

  always_comb begin
    p_blocked = p_en && hw_owns[p_bank];
    for (int b = 0; b < NUM_BANKS; b++) begin
      ena[b]   = p_en && (BW'(b) == p_bank) && !hw_owns[b];
      wea[b]   = p_we;
      addra[b] = p_addr;
      dia[b]   = p_wdata;
      enb[b]   = h_en && (BW'(b) == h_bank) && hw_owns[b];
      web[b]   = h_we;
      addrb[b] = h_addr;
      dib[b]   = h_wdata;
    end
  end

  always_ff @(posedge clk) begin
    if (p_en) p_bank_q <= p_bank;
    if (h_en) h_bank_q <= h_bank;
  end

  always_comb begin
    p_rdata = doa[p_bank_q];
    h_rdata = dob[h_bank_q];
  end

endmodule
