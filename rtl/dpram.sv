// dpram: true dual-port block RAM, 512 words x 32 bits by default, modelled
// on a RAMB16_S36_S36 FPGA primitive. Port A serves the processor, port B
// the hardware FFT.
//
// Each port has an enable (en), a write enable (we), a synchronous output
// reset (ssr), an address, write data and registered read data. With en
// high a port reads or writes on the clock edge; a write also shows the
// new word on the port's output (write-first). ssr clears the output
// register to zero. Read data appears one clock after the address.
// Both ports share one clock in this design (the primitive allows two);
// if both write the same address in the same cycle, port B wins. Parity
// bits of the primitive are not modelled. The memory content is not reset.
module dpram #(
  parameter int DEPTH = 512,
  parameter int WIDTH = 32,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  // port A
  input  logic             ena,
  input  logic             wea,
  input  logic             ssra,
  input  logic [AW-1:0]    addra,
  input  logic [WIDTH-1:0] dia,
  output logic [WIDTH-1:0] doa,
  // port B
  input  logic             enb,
  input  logic             web,
  input  logic             ssrb,
  input  logic [AW-1:0]    addrb,
  input  logic [WIDTH-1:0] dib,
  output logic [WIDTH-1:0] dob
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (ena && wea) mem[addra] <= dia;
    if (enb && web) mem[addrb] <= dib;
  end

  always_ff @(posedge clk) begin
    if (ssra)      doa <= '0;
    else if (ena)  doa <= wea ? dia : mem[addra];
    if (ssrb)      dob <= '0;
    else if (enb)  dob <= web ? dib : mem[addrb];
  end

endmodule
