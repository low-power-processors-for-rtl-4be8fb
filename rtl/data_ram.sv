// data_ram: internal data SRAM of the Nimbus microcontroller, BYTES x 8 bits
// (4096 bytes by default). Single port; read and write happen on the falling
// clock edge so that an address driven after a rising edge is served before
// the next rising edge. The read data register holds its value while 're' is
// low. The low address bits select the byte: with the default size the RAM
// answers data-space addresses 0x060..0xFFF (and aliases below 0x60 are never
// selected by the bus decoder).
module data_ram #(
  parameter int unsigned BYTES = 4096
) (
  input  logic                     clk,
  input  logic [$clog2(BYTES)-1:0] addr,
  input  logic                     re,
  input  logic                     we,
  input  logic [7:0]               wdata,
  output logic [7:0]               rdata
);
  logic [7:0] mem [BYTES];

  always_ff @(negedge clk) begin
    if (we) mem[addr] <= wdata;
    if (re) rdata <= mem[addr];
  end
endmodule
