// prog_rom: program memory of the Nimbus microcontroller, WORDS x 16 bits.
// The read is synchronous on the falling clock edge, so an address set up
// after a rising edge returns its word before the next rising edge: the core
// sees a one-cycle instruction fetch. The contents are fixed when the design
// is built: INIT_FILE, if not empty, is loaded with $readmemh (one 16-bit word
// per line); a simulation may also preload the array. The default size,
// 8192 words (16 KB), is the program memory size assumed for the chip's
// area and power estimates; the ROM's size would in practice follow the
// program. Address bits above the array size are ignored.
module prog_rom #(
  parameter int unsigned WORDS     = 8192,
  parameter string       INIT_FILE = ""
) (
  input  logic        clk,
  input  logic [15:0] addr,     // word address
  output logic [15:0] data
);
  localparam int unsigned AW = $clog2(WORDS);
  logic [15:0] mem [WORDS];

  initial begin
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(negedge clk) data <= mem[addr[AW-1:0]];
endmodule
