// service_module: special-function registers of the Nimbus I/O space.
// MCUCR (I/O 0x35) holds the sleep enable SE (bit 5) and the sleep-mode bits
// SM1, SM0, SM2 (bits 4, 3, 2) read by the power control when SLEEP executes.
// EIMSK (0x39) enables the external interrupt pins INT7..INT0. An external
// interrupt request is active while its pin is low and enabled; it is a
// level request and needs no clock, so it can wake the chip from power-down.
// Registers are written on the rising edge of the I/O clock and read
// combinationally; 'hit' flags an address this module owns.
module service_module
  import nimbus_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [5:0] io_addr,
  input  logic       io_we,
  input  logic [7:0] io_wdata,
  output logic [7:0] rdata,
  output logic       hit,
  input  logic [7:0] int_pins,   // external interrupt pins, active low
  output logic [7:0] ext_irq,
  output logic       se,
  output logic [2:0] sm          // {SM2, SM1, SM0}
);
  logic [7:0] mcucr, eimsk;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mcucr <= '0;
      eimsk <= '0;
    end else if (io_we) begin
      if (io_addr == IO_MCUCR) mcucr <= io_wdata;
      if (io_addr == IO_EIMSK) eimsk <= io_wdata;
    end
  end

  always_comb begin
    hit   = (io_addr == IO_MCUCR) || (io_addr == IO_EIMSK);
    rdata = (io_addr == IO_MCUCR) ? mcucr : (io_addr == IO_EIMSK) ? eimsk : 8'd0;
  end

  assign ext_irq = ~int_pins & eimsk;
  assign se      = mcucr[5];
  assign sm      = {mcucr[2], mcucr[4], mcucr[3]};
endmodule
