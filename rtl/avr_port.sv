// avr_port: an 8-bit parallel port (PORTA or PORTB of the Nimbus).
// PORTx holds the output value, DDRx the direction (1 = output) and PINx
// reads the pins through one synchronising register. Only the plain parallel
// function is provided, no alternate pin functions. The I/O addresses are
// parameters; the defaults are those of port B. Writes on the rising edge of
// the I/O clock, reads combinational; 'hit' flags an owned address.
module avr_port
  import nimbus_pkg::*;
#(
  parameter logic [5:0] PORT_ADDR = IO_PORTB,
  parameter logic [5:0] DDR_ADDR  = IO_DDRB,
  parameter logic [5:0] PIN_ADDR  = IO_PINB
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [5:0] io_addr,
  input  logic       io_we,
  input  logic [7:0] io_wdata,
  output logic [7:0] rdata,
  output logic       hit,
  input  logic [7:0] pins_in,
  output logic [7:0] port_out,
  output logic [7:0] ddr_out
);
  logic [7:0] port_q, ddr_q, pin_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      port_q <= '0;
      ddr_q  <= '0;
      pin_q  <= '0;
    end else begin
      pin_q <= pins_in;
      if (io_we && io_addr == PORT_ADDR) port_q <= io_wdata;
      if (io_we && io_addr == DDR_ADDR)  ddr_q  <= io_wdata;
    end
  end

  always_comb begin
    hit = 1'b1;
    unique case (io_addr)
      PORT_ADDR: rdata = port_q;
      DDR_ADDR:  rdata = ddr_q;
      PIN_ADDR:  rdata = pin_q;
      default: begin rdata = '0; hit = 1'b0; end
    endcase
  end

  assign port_out = port_q;
  assign ddr_out  = ddr_q;
endmodule
