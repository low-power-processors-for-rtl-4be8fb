// external_mux: the "IO & interrupts control" of the Nimbus.
// Combinational. It selects which source drives the core's data bus in: the
// data RAM for data-space addresses 0x60 and up, otherwise the I/O device
// that claims the I/O address ('hit'); an unclaimed address reads 0. It also
// assembles the interrupt request vector in ATmega103 order (line n is
// vector n+1): INT7..0 on lines 7..0, Timer0 compare on 14, Timer0 overflow
// on 15, UART receive, data-register-empty and transmit-complete on 17..19.
// Lines of devices Nimbus does not have stay 0.
module external_mux
  import nimbus_pkg::*;
#(
  parameter int unsigned NIRQ = IRQ_LINES
) (
  input  logic [15:0]     adr,
  input  logic [7:0]      ram_rdata,
  input  logic [7:0]      svc_rdata,
  input  logic            svc_hit,
  input  logic [7:0]      tmr_rdata,
  input  logic            tmr_hit,
  input  logic [7:0]      porta_rdata,
  input  logic            porta_hit,
  input  logic [7:0]      portb_rdata,
  input  logic            portb_hit,
  input  logic [7:0]      uart_rdata,
  input  logic            uart_hit,
  output logic [7:0]      dbus_in,
  input  logic [7:0]      ext_irq,
  input  logic            tmr_comp_irq,
  input  logic            tmr_ovf_irq,
  input  logic            uart_rx_irq,
  input  logic            uart_udre_irq,
  input  logic            uart_tx_irq,
  output logic [NIRQ-1:0] irq_lines
);
  always_comb begin
    if (adr >= 16'h60)  dbus_in = ram_rdata;
    else if (svc_hit)   dbus_in = svc_rdata;
    else if (tmr_hit)   dbus_in = tmr_rdata;
    else if (porta_hit) dbus_in = porta_rdata;
    else if (portb_hit) dbus_in = portb_rdata;
    else if (uart_hit)  dbus_in = uart_rdata;
    else                dbus_in = 8'd0;

    irq_lines                = '0;
    irq_lines[7:0]           = ext_irq;
    irq_lines[IRQ_T0_COMP]   = tmr_comp_irq;
    irq_lines[IRQ_T0_OVF]    = tmr_ovf_irq;
    irq_lines[IRQ_UART_RX]   = uart_rx_irq;
    irq_lines[IRQ_UART_UDRE] = uart_udre_irq;
    irq_lines[IRQ_UART_TX]   = uart_tx_irq;
  end
endmodule
