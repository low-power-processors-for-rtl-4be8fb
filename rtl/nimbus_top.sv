// nimbus_top: the Nimbus microcontroller, a low-power AVR (ATmega103
// instruction set and I/O map) for sensor-network motes.
// Blocks: the AVR core, program ROM, 4 KB data RAM, the I/O & interrupt
// control (external_mux), the service registers (MCUCR, EIMSK), Timer/Counter0
// with an external clock input, a UART, parallel ports A and B, and the power
// control that implements the sleep modes by gating three clocks derived from
// the internal clock 'clk':
//   clk_core  core, ROM and RAM        (stopped in every sleep mode)
//   clk_dev   ports, UART, service     (stopped in power-save and power-down)
//   clk_timer Timer/Counter0           (stopped in power-down)
// The core reaches RAM and devices through one data bus: it drives a
// data-space address, the RAM answers 0x60 and up and the devices answer the
// I/O space 0x20-0x5F (I/O addresses 0x00-0x3F). Interrupt requests from the
// external pins (active low, enabled in EIMSK), the timer and the UART reach
// both the core and the power control, which wakes the clocks.
// Port pins are split into input, output value and direction (DDR) signals.
// 'pc', 'inst' and the sleep signals are brought out for observation.
//
// Beside the microcontroller, and not connected to it, sits the
// de-synchronised design study (desyn_loop): a self-timed loop of a
// desyn-element and an incrementer, with handshake fork and join. It has no
// clock and its own reset; its matched delay is an external part between
// disa_req_to_delay and disa_req_from_delay, and its token input and
// observer output are 4-phase channels on the disa_* ports.
// Because that loop is built from C-elements and latches, a linter reports
// its handshake signals (and disa_q, which feeds the incrementer back into
// the loop) as circular combinational logic; the cycle is the intended
// self-timed feedback and passes through master and slave latches that the
// handshake never opens at the same time.
module nimbus_top
  import nimbus_pkg::*;
#(
  parameter int unsigned ROM_WORDS = 8192,
  parameter int unsigned RAM_BYTES = 4096,
  parameter string       ROM_INIT  = ""
) (
  input  logic        clk,          // internal clock
  input  logic        clk_ext,      // external timer clock
  input  logic        rst_n,
  input  logic [7:0]  int_pins,     // INT7..INT0, active low
  input  logic [7:0]  porta_in,
  output logic [7:0]  porta_out,
  output logic [7:0]  porta_ddr,
  input  logic [7:0]  portb_in,
  output logic [7:0]  portb_out,
  output logic [7:0]  portb_ddr,
  input  logic        rxd,
  output logic        txd,
  output logic [15:0] pc,
  output logic [15:0] inst,
  output logic        sleep_status,
  output logic        mode_idle,
  output logic        mode_power_save,
  output logic        mode_power_down,
  output logic        clk_core_enable,
  output logic        clk_dev_enable,
  // de-synchronised design study
  input  logic        disa_rst_n,
  output logic        disa_req_to_delay,
  input  logic        disa_req_from_delay,
  input  logic        disa_ext_req,
  output logic        disa_ext_ack,
  output logic        disa_obs_req,
  input  logic        disa_obs_ack,
  output logic [7:0]  disa_q
);
  logic clk_core, clk_dev, clk_timer, clk_timer_enable;

  // core bus
  logic [15:0] rom_addr, rom_data, adr, inst_reg, sp;
  logic [5:0]  io_addr;
  logic        iore, iowe, ramre, ramwe, sleep_req, irqack;
  logic [7:0]  dbusout, dbusin, sreg;
  logic [4:0]  irqackad;
  logic [IRQ_LINES-1:0] irq_lines;

  // devices
  logic [7:0] ram_rdata, svc_rdata, tmr_rdata, porta_rdata, portb_rdata, uart_rdata;
  logic       svc_hit, tmr_hit, porta_hit, portb_hit, uart_hit;
  logic [7:0] ext_irq;
  logic       se, tmr_comp_irq, tmr_ovf_irq, uart_rx_irq, uart_udre_irq, uart_tx_irq;
  logic [2:0] sm;

  // ---------------- power control and clock gates ----------------
  power_control u_power (
    .clk, .rst_n, .sleep_req, .se, .sm, .irq_lines,
    .clk_core_enable, .clk_dev_enable, .clk_timer_enable,
    .mode_idle, .mode_power_down, .mode_power_save, .sleep_status
  );
  clock_gate u_cg_core  (.clk, .rst_n, .en(clk_core_enable),  .gclk(clk_core));
  clock_gate u_cg_dev   (.clk, .rst_n, .en(clk_dev_enable),   .gclk(clk_dev));
  clock_gate u_cg_timer (.clk, .rst_n, .en(clk_timer_enable), .gclk(clk_timer));

  // ---------------- core and memories ----------------
  avr_core u_core (
    .clk(clk_core), .rst_n, .rom_addr, .inst(rom_data), .pc, .inst_reg,
    .adr, .io_addr, .iore, .iowe, .ramre, .ramwe, .dbusout, .dbusin,
    .irq_lines, .irqack, .irqackad, .sleep_req, .sreg, .sp
  );

  prog_rom #(.WORDS(ROM_WORDS), .INIT_FILE(ROM_INIT)) u_rom (
    .clk(clk_core), .addr(rom_addr), .data(rom_data)
  );

  data_ram #(.BYTES(RAM_BYTES)) u_ram (
    .clk(clk_core), .addr(adr[$clog2(RAM_BYTES)-1:0]), .re(ramre), .we(ramwe),
    .wdata(dbusout), .rdata(ram_rdata)
  );

  // ---------------- I/O & interrupt control ----------------
  external_mux u_xmux (
    .adr, .ram_rdata,
    .svc_rdata, .svc_hit, .tmr_rdata, .tmr_hit,
    .porta_rdata, .porta_hit, .portb_rdata, .portb_hit, .uart_rdata, .uart_hit,
    .dbus_in(dbusin),
    .ext_irq, .tmr_comp_irq, .tmr_ovf_irq, .uart_rx_irq, .uart_udre_irq, .uart_tx_irq,
    .irq_lines
  );

  service_module u_svc (
    .clk(clk_dev), .rst_n, .io_addr, .io_we(iowe), .io_wdata(dbusout),
    .rdata(svc_rdata), .hit(svc_hit), .int_pins, .ext_irq, .se, .sm
  );

  timer_counter u_timer (
    .clk(clk_timer), .rst_n, .clk_ext, .io_addr, .io_we(iowe), .io_wdata(dbusout),
    .rdata(tmr_rdata), .hit(tmr_hit), .irq_comp(tmr_comp_irq), .irq_ovf(tmr_ovf_irq),
    .irqack, .irqackad
  );

  avr_port #(.PORT_ADDR(IO_PORTA), .DDR_ADDR(IO_DDRA), .PIN_ADDR(IO_PINA)) u_porta (
    .clk(clk_dev), .rst_n, .io_addr, .io_we(iowe), .io_wdata(dbusout),
    .rdata(porta_rdata), .hit(porta_hit), .pins_in(porta_in),
    .port_out(porta_out), .ddr_out(porta_ddr)
  );

  avr_port #(.PORT_ADDR(IO_PORTB), .DDR_ADDR(IO_DDRB), .PIN_ADDR(IO_PINB)) u_portb (
    .clk(clk_dev), .rst_n, .io_addr, .io_we(iowe), .io_wdata(dbusout),
    .rdata(portb_rdata), .hit(portb_hit), .pins_in(portb_in),
    .port_out(portb_out), .ddr_out(portb_ddr)
  );

  uart u_uart (
    .clk(clk_dev), .rst_n, .io_addr, .io_re(iore), .io_we(iowe), .io_wdata(dbusout),
    .rdata(uart_rdata), .hit(uart_hit), .rxd, .txd,
    .irq_rx(uart_rx_irq), .irq_udre(uart_udre_irq), .irq_tx(uart_tx_irq),
    .irqack, .irqackad
  );

  assign inst = inst_reg;

  // ---------------- de-synchronised design study ----------------
  desyn_loop #(.W(8)) u_disa (
    .rst_n(disa_rst_n),
    .req_to_delay(disa_req_to_delay), .req_from_delay(disa_req_from_delay),
    .ext_req(disa_ext_req), .ext_ack(disa_ext_ack),
    .obs_req(disa_obs_req), .obs_ack(disa_obs_ack),
    .q(disa_q)
  );
endmodule
