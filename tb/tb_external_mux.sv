// tb_external_mux: checks the data-bus multiplexer and interrupt-line
// assembly. Addresses from 0x60 up must return RAM data; below that the
// device that claims the I/O address returns its register; an unclaimed
// address reads 0. Each interrupt source must appear on its vector line
// (INT0-7 on 0-7, timer compare 14, overflow 15, UART 17/18/19) and nowhere
// else. Combinational: no cycle counts apply.
`timescale 1ns/1ps
module tb_external_mux;
  import nimbus_pkg::*;
  logic [15:0] adr;
  logic [7:0]  ram_rdata, svc_rdata, tmr_rdata, porta_rdata, portb_rdata, uart_rdata, dbus_in, ext_irq;
  logic        svc_hit, tmr_hit, porta_hit, portb_hit, uart_hit;
  logic        tmr_comp_irq, tmr_ovf_irq, uart_rx_irq, uart_udre_irq, uart_tx_irq;
  logic [IRQ_LINES-1:0] irq_lines;
  external_mux dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask
  initial begin
    #100000; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [7:0] e;
    logic [IRQ_LINES-1:0] el;
    int who;
    for (int i = 0; i < 3000; i++) begin
      adr = (i % 2) ? 16'($urandom_range(16'h20, 16'h5F)) : 16'($urandom_range(0, 16'h0FFF));
      {ram_rdata, svc_rdata, tmr_rdata, porta_rdata} = $urandom;
      {portb_rdata, uart_rdata, ext_irq} = 24'($urandom);
      who = $urandom_range(0, 5);
      {svc_hit, tmr_hit, porta_hit, portb_hit, uart_hit} = (who == 5) ? 5'b0 : 5'(5'b10000 >> who);
      {tmr_comp_irq, tmr_ovf_irq, uart_rx_irq, uart_udre_irq, uart_tx_irq} = 5'($urandom);
      #1;
      if (adr >= 16'h60) e = ram_rdata;
      else case (who)
        0: e = svc_rdata; 1: e = tmr_rdata; 2: e = porta_rdata;
        3: e = portb_rdata; 4: e = uart_rdata; default: e = 8'h00;
      endcase
      check(dbus_in === e, $sformatf("dbus_in at %h (device %0d)", adr, who));
      el = '0; el[7:0] = ext_irq;
      el[IRQ_T0_COMP] = tmr_comp_irq; el[IRQ_T0_OVF] = tmr_ovf_irq;
      el[IRQ_UART_RX] = uart_rx_irq; el[IRQ_UART_UDRE] = uart_udre_irq; el[IRQ_UART_TX] = uart_tx_irq;
      check(irq_lines === el, $sformatf("irq_lines %h exp %h", irq_lines, el));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
