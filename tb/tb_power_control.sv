// tb_power_control: checks the sleep controller for each mode.
//  - SLEEP with SE = 0 does nothing;
//  - idle (SM = 00) stops only the core clock and any interrupt wakes it;
//  - power-save (SM = 11) stops core and device clocks, keeps the timer
//    clock, ignores UART interrupts and wakes on timer or external ones;
//  - power-down (SM = 10) stops all three, ignores timer interrupts and
//    wakes only on an external interrupt;
//  - SM = 01 behaves as idle.
// The enables must react to sleep_req and to the waking interrupt in the
// same cycle (combinationally), and sleep_status must follow one clock
// later.
`timescale 1ns/1ps
module tb_power_control;
  import nimbus_pkg::*;
  logic clk = 0, rst_n = 0, sleep_req = 0, se = 0;
  logic [2:0] sm = 0;
  logic [IRQ_LINES-1:0] irq_lines = '0;
  logic clk_core_enable, clk_dev_enable, clk_timer_enable;
  logic mode_idle, mode_power_down, mode_power_save, sleep_status;
  power_control dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask
  initial begin
    #200000; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic go_sleep(input logic [2:0] m, input logic e);
    @(negedge clk); sm = m; se = e; sleep_req = 1; #1;
    @(posedge clk); #1 sleep_req = 0;
  endtask
  task automatic pulse_irq(input int line);
    @(negedge clk); irq_lines[line] = 1; #1;
  endtask
  task automatic drop_irq(input int line);
    @(posedge clk); #1 irq_lines[line] = 0;
  endtask
  task automatic exp_en(input logic c, d, t, input string what);
    check({clk_core_enable, clk_dev_enable, clk_timer_enable} === {c, d, t},
          $sformatf("%s: enables %b%b%b exp %b%b%b", what, clk_core_enable, clk_dev_enable, clk_timer_enable, c, d, t));
  endtask

  initial begin
    #12 rst_n = 1;
    exp_en(1, 1, 1, "after reset");
    // SE = 0
    @(negedge clk); sleep_req = 1; se = 0; #1;
    exp_en(1, 1, 1, "SLEEP with SE clear");
    @(posedge clk); #1 sleep_req = 0;
    check(!sleep_status, "not asleep with SE clear");
    // idle
    @(negedge clk); sm = 3'b000; se = 1; sleep_req = 1; #1;
    exp_en(0, 1, 1, "idle, same cycle as SLEEP");
    check(mode_idle, "mode_idle");
    @(posedge clk); #1 sleep_req = 0;
    check(sleep_status, "sleep_status one clock later");
    repeat (5) @(posedge clk); #1;
    exp_en(0, 1, 1, "idle");
    pulse_irq(IRQ_UART_RX);
    exp_en(1, 1, 1, "idle woken by UART interrupt in the same cycle");
    drop_irq(IRQ_UART_RX); #1;
    check(!sleep_status, "awake");
    // SM = 01 as idle
    go_sleep(3'b001, 1);
    check(mode_idle, "SM=01 is idle");
    pulse_irq(IRQ_T0_COMP); drop_irq(IRQ_T0_COMP);
    // power-save
    go_sleep(3'b011, 1);
    exp_en(0, 0, 1, "power-save");
    check(mode_power_save, "mode_power_save");
    pulse_irq(IRQ_UART_RX);
    exp_en(0, 0, 1, "power-save ignores UART");
    drop_irq(IRQ_UART_RX);
    pulse_irq(IRQ_T0_COMP);
    exp_en(1, 1, 1, "power-save woken by timer");
    drop_irq(IRQ_T0_COMP);
    // power-down
    go_sleep(3'b010, 1);
    exp_en(0, 0, 0, "power-down");
    check(mode_power_down, "mode_power_down");
    pulse_irq(IRQ_T0_OVF);
    exp_en(0, 0, 0, "power-down ignores timer");
    drop_irq(IRQ_T0_OVF);
    repeat (3) @(posedge clk);
    pulse_irq(3);
    exp_en(1, 1, 1, "power-down woken by INT3");
    drop_irq(3); #1;
    check(!sleep_status, "awake after power-down");
    // pending interrupt prevents sleep
    @(negedge clk); irq_lines[5] = 1; sm = 3'b010; se = 1; sleep_req = 1; #1;
    exp_en(1, 1, 1, "no sleep with a waking interrupt pending");
    @(posedge clk); #1 sleep_req = 0; irq_lines[5] = 0;
    check(!sleep_status, "stayed awake");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
