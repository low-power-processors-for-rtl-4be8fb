// tb_nimbus_top: end-to-end test of the Nimbus microcontroller at its default
// sizes. A program assembled here runs a "timer blink": Timer0 in
// clear-on-compare mode interrupts the core, whose handler toggles PORTB bit
// 6, while the main loop sleeps between interrupts in
//   phase 1  idle sleep, timer on the internal clock,
//   phase 2  power-save sleep, timer on the external clock (AS0 = 1),
//   phase 3  power-down sleep, woken by pulling INT0 low,
//   phase 4  UART: sends 0x55 (checked bit by bit, 16 clocks per bit) and
//            receives 0xA7 from the testbench in its receive interrupt,
//            which writes it to PORTA; also reads PINA at start.
// Alongside, the de-synchronised loop is given 100 tokens through its join
// with a 3 ns matched delay (delay_line model) and an observer that checks
// that it counts 0, 1, 2, ... and stalls when no token is offered.
// It counts every mechanism (sleep entries per mode, wake-ups, interrupts per
// source, gated-clock cycles, timer ticks on the external clock, UART frames)
// and fails any that never happened. While asleep it checks that the program
// counter stands still, that the device clock is stopped in power-save and
// power-down, and that the timer stops only in power-down.
`timescale 1ns/1ps
module tb_nimbus_top;
  import nimbus_pkg::*;
  import avr_asm_pkg::*;

  logic clk = 1'b0, clk_ext = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;          // internal clock, 100 MHz simulated
  always #50 clk_ext = ~clk_ext; // external clock, 10x slower

  logic [7:0]  int_pins = 8'hFF, porta_in = 8'h3C, portb_in = 8'h00;
  logic [7:0]  porta_out, porta_ddr, portb_out, portb_ddr;
  logic        rxd = 1'b1, txd;
  logic [15:0] pc, inst;
  logic        sleep_status, mode_idle, mode_power_save, mode_power_down;
  logic        clk_core_enable, clk_dev_enable;
  logic        disa_rst_n = 1'b0, disa_req_to_delay, disa_req_from_delay;
  logic        disa_ext_req = 1'b0, disa_ext_ack, disa_obs_req, disa_obs_ack = 1'b0;
  logic [7:0]  disa_q;
  delay_line #(.DELAY(3)) u_dly (.a(disa_req_to_delay), .z(disa_req_from_delay));

  nimbus_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- program ----------------
  int unsigned pcw;
  task automatic emit(input w16 w); dut.u_rom.mem[pcw] = w; pcw++; endtask
  task automatic set_io(input int a, input int v); emit(op_ldi(16, v)); emit(op_out(a, 16)); endtask
  task automatic sleep_loop(input int n);         // r21 = n; loop: sleep; dec r21; brne loop
    emit(op_ldi(21, n)); emit(OP_SLEEP); emit(op_dec(21)); emit(op_brbc(1, -3));
  endtask

  initial begin
    for (int i = 0; i < 8192; i++) dut.u_rom.mem[i] = OP_NOP;
    pcw = 0;    emit(op_rjmp(16'h40 - 1));
    pcw = 2;    emit(op_rjmp(16'h60 - 3));        // INT0 -> 0x60
    pcw = 30;   emit(op_rjmp(16'h50 - 31));       // Timer0 compare -> 0x50
    pcw = 36;   emit(op_rjmp(16'h70 - 37));       // UART receive -> 0x70
    // Timer0 compare handler: toggle PORTB6 (SREG kept in r2)
    pcw = 16'h50;
    emit(op_in(2, IO_SREG)); emit(op_in(17, IO_PORTB)); emit(op_ldi(18, 8'h40));
    emit(op_eor(17, 18)); emit(op_out(IO_PORTB, 17)); emit(op_out(IO_SREG, 2)); emit(OP_RETI);
    // INT0 handler: disable INT0, flag in r22
    pcw = 16'h60;
    emit(op_ldi(17, 0)); emit(op_out(IO_EIMSK, 17)); emit(op_ldi(22, 1)); emit(OP_RETI);
    // UART receive handler: byte -> r23 and PORTA
    pcw = 16'h70;
    emit(op_in(23, IO_UDR)); emit(op_out(IO_PORTA, 23)); emit(OP_RETI);
    // main
    pcw = 16'h80;
    dut.u_rom.mem[16'h40] = OP_JMP; dut.u_rom.mem[16'h41] = 16'h0080;
    set_io(IO_SPH, 8'h0F); set_io(IO_SPL, 8'hFF);
    set_io(IO_DDRB, 8'hFF);
    emit(op_in(19, IO_PINA));                      // pins read 0x3C
    set_io(IO_DDRA, 8'hFF); emit(op_out(IO_PORTA, 19));
    set_io(IO_OCR0, 99); set_io(IO_TCCR0, 8'h09);  // CTC, clk/1: compare every 100 clocks
    set_io(IO_TIMSK, 8'h02);
    set_io(IO_UBRR, 0); set_io(IO_UCR, 8'h98);     // RXCIE, RXEN, TXEN
    emit(op_bset(7));                              // sei
    // phase 1: idle
    set_io(IO_MCUCR, 8'h20);
    sleep_loop(4);
    // phase 2: power-save, timer on the external clock, compare every 10 ext clocks
    set_io(IO_TCCR0, 8'h00); set_io(IO_TCNT0, 0); set_io(IO_OCR0, 9);
    set_io(IO_ASSR, 8'h08); set_io(IO_TCCR0, 8'h09);
    set_io(IO_MCUCR, 8'h38);
    sleep_loop(3);
    // phase 3: power-down, timer interrupt off, wake by INT0
    set_io(IO_TIMSK, 8'h00); set_io(IO_EIMSK, 8'h01);
    set_io(IO_MCUCR, 8'h30);
    emit(OP_SLEEP); emit(OP_NOP);
    // phase 4: UART
    set_io(IO_UDR, 8'h55);
    emit(op_cpi(23, 8'hA7)); emit(op_brbc(1, -2)); // wait for the received byte
    set_io(IO_PORTA, 8'hEE);                       // done
    emit(op_rjmp(-1));
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
  end

  // ---------------- mechanism counters ----------------
  int n_idle = 0, n_psave = 0, n_pdown = 0, n_wake = 0;
  int n_t0 = 0, n_int0 = 0, n_rx = 0, n_toggle = 0;
  int n_core_off = 0, n_dev_off = 0, n_ext_ticks = 0, n_timer_run_psave = 0;
  logic prev_sleep = 0, prev_b6 = 0;
  logic [15:0] sleep_pc;
  logic [7:0]  prev_tcnt;
  always @(posedge clk) if (rst_n) begin
    if (sleep_status && !prev_sleep) begin
      sleep_pc = pc;
      if (mode_idle) n_idle++;
      if (mode_power_save) n_psave++;
      if (mode_power_down) n_pdown++;
    end
    if (!sleep_status && prev_sleep) n_wake++;
    if (sleep_status && prev_sleep && pc != sleep_pc) begin
      failures++; $display("FAIL pc moved while asleep");
    end
    if (!clk_core_enable) n_core_off++;
    if (!clk_dev_enable) n_dev_off++;
    if (mode_power_save && dut.u_timer.tcnt != prev_tcnt) n_timer_run_psave++;
    if (mode_power_down && prev_sleep && dut.u_timer.tcnt != prev_tcnt) begin
      failures++; $display("FAIL timer ran in power-down");
    end
    if ((mode_power_save || mode_power_down) && clk_dev_enable) begin
      failures++; $display("FAIL device clock running in deep sleep");
    end
    if (dut.u_core.irqack) begin
      case (dut.u_core.irqackad)
        5'(IRQ_T0_COMP): n_t0++;
        5'(IRQ_INT0):    n_int0++;
        5'(IRQ_UART_RX): n_rx++;
        default: begin failures++; $display("FAIL unexpected interrupt %0d", dut.u_core.irqackad); end
      endcase
    end
    if (portb_out[6] != prev_b6) n_toggle++;
    if (dut.u_timer.assr[3] && dut.u_timer.tick) n_ext_ticks++;
    prev_sleep = sleep_status;
    prev_b6    = portb_out[6];
    prev_tcnt  = dut.u_timer.tcnt;
  end

  // wake the chip from power-down with INT0 after it has slept 200 cycles
  initial begin
    wait (rst_n);
    @(posedge clk);
    wait (mode_power_down && sleep_status);
    repeat (200) @(posedge clk);
    check(mode_power_down && sleep_status, "still in power-down before INT0");
    int_pins[0] = 1'b0;
    @(posedge clk);
    @(posedge clk);
    check(clk_core_enable, "core clock restarts within one cycle of INT0");
    wait (n_int0 == 1);
    int_pins[0] = 1'b1;
  end

  // initial pin read shows on PORTA
  initial begin
    wait (rst_n);
    wait (porta_ddr == 8'hFF);
    repeat (3) @(posedge clk);
    check(porta_out == 8'h3C, "PINA value copied to PORTA");
  end

  // UART transmit monitor: 8N1, 16 clocks per bit
  logic [7:0] tx_byte;
  int n_tx = 0;
  initial begin
    wait (rst_n);
    forever begin
      @(negedge txd);
      repeat (8) @(posedge clk);
      check(txd == 1'b0, "UART start bit");
      for (int i = 0; i < 8; i++) begin
        repeat (16) @(posedge clk);
        tx_byte[i] = txd;
      end
      repeat (16) @(posedge clk);
      check(txd == 1'b1, "UART stop bit");
      check(tx_byte == 8'h55, $sformatf("UART sent 0x%02h", tx_byte));
      n_tx++;
    end
  end

  // UART receive driver: send 0xA7 after the transmission has started
  initial begin
    logic [7:0] b;
    b = 8'hA7;
    wait (n_tx == 1);
    repeat (5) @(posedge clk);
    rxd = 1'b0; repeat (16) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (16) @(posedge clk); end
    rxd = 1'b1; repeat (16) @(posedge clk);
  end


  // de-synchronised loop: token source and observer
  int n_disa_tok = 0, n_disa_obs = 0, n_disa_stall = 0;
  initial begin
    logic [7:0] v;
    #20 disa_rst_n = 1'b1;
    forever begin
      wait (disa_obs_req);
      #0.1 v = disa_q;
      check(v === 8'(n_disa_obs), $sformatf("loop value %0d (%0d)", v, n_disa_obs));
      n_disa_obs++;
      #2 disa_obs_ack = 1'b1;
      wait (!disa_obs_req);
      #2 disa_obs_ack = 1'b0;
    end
  end
  initial begin
    logic [7:0] hold;
    #30;
    repeat (2) begin
      repeat (50) begin
        #($urandom_range(0, 7));
        disa_ext_req = 1'b1; wait (disa_ext_ack);
        disa_ext_req = 1'b0; wait (!disa_ext_ack);
        n_disa_tok++;
      end
      #20 hold = disa_q;
      #100 if (disa_q === hold) n_disa_stall++;
    end
  end

  // end of program
  initial begin
    wait (rst_n);
    wait (porta_out == 8'hEE);
    repeat (5) @(posedge clk);
    check(n_idle == 4, $sformatf("idle sleeps %0d (4)", n_idle));
    check(n_psave == 3, $sformatf("power-save sleeps %0d (3)", n_psave));
    check(n_pdown == 1, $sformatf("power-down sleeps %0d (1)", n_pdown));
    check(n_wake == 8, $sformatf("wake-ups %0d (8)", n_wake));
    check(n_t0 == 7, $sformatf("timer interrupts %0d (7)", n_t0));
    check(n_toggle == n_t0, $sformatf("PORTB6 toggles %0d", n_toggle));
    check(n_int0 == 1, "INT0 interrupt");
    check(n_rx == 1, "UART receive interrupt");
    check(n_tx == 1, "UART frame sent");
    check(n_core_off > 0, "core clock gated");
    check(n_dev_off > 0, "device clock gated");
    check(n_ext_ticks > 0, "timer counted the external clock");
    check(n_timer_run_psave > 0, "timer ran in power-save");
    check(dut.u_core.sp == 16'h0FFF, "stack balanced");
    check(n_disa_tok == 100 && n_disa_obs == 101, $sformatf("loop: %0d tokens, %0d values", n_disa_tok, n_disa_obs));
    check(n_disa_stall == 2, "loop stalled without tokens");
    $display("idle=%0d psave=%0d pdown=%0d wake=%0d t0=%0d int0=%0d rx=%0d tx=%0d core_off=%0d dev_off=%0d ext_ticks=%0d loop_tokens=%0d",
             n_idle, n_psave, n_pdown, n_wake, n_t0, n_int0, n_rx, n_tx, n_core_off, n_dev_off, n_ext_ticks, n_disa_tok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog (pc=%h)", pc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
