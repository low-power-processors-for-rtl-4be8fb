// tb_workload_sum: a memory-bound workload on the whole Nimbus chip at its
// default sizes, of the kind used to measure power with "minimal" and "heavy"
// data-memory access: a program fills a 200-byte table in RAM (0x100..) with
// 7*i, then walks it with LD X+, adds each byte to a running sum and stores
// every partial sum with ST Y+ (0x200..).
// Checks, with values worked out here from the program and not from the RTL:
//  - the table and the partial sums in RAM, byte by byte;
//  - the number of RAM reads (200) and writes (400), counted on the strobes;
//  - the cycle count of each loop, timed between two OUTs to PORTB that mark
//    its start and end: per iteration ST 2 + SUBI 1 + DEC 1 + BRNE 2 = 6 in the
//    fill loop and LD 2 + ADD 1 + ST 2 + DEC 1 + BRNE 2 = 8 in the sum loop,
//    one cycle less for the last (branch not taken);
//  - that the program memory is read once per core clock (the prefetch).
// A watchdog ends the run after 20000 clocks.
`timescale 1ns/1ps
module tb_workload_sum;
  import nimbus_pkg::*;
  import avr_asm_pkg::*;

  localparam int N = 200;

  logic clk = 1'b0, clk_ext = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  always #50 clk_ext = ~clk_ext;

  logic [7:0]  int_pins = 8'hFF, porta_in = 8'h00, portb_in = 8'h00;
  logic [7:0]  porta_out, porta_ddr, portb_out, portb_ddr;
  logic        rxd = 1'b1, txd;
  logic [15:0] pc, inst;
  logic        sleep_status, mode_idle, mode_power_save, mode_power_down;
  logic        clk_core_enable, clk_dev_enable;
  logic        disa_rst_n = 1'b0, disa_req_to_delay, disa_req_from_delay;
  logic        disa_ext_req = 1'b0, disa_ext_ack, disa_obs_req, disa_obs_ack = 1'b0;
  logic [7:0]  disa_q;
  assign disa_req_from_delay = disa_req_to_delay;

  nimbus_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  // ---------------- program ----------------
  int unsigned pcw;
  task automatic emit(input w16 w); dut.u_rom.mem[pcw] = w; pcw++; endtask
  task automatic mark(input int v); emit(op_ldi(20, v)); emit(op_out(IO_PORTB, 20)); endtask

  initial begin
    for (int i = 0; i < 8192; i++) dut.u_rom.mem[i] = OP_NOP;
    pcw = 0;  emit(op_rjmp(16'h40 - 1));
    pcw = 16'h40;
    emit(op_ldi(16, 8'h0F)); emit(op_out(IO_SPH, 16));
    emit(op_ldi(16, 8'hFF)); emit(op_out(IO_SPL, 16));
    emit(op_ldi(16, 8'hFF)); emit(op_out(IO_DDRB, 16));
    emit(op_ldi(26, 8'h00)); emit(op_ldi(27, 8'h01));   // X = 0x100
    emit(op_ldi(16, 0));     emit(op_ldi(17, N));
    emit(op_ldi(20, 1));     emit(op_out(IO_PORTB, 20)); // mark 1
    // fill: st X+, r16; subi r16, -7; dec r17; brne fill
    emit(op_st(16, 4'b1101)); emit(op_subi(16, 8'hF9)); emit(op_dec(17)); emit(op_brbc(1, -4));
    mark(2);
    emit(op_ldi(26, 8'h00)); emit(op_ldi(27, 8'h01));   // X = 0x100
    emit(op_ldi(28, 8'h00)); emit(op_ldi(29, 8'h02));   // Y = 0x200
    emit(op_ldi(18, 0));     emit(op_ldi(17, N));
    // sum: ld r19, X+; add r18, r19; st Y+, r18; dec r17; brne sum
    emit(op_ld(19, 4'b1101)); emit(op_add(18, 19)); emit(op_st(18, 4'b1001));
    emit(op_dec(17)); emit(op_brbc(1, -5));
    mark(3);
    emit(op_rjmp(-1));
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
  end

  // ---------------- counters ----------------
  int cyc = 0, n_rd = 0, n_wr = 0, n_rom = 0, mark_cyc[4], mark_rom[4];
  logic [7:0]  prev_b = 8'h00;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (portb_out != prev_b) begin
      if (portb_out inside {[1:3]}) begin
        mark_cyc[portb_out] = cyc; mark_rom[portb_out] = n_rom;
      end
      prev_b = portb_out;
    end
  end
  // the ROM and RAM act on the falling edge of the gated core clock
  always @(negedge dut.clk_core) if (rst_n) begin
    if (dut.ramre) n_rd++;
    if (dut.ramwe) n_wr++;
    n_rom++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL watchdog (pc=%h)", pc);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] sum;
    int rd0, wr0;
    wait (rst_n);
    wait (portb_out == 8'd1);
    rd0 = n_rd; wr0 = n_wr;
    wait (portb_out == 8'd3);
    repeat (2) @(posedge clk);
    // loop timing (marker to marker = instructions in between + the OUT)
    check(mark_cyc[2] - mark_cyc[1] == 6 * N - 1 + 1 + 1,
          $sformatf("fill loop %0d cycles, expected %0d", mark_cyc[2] - mark_cyc[1], 6 * N + 1));
    check(mark_cyc[3] - mark_cyc[2] == 6 + 8 * N - 1 + 1 + 1,
          $sformatf("sum loop %0d cycles, expected %0d", mark_cyc[3] - mark_cyc[2], 8 * N + 7));
    // memory traffic between the marks
    check(n_rd - rd0 == N, $sformatf("RAM reads %0d, expected %0d", n_rd - rd0, N));
    check(n_wr - wr0 == 2 * N, $sformatf("RAM writes %0d, expected %0d", n_wr - wr0, 2 * N));
    check(mark_rom[3] - mark_rom[1] == mark_cyc[3] - mark_cyc[1],
          $sformatf("ROM reads %0d in %0d clocks", mark_rom[3] - mark_rom[1], mark_cyc[3] - mark_cyc[1]));
    // results
    sum = 8'h00;
    for (int i = 0; i < N; i++) begin
      sum += 8'(7 * i);
      check(dut.u_ram.mem[12'h100 + i] == 8'(7 * i), $sformatf("table[%0d] = %h", i, dut.u_ram.mem[12'h100 + i]));
      check(dut.u_ram.mem[12'h200 + i] == sum, $sformatf("sum[%0d] = %h, expected %h", i, dut.u_ram.mem[12'h200 + i], sum));
    end
    $display("fill=%0d sum=%0d cycles, RAM reads=%0d writes=%0d, ROM reads=%0d",
             mark_cyc[2] - mark_cyc[1], mark_cyc[3] - mark_cyc[2], n_rd - rd0, n_wr - wr0, mark_rom[3] - mark_rom[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
