// tb_avr_core: self-checking test of the AVR core with a program memory, data
// RAM and a register-array I/O device modelled in the testbench.
// The program is assembled here: (1) random ALU operations whose result and
// SREG are stored to RAM and compared with the reference model; (2) memory
// and pointer addressing, stack and program-memory reads with known results;
// (3) timing blocks bracketed by OUT writes to I/O 0x10, whose cycle distance
// is compared with the AVR cycle counts; (4) an interrupt on request line 3,
// checking the vector fetch, the acknowledge and the return.
`timescale 1ns/1ps
module tb_avr_core;
  import nimbus_pkg::*;
  import avr_asm_pkg::*;
  import avr_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [15:0] rom_addr, inst, pc, inst_reg, adr, sp;
  logic [5:0]  io_addr;
  logic        iore, iowe, ramre, ramwe, irqack, sleep_req;
  logic [7:0]  dbusout, dbusin, sreg;
  logic [4:0]  irqackad;
  logic [IRQ_LINES-1:0] irq_lines = '0;

  avr_core dut (.*);

  // ---------------- memories and I/O model ----------------
  logic [15:0] rom [4096];
  logic [7:0]  ram [4096];
  logic [7:0]  iomem [64];
  logic [7:0]  ram_q;
  always_ff @(negedge clk) inst <= rom[rom_addr[11:0]];
  always_ff @(negedge clk) begin
    if (ramwe) ram[adr[11:0]] <= dbusout;
    if (ramre) ram_q <= ram[adr[11:0]];
  end
  always_ff @(posedge clk) if (iowe) iomem[io_addr] <= dbusout;
  assign dbusin = (adr >= 16'h60) ? ram_q : iomem[io_addr];

  // ---------------- program builder ----------------
  int unsigned pcw = 0;
  task automatic emit(input w16 w); rom[pcw] = w; pcw++; endtask

  int checks = 0, failures = 0;
  typedef struct { logic [15:0] a; logic [7:0] d; } wr_t;
  wr_t exp_wr[$];
  int  exp_gap[$];
  int unsigned store_ptr = 16'h200;

  // store register r to the next result slot and expect value v
  task automatic store_expect(input int r, input logic [7:0] v);
    emit(op_sts(r)); emit(16'(store_ptr));
    exp_wr.push_back('{16'(store_ptr), v});
    store_ptr++;
  endtask
  task automatic marker(); emit(op_out(16, 0)); endtask

  // ---------------- monitors ----------------
  longint cyc = 0, last_mark = -1;
  int n_wr = 0, n_gap = 0, n_irq = 0, n_vec = 0;
  always @(posedge clk) cyc++;
  int n_isr_wr = 0;
  always @(negedge clk) if (rst_n && ramwe && adr == 16'h3F0 && dbusout == 8'hA5) n_isr_wr++;
  always @(negedge clk) if (rst_n && ramwe && adr >= 16'h200 && adr < 16'h300) begin
    checks++; n_wr++;
    if (exp_wr.size() == 0) begin failures++; $display("unexpected write %h", adr); end
    else begin
      wr_t e;
      e = exp_wr.pop_front();
      if (e.a != adr || e.d != dbusout) begin
        failures++;
        $display("FAIL write %0d: got [%h]=%h expected [%h]=%h", n_wr, adr, dbusout, e.a, e.d);
      end
    end
  end
  bit in_block = 1'b0;
  always @(posedge clk) if (rst_n && iowe && io_addr == 6'd16) begin
    in_block = !in_block;
    if (!in_block) begin
      int e;
      checks++; n_gap++;
      e = (exp_gap.size() > 0) ? exp_gap.pop_front() : -1;
      if (longint'(e) != cyc - last_mark) begin
        failures++;
        $display("FAIL timing block %0d: %0d cycles, expected %0d", n_gap, cyc - last_mark, e);
      end
    end
    last_mark = cyc;
  end
  always @(posedge clk) if (irqack) begin
    checks++; n_irq++;
    if (irqackad != 5'd3) begin failures++; $display("FAIL irqackad %0d", irqackad); end
    irq_lines[3] <= 1'b0;
  end
  always @(negedge clk) if (rst_n && rom_addr == 16'd8 && sreg[SREG_I] == 1'b0) n_vec++;

  // timing block: marker, body (expected cycles), marker
  task automatic timed(input int body_cycles);
    exp_gap.push_back(body_cycles + 1);
  endtask

  initial begin
    logic [7:0] s, a, b;
    logic [15:0] rs;
    ref_op_e ops [15] = '{R_ADD, R_ADC, R_SUB, R_SBC, R_AND, R_OR, R_EOR, R_COM,
                          R_NEG, R_INC, R_DEC, R_LSR, R_ROR, R_ASR, R_SWAP};
    for (int i = 0; i < 4096; i++) rom[i] = OP_NOP;
    // vectors: reset -> 0x40, line 3 (vector 4, word 8) -> ISR at 0x30
    pcw = 0;  emit(op_rjmp(16'h40 - 1));
    pcw = 8;  emit(op_rjmp(16'h30 - 9));
    // ISR: store a marker value, return
    pcw = 16'h30;
    emit(op_push(20)); emit(op_ldi(20, 8'hA5)); emit(op_sts(20)); emit(16'h03F0); emit(op_pop(20)); emit(OP_RETI);
    // main
    pcw = 16'h40;
    emit(op_ldi(16, 8'h0F)); emit(op_out(IO_SPH, 16));
    emit(op_ldi(16, 8'hFF)); emit(op_out(IO_SPL, 16));
    // (1) random ALU operations
    s = 8'h00;
    for (int t = 0; t < 60; t++) begin
      ref_op_e op = ops[$urandom_range(0, 14)];
      a = 8'($urandom); b = 8'($urandom);
      if (t % 7 == 0) begin a = 8'h80; b = 8'h01; end
      if (t % 11 == 0) b = a;
      s[0] = 1'($urandom);
      s[1] = 1'($urandom);
      emit(op_ldi(16, a)); emit(op_ldi(17, b));
      emit(s[0] ? op_bset(0) : op_bclr(0));
      emit(s[1] ? op_bset(1) : op_bclr(1));
      case (op)
        R_ADD: emit(op_add(16, 17));  R_ADC: emit(op_adc(16, 17));
        R_SUB: emit(op_sub(16, 17));  R_SBC: emit(op_sbc(16, 17));
        R_AND: emit(op_and(16, 17));  R_OR:  emit(op_or(16, 17));
        R_EOR: emit(op_eor(16, 17));  R_COM: emit(op_com(16));
        R_NEG: emit(op_neg(16));      R_INC: emit(op_inc(16));
        R_DEC: emit(op_dec(16));      R_LSR: emit(op_lsr(16));
        R_ROR: emit(op_ror(16));      R_ASR: emit(op_asr(16));
        default: emit(op_swap(16));
      endcase
      rs = ref_alu(op, a, b, s);
      s  = rs[15:8];
      emit(op_in(18, IO_SREG));
      store_expect(16, rs[7:0]);
      store_expect(18, rs[15:8]);
    end
    // immediate forms: subi / cpi / sbci / andi / ori
    emit(op_ldi(20, 8'h35)); emit(op_subi(20, 8'h47)); store_expect(20, 8'hEE);
    emit(op_ori(20, 8'h01)); emit(op_andi(20, 8'h0F)); store_expect(20, 8'h0F);
    emit(op_cpi(20, 8'h0F)); emit(op_in(21, IO_SREG)); emit(op_andi(21, 8'h03)); store_expect(21, 8'h02);
    emit(op_ldi(22, 8'h00)); emit(op_ldi(23, 8'h01)); emit(op_sub(22, 23)); emit(op_sbci(23, 8'h00));
    store_expect(23, 8'h00);
    // word ops: adiw / sbiw on r25:r24
    emit(op_ldi(24, 8'hFE)); emit(op_ldi(25, 8'h00)); emit(op_adiw(0, 3));
    store_expect(24, 8'h01); store_expect(25, 8'h01);
    emit(op_sbiw(0, 2)); store_expect(24, 8'hFF); store_expect(25, 8'h00);
    // (2) pointers: X+, -Y, LDD/STD Z+q, LD X
    emit(op_ldi(26, 8'h00)); emit(op_ldi(27, 8'h03));          // X = 0x300
    emit(op_ldi(16, 8'h11)); emit(op_st(16, 4'b1101));          // [0x300]=11, X=301
    emit(op_ldi(16, 8'h22)); emit(op_st(16, 4'b1101));          // [0x301]=22, X=302
    emit(op_ldi(28, 8'h02)); emit(op_ldi(29, 8'h03));           // Y = 0x302
    emit(op_ld(17, 4'b1010));                                   // r17=[0x301]=22, Y=301
    store_expect(17, 8'h22);
    emit(op_ld(18, 4'b1010));                                   // r18=[0x300]=11, Y=300
    store_expect(18, 8'h11); store_expect(28, 8'h00);
    emit(op_ldi(30, 8'hF0)); emit(op_ldi(31, 8'h02));           // Z = 0x2F0
    emit(op_ldi(16, 8'h5A)); emit(op_std(16, 0, 17));           // [0x301] = 5A
    emit(op_ldd(19, 1, 1));                                     // r19 = [Y+1] = [0x301]
    store_expect(19, 8'h5A);
    emit(op_ld(20, 4'b1100)); store_expect(20, 8'hFF);          // X=302: unwritten RAM, preset FF
    // stack: push/pop
    emit(op_ldi(16, 8'h77)); emit(op_ldi(17, 8'h88));
    emit(op_push(16)); emit(op_push(17)); emit(op_pop(18)); emit(op_pop(19));
    store_expect(18, 8'h88); store_expect(19, 8'h77);
    // register file through data space (address 5 = r5)
    emit(op_ldi(16, 8'h3C)); emit(op_sts(16)); emit(16'h0005); store_expect(5, 8'h3C);
    // LPM from a table at word 0x700: word 0x1234 -> byte 0xE00 = 34, 0xE01 = 12
    emit(op_ldi(30, 8'h01)); emit(op_ldi(31, 8'h0E)); emit(OP_LPM); store_expect(0, 8'h12);
    emit(op_ldi(30, 8'h00)); emit(op_lpm_zp(21)); store_expect(21, 8'h34); store_expect(30, 8'h01);
    // skips and bit ops
    emit(op_ldi(16, 8'h04)); emit(op_sbrs(16, 2)); emit(op_ldi(16, 8'h99)); store_expect(16, 8'h04);
    emit(op_sbrc(16, 2)); emit(op_ldi(16, 8'h98)); store_expect(16, 8'h98);
    emit(op_bst(16, 3)); emit(op_ldi(17, 8'h00)); emit(op_bld(17, 5)); store_expect(17, 8'h20);
    // I/O bits on the device model, I/O 0x12
    emit(op_ldi(16, 8'h00)); emit(op_out(18, 16)); emit(op_sbi(18, 6)); emit(op_sbi(18, 0)); emit(op_cbi(18, 0));
    emit(op_in(17, 18)); store_expect(17, 8'h40);
    emit(op_sbis(18, 6)); emit(op_ldi(17, 8'h01)); store_expect(17, 8'h40);
    // (3) timing blocks
    marker(); timed(1);  emit(op_add(1, 2));                 marker();
    marker(); timed(2);  emit(op_rjmp(0));                   marker();
    marker(); timed(3);  emit(OP_JMP); emit(16'(pcw + 1));   marker();
    marker(); timed(2);  emit(op_lds(3)); emit(16'h0300);    marker();
    marker(); timed(2);  emit(op_sts(3)); emit(16'h0310);    marker();
    marker(); timed(4);  emit(op_push(3)); emit(op_pop(3));  marker();
    marker(); timed(2);  emit(op_ld(4, 4'b1100));            marker();
    marker(); timed(2);  emit(op_adiw(1, 1));                marker();
    marker(); timed(2);  emit(op_sbi(18, 1));                marker();
    marker(); timed(3);  emit(OP_LPM);                       marker();
    emit(op_ldi(16, 8'h01)); emit(op_cpi(16, 8'h01));        // Z = 1
    marker(); timed(2);  emit(op_brbs(1, 0));                marker();   // BREQ taken
    marker(); timed(1);  emit(op_brbc(1, 0));                marker();   // BRNE not taken
    marker(); timed(2);  emit(op_cpse(16, 16)); emit(OP_NOP); marker();  // skip one word
    marker(); timed(3);  emit(op_cpse(16, 16)); emit(op_sts(3)); emit(16'h0311); marker(); // skip two
    // call/ret: 4 + 4, rcall/ret 3 + 4, icall/ret 3 + 4 (subroutine at 0x38: ret)
    marker(); timed(8);  emit(OP_CALL); emit(16'h0038);      marker();
    marker(); timed(7);  emit(op_rcall(16'h38 - pcw - 1));   marker();
    emit(op_ldi(30, 8'h38)); emit(op_ldi(31, 8'h00));
    marker(); timed(7);  emit(OP_ICALL);                     marker();
    // (4) interrupt: the testbench raises line 3 when it sees this OUT to 0x11
    emit(op_bset(7));
    emit(op_out(17, 16));
    for (int i = 0; i < 6; i++) emit(OP_NOP);
    emit(op_ldi(16, 8'h5C)); store_expect(16, 8'h5C);        // after return
    emit(op_rjmp(-1));                                       // end: loop forever
    rom[16'h38] = OP_RET;
    rom[16'h700] = 16'h1234;
    for (int i = 0; i < 4096; i++) ram[i] = 8'hFF;  // not zero, so a lost stack write cannot pass
    for (int i = 0; i < 64; i++) iomem[i] = 8'h00;

    repeat (3) @(posedge clk);
    rst_n = 1'b1;
  end

  // raise interrupt line 3 after the program's OUT to I/O 0x11
  always @(posedge clk) if (rst_n && iowe && io_addr == 6'd17) irq_lines[3] <= 1'b1;

  // finish when the end loop is reached
  initial begin
    wait (rst_n);
    wait (exp_wr.size() == 0 && n_irq == 1);
    repeat (20) @(posedge clk);
    checks++;
    if (exp_gap.size() != 0) begin failures++; $display("FAIL %0d timing blocks not seen", exp_gap.size()); end
    checks++;
    if (n_vec == 0) begin failures++; $display("FAIL interrupt vector not fetched"); end
    checks++;
    if (n_isr_wr != 1) begin failures++; $display("FAIL ISR body ran %0d times", n_isr_wr); end
    checks++;  // the interrupt pushed a return address inside the main program
    if ({ram[12'hFFE], ram[12'hFFF]} < 16'h40 || {ram[12'hFFE], ram[12'hFFF]} >= 16'h700) begin
      failures++; $display("FAIL pushed return address %h", {ram[12'hFFE], ram[12'hFFF]});
    end
    checks++;
    if (!sreg[SREG_I]) begin failures++; $display("FAIL I flag not restored by RETI"); end
    $display("writes=%0d timing=%0d irq=%0d", n_wr, n_gap, n_irq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog: %0d expected writes pending", exp_wr.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
