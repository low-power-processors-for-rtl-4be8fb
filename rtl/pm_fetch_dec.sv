// pm_fetch_dec: program counter, instruction decoder and multi-cycle
// sequencer of the Nimbus AVR core (ATmega103 instruction set).
//
// Pipeline: the instruction register 'ir' holds the instruction at 'pc'. In
// the last cycle of every instruction the address of the next instruction is
// put on 'rom_addr'; the program memory (read on the falling edge) returns the
// word before the rising edge that loads it into 'ir'. Multi-cycle
// instructions count cycles in 'cyc'. The first cycle of a two-word
// instruction reads its second word from pc+1. Cycle counts follow the AVR:
// ALU/move/IN/OUT 1; taken branch, RJMP, IJMP, LD/ST/LDD/STD/LDS/STS/PUSH/POP,
// SBI/CBI, ADIW/SBIW 2 (skips 2 or 3); JMP, RCALL, ICALL, LPM 3; CALL, RET,
// RETI and interrupt entry 4. A taken branch spends its second cycle fetching
// from the new address.
//
// Data-space accesses (loads, stores, stack) use a registered address 'adr'
// set in the first cycle; the access itself (read data written to the
// register file, or write data driven) happens in the second cycle. Addresses
// 0x00-0x1F reach the register file, 0x20-0x5F the I/O space, 0x60 and up
// the RAM. IN/OUT access I/O space in their single cycle.
//
// Interrupts are taken at the start of an instruction: when SREG.I is set and
// a request line is active, the fetched instruction is dropped, its address
// is pushed (low byte first), I is cleared, the request is acknowledged
// ('irqack' with the line number on 'irqackad') and execution continues at
// word address 2*(line+1). One instruction is always executed after RETI or
// SEI before the next interrupt. SLEEP raises 'sleep_req' for one cycle; the
// power control then stops the core clock. Execution resumes with the next
// instruction, or first with the interrupt that woke the core.
//
// Not implemented: ELPM (no RAMPZ), the watchdog (WDR is a no-op), and the
// instructions the ATmega103 lacks (MUL, MOVW, SPM, BREAK, EIJMP/EICALL);
// they execute as NOP.
module pm_fetch_dec
  import nimbus_pkg::*;
#(
  parameter int unsigned NIRQ = IRQ_LINES
) (
  input  logic            clk,
  input  logic            rst_n,
  // program memory
  output logic [15:0]     rom_addr,
  input  logic [15:0]     inst,
  output logic [15:0]     pc,
  output logic [15:0]     ir,
  // register file
  output logic [4:0]      rd_addr,
  output logic [4:0]      rr_addr,
  input  logic [7:0]      rd_data,
  input  logic [7:0]      rr_data,
  input  logic [15:0]     x_ptr,
  input  logic [15:0]     y_ptr,
  input  logic [15:0]     z_ptr,
  output logic            rf_we,
  output logic [4:0]      rf_waddr,
  output logic [7:0]      rf_wdata,
  output logic            rf_we_pair,
  output logic [3:0]      rf_pair_sel,
  output logic [15:0]     rf_wdata_pair,
  // ALU
  output alu_op_e         alu_op,
  output logic [15:0]     alu_a,
  output logic [7:0]      alu_b,
  input  logic [15:0]     alu_result,
  input  logic [7:0]      alu_sreg,
  // bit processor
  output bit_op_e         bit_op,
  output logic [2:0]      bit_sel,
  input  logic [7:0]      bp_rd_out,
  input  logic [7:0]      bp_io_out,
  input  logic [7:0]      bp_sreg,
  input  logic            bp_rd_bit,
  input  logic            bp_io_bit,
  // core I/O registers
  input  logic [7:0]      sreg,
  input  logic [15:0]     sp,
  output logic            sreg_we,
  output logic [7:0]      sreg_next,
  output logic            sp_we,
  output logic [15:0]     sp_next,
  // data bus
  output logic [15:0]     adr,        // data-space address
  output logic            io_space,   // adr is in I/O space
  output logic [5:0]      io_addr,
  output logic            io_re,
  output logic            io_we,
  output logic            ram_re,
  output logic            ram_we,
  output logic [7:0]      dbus_out,
  input  logic [7:0]      dbus_in,    // read data (I/O or RAM), valid in the access cycle
  // interrupts and sleep
  input  logic [NIRQ-1:0] irq_lines,
  output logic            irqack,
  output logic [4:0]      irqackad,
  output logic            sleep_req
);
  typedef enum logic [1:0] {S_FETCH, S_EXEC, S_IRQ} state_e;

  state_e      state_q, state_d;
  logic [1:0]  cyc_q, cyc_d;
  logic [15:0] pc_q, ir_q;
  logic [15:0] adr_q, adr_d;
  logic [15:0] k_q;          // word at pc+1, read in the first cycle
  logic [15:0] tgt_q, tgt_d;
  logic [7:0]  wdat_q, wdat_d;
  logic [4:0]  vec_q, vec_d;
  logic        no_irq_q, no_irq_d;
  logic        sleep_q, sleep_d;
  logic        fin;           // last cycle: load ir from rom_addr
  logic [15:0] fetch_addr;

  assign pc = pc_q;
  assign ir = ir_q;

  // ---- instruction fields ----
  logic [4:0]  f_d, f_r, f_d16;
  logic [7:0]  f_k8;
  logic [5:0]  f_q, f_a6, f_k6;
  logic [4:0]  f_a5;
  logic [2:0]  f_b;
  logic [15:0] f_rel12, f_rel7;
  logic [1:0]  f_pair;

  assign f_d     = ir_q[8:4];
  assign f_r     = {ir_q[9], ir_q[3:0]};
  assign f_d16   = {1'b1, ir_q[7:4]};
  assign f_k8    = {ir_q[11:8], ir_q[3:0]};
  assign f_q     = {ir_q[13], ir_q[11:10], ir_q[2:0]};
  assign f_a6    = {ir_q[10:9], ir_q[3:0]};
  assign f_a5    = ir_q[7:3];
  assign f_b     = ir_q[2:0];
  assign f_k6    = {ir_q[7:6], ir_q[3:0]};
  assign f_pair  = ir_q[5:4];
  assign f_rel12 = {{4{ir_q[11]}}, ir_q[11:0]};
  assign f_rel7  = {{9{ir_q[9]}}, ir_q[9:3]};

  function automatic logic two_word(input logic [15:0] w);
    return ((w[15:10] == 6'b100100) && (w[3:0] == 4'b0000)) ||      // LDS, STS
           ((w[15:9] == 7'b1001010) && (w[3:2] == 2'b11));          // JMP, CALL
  endfunction

  // lowest active request line
  logic [4:0] irq_num;
  always_comb begin
    irq_num = '0;
    for (int i = NIRQ - 1; i >= 0; i--) if (irq_lines[i]) irq_num = 5'(i);
  end

  logic take_irq;
  assign take_irq = (state_q == S_EXEC) && (cyc_q == 2'd0) && sreg[SREG_I] &&
                    (|irq_lines) && !no_irq_q;

  // data-space read data: registers below 0x20, otherwise the data bus
  logic [7:0] load_data;
  assign load_data = (adr_q < 16'h20) ? rr_data : dbus_in;

  // data-space access requests of the current cycle (at adr_q), and direct
  // I/O accesses of IN/OUT/SBI/CBI/SBIC/SBIS (at the instruction's address)
  logic        mem_rd, mem_wr, iod_rd, iod_wr;
  logic [5:0]  iod_addr;
  logic        cond;
  logic [15:0] ptr;
  logic [3:0]  psel;
  logic        imm_form;
  assign imm_form = (ir_q[15:12] inside {4'h3, 4'h4, 4'h5, 4'h6, 4'h7, 4'hE});

  always_comb begin
    // defaults
    state_d       = state_q;
    cyc_d         = cyc_q + 2'd1;
    adr_d         = adr_q;
    tgt_d         = tgt_q;
    wdat_d        = wdat_q;
    vec_d         = vec_q;
    no_irq_d      = no_irq_q;
    sleep_d       = 1'b0;
    fin           = 1'b0;
    fetch_addr    = pc_q + 16'd1;
    rd_addr       = imm_form ? f_d16 : f_d;
    rr_addr       = f_r;
    mem_rd        = 1'b0;
    mem_wr        = 1'b0;
    iod_rd        = 1'b0;
    iod_wr        = 1'b0;
    iod_addr      = f_a6;
    cond          = 1'b0;
    ptr           = z_ptr;
    psel          = 4'd15;
    io_space      = 1'b0;
    io_addr       = '0;
    rf_we         = 1'b0;
    rf_waddr      = f_d;
    rf_wdata      = '0;
    rf_we_pair    = 1'b0;
    rf_pair_sel   = '0;
    rf_wdata_pair = '0;
    alu_op        = ALU_PASS;
    alu_a         = {8'd0, rd_data};
    alu_b         = rr_data;
    bit_op        = BIT_NONE;
    bit_sel       = f_b;
    sreg_we       = 1'b0;
    sreg_next     = sreg;
    sp_we         = 1'b0;
    sp_next       = sp;
    adr           = adr_q;
    io_re         = 1'b0;
    io_we         = 1'b0;
    ram_re        = 1'b0;
    ram_we        = 1'b0;
    dbus_out      = wdat_q;
    irqack        = 1'b0;
    irqackad      = vec_q;

    unique case (state_q)
      S_FETCH: begin
        fetch_addr = 16'd0;
        fin        = 1'b1;
        state_d    = S_EXEC;
      end

      S_IRQ: begin
        // cycle 0 was the detecting cycle (adr = SP, vector latched)
        unique case (cyc_q)
          2'd1: begin
            dbus_out = pc_q[7:0];
            mem_wr   = 1'b1;
            adr_d    = sp - 16'd1;
          end
          2'd2: begin
            dbus_out  = pc_q[15:8];
            mem_wr    = 1'b1;
            sp_we     = 1'b1;
            sp_next   = sp - 16'd2;
            sreg_we   = 1'b1;
            sreg_next = sreg & ~(8'd1 << SREG_I);
            irqack    = 1'b1;
          end
          default: begin
            fetch_addr = {10'd0, vec_q + 5'd1, 1'b0};
            fin        = 1'b1;
            state_d    = S_EXEC;
          end
        endcase
      end

      default: begin // S_EXEC
        if (cyc_q == 2'd0) no_irq_d = 1'b0;
        if (take_irq) begin
          adr_d   = sp;
          vec_d   = irq_num;
          state_d = S_IRQ;
          cyc_d   = 2'd1;
        end else begin
          casez (ir_q)
            // ---------- two-register ALU ops ----------
            16'b0000_01??_????_????,   // CPC
            16'b0000_10??_????_????,   // SBC
            16'b0000_11??_????_????,   // ADD
            16'b0001_01??_????_????,   // CP
            16'b0001_10??_????_????,   // SUB
            16'b0001_11??_????_????,   // ADC
            16'b0010_00??_????_????,   // AND
            16'b0010_01??_????_????,   // EOR
            16'b0010_10??_????_????: begin // OR
              unique case (ir_q[13:10])
                4'b0001, 4'b0101: alu_op = (ir_q[12]) ? ALU_SUB : ALU_SBC; // CPC / CP
                4'b0010: alu_op = ALU_SBC;
                4'b0011: alu_op = ALU_ADD;
                4'b0110: alu_op = ALU_SUB;
                4'b0111: alu_op = ALU_ADC;
                4'b1000: alu_op = ALU_AND;
                4'b1001: alu_op = ALU_EOR;
                default: alu_op = ALU_OR;
              endcase
              sreg_we   = 1'b1;
              sreg_next = alu_sreg;
              rf_we     = (ir_q[13:10] != 4'b0001) && (ir_q[13:10] != 4'b0101);
              rf_wdata  = alu_result[7:0];
              fin       = 1'b1;
            end
            16'b0010_11??_????_????: begin // MOV
              rf_we    = 1'b1;
              rf_wdata = rr_data;
              fin      = 1'b1;
            end
            // ---------- immediate ops (r16..r31) ----------
            16'b0011_????_????_????,   // CPI
            16'b0100_????_????_????,   // SBCI
            16'b0101_????_????_????,   // SUBI
            16'b0110_????_????_????,   // ORI
            16'b0111_????_????_????: begin // ANDI
              alu_b = f_k8;
              unique case (ir_q[14:12])
                3'b011:  alu_op = ALU_SUB;
                3'b100:  alu_op = ALU_SBC;
                3'b101:  alu_op = ALU_SUB;
                3'b110:  alu_op = ALU_OR;
                default: alu_op = ALU_AND;
              endcase
              sreg_we   = 1'b1;
              sreg_next = alu_sreg;
              rf_we     = (ir_q[15:12] != 4'h3);
              rf_waddr  = f_d16;
              rf_wdata  = alu_result[7:0];
              fin       = 1'b1;
            end
            16'b1110_????_????_????: begin // LDI
              rf_we    = 1'b1;
              rf_waddr = f_d16;
              rf_wdata = f_k8;
              fin      = 1'b1;
            end
            // ---------- skips ----------
            16'b0001_00??_????_????,   // CPSE
            16'b1111_11??_????_0???,   // SBRC / SBRS
            16'b1001_1001_????_????,   // SBIC
            16'b1001_1011_????_????: begin // SBIS
              iod_addr = {1'b0, f_a5};
              if (ir_q[15:12] == 4'h1)      cond = (rd_data == rr_data);
              else if (ir_q[15:12] == 4'hF) begin
                cond = (bp_rd_bit == ir_q[9]);
              end else begin
                cond = (bp_io_bit == ir_q[9]);
              end
              if (ir_q[15:12] == 4'h9) bit_sel = ir_q[2:0];
              unique case (cyc_q)
                2'd0: if (!cond) fin = 1'b1;
                2'd1: if (!two_word(k_q)) begin
                  fetch_addr = pc_q + 16'd2;
                  fin        = 1'b1;
                end
                default: begin
                  fetch_addr = pc_q + 16'd3;
                  fin        = 1'b1;
                end
              endcase
            end
            // ---------- LDD/STD with displacement, LD/ST Y, Z ----------
            16'b10?0_????_????_????: begin
              if (cyc_q == 2'd0) begin
                adr_d = (ir_q[3] ? y_ptr : z_ptr) + {10'd0, f_q};
              end else begin
                if (ir_q[9]) begin
                  dbus_out = rd_data;
                  mem_wr   = 1'b1;
                end else begin
                  mem_rd   = 1'b1;
                  rf_we    = 1'b1;
                  rf_wdata = load_data;
                end
                fin = 1'b1;
              end
            end
            // ---------- LDS/STS, LD/ST with pointer update, PUSH/POP, LPM ----------
            16'b1001_00??_????_????: begin
              unique case (ir_q[3:2])
                2'b11:   begin ptr = x_ptr; psel = 4'd13; end
                2'b10:   begin ptr = y_ptr; psel = 4'd14; end
                default: begin ptr = z_ptr; psel = 4'd15; end
              endcase
              if (ir_q[3:1] == 3'b010) begin
                // LPM Rd,Z / LPM Rd,Z+ (3 cycles)
                unique case (cyc_q)
                  2'd0: begin
                    fetch_addr = {1'b0, z_ptr[15:1]};
                    wdat_d     = z_ptr[0] ? inst[15:8] : inst[7:0];
                  end
                  2'd1: begin
                    rf_we    = 1'b1;
                    rf_wdata = wdat_q;
                    if (ir_q[0]) begin
                      rf_we_pair    = 1'b1;
                      rf_pair_sel   = 4'd15;
                      rf_wdata_pair = z_ptr + 16'd1;
                    end
                  end
                  default: fin = 1'b1;
                endcase
              end else if (ir_q[3:0] inside {4'b0011, 4'b0110, 4'b0111, 4'b1000, 4'b1011}) begin
                fin = 1'b1;                                // ELPM and reserved: no operation
              end else if (cyc_q == 2'd0) begin
                if (ir_q[3:0] == 4'b0000) begin        // LDS / STS
                  adr_d = inst;
                end else if (ir_q[3:0] == 4'b1111) begin // PUSH / POP
                  sp_we = 1'b1;
                  if (ir_q[9]) begin adr_d = sp;          sp_next = sp - 16'd1; end
                  else         begin adr_d = sp + 16'd1;  sp_next = sp + 16'd1; end
                end else if (ir_q[3:0] == 4'b1100) begin
                  adr_d = ptr;                             // LD/ST X (Y, Z use the LDD form)
                end else if (ir_q[1:0] == 2'b01) begin     // post-increment
                  adr_d         = ptr;
                  rf_we_pair    = 1'b1;
                  rf_pair_sel   = psel;
                  rf_wdata_pair = ptr + 16'd1;
                end else if (ir_q[1:0] == 2'b10) begin     // pre-decrement
                  adr_d         = ptr - 16'd1;
                  rf_we_pair    = 1'b1;
                  rf_pair_sel   = psel;
                  rf_wdata_pair = ptr - 16'd1;
                end
              end else begin
                if (ir_q[9]) begin
                  dbus_out = rd_data;
                  mem_wr   = 1'b1;
                end else begin
                  mem_rd   = 1'b1;
                  rf_we    = 1'b1;
                  rf_wdata = load_data;
                end
                fetch_addr = (ir_q[3:0] == 4'b0000) ? pc_q + 16'd2 : pc_q + 16'd1;
                fin        = 1'b1;
              end
            end
            // ---------- one-operand ALU ops ----------
            16'b1001_010?_????_0000,   // COM
            16'b1001_010?_????_0001,   // NEG
            16'b1001_010?_????_0010,   // SWAP
            16'b1001_010?_????_0011,   // INC
            16'b1001_010?_????_0101,   // ASR
            16'b1001_010?_????_0110,   // LSR
            16'b1001_010?_????_0111,   // ROR
            16'b1001_010?_????_1010: begin // DEC
              unique case (ir_q[3:0])
                4'h0: alu_op = ALU_COM;
                4'h1: alu_op = ALU_NEG;
                4'h2: alu_op = ALU_SWAP;
                4'h3: alu_op = ALU_INC;
                4'h5: alu_op = ALU_ASR;
                4'h6: alu_op = ALU_LSR;
                4'h7: alu_op = ALU_ROR;
                default: alu_op = ALU_DEC;
              endcase
              alu_b     = rd_data;
              sreg_we   = 1'b1;
              sreg_next = alu_sreg;
              rf_we     = 1'b1;
              rf_wdata  = alu_result[7:0];
              if (ir_q[3:0] == 4'h2) rf_wdata = {rd_data[3:0], rd_data[7:4]};
              fin       = 1'b1;
            end
            // ---------- JMP / CALL ----------
            16'b1001_010?_????_110?,
            16'b1001_010?_????_111?: begin
              unique case (cyc_q)
                2'd0: begin
                  tgt_d = inst;            // 16-bit program space: high bits ignored
                  adr_d = sp;
                end
                2'd1: if (ir_q[1]) begin     // CALL: push return address
                  dbus_out = 8'(pc_q + 16'd2);
                  mem_wr   = 1'b1;
                  adr_d    = sp - 16'd1;
                end
                2'd2: begin
                  if (ir_q[1]) begin
                    dbus_out = 8'((pc_q + 16'd2) >> 8);
                    mem_wr   = 1'b1;
                    sp_we    = 1'b1;
                    sp_next  = sp - 16'd2;
                  end else begin
                    fetch_addr = tgt_q;
                    fin        = 1'b1;
                  end
                end
                default: begin
                  fetch_addr = tgt_q;
                  fin        = 1'b1;
                end
              endcase
            end
            // ---------- BSET / BCLR ----------
            16'b1001_0100_????_1000: begin
              bit_op    = ir_q[7] ? BIT_BCLR : BIT_BSET;
              bit_sel   = ir_q[6:4];
              sreg_we   = 1'b1;
              sreg_next = bp_sreg;
              if (!ir_q[7] && ir_q[6:4] == 3'd7) no_irq_d = 1'b1;  // SEI
              fin       = 1'b1;
            end
            // ---------- IJMP / ICALL ----------
            16'b1001_0100_0000_1001,
            16'b1001_0101_0000_1001: begin
              unique case (cyc_q)
                2'd0: begin
                  tgt_d = z_ptr;
                  adr_d = sp;
                end
                2'd1: begin
                  if (ir_q[8]) begin
                    dbus_out = 8'(pc_q + 16'd1);
                    mem_wr   = 1'b1;
                    adr_d    = sp - 16'd1;
                  end else begin
                    fetch_addr = tgt_q;
                    fin        = 1'b1;
                  end
                end
                default: begin
                  dbus_out   = 8'((pc_q + 16'd1) >> 8);
                  mem_wr     = 1'b1;
                  sp_we      = 1'b1;
                  sp_next    = sp - 16'd2;
                  fetch_addr = tgt_q;
                  fin        = 1'b1;
                end
              endcase
            end
            // ---------- RET / RETI ----------
            16'b1001_0101_000?_1000: begin
              unique case (cyc_q)
                2'd0: adr_d = sp + 16'd1;
                2'd1: begin
                  mem_rd        = 1'b1;
                  tgt_d[15:8]   = load_data;
                  adr_d         = sp + 16'd2;
                end
                2'd2: begin
                  mem_rd        = 1'b1;
                  tgt_d[7:0]    = load_data;
                  sp_we         = 1'b1;
                  sp_next       = sp + 16'd2;
                end
                default: begin
                  if (ir_q[4]) begin
                    sreg_we   = 1'b1;
                    sreg_next = sreg | (8'd1 << SREG_I);
                    no_irq_d  = 1'b1;
                  end
                  fetch_addr = tgt_q;
                  fin        = 1'b1;
                end
              endcase
            end
            // ---------- SLEEP ----------
            16'b1001_0101_1000_1000: begin
              sleep_d = 1'b1;
              fin     = 1'b1;
            end
            // ---------- LPM (R0 implied), 3 cycles ----------
            16'b1001_0101_1100_1000: begin
              rf_waddr = 5'd0;
              unique case (cyc_q)
                2'd0: begin
                  fetch_addr = {1'b0, z_ptr[15:1]};
                  wdat_d     = z_ptr[0] ? inst[15:8] : inst[7:0];
                end
                2'd1: begin
                  rf_we    = 1'b1;
                  rf_wdata = wdat_q;
                end
                default: fin = 1'b1;
              endcase
            end
            // ---------- ADIW / SBIW ----------
            16'b1001_011?_????_????: begin
              rd_addr = {2'b11, f_pair, 1'b0};
              rr_addr = {2'b11, f_pair, 1'b1};
              if (cyc_q == 2'd0) begin
                alu_op        = ir_q[8] ? ALU_SBIW : ALU_ADIW;
                alu_a         = {rr_data, rd_data};
                alu_b         = {2'b00, f_k6};
                sreg_we       = 1'b1;
                sreg_next     = alu_sreg;
                rf_we_pair    = 1'b1;
                rf_pair_sel   = {2'b11, f_pair};
                rf_wdata_pair = alu_result;
              end else begin
                fin = 1'b1;
              end
            end
            // ---------- CBI / SBI (2 cycles, read-modify-write) ----------
            16'b1001_1000_????_????,
            16'b1001_1010_????_????: begin
              iod_addr = {1'b0, f_a5};
              bit_op   = ir_q[9] ? BIT_SBI : BIT_CBI;
              if (cyc_q == 2'd0) begin
                wdat_d = bp_io_out;
              end else begin
                dbus_out = wdat_q;
                iod_wr   = 1'b1;
                fin      = 1'b1;
              end
            end
            // ---------- IN / OUT ----------
            16'b1011_????_????_????: begin
              if (ir_q[11]) begin
                dbus_out = rd_data;
                iod_wr   = 1'b1;
              end else begin
                iod_rd   = 1'b1;
                rf_we    = 1'b1;
                rf_wdata = dbus_in;
              end
              fin = 1'b1;
            end
            // ---------- RJMP / RCALL ----------
            16'b110?_????_????_????: begin
              unique case (cyc_q)
                2'd0: begin
                  tgt_d = pc_q + 16'd1 + f_rel12;
                  adr_d = sp;
                end
                2'd1: begin
                  if (ir_q[12]) begin
                    dbus_out = 8'(pc_q + 16'd1);
                    mem_wr   = 1'b1;
                    adr_d    = sp - 16'd1;
                  end else begin
                    fetch_addr = tgt_q;
                    fin        = 1'b1;
                  end
                end
                default: begin
                  dbus_out   = 8'((pc_q + 16'd1) >> 8);
                  mem_wr     = 1'b1;
                  sp_we      = 1'b1;
                  sp_next    = sp - 16'd2;
                  fetch_addr = tgt_q;
                  fin        = 1'b1;
                end
              endcase
            end
            // ---------- BRBS / BRBC ----------
            16'b1111_0???_????_????: begin
              if (cyc_q == 2'd0) begin
                tgt_d = pc_q + 16'd1 + f_rel7;
                if (sreg[f_b] == ir_q[10]) fin = 1'b1;  // not taken
              end else begin
                fetch_addr = tgt_q;
                fin        = 1'b1;
              end
            end
            // ---------- BLD / BST ----------
            16'b1111_100?_????_0???: begin
              bit_op   = BIT_BLD;
              rf_we    = 1'b1;
              rf_wdata = bp_rd_out;
              fin      = 1'b1;
            end
            16'b1111_101?_????_0???: begin
              bit_op    = BIT_BST;
              sreg_we   = 1'b1;
              sreg_next = bp_sreg;
              fin       = 1'b1;
            end
            default: fin = 1'b1;   // NOP, WDR and unimplemented opcodes
          endcase
        end
      end
    endcase

    if (fin) cyc_d = 2'd0;

    // ---- data bus: route the access to registers, I/O space or RAM ----
    // The I/O address of SBI/CBI/SBIC/SBIS/IN/OUT is also presented while
    // those instructions only read, so their operand is on the read bus.
    if (state_q == S_EXEC && !take_irq &&
        (ir_q[15:12] == 4'hB || ir_q[15:10] == 6'b100110)) begin
      adr      = 16'h20 + {10'd0, iod_addr};
      io_space = 1'b1;
      io_addr  = iod_addr;
      io_re    = iod_rd;
      io_we    = iod_wr;
    end else begin
      adr      = adr_q;
      io_space = (adr_q >= 16'h20) && (adr_q < 16'h60);
      io_addr  = 6'(adr_q - 16'h20);
      io_re    = mem_rd && io_space;
      io_we    = mem_wr && io_space;
      ram_re   = mem_rd && (adr_q >= 16'h60);
      ram_we   = mem_wr && (adr_q >= 16'h60);
      if (adr_q < 16'h20) begin
        if (mem_rd) rr_addr = adr_q[4:0];
        if (mem_wr) begin
          rf_we    = 1'b1;
          rf_waddr = adr_q[4:0];
          rf_wdata = dbus_out;
        end
      end
    end
  end

  assign rom_addr  = fetch_addr;
  assign sleep_req = sleep_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= S_FETCH;
      cyc_q    <= '0;
      pc_q     <= '0;
      ir_q     <= '0;
      adr_q    <= '0;
      k_q      <= '0;
      tgt_q    <= '0;
      wdat_q   <= '0;
      vec_q    <= '0;
      no_irq_q <= 1'b0;
      sleep_q  <= 1'b0;
    end else begin
      state_q  <= state_d;
      cyc_q    <= cyc_d;
      adr_q    <= adr_d;
      tgt_q    <= tgt_d;
      wdat_q   <= wdat_d;
      vec_q    <= vec_d;
      no_irq_q <= no_irq_d;
      sleep_q  <= sleep_d;
      if (state_q == S_EXEC && cyc_q == 2'd0) k_q <= inst;
      if (fin) begin
        ir_q <= inst;
        pc_q <= fetch_addr;
      end
    end
  end
endmodule
