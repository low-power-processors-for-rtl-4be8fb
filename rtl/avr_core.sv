// avr_core: the Nimbus AVR core (ATmega103 instruction set, 8-bit data,
// 16-bit instructions, Harvard memories outside the core).
// It connects the sequencer (pm_fetch_dec: program counter, decoder,
// instruction timing, interrupt entry), the ALU, the bit processor, the
// 32-register file, the core I/O registers (SREG, SP) and the I/O address
// decoder, as in the original core's structure. The program memory, data RAM
// and I/O devices sit outside: the core drives 'rom_addr' and takes 'inst'
// (valid before the next rising edge), and drives a data-space address 'adr'
// with read/write strobes split into I/O space (iore/iowe, with 'io_addr')
// and RAM (ramre/ramwe). 'dbusin' must carry the read data of the addressed
// RAM byte or I/O device in the cycle of the access. Interrupt request lines
// come in on 'irq_lines'; an accepted request is acknowledged by 'irqack'
// with its line number on 'irqackad'. 'sleep_req' pulses when SLEEP executes.
module avr_core
  import nimbus_pkg::*;
#(
  parameter int unsigned NIRQ = IRQ_LINES
) (
  input  logic            clk,
  input  logic            rst_n,
  output logic [15:0]     rom_addr,
  input  logic [15:0]     inst,
  output logic [15:0]     pc,
  output logic [15:0]     inst_reg,
  output logic [15:0]     adr,
  output logic [5:0]      io_addr,
  output logic            iore,
  output logic            iowe,
  output logic            ramre,
  output logic            ramwe,
  output logic [7:0]      dbusout,
  input  logic [7:0]      dbusin,
  input  logic [NIRQ-1:0] irq_lines,
  output logic            irqack,
  output logic [4:0]      irqackad,
  output logic            sleep_req,
  output logic [7:0]      sreg,
  output logic [15:0]     sp
);
  logic [4:0]  rd_addr, rr_addr, rf_waddr;
  logic [7:0]  rd_data, rr_data, rf_wdata;
  logic [15:0] x_ptr, y_ptr, z_ptr, rf_wdata_pair;
  logic        rf_we, rf_we_pair;
  logic [3:0]  rf_pair_sel;
  alu_op_e     alu_op;
  logic [15:0] alu_a, alu_result;
  logic [7:0]  alu_b, alu_sreg;
  bit_op_e     bit_op;
  logic [2:0]  bit_sel;
  logic [7:0]  bp_rd_out, bp_io_out, bp_sreg;
  logic        bp_rd_bit, bp_io_bit;
  logic        sreg_we, sp_we;
  logic [7:0]  sreg_next;
  logic [15:0] sp_next;
  logic        io_space, io_re, io_we, int_sel, int_we;
  logic [7:0]  int_rdata, rdata;

  pm_fetch_dec #(.NIRQ(NIRQ)) u_pm_fetch_dec (
    .clk, .rst_n, .rom_addr, .inst, .pc, .ir(inst_reg),
    .rd_addr, .rr_addr, .rd_data, .rr_data, .x_ptr, .y_ptr, .z_ptr,
    .rf_we, .rf_waddr, .rf_wdata, .rf_we_pair, .rf_pair_sel, .rf_wdata_pair,
    .alu_op, .alu_a, .alu_b, .alu_result, .alu_sreg,
    .bit_op, .bit_sel, .bp_rd_out, .bp_io_out, .bp_sreg, .bp_rd_bit, .bp_io_bit,
    .sreg, .sp, .sreg_we, .sreg_next, .sp_we, .sp_next,
    .adr, .io_space, .io_addr, .io_re, .io_we, .ram_re(ramre), .ram_we(ramwe),
    .dbus_out(dbusout), .dbus_in(rdata),
    .irq_lines, .irqack, .irqackad, .sleep_req
  );

  alu_avr u_alu (
    .op(alu_op), .a(alu_a), .b(alu_b), .sreg_in(sreg),
    .result(alu_result), .sreg_out(alu_sreg)
  );

  bit_processor u_bit_processor (
    .op(bit_op), .bit_sel, .rd(rd_data), .io_val(rdata), .sreg_in(sreg),
    .rd_out(bp_rd_out), .io_out(bp_io_out), .sreg_out(bp_sreg),
    .rd_bit(bp_rd_bit), .io_bit(bp_io_bit)
  );

  reg_file u_reg_file (
    .clk, .rst_n, .rd_addr, .rr_addr, .rd_data, .rr_data, .x_ptr, .y_ptr, .z_ptr,
    .we(rf_we), .waddr(rf_waddr), .wdata(rf_wdata),
    .we_pair(rf_we_pair), .pair_sel(rf_pair_sel), .wdata_pair(rf_wdata_pair)
  );

  io_reg_file u_io_reg_file (
    .clk, .rst_n, .io_addr, .io_we(int_we), .io_wdata(dbusout), .io_rdata(int_rdata),
    .sreg_we, .sreg_next, .sp_we, .sp_next, .sreg, .sp
  );

  io_adr_dec u_io_adr_dec (
    .io_space, .io_addr, .re(io_re), .we(io_we), .int_rdata, .ext_rdata(dbusin),
    .int_sel, .int_we, .ext_re(iore), .ext_we(iowe), .rdata
  );
endmodule
