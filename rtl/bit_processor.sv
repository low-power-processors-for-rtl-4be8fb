// bit_processor: single-bit operations of the AVR core.
// Combinational. BSET/BCLR set or clear one SREG bit; BST copies a register
// bit into T; BLD copies T into a register bit; SBI/CBI set or clear one bit
// of an I/O register value (the core writes the result back in the second
// cycle of SBI/CBI). 'bit_value' is the selected bit of the register (for
// SBRC/SBRS) or of the I/O value (SBIC/SBIS), used by the skip logic.
// The operations are those of the AVR instruction set; their grouping in one
// unit follows the original core.
module bit_processor
  import nimbus_pkg::*;
(
  input  bit_op_e    op,
  input  logic [2:0] bit_sel,
  input  logic [7:0] rd,        // register operand
  input  logic [7:0] io_val,    // I/O register operand
  input  logic [7:0] sreg_in,
  output logic [7:0] rd_out,
  output logic [7:0] io_out,
  output logic [7:0] sreg_out,
  output logic       rd_bit,    // rd[bit_sel]
  output logic       io_bit     // io_val[bit_sel]
);
  always_comb begin
    rd_out   = rd;
    io_out   = io_val;
    sreg_out = sreg_in;
    rd_bit   = rd[bit_sel];
    io_bit   = io_val[bit_sel];
    unique case (op)
      BIT_BSET: sreg_out[bit_sel] = 1'b1;
      BIT_BCLR: sreg_out[bit_sel] = 1'b0;
      BIT_BST:  sreg_out[SREG_T]  = rd[bit_sel];
      BIT_BLD:  rd_out[bit_sel]   = sreg_in[SREG_T];
      BIT_SBI:  io_out[bit_sel]   = 1'b1;
      BIT_CBI:  io_out[bit_sel]   = 1'b0;
      default: ;
    endcase
  end
endmodule
