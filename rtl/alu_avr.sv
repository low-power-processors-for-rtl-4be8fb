// alu_avr: the arithmetic/logic unit of the AVR core.
// Purely combinational. It computes the 8-bit result of the AVR arithmetic,
// logic and shift instructions and the new H, S, V, N, Z, C flags, following
// the flag equations of the AVR instruction set. The 16-bit word operations
// ADIW/SBIW use a (16-bit register pair) and k (6-bit constant in b).
// 'with_carry' operations (ADC, SBC) take C from sreg_in; SBC/CPC/SBCI keep Z
// only if it was already set. The I and T flags pass through unchanged.
// What the unit computes is the AVR instruction set; splitting it out of the
// core as one unit follows the original core's structure.
module alu_avr
  import nimbus_pkg::*;
(
  input  alu_op_e     op,
  input  logic [15:0] a,        // Rd (bits 7:0), or Rd+1:Rd for ADIW/SBIW
  input  logic [7:0]  b,        // Rr, immediate K, or k for ADIW/SBIW
  input  logic [7:0]  sreg_in,
  output logic [15:0] result,   // bits 15:8 used by ADIW/SBIW only
  output logic [7:0]  sreg_out
);
  logic [7:0] d, r;
  logic c_in, h, v, n, z, c;
  logic [15:0] w;

  always_comb begin
    d        = a[7:0];
    c_in     = sreg_in[SREG_C];
    r        = '0;
    w        = '0;
    h        = sreg_in[SREG_H];
    v        = sreg_in[SREG_V];
    c        = sreg_in[SREG_C];
    n        = 1'b0;
    z        = 1'b0;
    sreg_out = sreg_in;
    unique case (op)
      ALU_ADD, ALU_ADC: begin
        r = d + b + ((op == ALU_ADC) ? {7'd0, c_in} : 8'd0);
        h = (d[3] & b[3]) | (b[3] & ~r[3]) | (~r[3] & d[3]);
        v = (d[7] & b[7] & ~r[7]) | (~d[7] & ~b[7] & r[7]);
        c = (d[7] & b[7]) | (b[7] & ~r[7]) | (~r[7] & d[7]);
      end
      ALU_SUB, ALU_SBC: begin
        r = d - b - ((op == ALU_SBC) ? {7'd0, c_in} : 8'd0);
        h = (~d[3] & b[3]) | (b[3] & r[3]) | (r[3] & ~d[3]);
        v = (d[7] & ~b[7] & ~r[7]) | (~d[7] & b[7] & r[7]);
        c = (~d[7] & b[7]) | (b[7] & r[7]) | (r[7] & ~d[7]);
      end
      ALU_AND:  begin r = d & b; v = 1'b0; end
      ALU_OR:   begin r = d | b; v = 1'b0; end
      ALU_EOR:  begin r = d ^ b; v = 1'b0; end
      ALU_COM:  begin r = ~d;    v = 1'b0; c = 1'b1; end
      ALU_NEG: begin
        r = 8'd0 - d;
        h = r[3] | d[3];
        v = (r == 8'h80);
        c = (r != 8'h00);
      end
      ALU_INC:  begin r = d + 8'd1; v = (d == 8'h7F); end
      ALU_DEC:  begin r = d - 8'd1; v = (d == 8'h80); end
      ALU_LSR:  begin r = {1'b0, d[7:1]};  c = d[0]; v = r[7] ^ d[0]; end
      ALU_ROR:  begin r = {c_in, d[7:1]};  c = d[0]; v = r[7] ^ d[0]; end
      ALU_ASR:  begin r = {d[7], d[7:1]};  c = d[0]; v = r[7] ^ d[0]; end
      ALU_SWAP: r = {d[3:0], d[7:4]};
      ALU_PASS: r = b;
      ALU_ADIW: begin
        w = a + {10'd0, b[5:0]};
        v = ~a[15] & w[15];
        c = ~w[15] & a[15];
      end
      ALU_SBIW: begin
        w = a - {10'd0, b[5:0]};
        v = a[15] & ~w[15];
        c = w[15] & ~a[15];
      end
      default: r = d;
    endcase

    if (op == ALU_ADIW || op == ALU_SBIW) begin
      n = w[15];
      z = (w == 16'd0);
      result = w;
    end else begin
      n = r[7];
      z = (op == ALU_SBC) ? ((r == 8'd0) & sreg_in[SREG_Z]) : (r == 8'd0);
      result = {8'd0, r};
    end

    if (op != ALU_SWAP && op != ALU_PASS) begin
      sreg_out[SREG_H] = h;
      sreg_out[SREG_V] = v;
      sreg_out[SREG_C] = c;
      sreg_out[SREG_N] = n;
      sreg_out[SREG_Z] = z;
      sreg_out[SREG_S] = n ^ v;
    end
  end
endmodule
