// avr_ref_pkg: reference model of the AVR arithmetic instructions for the
// testbenches. It is written from the arithmetic meaning of each flag (wide
// sums, signed ranges, nibble borrows) rather than from the bit equations
// the ALU uses. Returns {sreg, result}.
package avr_ref_pkg;
  typedef enum int {R_ADD, R_ADC, R_SUB, R_SBC, R_AND, R_OR, R_EOR, R_COM, R_NEG,
                    R_INC, R_DEC, R_LSR, R_ROR, R_ASR, R_SWAP} ref_op_e;

  function automatic logic [15:0] ref_alu(input ref_op_e op, input logic [7:0] a,
                                          input logic [7:0] b, input logic [7:0] s);
    int ua, ub, ci, sa, sb, full, sfull;
    logic [7:0] r;
    logic c, z, n, v, h;
    ua = int'(a); ub = int'(b); ci = int'(s[0]);
    sa = (ua > 127) ? ua - 256 : ua;
    sb = (ub > 127) ? ub - 256 : ub;
    c = s[0]; z = s[1]; n = s[2]; v = s[3]; h = s[5];
    r = a;
    case (op)
      R_ADD, R_ADC: begin
        if (op == R_ADD) ci = 0;
        full = ua + ub + ci; sfull = sa + sb + ci;
        r = 8'(full); c = full > 255; h = ((ua % 16) + (ub % 16) + ci) > 15;
        v = (sfull > 127) || (sfull < -128);
      end
      R_SUB, R_SBC: begin
        if (op == R_SUB) ci = 0;
        full = ua - ub - ci; sfull = sa - sb - ci;
        r = 8'(full); c = full < 0; h = ((ua % 16) - (ub % 16) - ci) < 0;
        v = (sfull > 127) || (sfull < -128);
      end
      R_AND: begin r = a & b; v = 0; end
      R_OR:  begin r = a | b; v = 0; end
      R_EOR: begin r = a ^ b; v = 0; end
      R_COM: begin r = 8'(255 - ua); v = 0; c = 1; end
      R_NEG: begin r = 8'(256 - ua); c = (ua != 0); v = (ua == 128); h = (ua % 16) != 0; end
      R_INC: begin r = 8'(ua + 1); v = (ua == 127); end
      R_DEC: begin r = 8'(ua - 1); v = (ua == 128); end
      R_LSR: begin r = 8'(ua / 2); c = a[0]; end
      R_ROR: begin r = 8'(ua / 2 + 128 * ci); c = a[0]; end
      R_ASR: begin r = 8'((sa - (sa & 1)) / 2); c = a[0]; end
      R_SWAP: r = {a[3:0], a[7:4]};
      default: ;
    endcase
    if (op != R_SWAP) begin
      n = r[7];
      z = (op == R_SBC) ? (s[1] && r == 0) : (r == 0);
      if (op inside {R_LSR, R_ROR, R_ASR}) v = n ^ c;
    end
    return {s[7:6], (op == R_SWAP) ? s[5:0] : {h, n ^ v, v, n, z, c}, r};
  endfunction
endpackage
