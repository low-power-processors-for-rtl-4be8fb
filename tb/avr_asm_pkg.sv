// avr_asm_pkg: AVR instruction encoders used by the testbenches to build
// programs in memory (one function per instruction; two-word instructions
// return the first word, the second word is the 16-bit address).
package avr_asm_pkg;
  typedef logic [15:0] w16;

  function automatic w16 rr(input logic [5:0] op, input int d, input int r);
    return {op, 1'(r >> 4), 5'(d), 4'(r)};
  endfunction
  function automatic w16 op_add (input int d, input int r); return rr(6'b000011, d, r); endfunction
  function automatic w16 op_adc (input int d, input int r); return rr(6'b000111, d, r); endfunction
  function automatic w16 op_sub (input int d, input int r); return rr(6'b000110, d, r); endfunction
  function automatic w16 op_sbc (input int d, input int r); return rr(6'b000010, d, r); endfunction
  function automatic w16 op_and (input int d, input int r); return rr(6'b001000, d, r); endfunction
  function automatic w16 op_eor (input int d, input int r); return rr(6'b001001, d, r); endfunction
  function automatic w16 op_or  (input int d, input int r); return rr(6'b001010, d, r); endfunction
  function automatic w16 op_mov (input int d, input int r); return rr(6'b001011, d, r); endfunction
  function automatic w16 op_cp  (input int d, input int r); return rr(6'b000101, d, r); endfunction
  function automatic w16 op_cpc (input int d, input int r); return rr(6'b000001, d, r); endfunction
  function automatic w16 op_cpse(input int d, input int r); return rr(6'b000100, d, r); endfunction

  function automatic w16 imm(input logic [3:0] op, input int d, input int k);
    return {op, 4'(k >> 4), 4'(d - 16), 4'(k)};
  endfunction
  function automatic w16 op_ldi (input int d, input int k); return imm(4'hE, d, k); endfunction
  function automatic w16 op_cpi (input int d, input int k); return imm(4'h3, d, k); endfunction
  function automatic w16 op_sbci(input int d, input int k); return imm(4'h4, d, k); endfunction
  function automatic w16 op_subi(input int d, input int k); return imm(4'h5, d, k); endfunction
  function automatic w16 op_ori (input int d, input int k); return imm(4'h6, d, k); endfunction
  function automatic w16 op_andi(input int d, input int k); return imm(4'h7, d, k); endfunction

  function automatic w16 one(input int d, input logic [3:0] code);
    return {7'b1001010, 5'(d), code};
  endfunction
  function automatic w16 op_com (input int d); return one(d, 4'h0); endfunction
  function automatic w16 op_neg (input int d); return one(d, 4'h1); endfunction
  function automatic w16 op_swap(input int d); return one(d, 4'h2); endfunction
  function automatic w16 op_inc (input int d); return one(d, 4'h3); endfunction
  function automatic w16 op_asr (input int d); return one(d, 4'h5); endfunction
  function automatic w16 op_lsr (input int d); return one(d, 4'h6); endfunction
  function automatic w16 op_ror (input int d); return one(d, 4'h7); endfunction
  function automatic w16 op_dec (input int d); return one(d, 4'hA); endfunction

  function automatic w16 op_in (input int d, input int a); return {5'b10110, 2'(a >> 4), 5'(d), 4'(a)}; endfunction
  function automatic w16 op_out(input int a, input int r); return {5'b10111, 2'(a >> 4), 5'(r), 4'(a)}; endfunction
  function automatic w16 op_lds(input int d); return {7'b1001000, 5'(d), 4'b0000}; endfunction
  function automatic w16 op_sts(input int r); return {7'b1001001, 5'(r), 4'b0000}; endfunction
  // pointer modes: 4'b1100 X, 4'b1101 X+, 4'b1110 -X, 4'b1001 Y+, 4'b1010 -Y, 4'b0001 Z+, 4'b0010 -Z
  function automatic w16 op_ld (input int d, input logic [3:0] m); return {7'b1001000, 5'(d), m}; endfunction
  function automatic w16 op_st (input int r, input logic [3:0] m); return {7'b1001001, 5'(r), m}; endfunction
  function automatic w16 op_ldd(input int d, input bit y, input int q);
    return {2'b10, 1'(q >> 5), 1'b0, 2'(q >> 3), 1'b0, 5'(d), y, 3'(q)};
  endfunction
  function automatic w16 op_std(input int r, input bit y, input int q);
    return {2'b10, 1'(q >> 5), 1'b0, 2'(q >> 3), 1'b1, 5'(r), y, 3'(q)};
  endfunction
  function automatic w16 op_push(input int r); return {7'b1001001, 5'(r), 4'b1111}; endfunction
  function automatic w16 op_pop (input int d); return {7'b1001000, 5'(d), 4'b1111}; endfunction
  function automatic w16 op_lpm_z(input int d); return {7'b1001000, 5'(d), 4'b0100}; endfunction
  function automatic w16 op_lpm_zp(input int d); return {7'b1001000, 5'(d), 4'b0101}; endfunction

  function automatic w16 op_rjmp (input int k); return {4'b1100, 12'(k)}; endfunction
  function automatic w16 op_rcall(input int k); return {4'b1101, 12'(k)}; endfunction
  localparam w16 OP_JMP   = 16'h940C;
  localparam w16 OP_CALL  = 16'h940E;
  localparam w16 OP_RET   = 16'h9508;
  localparam w16 OP_RETI  = 16'h9518;
  localparam w16 OP_SLEEP = 16'h9588;
  localparam w16 OP_NOP   = 16'h0000;
  localparam w16 OP_IJMP  = 16'h9409;
  localparam w16 OP_ICALL = 16'h9509;
  localparam w16 OP_LPM   = 16'h95C8;
  function automatic w16 op_brbs(input int s, input int k); return {6'b111100, 7'(k), 3'(s)}; endfunction
  function automatic w16 op_brbc(input int s, input int k); return {6'b111101, 7'(k), 3'(s)}; endfunction
  function automatic w16 op_sbi (input int a, input int b); return {8'h9A, 5'(a), 3'(b)}; endfunction
  function automatic w16 op_cbi (input int a, input int b); return {8'h98, 5'(a), 3'(b)}; endfunction
  function automatic w16 op_sbic(input int a, input int b); return {8'h99, 5'(a), 3'(b)}; endfunction
  function automatic w16 op_sbis(input int a, input int b); return {8'h9B, 5'(a), 3'(b)}; endfunction
  function automatic w16 op_sbrc(input int r, input int b); return {7'b1111110, 5'(r), 1'b0, 3'(b)}; endfunction
  function automatic w16 op_sbrs(input int r, input int b); return {7'b1111111, 5'(r), 1'b0, 3'(b)}; endfunction
  function automatic w16 op_bset(input int s); return {9'b100101000, 3'(s), 4'b1000}; endfunction
  function automatic w16 op_bclr(input int s); return {9'b100101001, 3'(s), 4'b1000}; endfunction
  function automatic w16 op_bst (input int d, input int b); return {7'b1111101, 5'(d), 1'b0, 3'(b)}; endfunction
  function automatic w16 op_bld (input int d, input int b); return {7'b1111100, 5'(d), 1'b0, 3'(b)}; endfunction
  function automatic w16 op_adiw(input int p, input int k); return {8'h96, 2'(k >> 4), 2'(p), 4'(k)}; endfunction
  function automatic w16 op_sbiw(input int p, input int k); return {8'h97, 2'(k >> 4), 2'(p), 4'(k)}; endfunction
endpackage
