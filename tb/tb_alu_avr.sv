// tb_alu_avr: checks the combinational ALU against an independent reference
// model (wide-integer arithmetic in avr_ref_pkg) for every 8-bit operation
// with random operands and random incoming flags, including the corner
// operands 0x00, 0x7F, 0x80 and 0xFF, and checks the 16-bit ADIW/SBIW word
// operations against their own reference. The ALU has no clock, so there are
// no cycle counts to check; results are sampled 1 ns after each change.
`timescale 1ns/1ps
module tb_alu_avr;
  import nimbus_pkg::*;
  import avr_ref_pkg::*;

  alu_op_e     op;
  logic [15:0] a, result;
  logic [7:0]  b, sreg_in, sreg_out;
  alu_avr dut (.*);

  int checks = 0, failures = 0;
  initial begin
    #100000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam alu_op_e MAP [15] = '{ALU_ADD, ALU_ADC, ALU_SUB, ALU_SBC, ALU_AND, ALU_OR, ALU_EOR,
                                   ALU_COM, ALU_NEG, ALU_INC, ALU_DEC, ALU_LSR, ALU_ROR, ALU_ASR, ALU_SWAP};
  localparam logic [7:0] CORNER [4] = '{8'h00, 8'h7F, 8'h80, 8'hFF};

  initial begin
    logic [15:0] exp;
    logic [15:0] r16;
    logic [7:0]  s;
    for (int o = 0; o < 15; o++) begin
      for (int i = 0; i < 400; i++) begin
        op = MAP[o];
        a  = {8'h00, (i < 16) ? CORNER[i % 4] : 8'($urandom)};
        b  = (i < 16) ? CORNER[i / 4] : 8'($urandom);
        sreg_in = 8'($urandom);
        #1;
        exp = ref_alu(ref_op_e'(o), a[7:0], b, sreg_in);
        checks++;
        if ({sreg_out, result[7:0]} !== exp) begin
          failures++;
          if (failures < 10)
            $display("FAIL op=%s a=%h b=%h s=%b got %b/%h exp %b/%h", op.name(), a[7:0], b, sreg_in,
                     sreg_out, result[7:0], exp[15:8], exp[7:0]);
        end
      end
    end
    for (int i = 0; i < 2000; i++) begin
      op = (i % 2) ? ALU_SBIW : ALU_ADIW;
      a  = (i < 8) ? {CORNER[i % 4], 8'hFF} : 16'($urandom);
      b  = {2'b00, 6'($urandom)};
      sreg_in = 8'($urandom);
      #1;
      s = sreg_in;
      if (op == ALU_ADIW) begin
        r16 = a + 16'(b);
        s[SREG_C] = ~r16[15] & a[15];
        s[SREG_V] = ~a[15] & r16[15];
      end else begin
        r16 = a - 16'(b);
        s[SREG_C] = r16[15] & ~a[15];
        s[SREG_V] = a[15] & ~r16[15];
      end
      s[SREG_N] = r16[15];
      s[SREG_Z] = (r16 == 0);
      s[SREG_S] = s[SREG_N] ^ s[SREG_V];
      checks++;
      if (result !== r16 || sreg_out !== s) begin
        failures++;
        if (failures < 10) $display("FAIL %s a=%h k=%0d got %h/%b exp %h/%b", op.name(), a, b, result, sreg_out, r16, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
