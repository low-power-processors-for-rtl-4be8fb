// tb_bit_processor: exhaustive check of the bit processor. For every
// operation (BSET, BCLR, BST, BLD, SBI, CBI and none) and every bit number it
// applies random register, I/O and status values and compares all outputs
// with the expected single-bit change; everything not addressed must pass
// through unchanged. The unit is combinational: no cycle counts apply.
`timescale 1ns/1ps
module tb_bit_processor;
  import nimbus_pkg::*;
  bit_op_e    op;
  logic [2:0] bit_sel;
  logic [7:0] rd, io_val, sreg_in, rd_out, io_out, sreg_out;
  logic       rd_bit, io_bit;
  bit_processor dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask
  initial begin
    #100000; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [7:0] er, ei, es;
    for (int o = 0; o < 7; o++)
      for (int k = 0; k < 8; k++)
        for (int i = 0; i < 20; i++) begin
          op = bit_op_e'(o); bit_sel = 3'(k);
          rd = 8'($urandom); io_val = 8'($urandom); sreg_in = 8'($urandom);
          #1;
          er = rd; ei = io_val; es = sreg_in;
          case (op)
            BIT_BSET: es[k] = 1'b1;
            BIT_BCLR: es[k] = 1'b0;
            BIT_BST:  es[6] = rd[k];
            BIT_BLD:  er[k] = sreg_in[6];
            BIT_SBI:  ei[k] = 1'b1;
            BIT_CBI:  ei[k] = 1'b0;
            default: ;
          endcase
          check(rd_out === er && io_out === ei && sreg_out === es,
                $sformatf("%s bit %0d: rd %h/%h io %h/%h s %h/%h", op.name(), k, rd_out, er, io_out, ei, sreg_out, es));
          check(rd_bit === rd[k] && io_bit === io_val[k], "bit test outputs");
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
