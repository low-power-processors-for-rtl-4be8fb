// tb_prog_rom: checks the program ROM at its full size (8192 words). The
// contents are loaded through the memory array, then random and boundary
// addresses are presented just after a rising edge; the instruction word
// must appear after the following falling edge (half a cycle), so that it
// is ready for the next rising edge, and must hold until the next falling
// edge.
`timescale 1ns/1ps
module tb_prog_rom;
  logic        clk = 0;
  logic [15:0] addr = 0, data;
  prog_rom dut (.clk(clk), .addr(addr), .data(data));
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask
  initial begin
    #400000; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [15:0] pat(input int i); return 16'(i * 40503 + 17); endfunction
  initial begin
    logic [15:0] prev_data;
    for (int i = 0; i < 8192; i++) dut.mem[i] = pat(i);
    for (int i = 0; i < 2000; i++) begin
      @(posedge clk); #1;
      prev_data = data;
      addr = (i < 4) ? 16'(i * 8191 / 3) : 16'($urandom_range(0, 8191));
      #2;
      check(data === prev_data, "output holds until the falling edge");
      @(negedge clk); #1;
      check(data === pat(addr), $sformatf("word at %h: %h", addr, data));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
