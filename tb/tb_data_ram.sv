// tb_data_ram: random test of the 4 KB data RAM against a model array.
// Address and strobes are set up after a rising edge; a write must take
// place, and read data must appear, at the next falling edge, which lets a
// load or store finish within one clock cycle. Read data must hold while
// no read is requested.
`timescale 1ns/1ps
module tb_data_ram;
  logic        clk = 0, re = 0, we = 0;
  logic [11:0] addr = 0;
  logic [7:0]  wdata = 0, rdata;
  data_ram dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [7:0] m [4096];
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask
  initial begin
    #800000; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [7:0] last;
    // fill every byte, so that no read sees contents left from power-up
    for (int i = 0; i < 4096; i++) begin
      @(posedge clk); #1;
      addr = 12'(i); we = 1; wdata = 8'(i * 7 + 3); m[i] = wdata;
    end
    @(posedge clk); #1 we = 0;
    for (int i = 0; i < 3000; i++) begin
      @(posedge clk); #1;
      last = rdata;
      addr = ($urandom % 2) ? 12'($urandom) : 12'(64 * ($urandom % 64));
      re = ($urandom % 2); we = !re && ($urandom % 2); wdata = 8'($urandom);
      @(negedge clk); #1;
      if (we) m[addr] = wdata;
      if (re) check(rdata === m[addr], $sformatf("read %h: %h exp %h", addr, rdata, m[addr]));
      else    check(rdata === last, "read data holds without re");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
