// tb_service_module: checks MCUCR and EIMSK. Writes must read back on the
// next cycle and only at their own addresses; SE and SM must follow MCUCR
// bits 5 and 4:3 (SM2 is bit 2); the external interrupt requests must be
// the active-low pins masked by EIMSK, combinationally, so that they work
// with every clock stopped.
`timescale 1ns/1ps
module tb_service_module;
  import nimbus_pkg::*;
  logic       clk = 0, rst_n = 0, io_we = 0, hit, se;
  logic [5:0] io_addr = 0;
  logic [7:0] io_wdata = 0, rdata, int_pins = 8'hFF, ext_irq;
  logic [2:0] sm;
  service_module dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask
  initial begin
    #200000; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [7:0] mc, em;
    mc = 0; em = 0;
    #12 rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      io_addr = (i % 3 == 0) ? IO_MCUCR : (i % 3 == 1) ? IO_EIMSK : 6'($urandom);
      io_we = $urandom % 2; io_wdata = 8'($urandom); int_pins = 8'($urandom);
      #1;
      check(hit === (io_addr == IO_MCUCR || io_addr == IO_EIMSK), "hit");
      check(rdata === ((io_addr == IO_MCUCR) ? mc : (io_addr == IO_EIMSK) ? em : 8'h00), "read back");
      check(ext_irq === (~int_pins & em), "external interrupt masking");
      check(se === mc[5] && sm === {mc[2], mc[4], mc[3]}, "SE/SM");
      @(posedge clk);
      if (io_we && io_addr == IO_MCUCR) mc = io_wdata;
      if (io_we && io_addr == IO_EIMSK) em = io_wdata;
    end
    // with the clock stopped, a pin still raises its request at once
    @(negedge clk); io_we = 1; io_addr = IO_EIMSK; io_wdata = 8'h01; @(posedge clk); #1 io_we = 0;
    force clk = 1'b0;
    int_pins = 8'hFF; #3;
    check(ext_irq === 8'h00, "no request with pin high");
    int_pins[0] = 1'b0; #1;
    check(ext_irq === 8'h01, "INT0 request without a clock");
    release clk;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
