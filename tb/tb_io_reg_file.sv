// tb_io_reg_file: checks the status register and stack pointer held inside
// the core. Bus writes to SREG (0x3F), SPH (0x3E) and SPL (0x3D) must read
// back on the next cycle, direct updates from the sequencer (sreg_we,
// sp_we) must take effect in one clock, and other addresses must read 0.
`timescale 1ns/1ps
module tb_io_reg_file;
  import nimbus_pkg::*;
  logic        clk = 0, rst_n = 0;
  logic [5:0]  io_addr = 0;
  logic        io_we = 0, sreg_we = 0, sp_we = 0;
  logic [7:0]  io_wdata = 0, io_rdata, sreg_next = 0, sreg;
  logic [15:0] sp_next = 0, sp;
  io_reg_file dut (.*);
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
    logic [7:0] es;
    logic [15:0] esp;
    #12 rst_n = 1;
    check(sreg === 0, "SREG resets to 0");
    es = 0; esp = sp;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      io_addr = 6'($urandom); io_we = $urandom % 2; io_wdata = 8'($urandom);
      if (i % 4 == 0) io_addr = IO_SREG;
      if (i % 4 == 1) io_addr = IO_SPL;
      if (i % 4 == 2) io_addr = IO_SPH;
      sreg_we = !io_we && ($urandom % 2); sreg_next = 8'($urandom);
      sp_we = !io_we && ($urandom % 2); sp_next = 16'($urandom);
      #1;
      case (io_addr)
        IO_SREG: check(io_rdata === es, "read SREG");
        IO_SPL:  check(io_rdata === esp[7:0], "read SPL");
        IO_SPH:  check(io_rdata === esp[15:8], "read SPH");
        default: check(io_rdata === 8'h00, "other addresses read 0");
      endcase
      @(posedge clk);
      if (io_we && io_addr == IO_SREG) es = io_wdata;
      if (io_we && io_addr == IO_SPL)  esp[7:0] = io_wdata;
      if (io_we && io_addr == IO_SPH)  esp[15:8] = io_wdata;
      if (sreg_we) es = sreg_next;
      if (sp_we) esp = sp_next;
      #1;
      check(sreg === es, $sformatf("SREG %h exp %h", sreg, es));
      check(sp === esp, $sformatf("SP %h exp %h", sp, esp));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
