// tb_io_adr_dec: exhaustive check of the I/O address decoder over all 64
// I/O addresses with every read/write and space combination: SREG, SPH and
// SPL in I/O space must select the internal registers; every other access
// (other I/O addresses, and RAM accesses, which share the external data
// bus) must go out on the external strobes, and the read data must come
// from the selected side. Combinational: no cycle counts apply.
`timescale 1ns/1ps
module tb_io_adr_dec;
  import nimbus_pkg::*;
  logic       io_space, re, we, int_sel, int_we, ext_re, ext_we;
  logic [5:0] io_addr;
  logic [7:0] int_rdata, ext_rdata, rdata;
  io_adr_dec dut (.*);

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
    bit is_int;
    for (int a = 0; a < 64; a++)
      for (int m = 0; m < 8; m++) begin
        io_addr = 6'(a); io_space = m[2]; re = m[1]; we = m[0];
        int_rdata = 8'($urandom); ext_rdata = 8'($urandom);
        #1;
        is_int = io_space && (a == IO_SREG || a == IO_SPH || a == IO_SPL);
        check(int_sel === is_int, $sformatf("int_sel @%h", a));
        check(int_we === (is_int && we), $sformatf("int_we @%h", a));
        check(ext_re === (!is_int && re), $sformatf("ext_re @%h", a));
        check(ext_we === (!is_int && we), $sformatf("ext_we @%h", a));
        check(rdata === (is_int ? int_rdata : ext_rdata), $sformatf("rdata @%h", a));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
