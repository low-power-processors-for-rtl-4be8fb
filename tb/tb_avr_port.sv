// tb_avr_port: checks a parallel port at its default addresses (port B:
// PORTB 0x18, DDRB 0x17, PINB 0x16). PORT and DDR writes must reach the
// outputs one clock later and read back; PIN must read the pins one clock
// after they change (one synchroniser stage); other addresses must not hit.
`timescale 1ns/1ps
module tb_avr_port;
  import nimbus_pkg::*;
  logic       clk = 0, rst_n = 0, io_we = 0, hit;
  logic [5:0] io_addr = 0;
  logic [7:0] io_wdata = 0, rdata, pins_in = 0, port_out, ddr_out;
  avr_port dut (.*);
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
    logic [7:0] p, d, pin;
    p = 0; d = 0; pin = 0;
    #12 rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      io_addr = (i % 4 == 3) ? 6'($urandom) : 6'(IO_PINB + i % 4);
      io_we = $urandom % 2; io_wdata = 8'($urandom);
      #1;
      check(port_out === p && ddr_out === d, "outputs");
      check(hit === (io_addr inside {IO_PORTB, IO_DDRB, IO_PINB}), "hit");
      case (io_addr)
        IO_PORTB: check(rdata === p, "read PORTB");
        IO_DDRB:  check(rdata === d, "read DDRB");
        IO_PINB:  check(rdata === pin, $sformatf("read PINB %h exp %h", rdata, pin));
        default:  check(rdata === 8'h00, "read other");
      endcase
      @(posedge clk);
      if (io_we && io_addr == IO_PORTB) p = io_wdata;
      if (io_we && io_addr == IO_DDRB)  d = io_wdata;
      pin = pins_in;
      #2 pins_in = 8'($urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
