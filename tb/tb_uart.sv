// tb_uart: checks the UART with UBRR = 1, i.e. one bit every 2 x 16 = 32
// clocks.
//  - Transmit: a write to UDR produces a start bit, eight data bits LSB
//    first and a stop bit, each 32 clocks long; UDRE falls on the write and
//    rises when the byte moves to the shift register; TXC and its interrupt
//    follow the end of the stop bit; a second byte written while the first
//    is sent follows it back to back (at most one clock between the stop
//    bit and the next start bit).
//  - Receive: frames driven by the testbench set RXC and the receive
//    interrupt with the byte in UDR; reading UDR clears RXC; a 0 stop bit
//    sets FE; a second frame before UDR is read sets OR.
`timescale 1ns/1ps
module tb_uart;
  import nimbus_pkg::*;
  logic       clk = 0, rst_n = 0, io_re = 0, io_we = 0, hit, rxd = 1, txd;
  logic       irq_rx, irq_udre, irq_tx, irqack = 0;
  logic [5:0] io_addr = 0;
  logic [7:0] io_wdata = 0, rdata;
  logic [4:0] irqackad = 0;
  uart dut (.*);
  always #5 clk = ~clk;
  localparam int BIT = 32;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask
  initial begin
    #2000000; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic wr(input logic [5:0] a, input logic [7:0] d);
    @(negedge clk); io_addr = a; io_wdata = d; io_we = 1;
    @(posedge clk); #1 io_we = 0;
  endtask
  logic [7:0] pv;   // value read by peek()
  task automatic peek(input logic [5:0] a);
    io_addr = a; #0.1; pv = rdata;
  endtask
  task automatic rd_udr(output logic [7:0] d);
    @(negedge clk); io_addr = IO_UDR; io_re = 1; #1 d = rdata;
    @(posedge clk); #1 io_re = 0;
  endtask
  task automatic send(input logic [7:0] b, input logic stop);
    rxd = 0; repeat (BIT) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (BIT) @(posedge clk); end
    rxd = stop; repeat (BIT) @(posedge clk);
    rxd = 1; repeat (BIT) @(posedge clk);
  endtask

  // transmit monitor: measures every bit length
  logic [7:0] got [$];
  int fall_t [$];   // start-bit times
  initial begin
    logic [7:0] b;
    int n;
    forever begin
      @(negedge txd);
      fall_t.push_back($time);
      n = 0;
      for (int i = 0; i < 9; i++) begin
        // sample in the middle of each bit, and check the edges fall on the grid
        repeat (BIT / 2) @(posedge clk);
        if (i == 0) check(txd == 0, "start bit");
        else b[i-1] = txd;
        repeat (BIT / 2) @(posedge clk);
      end
      repeat (BIT / 2) @(posedge clk);
      check(txd == 1, "stop bit");
      got.push_back(b);
    end
  end

  initial begin
    logic [7:0] d, s;
    int n;
    #12 rst_n = 1;
    wr(IO_UBRR, 1);
    wr(IO_UCR, 8'hF8);   // RXCIE TXCIE UDRIE RXEN TXEN
    peek(IO_UCR); s = pv;
    peek(IO_UBRR);
    check(s == 8'hF8 && pv == 1, "control registers read back");
    peek(IO_USR);
    check(irq_udre && pv[5], "UDRE set after reset");
    wr(IO_UDR, 8'hA5);
    @(posedge clk); #1;
    check(irq_udre, "UDRE back after the byte moves to the shift register");
    wr(IO_UDR, 8'h3C);
    check(!irq_udre, "UDRE low while a byte waits");
    n = 0;
    while (!irq_tx && n < 2000) begin @(posedge clk); #1; n++; end
    check(got.size() == 2 && got[0] == 8'hA5 && got[1] == 8'h3C, "two bytes sent");
    check(fall_t.size() == 2 && (fall_t[1] - fall_t[0]) >= 10 * BIT * 10 && (fall_t[1] - fall_t[0]) <= 10 * BIT * 10 + 10,
          $sformatf("frames back to back (within one clock), %0d ns apart", (fall_t.size() == 2) ? fall_t[1] - fall_t[0] : -1));
    check(n > 0 && n < 2000, "TXC interrupt at the end");
    @(negedge clk); irqack = 1; irqackad = 5'(IRQ_UART_TX); @(posedge clk); #1 irqack = 0;
    check(!irq_tx, "TXC cleared by acknowledge");
    // receive
    send(8'h5A, 1);
    peek(IO_USR);
    check(irq_rx && pv[7], "RXC after a frame");
    rd_udr(d);
    check(d == 8'h5A, $sformatf("received %h", d));
    check(!irq_rx, "reading UDR clears RXC");
    send(8'h81, 0);
    peek(IO_USR); s = pv;
    check(s[4], "framing error on a 0 stop bit");
    send(8'h18, 1);
    peek(IO_USR); s = pv;
    check(s[3] && !s[4], "overrun when UDR was not read");
    rd_udr(d);
    check(d == 8'h18, "newest byte in UDR");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
