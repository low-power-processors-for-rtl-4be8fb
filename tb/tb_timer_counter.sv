// tb_timer_counter: checks Timer/Counter0.
//  - counting period for every prescaler setting (1, 8, 32, 64, 128, 256,
//    1024 clocks per count), measured between two counter changes;
//  - overflow flag exactly 256 counts after TCNT0 = 0 in normal mode;
//  - clear-on-compare: with OCR0 = 9 the compare flag is set every 10
//    counts and TCNT0 returns to 0;
//  - interrupt outputs follow flag AND mask, flags clear by writing 1 and by
//    the core's interrupt acknowledge;
//  - with AS0 set the counter advances once per external clock rising edge.
`timescale 1ns/1ps
module tb_timer_counter;
  import nimbus_pkg::*;
  logic       clk = 0, clk_ext = 0, rst_n = 0, io_we = 0, hit, irq_comp, irq_ovf, irqack = 0;
  logic [5:0] io_addr = 0;
  logic [7:0] io_wdata = 0, rdata;
  logic [4:0] irqackad = 0;
  timer_counter dut (.*);
  always #5 clk = ~clk;
  always #35 clk_ext = ~clk_ext;   // external clock period 70 ns = 7 clocks

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask
  initial begin
    #5000000; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic wr(input logic [5:0] a, input logic [7:0] d);
    @(negedge clk); io_addr = a; io_wdata = d; io_we = 1;
    @(posedge clk); #1 io_we = 0;
  endtask
  logic [7:0] rv;   // value read by rd()
  task automatic rd(input logic [5:0] a);
    io_addr = a; #0.1; rv = rdata;
  endtask
  task automatic period(output int n);   // clocks between the 2nd and 3rd counter change
    logic [7:0] v;
    int k;
    for (int c = 0; c < 2; c++) begin
      v = dut.tcnt; k = 0;
      while (dut.tcnt == v && k < 5000) begin @(posedge clk); #1; k++; end
    end
    v = dut.tcnt; n = 0;
    while (dut.tcnt == v && n < 5000) begin @(posedge clk); #1; n++; end
  endtask

  localparam int DIV [8] = '{0, 1, 8, 32, 64, 128, 256, 1024};
  initial begin
    int n;
    #12 rst_n = 1;
    for (int cs = 1; cs < 8; cs++) begin
      wr(IO_TCCR0, 8'(cs));
      period(n);
      check(n == DIV[cs], $sformatf("prescaler %0d: period %0d", cs, n));
    end
    // overflow in normal mode
    wr(IO_TCCR0, 0); wr(IO_TIFR, 8'h03); wr(IO_TIMSK, 8'h01); wr(IO_TCNT0, 0);
    rd(IO_TIFR);
    check(!irq_ovf && rv == 0, "flags cleared by writing 1");
    wr(IO_TCCR0, 1);
    n = 0;
    while (!irq_ovf && n < 1000) begin @(posedge clk); #1; n++; end
    check(n == 256, $sformatf("overflow after %0d clocks (256)", n));
    rd(IO_TCNT0);
    check(rv == 0, "counter wrapped to 0");
    @(negedge clk); irqack = 1; irqackad = 5'(IRQ_T0_OVF); @(posedge clk); #1 irqack = 0;
    check(!irq_ovf, "overflow flag cleared by acknowledge");
    // clear on compare
    wr(IO_TCCR0, 0); wr(IO_OCR0, 9); wr(IO_TIMSK, 8'h02); wr(IO_TIFR, 8'h03); wr(IO_TCNT0, 0);
    wr(IO_TCCR0, 8'h09);
    for (int i = 0; i < 3; i++) begin
      n = 0;
      while (!irq_comp && n < 1000) begin @(posedge clk); #1; n++; end
      check(n == ((i == 0) ? 10 : 9), $sformatf("compare after %0d clocks", n));
      rd(IO_TCNT0);
      check(rv == 0, "counter cleared on compare");
      wr(IO_TIFR, 8'h02);
      check(!irq_comp, "compare flag cleared by writing 1");
    end
    wr(IO_TIMSK, 8'h00);
    repeat (20) @(posedge clk); #1;
    rd(IO_TIFR);
    check(!irq_comp && rv[1], "flag set but masked");
    wr(IO_TIFR, 8'h02);
    // external clock
    wr(IO_TCCR0, 0); wr(IO_OCR0, 8'hFF); wr(IO_ASSR, 8'h08); wr(IO_TCNT0, 0);
    rd(IO_ASSR);
    check(rv == 8'h08, "ASSR reads back AS0");
    wr(IO_TCCR0, 8'h01);
    #(70 * 20);
    rd(IO_TCNT0);
    n = rv;
    check(n >= 19 && n <= 21, $sformatf("%0d counts in 20 external clocks", n));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
