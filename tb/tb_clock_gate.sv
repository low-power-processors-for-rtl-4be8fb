// tb_clock_gate: drives the enable with random changes at random times
// within the clock period and checks that the gated clock
//  - is the input clock ANDed with the enable sampled at the last falling
//    edge (a change takes effect on the next rising edge),
//  - never shows a high pulse shorter than the input clock's high phase,
//  - stays low while disabled, and runs after reset.
`timescale 1ns/1ps
module tb_clock_gate;
  logic clk = 0, rst_n = 1, en = 0, gclk;
  clock_gate dut (.*);
  always #50 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask
  initial begin
    #2000000; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  realtime rise_t;
  int pulses = 0;
  always @(posedge gclk) rise_t = $realtime;
  bit started = 0;  // ignore the settling of power-up values at time zero
  always @(negedge gclk) if (rst_n && started) begin
    check($realtime - rise_t >= 49.999, $sformatf("pulse %0.2f ns", $realtime - rise_t));
    pulses++;
  end

  logic en_at_fall = 1;
  always @(negedge clk) en_at_fall <= rst_n ? en : 1'b1;

  initial begin
    #1 rst_n = 0; started = 1;
    check(gclk === 1'b0, "low while clk low");
    #60;
    check(gclk === 1'b1, "runs during reset");
    #60 rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      #($urandom_range(1, 99));
      if ($time % 50 == 0) #1;
      en = $urandom % 2;
      #1;
      if ($time % 50 != 0) check(gclk === (clk & en_at_fall), $sformatf("gclk = clk & enable sampled at falling edge (t=%0t)", $time));
    end
    check(pulses > 100, "gated clock ran");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
