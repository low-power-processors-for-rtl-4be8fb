// clock_gate: glitch-free clock gate. The enable is sampled on the falling
// edge of 'clk' and ANDed with it, so the gated clock can only stop or start
// while 'clk' is low and never produces a shortened pulse: a stopped clock
// rests low, and it restarts with the next full high phase after the enable
// returns. Reset leaves the clock running.
module clock_gate (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic gclk
);
  logic en_q;

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) en_q <= 1'b1;
    else        en_q <= en;
  end

  assign gclk = clk & en_q;
endmodule
