// delay_line: behavioural model of the matched delay element that bundles
// a request with its data in the de-synchronised circuits. It is a timing
// part with no logic function (in silicon, a chain of gates sized to be
// slower than the logic it matches), so it exists only as a simulation
// model: the output follows the input after DELAY ns (transport delay).
`timescale 1ns/1ps
module delay_line #(
  parameter real DELAY = 2.0
) (
  input  logic a,
  output logic z
);
  always @(a) z <= #(DELAY) a;
endmodule
