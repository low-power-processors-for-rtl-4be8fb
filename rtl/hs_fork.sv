// hs_fork: 4-phase handshake fork. One request is sent to N receivers and
// the sender is acknowledged only when all of them have acknowledged.
//
// How it works: every rout is a copy of rin; ain is an N-input C-element
// of the acknowledges (1 when all are 1, 0 when all are 0, otherwise
// unchanged), so the return-to-zero phase also waits for every receiver.
//
// Interface: rst_n, rin, ain, rout[N-1:0], aout[N-1:0].
// Timing: no clock. The function follows the document's description of
// forks and joins between asynchronous components; the document gives no
// schematic, so this is the simplest circuit that performs it. N = 2 is
// this design's default. The C-element state latch is intended.
module hs_fork #(
  parameter int unsigned N = 2
) (
  input  logic         rst_n,
  input  logic         rin,
  output logic         ain,
  output logic [N-1:0] rout,
  input  logic [N-1:0] aout
);
  assign rout = {N{rin}};

  always_latch begin
    if (!rst_n)          ain = 1'b0;
    else if (&aout)      ain = 1'b1;
    else if (!(|aout))   ain = 1'b0;
  end
endmodule
