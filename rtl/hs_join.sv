// hs_join: 4-phase handshake join. N senders are combined into one request
// that rises when all of them have requested and falls when all have
// withdrawn; the receiver's acknowledge goes back to every sender.
//
// How it works: rout is an N-input C-element of the requests; every ain is
// a copy of aout.
//
// Interface: rst_n, rin[N-1:0], ain[N-1:0], rout, aout.
// Timing: no clock. Function as described in the document for joins; the
// circuit and the default N = 2 are this design's own choices. The
// C-element state latch is intended.
module hs_join #(
  parameter int unsigned N = 2
) (
  input  logic         rst_n,
  input  logic [N-1:0] rin,
  output logic [N-1:0] ain,
  output logic         rout,
  input  logic         aout
);
  assign ain = {N{aout}};

  always_latch begin
    if (!rst_n)        rout = 1'b0;
    else if (&rin)     rout = 1'b1;
    else if (!(|rin))  rout = 1'b0;
  end
endmodule
