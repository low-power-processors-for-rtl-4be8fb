// semi_decoupled_ctrl: semi-decoupled 4-phase bundled-data latch controller
// (Furber and Day) used to replace the clock of one latch in a
// de-synchronised circuit.
//
// How it works: two asymmetric C-elements.
//   A    = C(a = rin, b = rout, c = aout): set by rin & ~rout, cleared by
//          ~rin & rout & aout. A is the input acknowledge (ain) and drives
//          the latch: the latch is closed while A is high.
//   rout = C(a = A, b = aout, +): set by A & ~aout, cleared by ~A.
// So an input request closes the latch and acknowledges it (A+), the output
// request follows once the previous output handshake has finished
// (aout low), and the latch reopens (A-) only after the input request has
// been withdrawn and the receiver has acknowledged (aout high), which is
// what lets neighbouring latches overlap their handshakes.
//
// Interface: rst_n; input channel rin/ain; output channel rout/aout;
// latch_open (1 = transparent).
// Reset: FULL = 0 resets empty (A = 0, rout = 0, latch open); FULL = 1
// resets holding a valid token (A = 1, rout = 1, latch closed), which a
// ring of controllers needs in at least one stage to start.
// Timing: no clock; requests are bundled with data by a matched delay
// outside this block.
// The two C-element functions and the signal names follow the document's
// drawings; "latch open while A is low" (normally-open latch) and the two
// reset states are this design's own choices. The loop through the two
// C-elements (A feeds rout, rout feeds back into A) is the intended
// asynchronous state machine; a simulator or linter reports it as a
// circular combinational path on rout, which is expected for this circuit
// and settles because each C-element only changes when its set or reset
// term is true.
module semi_decoupled_ctrl #(
  parameter logic FULL = 1'b0
) (
  input  logic rst_n,
  input  logic rin,
  output logic ain,
  output logic rout,
  input  logic aout,
  output logic latch_open
);
  logic a;

  c_element #(.VARIANT(1), .INIT(FULL)) u_ca (.rst_n, .a(rin), .b(rout), .c(aout), .z(a));
  c_element #(.VARIANT(2), .INIT(FULL)) u_cr (.rst_n, .a(a),   .b(aout), .c(1'b0), .z(rout));

  assign ain        = a;
  assign latch_open = ~a;
endmodule
