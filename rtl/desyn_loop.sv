// desyn_loop: a self-timed loop in the style of the de-synchronisation
// design studies: one desyn-element (master and slave latch with their
// semi-decoupled controllers) whose output data goes through a block of
// combinational logic and back to its input, while its output request goes
// through a matched delay and back as its input request.
//
// How it works:
//   - the element's output channel (q, request, acknowledge) is forked
//     (hs_fork) to the loop path and to an observer channel
//     (obs_req/obs_ack), which can watch every value q takes, as the
//     monitor of the second design study did;
//   - on the loop path the request passes the matched delay, which is
//     outside this block between req_to_delay and req_from_delay;
//   - the delayed request is joined (hs_join) with an external token
//     channel (ext_req/ext_ack) before it reaches the element's input, so
//     one loop cycle runs per external token and the loop stalls while no
//     token is offered. Holding ext_req high on every cycle lets it run
//     freely.
// The combinational logic is a W-bit incrementer, so q counts completed
// loop cycles, starting from 0 after reset.
//
// Interface: rst_n; req_to_delay/req_from_delay (matched delay, must be
// longer than the incrementer); ext_req/ext_ack (4-phase token input);
// obs_req/obs_ack (4-phase output, q valid from obs_req+ to obs_ack+); q.
// Timing: no clock; the cycle time is the delay plus the controllers'
// gate delays, or the token rate if slower.
// The element, the delay and the loop follow the document's drawing of the
// first design study; the incrementer, W = 8, the observer fork and the
// token join are this design's own choices (the document does not say
// what the logic computed). The data path q -> incrementer -> master latch
// -> slave latch -> q is a loop through latches that are never open at the
// same time; a linter reports it, and the controller loops, as circular
// combinational logic, which is the nature of this circuit.
module desyn_loop #(
  parameter int unsigned W = 8
) (
  input  logic         rst_n,
  output logic         req_to_delay,
  input  logic         req_from_delay,
  input  logic         ext_req,
  output logic         ext_ack,
  output logic         obs_req,
  input  logic         obs_ack,
  output logic [W-1:0] q
);
  logic         in_req, in_ack, out_req, out_ack;
  logic [1:0]   j_ack, f_req;
  logic [W-1:0] d;

  assign d = q + W'(1);

  desyn_element #(.W(W), .INIT('0)) u_elem (
    .rst_n, .d, .rin(in_req), .ain(in_ack),
    .q, .rout(out_req), .aout(out_ack)
  );

  hs_fork #(.N(2)) u_fork (
    .rst_n, .rin(out_req), .ain(out_ack),
    .rout(f_req), .aout({obs_ack, j_ack[0]})
  );
  assign req_to_delay = f_req[0];
  assign obs_req      = f_req[1];

  hs_join #(.N(2)) u_join (
    .rst_n, .rin({ext_req, req_from_delay}), .ain(j_ack),
    .rout(in_req), .aout(in_ack)
  );
  assign ext_ack = j_ack[1];
endmodule
