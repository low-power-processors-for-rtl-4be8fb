// desyn_element: de-synchronised replacement of a W-bit master-slave
// flip-flop register: a master latch and a slave latch, each with its own
// semi-decoupled latch controller.
//
// How it works: the master controller takes the input request rin and
// acknowledges with ain; its output request goes to the slave controller,
// whose acknowledge returns to the master. The slave's output request is
// rout, acknowledged by aout. The master resets empty and the slave resets
// full, holding the value INIT as the element's first output token, the
// same way a flip-flop holds its reset value before the first clock.
//
// Interface: rst_n; d/rin/ain input channel (d must be stable from rin+
// until ain+); q/rout/aout output channel (q is valid from rout+ until
// aout+).
// Timing: no clock; one token passes per full 4-phase handshake on each
// side.
// The structure (master latch + master control + slave latch + slave
// control) follows the document; the width and INIT parameters, the
// reset states and the normally-open latches are this design's own
// choices. The two data latches are intended, and so are the loops between
// the two controllers (the master's acknowledge depends on the slave's and
// the other way round), which a linter reports as circular combinational
// logic.
module desyn_element #(
  parameter int unsigned W    = 8,
  parameter logic [W-1:0] INIT = '0
) (
  input  logic         rst_n,
  input  logic [W-1:0] d,
  input  logic         rin,
  output logic         ain,
  output logic [W-1:0] q,
  output logic         rout,
  input  logic         aout
);
  logic         m_rout, s_ain, m_open, s_open;
  logic [W-1:0] m_q;

  semi_decoupled_ctrl #(.FULL(1'b0)) u_mctl (.rst_n, .rin, .ain, .rout(m_rout), .aout(s_ain), .latch_open(m_open));
  semi_decoupled_ctrl #(.FULL(1'b1)) u_sctl (.rst_n, .rin(m_rout), .ain(s_ain), .rout, .aout, .latch_open(s_open));

  always_latch begin
    if (!rst_n)      m_q = INIT;
    else if (m_open) m_q = d;
  end

  always_latch begin
    if (!rst_n)      q = INIT;
    else if (s_open) q = m_q;
  end
endmodule
