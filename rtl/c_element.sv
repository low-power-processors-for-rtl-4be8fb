// c_element: Muller C-element, the state-holding gate of the asynchronous
// (Disa) handshake circuits.
//
// How it works: the output is z = z_set + z & ~z_reset; it is set when
// z_set holds, cleared when z_reset holds, and otherwise keeps its value.
// VARIANT selects the set/reset functions:
//   0  symmetric 2-input C-element: set = a & b, reset = ~a & ~b
//      (all inputs 1 -> 1, all 0 -> 0, otherwise hold);
//   1  asymmetric element (a): set = a & ~b, reset = ~a & b & c
//      (b inverted on both sides, c inverted and used only for reset);
//   2  asymmetric element (b): set = a & ~b, reset = ~a
//      (b inverted and used only for set).
// Variants 1 and 2 are the two elements of the semi-decoupled latch
// controller. The state is held in a level-sensitive latch; set and reset
// are never true together in any variant, so the latch data is simply
// "set". An active-low reset forces the output to INIT.
//
// Interface: rst_n, a, b, c (c unused in variants 0 and 2), z.
// Timing: none; the output follows its inputs after gate delays only.
// The three set/reset functions follow the document; building the element
// as a latch with an enable (instead of a gate with feedback) and the
// reset input are this design's own choices. The latch is intended:
// synthesis maps it to a latch cell, which keeps the state-holding
// function from being optimised away.
module c_element #(
  parameter int   VARIANT = 0,
  parameter logic INIT    = 1'b0
) (
  input  logic rst_n,
  input  logic a,
  input  logic b,
  input  logic c,
  output logic z
);
  logic z_set, z_reset;

  always_comb begin
    unique case (VARIANT)
      1: begin z_set = a & ~b; z_reset = ~a & b & c; end
      2: begin z_set = a & ~b; z_reset = ~a;         end
      default: begin z_set = a & b; z_reset = ~a & ~b; end
    endcase
  end

  always_latch begin
    if (!rst_n)                 z = INIT;
    else if (z_set || z_reset)  z = z_set;
  end
endmodule
