// c_element: N-input Muller C-element.
//
// The output rises when all inputs are 1, falls when all inputs are 0 and
// otherwise keeps its value.  STTL cells use it so that a gate output can
// only fire once per computation and never glitches (hazard-free inputs for
// the OR gates that follow).  It is written as a level-sensitive latch that
// is open only while the inputs agree: on an FPGA it maps to one LUT with
// its output fed back, as in the hard macros of the STTL cells.
//
// There is no reset wire: driving all inputs to 0 (the STTL spacer) clears
// the element, and every STTL circuit starts from the spacer.
//
// Interface: in[N-1:0] -> out.  Purely combinational/asynchronous, no clock.
// Circuit warning: the latch is the C-element's state and is intended.
module c_element #(
  parameter int unsigned N = 2
) (
  input  logic [N-1:0] in,
  output logic         out
);

  logic agree;

  assign agree = (&in) | (~|in);

  always_latch begin
    if (agree) out = in[0];
  end

endmodule
