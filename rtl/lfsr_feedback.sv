// lfsr_feedback - the feedback function of a Fibonacci LFSR.
//
// fb is the modulo-2 sum (XOR) of the state bits selected by TAPS: bit i of
// TAPS set means state[i] is a tap. The design feeds fb back to the
// left-most (most significant) stage of the shift register. Purely
// combinational. The default tap mask is the maximal-length one for the
// default width from lfsr_pkg::max_taps; the document names no taps.
module lfsr_feedback #(
  parameter int unsigned       WIDTH = 16,
  parameter logic [WIDTH-1:0]  TAPS  = WIDTH'(lfsr_pkg::max_taps(WIDTH))
) (
  input  logic [WIDTH-1:0] state,
  output logic             fb
);
  always_comb fb = ^(state & TAPS);
endmodule
