// dff - one D flip-flop with clock enable, the storage cell every LFSR stage
// is built from (the LFSR instantiates it once per stage, as the design
// describes building its 16-bit register from one repeated flip-flop).
//
// On a rising clk edge with en high, q takes d; with en low, q holds.
// There is no reset: the shift register that uses it loads its start state
// (the seed) through d. The enable is this design's own addition, so the
// generator can be paused without gating the clock.
module dff (
  input  logic clk,
  input  logic en,
  input  logic d,
  output logic q
);
  always_ff @(posedge clk)
    if (en) q <= d;
endmodule
