// lfsr_shift_reg - WIDTH-stage right-shifting register built from one dff
// per stage.
//
// Each enabled clock, stage i takes stage i+1, the top stage takes
// shift_in (the LFSR feedback bit) and stage 0, the least significant bit,
// is the serial output. With load high the stages instead take seed
// (the "FILL" start state) on the next enabled clock. All stages are
// visible on q. Timing: q and serial_out change one clock after the edge
// on which en is sampled high. Shifting right with the LSB as output
// follows the design; the parallel load port is this design's own choice
// for setting the start state.
module lfsr_shift_reg #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             en,
  input  logic             load,
  input  logic [WIDTH-1:0] seed,
  input  logic             shift_in,
  output logic [WIDTH-1:0] q,
  output logic             serial_out
);
  logic [WIDTH-1:0] d;

  // Next value of every stage: the seed on load, else the right shift.
  always_comb begin
    if (load) d = seed;
    else      d = {shift_in, q[WIDTH-1:1]};
  end

  for (genvar i = 0; i < WIDTH; i++) begin : g_stage
    dff u_dff (.clk(clk), .en(en | load), .d(d[i]), .q(q[i]));
  end

  assign serial_out = q[0];
endmodule
