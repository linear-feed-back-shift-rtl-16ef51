// lfsr - maximal-length Fibonacci linear feedback shift register.
//
// A lfsr_shift_reg of WIDTH stages shifts right each enabled clock; its
// new left-most bit is the XOR of the tapped stages (lfsr_feedback). With
// a maximal-length tap mask and a non-zero seed the state runs through all
// 2^WIDTH-1 non-zero values before it repeats; the all-zero state is the
// lock-up state and is never reached from a non-zero seed. A zero seed is
// replaced by 1 on load so the register cannot lock up (this design's own
// guard; the document only notes that the all-zero state is excluded).
//
// Ports: load (priority over en) writes seed into the register on the next
// clock; en advances one step per clock. prbs is the serial pseudo-random
// bit (stage 0) and state the whole WIDTH-bit register, one new word each
// enabled clock. The document builds 8, 10, 16 and 32-bit versions and
// gives the 16-bit one as its worked example, hence WIDTH = 16.
module lfsr #(
  parameter int unsigned       WIDTH = 16,
  parameter logic [WIDTH-1:0]  TAPS  = WIDTH'(lfsr_pkg::max_taps(WIDTH))
) (
  input  logic             clk,
  input  logic             en,
  input  logic             load,
  input  logic [WIDTH-1:0] seed,
  output logic [WIDTH-1:0] state,
  output logic             prbs
);
  logic             fb;
  logic [WIDTH-1:0] safe_seed;

  always_comb safe_seed = (seed == '0) ? WIDTH'(1) : seed;

  lfsr_feedback #(.WIDTH(WIDTH), .TAPS(TAPS)) u_fb (
    .state (state),
    .fb    (fb)
  );

  lfsr_shift_reg #(.WIDTH(WIDTH)) u_sr (
    .clk        (clk),
    .en         (en),
    .load       (load),
    .seed       (safe_seed),
    .shift_in   (fb),
    .q          (state),
    .serial_out (prbs)
  );

  initial begin
    assert (WIDTH >= 2 && WIDTH <= lfsr_pkg::MAX_WIDTH)
      else $error("lfsr: WIDTH %0d outside 2..%0d", WIDTH, lfsr_pkg::MAX_WIDTH);
    assert (TAPS[0])
      else $error("lfsr: tap mask must include stage 0 for a maximal sequence");
  end
endmodule
