// xor_combiner - bitwise XOR of the two SRAM read words.
//
// mum = dout11 ^ dout22, combinational, WIDTH bits. Each output bit is one
// of WIDTH parallel pseudo-random binary sequences; XOR-ing two words read
// through independent address sequences gives a sequence whose period is
// the least common multiple of the two address periods. The XOR and the
// signal names follow the design's waveform, where every mum value equals
// the XOR of the dout11 and dout22 values beside it.
module xor_combiner #(
  parameter int unsigned WIDTH = lfsr_pkg::WORD_W
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] y
);
  always_comb y = a ^ b;
endmodule
