// mp_sram - two-bank, multiple-port SRAM of the random number generator.
//
// Two independent banks of DEPTH words of WIDTH bits (64 x 8 each by
// default: 128 word registers in all). Each bank has one address, used by
// its write port and its read port alike, and one registered read port
// whose word is picked by a DEPTH-to-1 multiplexer. The two banks share
// the write enable we, so one clock stores din1 in bank 1 and din2 in
// bank 2.
//
// Timing, per rising clk edge:
//   we = 1 : bank1[addr1] <= din1, bank2[addr2] <= din2, and the read
//            registers take the words being written (write-first), so
//            dout11/dout22 show din1/din2 one clock later;
//   we = 0 : dout11 <= bank1[addr1], dout22 <= bank2[addr2].
// Read latency is one clock, one word per port per clock. The contents are
// not reset, as in an SRAM: they are meaningful only after being written.
// The sizes follow the design's synthesis results (64-to-1 multiplexers,
// 8-bit registers); sharing one address between a bank's write and read
// port and the write-first behaviour are this design's choices, picked to
// match the published waveform in which the read word follows the written
// word by one clock.
module mp_sram #(
  parameter int unsigned DEPTH  = lfsr_pkg::DEPTH,
  parameter int unsigned WIDTH  = lfsr_pkg::WORD_W,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr1,
  input  logic [ADDR_W-1:0] addr2,
  input  logic [WIDTH-1:0]  din1,
  input  logic [WIDTH-1:0]  din2,
  output logic [WIDTH-1:0]  dout11,
  output logic [WIDTH-1:0]  dout22
);
  logic [WIDTH-1:0] bank1 [DEPTH];
  logic [WIDTH-1:0] bank2 [DEPTH];

  always_ff @(posedge clk) begin
    if (we) begin
      bank1[addr1] <= din1;
      dout11       <= din1;
    end else begin
      dout11       <= bank1[addr1];
    end
  end

  always_ff @(posedge clk) begin
    if (we) begin
      bank2[addr2] <= din2;
      dout22       <= din2;
    end else begin
      dout22       <= bank2[addr2];
    end
  end
endmodule
