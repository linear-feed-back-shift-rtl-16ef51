// sram_rng - SRAM-based multiple long-period random binary sequence
// generator (top level).
//
// Idea: a small table of words is stored in two SRAM banks and read back
// through two LFSR address sequences of different, co-prime-ish periods.
// The two read words are XORed into mum, a new WIDTH-bit random word every
// clock, i.e. WIDTH parallel binary sequences. Bank 1 is addressed by a
// 6-stage LFSR (period 63), bank 2 by the low address bits of a 16-stage
// LFSR (period 65535), so the address pair, and with it mum, repeats only
// after lcm(63, 65535) = 1,376,235 clocks although each bank holds only 64
// words. The 16-stage LFSR's serial bit is also brought out as prbs, a
// plain 16-bit PRBS, and its state as word16.
//
// Beside the SRAM generator stand the plain LFSR generators of 8, 10 and
// 32 stages that the design is compared with as its own work; each gives
// its whole state as a new word every clock (word8, word10, word32). They
// share clk and rst with the SRAM generator and are otherwise independent.
//
// Interface:
//   rst        synchronous, active high: loads SEED1/SEED2 into the address
//              LFSRs; they do not step while rst is high. SRAM contents are
//              untouched.
//   we         write enable: din1/din2 are written at the current addresses
//              (and appear on dout11/dout22 one clock later).
//   dout11/22  the registered bank read words, mum = dout11 ^ dout22.
//   word8/10/16/32  state words of the 8, 10, 16 and 32-stage LFSRs.
// Timing: the LFSRs step every clock out of reset; the word read at the
// address pair of clock k appears on dout11/dout22/mum after edge k
// (one-clock read latency), so one 8-bit word per clock.
//
// From the design: port names clk, we, din1, din2, dout11, dout22, mum; the
// two 64x8 banks with 64-to-1 read multiplexers and 8-bit registered
// outputs; the 8-bit XOR; LFSRs that shift right with XOR feedback to the
// left-most stage; LFSRs of 8, 10, 16 and 32 stages. This implementation's
// own choices: that the LFSRs drive the SRAM addresses, their lengths (6
// and 16), the tap polynomials, the seeds, the reset, write-first writes at
// the read address, and housing the plain LFSR generators in the same top.
// Address 0 of bank 1 is never visited because a 6-stage LFSR never
// reaches zero. The serial bits p8, p10, p32 and a1_prbs are left unused:
// they are bit 0 of the state words already brought out.
module sram_rng #(
  parameter int unsigned DEPTH   = lfsr_pkg::DEPTH,
  parameter int unsigned WIDTH   = lfsr_pkg::WORD_W,
  parameter int unsigned A1_BITS = 6,
  parameter int unsigned A2_BITS = 16,
  parameter logic [A1_BITS-1:0] SEED1 = A1_BITS'(1),
  parameter logic [A2_BITS-1:0] SEED2 = A2_BITS'(16'hACE1),
  parameter logic [7:0]         SEED8  = 8'h01,
  parameter logic [9:0]         SEED10 = 10'h001,
  parameter logic [31:0]        SEED32 = 32'h0000_0001
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             we,
  input  logic [WIDTH-1:0] din1,
  input  logic [WIDTH-1:0] din2,
  output logic [WIDTH-1:0] dout11,
  output logic [WIDTH-1:0] dout22,
  output logic [WIDTH-1:0] mum,
  output logic             prbs,
  output logic [A2_BITS-1:0] word16,
  output logic [7:0]       word8,
  output logic [9:0]       word10,
  output logic [31:0]      word32
);
  localparam int unsigned ADDR_W = $clog2(DEPTH);

  logic [A1_BITS-1:0] a1_state;
  logic [A2_BITS-1:0] a2_state;
  logic               a1_prbs;
  logic               p8, p10, p32;

  lfsr #(.WIDTH(A1_BITS)) u_addr1 (
    .clk   (clk),
    .en    (1'b1),
    .load  (rst),
    .seed  (SEED1),
    .state (a1_state),
    .prbs  (a1_prbs)
  );

  lfsr #(.WIDTH(A2_BITS)) u_addr2 (
    .clk   (clk),
    .en    (1'b1),
    .load  (rst),
    .seed  (SEED2),
    .state (a2_state),
    .prbs  (prbs)
  );

  mp_sram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) u_sram (
    .clk    (clk),
    .we     (we),
    .addr1  (a1_state[ADDR_W-1:0]),
    .addr2  (a2_state[ADDR_W-1:0]),
    .din1   (din1),
    .din2   (din2),
    .dout11 (dout11),
    .dout22 (dout22)
  );

  assign word16 = a2_state;

  // Stand-alone LFSR generators of the other evaluated widths.
  lfsr #(.WIDTH(8)) u_lfsr8 (
    .clk(clk), .en(1'b1), .load(rst), .seed(SEED8), .state(word8), .prbs(p8)
  );
  lfsr #(.WIDTH(10)) u_lfsr10 (
    .clk(clk), .en(1'b1), .load(rst), .seed(SEED10), .state(word10), .prbs(p10)
  );
  lfsr #(.WIDTH(32)) u_lfsr32 (
    .clk(clk), .en(1'b1), .load(rst), .seed(SEED32), .state(word32), .prbs(p32)
  );

  xor_combiner #(.WIDTH(WIDTH)) u_xor (
    .a (dout11),
    .b (dout22),
    .y (mum)
  );

  initial begin
    assert (A1_BITS >= ADDR_W && A2_BITS >= ADDR_W)
      else $error("sram_rng: address LFSRs narrower than the SRAM address");
  end
endmodule
