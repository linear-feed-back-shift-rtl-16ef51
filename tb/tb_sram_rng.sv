// tb_sram_rng - end-to-end, self-checking testbench of the SRAM random
// number generator at its default parameters (64 x 8 banks, 6-stage and
// 16-stage address LFSRs).
//
// The testbench keeps its own model: the two address LFSRs written as their
// recurrences (x^6+x^5+1 and x^16+x^15+x^13+x^4+1, shifting right) and two
// 64-word arrays, plus the 8, 10 and 32-stage generators as the recurrences
// of x^8+x^6+x^5+x^4+1, x^10+x^7+1 and x^32+x^22+x^2+x+1. One complete
// operation is: reset (seed load); fill, writing random words until every address the LFSRs reach
// has been written; generate, reading for 1,376,235 + 256 clocks; reset
// again; read 200 more clocks.
// Every clock dout11, dout22, mum, prbs (bit 0 of the 16-stage LFSR) and
// the four LFSR state words are compared with the model. Words never written are not compared, since
// SRAM contents start unknown. This also checks the rate of one new 8-bit
// word per clock and the one-clock read latency. Further checks: mum
// repeats with the full period lcm(63, 65535) = 1,376,235 and does not
// repeat with the period of either address LFSR alone (63 or 65535).
// Mechanisms counted and required at least once: seed load, write with
// write-first read-back, read, bank-1 address wrap (period 63), bank-2
// address wrap (period 65535), full period of mum, return of the 8 and
// 10-stage generators to their seeds (periods 255 and 1023).
module tb_sram_rng;
  localparam int P1   = 63;
  localparam int P2   = 65535;
  localparam int P    = 1376235;  // lcm(P1, P2)
  localparam int KEEP = 256;

  logic       clk = 1'b0;
  logic       rst, we;
  logic [7:0] din1, din2, dout11, dout22, mum;
  logic       prbs;
  logic [15:0] word16;
  logic [7:0]  word8;
  logic [9:0]  word10;
  logic [31:0] word32;
  logic [7:0]  m8;
  logic [9:0]  m10;
  logic [31:0] m32;
  int         checks = 0, failures = 0;

  sram_rng dut (
    .clk(clk), .rst(rst), .we(we), .din1(din1), .din2(din2),
    .dout11(dout11), .dout22(dout22), .mum(mum), .prbs(prbs),
    .word16(word16), .word8(word8), .word10(word10), .word32(word32)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (P + 5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- reference model ------------------------------------------------------
  logic [5:0]  m_a1;
  logic [15:0] m_a2;
  logic [7:0]  mem1 [64];
  logic [7:0]  mem2 [64];
  logic [7:0]  e1, e2;
  bit          w1 [64];        // model word written since start
  bit          w2 [64];
  bit          v1, v2;         // expected value is known
  bit          addr_known = 1'b0;

  int n_seed = 0, n_write = 0, n_read = 0, n_wrap1 = 0, n_wrap2 = 0, n_full = 0;
  int n_wrap8 = 0, n_wrap10 = 0;

  function automatic logic [5:0] next6(logic [5:0] s);
    return {s[0] ^ s[1], s[5:1]};
  endfunction
  function automatic logic [7:0] next8(logic [7:0] s);
    return {s[0] ^ s[2] ^ s[3] ^ s[4], s[7:1]};
  endfunction
  function automatic logic [9:0] next10(logic [9:0] s);
    return {s[0] ^ s[3], s[9:1]};
  endfunction
  function automatic logic [31:0] next32(logic [31:0] s);
    return {s[0] ^ s[10] ^ s[30] ^ s[31], s[31:1]};
  endfunction
  function automatic logic [15:0] next16(logic [15:0] s);
    return {s[0] ^ s[1] ^ s[3] ^ s[12], s[15:1]};
  endfunction

  // One clock: apply inputs, advance the model, compare after the edge.
  task automatic cycle(input logic r, input logic w, input logic [7:0] x1,
                       input logic [7:0] x2);
    @(negedge clk);
    rst = r; we = w; din1 = x1; din2 = x2;
    if (w) begin
      e1 = x1; e2 = x2; v1 = 1'b1; v2 = 1'b1; n_write++;
      if (addr_known) begin
        mem1[m_a1] = x1; mem2[m_a2[5:0]] = x2; w1[m_a1] = 1'b1; w2[m_a2[5:0]] = 1'b1;
      end
    end else begin
      e1 = mem1[m_a1]; e2 = mem2[m_a2[5:0]];
      v1 = addr_known && w1[m_a1]; v2 = addr_known && w2[m_a2[5:0]];
      if (v1 && v2) n_read++;
    end
    if (r) begin
      m_a1 = 6'd1; m_a2 = 16'hACE1; n_seed++; addr_known = 1'b1;
      m8 = 8'h01; m10 = 10'h001; m32 = 32'h1;
    end else begin
      m_a1 = next6(m_a1); m_a2 = next16(m_a2);
      m8 = next8(m8); m10 = next10(m10); m32 = next32(m32);
      if (m8 == 8'h01) n_wrap8++;
      if (m10 == 10'h001) n_wrap10++;
      if (m_a1 == 6'd1) n_wrap1++;
      if (m_a2 == 16'hACE1) n_wrap2++;
    end
    @(posedge clk);
    #1;
    if (v1) begin
      checks++;
      if (dout11 !== e1) begin failures++; if (failures < 10) $display("dout11 %h expected %h", dout11, e1); end
    end
    if (v2) begin
      checks++;
      if (dout22 !== e2) begin failures++; if (failures < 10) $display("dout22 %h expected %h", dout22, e2); end
    end
    if (addr_known) begin
      checks++;
      if (prbs !== m_a2[0]) begin failures++; if (failures < 10) $display("prbs %b expected %b", prbs, m_a2[0]); end
      checks += 4;
      if (word16 !== m_a2) begin failures++; if (failures < 10) $display("word16 %h expected %h", word16, m_a2); end
      if (word8  !== m8)   begin failures++; if (failures < 10) $display("word8 %h expected %h", word8, m8); end
      if (word10 !== m10)  begin failures++; if (failures < 10) $display("word10 %h expected %h", word10, m10); end
      if (word32 !== m32)  begin failures++; if (failures < 10) $display("word32 %h expected %h", word32, m32); end
    end
    if (v1 && v2) begin
      checks++;
      if (mum !== (e1 ^ e2)) begin failures++; if (failures < 10) $display("mum %h expected %h", mum, e1 ^ e2); end
    end
  endtask

  logic [7:0] first [KEEP];
  logic [7:0] hist  [P2 + KEEP];
  int         diff63, diff65535, n_fill;

  function automatic bit filled();
    for (int i = 1; i < 64; i++) if (!w1[i]) return 1'b0;
    for (int i = 0; i < 64; i++) if (!w2[i]) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    m_a1 = '0; m_a2 = '0;
    // seed load: the address LFSRs take their seeds
    cycle(1'b1, 1'b0, 8'h00, 8'h00);
    cycle(1'b1, 1'b1, 8'h14, 8'h35);
    // fill both banks with random words until every address the LFSRs
    // reach (bank 1: 1..63, bank 2: 0..63) has been written
    n_fill = 0;
    while (!filled() && n_fill < 5000) begin
      cycle(1'b0, 1'b1, 8'($urandom), 8'($urandom));
      n_fill++;
    end
    checks++;
    if (!filled()) begin failures++; $display("banks not filled after %0d writes", n_fill); end
    $display("banks filled after %0d write clocks", n_fill);
    // generate: read for the full period and a margin
    diff63 = 0; diff65535 = 0;
    for (int k = 0; k < P + KEEP; k++) begin
      cycle(1'b0, 1'b0, 8'($urandom), 8'($urandom));
      if (k < P2 + KEEP) hist[k] = mum;
      if (k < KEEP) first[k] = mum;
      if (k >= P1 && k < P1 + KEEP && hist[k - P1] != mum) diff63++;
      if (k >= P2 && k < P2 + KEEP && hist[k - P2] != mum) diff65535++;
      if (k >= P) begin
        checks++;
        if (first[k - P] !== mum) begin
          failures++;
          if (failures < 10) $display("mum does not repeat after %0d clocks", P);
        end
        if (k == P + KEEP - 1) n_full++;
      end
    end
    checks += 2;
    if (diff63 == 0) begin failures++; $display("mum repeats with period 63"); end
    if (diff65535 == 0) begin failures++; $display("mum repeats with period 65535"); end
    // reset in the middle of reading, then keep reading
    cycle(1'b1, 1'b0, 8'h00, 8'h00);
    for (int i = 0; i < 200; i++)
      cycle(1'b0, 1'b0, 8'($urandom), 8'($urandom));

    $display("mechanisms: seed_load=%0d write=%0d read=%0d wrap63=%0d wrap65535=%0d full_period=%0d",
             n_seed, n_write, n_read, n_wrap1, n_wrap2, n_full);
    $display("mechanisms: wrap255=%0d wrap1023=%0d", n_wrap8, n_wrap10);
    checks += 8;
    if (n_wrap8 == 0) failures++;
    if (n_wrap10 == 0) failures++;
    if (n_seed  == 0) failures++;
    if (n_write == 0) failures++;
    if (n_read  == 0) failures++;
    if (n_wrap1 == 0) failures++;
    if (n_wrap2 == 0) failures++;
    if (n_full  == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
