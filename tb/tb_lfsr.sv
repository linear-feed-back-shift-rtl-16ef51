// tb_lfsr - self-checking testbench of the maximal-length LFSR.
//
// 1. Period: one LFSR of every width from 2 to 24 stages starts from seed 1
//    and is stepped every clock; the clock at which each first returns to
//    its seed must be exactly 2^W - 1, and none may ever reach zero.
// 2. Recurrence: the serial bits of the 32-stage and 16-stage LFSRs must
//    obey the recurrences of x^32+x^22+x^2+x+1 and x^16+x^15+x^13+x^4+1,
//    a(k+n) = XOR of a(k+n-t) over the taps t, checked on the bit history.
// 3. Control: an 8-stage LFSR is held with en low (state must not change),
//    reloaded with a seed, and loaded with zero (must start from 1).
module tb_lfsr;
  localparam int MINW = 2;
  localparam int MAXW = 24;
  localparam longint RUN = (64'd1 << MAXW) + 16;

  logic   clk = 1'b0;
  logic   load;
  int     checks = 0, failures = 0;
  longint cycle = 0;

  always #5 clk = ~clk;

  initial begin
    #((RUN + 400) * 10 + 1000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // --- 1. period of every width -------------------------------------------
  longint period   [MINW:MAXW];
  int     zero_hit [MINW:MAXW];

  for (genvar w = MINW; w <= MAXW; w++) begin : g_w
    logic [w-1:0] st;
    logic         bit_out;
    lfsr #(.WIDTH(w)) dut (
      .clk(clk), .en(1'b1), .load(load), .seed(w'(1)),
      .state(st), .prbs(bit_out)
    );
    initial begin period[w] = 0; zero_hit[w] = 0; end
    always @(negedge clk) if (!load && cycle > 0) begin
      if (st == '0) zero_hit[w]++;
      if (st == w'(1) && period[w] == 0) period[w] = cycle;
    end
  end

  // --- 2. serial recurrences -------------------------------------------------
  logic [31:0] st32;
  logic        b32;
  logic [15:0] st16;
  logic        b16;
  logic [63:0] h32;   // h32[0] is the newest bit
  logic [31:0] h16;
  int          rec_checks = 0;

  lfsr #(.WIDTH(32)) dut32 (
    .clk(clk), .en(1'b1), .load(load), .seed(32'hDEADBEEF),
    .state(st32), .prbs(b32)
  );
  lfsr #(.WIDTH(16)) dut16 (
    .clk(clk), .en(1'b1), .load(load), .seed(16'hACE1),
    .state(st16), .prbs(b16)
  );

  always @(negedge clk) if (!load) begin
    h32 = {h32[62:0], b32};
    h16 = {h16[30:0], b16};
    if (cycle > 40 && cycle < 20000) begin
      // a(k+32) = a(k) ^ a(k+10) ^ a(k+30) ^ a(k+31); newest bit is a(k+32)
      checks++;
      if (h32[0] !== (h32[32] ^ h32[22] ^ h32[2] ^ h32[1])) begin
        failures++;
        if (failures < 10) $display("32-bit recurrence broken at %0d", cycle);
      end
      checks++;
      if (h16[0] !== (h16[16] ^ h16[15] ^ h16[13] ^ h16[4])) begin
        failures++;
        if (failures < 10) $display("16-bit recurrence broken at %0d", cycle);
      end
    end
  end

  // --- 3. enable, reload and zero seed on an 8-stage LFSR ---------------------
  logic       c_en, c_load;
  logic [7:0] c_seed, c_st, held;
  logic       c_bit;
  lfsr #(.WIDTH(8)) dutc (
    .clk(clk), .en(c_en), .load(c_load), .seed(c_seed),
    .state(c_st), .prbs(c_bit)
  );

  initial begin
    c_en = 1'b0; c_load = 1'b1; c_seed = 8'h5A;
    @(negedge clk);
    checks++;
    if (c_st !== 8'h5A) begin failures++; $display("8-bit load failed: %h", c_st); end
    c_load = 1'b0; c_en = 1'b1;
    @(negedge clk);
    // one step: 5A >> 1 with fb = s0^s2^s3^s4 = 0^0^1^1 = 0 -> 2D
    checks++;
    if (c_st !== 8'h2D) begin failures++; $display("8-bit step failed: %h", c_st); end
    c_en = 1'b0; held = c_st;
    repeat (5) begin
      @(negedge clk);
      checks++;
      if (c_st !== held) begin failures++; $display("8-bit hold failed"); end
    end
    c_load = 1'b1; c_seed = 8'h00;
    @(negedge clk);
    checks++;
    if (c_st !== 8'h01) begin failures++; $display("zero seed not replaced: %h", c_st); end
    c_load = 1'b0;
  end

  // --- sequencing ------------------------------------------------------------
  initial begin
    load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    cycle = 0;
    while (cycle < RUN) begin
      @(posedge clk);
      cycle++;
    end
    @(negedge clk);
    for (int w = MINW; w <= MAXW; w++) begin
      checks += 2;
      if (period[w] != (64'd1 << w) - 1) begin
        failures++;
        $display("width %0d: period %0d, expected %0d", w, period[w], (64'd1 << w) - 1);
      end
      if (zero_hit[w] != 0) begin
        failures++;
        $display("width %0d reached the all-zero state", w);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
