// tb_mp_sram - self-checking testbench of the two-bank SRAM.
// First writes every address of both banks with known words, then runs
// 4000 clocks of random writes and reads at random addresses and compares
// dout11/dout22 every clock with a reference memory kept in the testbench
// (one-clock read latency; a write returns the written word).
module tb_mp_sram;
  localparam int D = 64;
  localparam int W = 8;
  logic         clk = 1'b0;
  logic         we;
  logic [5:0]   a1, a2;
  logic [W-1:0] d1, d2, q1, q2;
  logic [W-1:0] m1 [D];
  logic [W-1:0] m2 [D];
  logic [W-1:0] e1, e2;
  int           checks = 0, failures = 0;
  int           writes = 0, reads = 0;

  mp_sram dut (
    .clk(clk), .we(we), .addr1(a1), .addr2(a2), .din1(d1), .din2(d2),
    .dout11(q1), .dout22(q2)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic w, input logic [5:0] x1, input logic [5:0] x2,
                      input logic [W-1:0] v1, input logic [W-1:0] v2, input bit check);
    @(negedge clk);
    we = w; a1 = x1; a2 = x2; d1 = v1; d2 = v2;
    if (w) begin
      m1[x1] = v1; m2[x2] = v2; e1 = v1; e2 = v2; writes++;
    end else begin
      e1 = m1[x1]; e2 = m2[x2]; reads++;
    end
    @(posedge clk);
    #1;
    if (check) begin
      checks += 2;
      if (q1 !== e1) begin failures++; $display("bank1 addr %0d: %h expected %h", x1, q1, e1); end
      if (q2 !== e2) begin failures++; $display("bank2 addr %0d: %h expected %h", x2, q2, e2); end
    end
  endtask

  initial begin
    for (int i = 0; i < D; i++)
      step(1'b1, 6'(i), 6'(D - 1 - i), W'(i * 3 + 1), W'(i ^ 8'hA5), 1'b1);
    for (int i = 0; i < 4000; i++)
      step(1'($urandom_range(0, 3) == 0), 6'($urandom), 6'($urandom),
           W'($urandom), W'($urandom), 1'b1);
    checks++;
    if (writes == 0 || reads == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
