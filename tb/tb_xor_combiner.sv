// tb_xor_combiner - self-checking testbench of the output XOR: the value
// pairs printed in the design's waveform (14/35 -> 21, 08/4D -> 45,
// 08/0E -> 06, 05/4E -> 4B, 01/44 -> 45, 12/19 -> 0B) and then random
// words, each output bit compared with the inequality of its input bits.
module tb_xor_combiner;
  logic [7:0] a, b, y;
  int         checks = 0, failures = 0;

  xor_combiner dut (.a(a), .b(b), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input logic [7:0] x, input logic [7:0] z, input logic [7:0] exp);
    a = x; b = z;
    #1;
    checks++;
    if (y !== exp) begin
      failures++;
      $display("%h ^ %h = %h, expected %h", x, z, y, exp);
    end
  endtask

  initial begin
    check_one(8'h14, 8'h35, 8'h21);
    check_one(8'h08, 8'h4D, 8'h45);
    check_one(8'h08, 8'h0E, 8'h06);
    check_one(8'h05, 8'h4E, 8'h4B);
    check_one(8'h01, 8'h44, 8'h45);
    check_one(8'h12, 8'h19, 8'h0B);
    for (int i = 0; i < 1000; i++) begin
      logic [7:0] x, z, e;
      x = 8'($urandom); z = 8'($urandom);
      for (int k = 0; k < 8; k++) e[k] = (x[k] != z[k]);
      check_one(x, z, e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
