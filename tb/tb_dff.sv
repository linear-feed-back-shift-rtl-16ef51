// tb_dff - self-checking testbench of the dff cell: drives random d and en
// for 500 clocks and compares q with a reference register kept in the
// testbench (q follows d on enabled edges and holds otherwise).
module tb_dff;
  logic clk = 1'b0;
  logic en, d, q;
  logic ref_q;
  logic ref_valid = 1'b0;
  int   checks = 0, failures = 0;

  dff dut (.clk(clk), .en(en), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1'b1; d = 1'b0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      if (ref_valid) begin
        checks++;
        if (q !== ref_q) begin
          failures++;
          $display("cycle %0d: q=%b expected %b", i, q, ref_q);
        end
      end
      en = (i < 2) ? 1'b1 : 1'($urandom_range(0, 3) != 0);
      d  = 1'($urandom);
      @(posedge clk);
      if (en) begin ref_q = d; ref_valid = 1'b1; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
