// tb_lfsr_shift_reg - self-checking testbench of the right-shifting
// register: random load, enable, seed and shift-in for 2000 clocks,
// compared every clock with a reference model (q >> 1 with shift_in as
// the new MSB, seed on load, hold when disabled; serial_out = q[0]).
module tb_lfsr_shift_reg;
  localparam int W = 16;
  logic         clk = 1'b0;
  logic         en, load, shift_in, serial_out;
  logic [W-1:0] seed, q, ref_q;
  int           checks = 0, failures = 0;

  lfsr_shift_reg #(.WIDTH(W)) dut (
    .clk(clk), .en(en), .load(load), .seed(seed), .shift_in(shift_in),
    .q(q), .serial_out(serial_out)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    load = 1'b1; en = 1'b0; seed = 16'h8001; shift_in = 1'b0;
    @(posedge clk); ref_q = seed;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      checks += 2;
      if (q !== ref_q) begin
        failures++;
        $display("cycle %0d: q=%h expected %h", i, q, ref_q);
      end
      if (serial_out !== ref_q[0]) failures++;
      load     = 1'($urandom_range(0, 15) == 0);
      en       = 1'($urandom_range(0, 3) != 0);
      seed     = W'($urandom);
      shift_in = 1'($urandom);
      @(posedge clk);
      if (load)    ref_q = seed;
      else if (en) ref_q = {shift_in, ref_q[W-1:1]};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
