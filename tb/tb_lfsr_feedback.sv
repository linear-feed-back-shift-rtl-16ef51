// tb_lfsr_feedback - self-checking testbench of the LFSR feedback XOR.
// Two instances with their default maximal-length masks (16 and 8 stages)
// get random states; the expected bit is the XOR of the stages named by
// the primitive polynomials x^16+x^15+x^13+x^4+1 and x^8+x^6+x^5+x^4+1,
// written out here bit by bit (tap t is state bit n-t).
module tb_lfsr_feedback;
  logic [15:0] s16;
  logic [7:0]  s8;
  logic        fb16, fb8;
  int          checks = 0, failures = 0;

  lfsr_feedback #(.WIDTH(16)) dut16 (.state(s16), .fb(fb16));
  lfsr_feedback #(.WIDTH(8))  dut8  (.state(s8),  .fb(fb8));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      s16 = 16'($urandom);
      s8  = 8'($urandom);
      #1;
      checks += 2;
      if (fb16 !== (s16[0] ^ s16[1] ^ s16[3] ^ s16[12])) begin
        failures++;
        $display("16: state=%h fb=%b", s16, fb16);
      end
      if (fb8 !== (s8[0] ^ s8[2] ^ s8[3] ^ s8[4])) begin
        failures++;
        $display("8: state=%h fb=%b", s8, fb8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
