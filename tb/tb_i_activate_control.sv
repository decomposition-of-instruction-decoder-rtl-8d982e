// tb_i_activate_control: both values of the partition bit; exactly one
// control is 0 and it selects the group equal to the bit.
module tb_i_activate_control;
  logic pb, c0, c1;
  int   checks, failures;

  i_activate_control dut (.part_bit(pb), .i_control0(c0), .i_control1(c1));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    checks = 0; failures = 0;
    for (int n = 0; n < 8; n++) begin
      pb = 1'(n);
      #1;
      checks++;
      // bit 0: I-Decoder0 on (c0 = 0), I-Decoder1 off (c1 = 1)
      if (!(pb == 1'b0 ? (c0 == 1'b0 && c1 == 1'b1) : (c0 == 1'b1 && c1 == 1'b0))) begin
        failures++;
        $display("FAIL pb=%b c0=%b c1=%b", pb, c0, c1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
