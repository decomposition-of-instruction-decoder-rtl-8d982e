// tb_s_activate_control: with a fixed group-1 mask (codes 100..142 and the
// odd codes below 20), every code must switch on the sub-decoder of its
// group and only that one.
module tb_s_activate_control;
  import ctrl_pkg::*;

  function automatic code_mask_t test_mask();
    code_mask_t m;
    m = '0;
    for (int i = 100; i <= 142; i++) m[i] = 1'b1;
    for (int i = 1; i < 20; i += 2) m[i] = 1'b1;
    return m;
  endfunction
  localparam code_mask_t M = test_mask();

  icode_t code;
  logic   c0, c1;
  int     checks, failures;
  bit     g1;

  s_activate_control #(.GROUP1(M)) dut (.code(code), .s_control0(c0), .s_control1(c1));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    checks = 0; failures = 0;
    for (int n = 0; n < 256; n++) begin
      code = 8'(n);
      #1;
      g1 = (n >= 100 && n <= 142) || (n < 20 && n % 2 == 1);
      checks++;
      if (!(g1 ? (c1 == 1'b0 && c0 == 1'b1) : (c0 == 1'b0 && c1 == 1'b1))) begin
        failures++;
        $display("FAIL code=%0d c0=%b c1=%b", n, c0, c1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
