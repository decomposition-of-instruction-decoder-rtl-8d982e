// tb_i_sub_decoder: the two instruction sub-decoders with partition bit 26.
// For instructions of every code, the sub-decoder of the instruction's group
// must give the code and the other one zeros. The frozen inputs of a
// switched-off sub-decoder (key with only bit 26 set for group 0, all-zero
// key for group 1) must give zeros.
module tb_i_sub_decoder;
  import ctrl_pkg::*;
  import tb_gen_pkg::*;

  logic [31:0] instr;
  key_t        key;
  icode_t      code0, code1;
  int          checks, failures;

  i_sub_decoder #(.GROUP(0), .KEY_BIT(14)) dut0 (.key(key), .code(code0));
  i_sub_decoder #(.GROUP(1), .KEY_BIT(14)) dut1 (.key(key), .code(code1));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s key=%h code0=%0d code1=%0d", what, key, code0, code1);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c;
    checks = 0; failures = 0;
    for (int n = 0; n < 5000; n++) begin
      c = n % (NTYPES + 1);
      instr = gen_instr(c);
      key = {instr[27:20], instr[11:4]};
      #1;
      if (instr[26]) begin
        check(code0 == 0, "group-1 instruction in I-Decoder0");
        check(int'(code1) == c, "I-Decoder1 code");
      end else begin
        check(int'(code0) == c, "I-Decoder0 code");
        check(code1 == 0, "group-0 instruction in I-Decoder1");
      end
    end
    key = 16'h4000;
    #1;
    check(code0 == 0, "I-Decoder0 frozen minterm");
    key = 16'h0000;
    #1;
    check(code1 == 0, "I-Decoder1 frozen minterm");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
