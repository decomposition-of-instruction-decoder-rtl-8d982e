// tb_instr_decoder: self-checking test of the decomposed instruction decoder.
//
// 1. Random instructions of every intermediate code, built by tb_gen_pkg,
//    must decode to the code they were built for.
// 2. All 65536 decode keys, placed in an instruction, must give the same
//    code as an undecomposed decoder (ctrl_pkg::decode_key): the
//    decomposition must not change the function.
// 3. The sub-decoder that is on must follow instruction bit 26.
// Both sub-decoders must be on at least once.
module tb_instr_decoder;
  import ctrl_pkg::*;
  import tb_gen_pkg::*;

  logic [31:0] instr;
  icode_t      code;
  logic        c0, c1;
  int          checks, failures;
  int          on0, on1;

  instr_decoder dut (.instr(instr), .code(code), .i_control0(c0), .i_control1(c1));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s instr=%h code=%0d", what, instr, code);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c;
    checks = 0; failures = 0; on0 = 0; on1 = 0;
    for (int n = 0; n < 20000; n++) begin
      c = n % (NTYPES + 1);
      instr = gen_instr(c);
      #1;
      check(int'(code) == c, $sformatf("random code %0d", c));
      check(c0 == instr[26] && c1 == !instr[26], "activate control");
      if (!c0) on0++;
      if (!c1) on1++;
    end
    for (int k = 0; k < 65536; k++) begin
      instr = {4'($urandom), 8'(k >> 8), 8'($urandom), 8'(k), 4'($urandom)};
      #1;
      check(code == decode_key(key_t'(k)), "exhaustive key");
    end
    check(on0 > 0 && on1 > 0, "both sub-decoders used");
    $display("I-Decoder0 on %0d times, I-Decoder1 on %0d times", on0, on1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
