// tb_s_sub_decoder: four signal sub-decoders (two stages x two groups) with
// a fixed group-1 mask (the odd codes). For the reference codes of
// tb_ref_pkg the sub-decoder of the code's group must give the hand-written
// stage word and the other one zeros; for every code the sub-decoder of the
// other group must give zeros.
module tb_s_sub_decoder;
  import ctrl_pkg::*;
  import tb_ref_pkg::*;

  function automatic code_mask_t odd_mask();
    code_mask_t m;
    m = '0;
    for (int i = 1; i < 256; i += 2) m[i] = 1'b1;
    return m;
  endfunction
  localparam code_mask_t M = odd_mask();

  icode_t code;
  ctrl_t  id0, id1, ex0, ex1;
  int     checks, failures;

  s_sub_decoder #(.STAGE(0), .GROUP(0), .GROUP1(M)) d_id0 (.code(code), .ctrl(id0));
  s_sub_decoder #(.STAGE(0), .GROUP(1), .GROUP1(M)) d_id1 (.code(code), .ctrl(id1));
  s_sub_decoder #(.STAGE(1), .GROUP(0), .GROUP1(M)) d_ex0 (.code(code), .ctrl(ex0));
  s_sub_decoder #(.STAGE(1), .GROUP(1), .GROUP1(M)) d_ex1 (.code(code), .ctrl(ex1));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s code=%0d", what, code);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c;
    bit odd;
    checks = 0; failures = 0;
    for (int r = 0; r < NREF; r++) begin
      c = REF_CODES[r];
      code = 8'(c);
      odd = c % 2 == 1;
      #1;
      check((odd ? id1 : id0) == hand_stage(0, c), "decode-stage word");
      check((odd ? ex1 : ex0) == hand_stage(1, c), "execute-stage word");
    end
    for (int n = 0; n < 256; n++) begin
      code = 8'(n);
      #1;
      if (n % 2 == 1) check(id0 == '0 && ex0 == '0, "group-1 code in sub-decoder 0");
      else            check(id1 == '0 && ex1 == '0, "group-0 code in sub-decoder 1");
      check(id0.mem == '0 && id1.mem == '0, "decode stage makes no mem field");
      check(ex0.id == '0 && ex0.ex == '0 && ex1.id == '0 && ex1.ex == '0,
            "execute stage makes only the mem field");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
