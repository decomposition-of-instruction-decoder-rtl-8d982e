// tb_signal_decoder: the decomposed signal decoders of both stages with
// their default partitions.
//  - reference codes give the hand-written stage words (tb_ref_pkg);
//  - every code gives the same word as an undecomposed decoder
//    (ctrl_pkg::stage_ctrl), so the decomposition keeps the function;
//  - the sub-decoder that is on matches the default partition, and the three
//    MOV codes use S-Decoder0;
//  - both sub-decoders of each stage are used.
module tb_signal_decoder;
  import ctrl_pkg::*;
  import tb_ref_pkg::*;

  localparam code_mask_t G1_ID = s_group1_mask(STAGE_ID, mov_group());
  localparam code_mask_t G1_EX = s_group1_mask(STAGE_EX, mov_group());

  icode_t code;
  ctrl_t  cid, cex;
  logic   id_c0, id_c1, ex_c0, ex_c1;
  int     checks, failures;
  int     on [2][2];

  signal_decoder #(.STAGE(STAGE_ID)) dut_id (.code(code), .ctrl(cid), .s_control0(id_c0), .s_control1(id_c1));
  signal_decoder #(.STAGE(STAGE_EX)) dut_ex (.code(code), .ctrl(cex), .s_control0(ex_c0), .s_control1(ex_c1));

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
    checks = 0; failures = 0;
    on = '{'{0, 0}, '{0, 0}};
    for (int r = 0; r < NREF; r++) begin
      code = 8'(REF_CODES[r]);
      #1;
      check(cid == hand_stage(0, REF_CODES[r]), "decode-stage reference word");
      check(cex == hand_stage(1, REF_CODES[r]), "execute-stage reference word");
    end
    for (int n = 0; n < 256; n++) begin
      code = 8'(n);
      #1;
      check(cid == stage_ctrl(STAGE_ID, code), "decode stage vs undecomposed");
      check(cex == stage_ctrl(STAGE_EX, code), "execute stage vs undecomposed");
      check(id_c1 == !G1_ID[n] && id_c0 == G1_ID[n], "decode-stage activate control");
      check(ex_c1 == !G1_EX[n] && ex_c0 == G1_EX[n], "execute-stage activate control");
      if (n >= 40 && n <= 42) check(!id_c0 && !ex_c0, "MOV on S-Decoder0");
      if (n >= 1 && n <= 142) begin
        on[0][id_c0 ? 1 : 0]++;
        on[1][ex_c0 ? 1 : 0]++;
      end
    end
    check(on[0][0] > 0 && on[0][1] > 0 && on[1][0] > 0 && on[1][1] > 0, "all sub-decoders used");
    $display("decode stage: S-Decoder0 %0d codes, S-Decoder1 %0d codes", on[0][0], on[0][1]);
    $display("execute stage: S-Decoder0 %0d codes, S-Decoder1 %0d codes", on[1][0], on[1][1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
