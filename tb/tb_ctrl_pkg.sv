// tb_ctrl_pkg: checks the shared functions of ctrl_pkg.
//  - decode_key on random instructions of every code (built by tb_gen_pkg)
//    gives that code; exactly 142 codes are reachable over all 65536 keys;
//  - full_ctrl matches the hand-written control words of tb_ref_pkg;
//  - the signal-decoder partition of both stages keeps the three MOV codes
//    in group 0 and is closed: no group-0 code dominates a group-1 code;
//  - select_part_bit picks bit 26 on the partition example (bit 27: 80 %/20 %,
//    bit 26: 90 %/10 %), and the bit a random profile is most skewed on;
//  - threshold_group0 keeps exactly the codes above the threshold, and its
//    result fed to s_group1_mask gives a closed partition.
module tb_ctrl_pkg;
  import ctrl_pkg::*;
  import tb_gen_pkg::*;
  import tb_ref_pkg::*;

  int checks, failures;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] instr;
    bit          seen [256];
    int          nseen;
    code_mask_t  g1;
    ctrl_t       wi, wj;
    int          n1;
    checks = 0; failures = 0;
    for (int n = 0; n < 10000; n++) begin
      instr = gen_instr(n % (NTYPES + 1));
      check(int'(decode_key({instr[27:20], instr[11:4]})) == n % (NTYPES + 1),
            $sformatf("decode_key %h", instr));
    end
    for (int k = 0; k < 256; k++) seen[k] = 0;
    for (int k = 0; k < 65536; k++) seen[decode_key(key_t'(k))] = 1;
    nseen = 0;
    for (int k = 1; k < 256; k++) if (seen[k]) nseen++;
    check(nseen == 142, $sformatf("%0d codes reachable", nseen));
    for (int r = 0; r < NREF; r++)
      check(full_ctrl(icode_t'(REF_CODES[r])) == hand_ctrl(REF_CODES[r]),
            $sformatf("full_ctrl code %0d", REF_CODES[r]));
    for (int st = 0; st < 2; st++) begin
      g1 = s_group1_mask(st, mov_group());
      check(g1[40] == 0 && g1[41] == 0 && g1[42] == 0, "MOV codes in group 0");
      check(g1[0] == 0 && g1[255:143] == '0, "unused codes in group 0");
      n1 = 0;
      for (int i = 1; i <= 142; i++) begin
        if (g1[i]) n1++;
        for (int j = 1; j <= 142; j++) begin
          wi = stage_ctrl(st, icode_t'(i));
          wj = stage_ctrl(st, icode_t'(j));
          if (!g1[i] && g1[j] && ((wi & ~wj) == '0))
            check(0, $sformatf("stage %0d: group-0 code %0d dominates group-1 code %0d", st, i, j));
        end
      end
      check(n1 > 0, "group 1 not empty");
      $display("stage %0d: %0d codes in group 0, %0d in group 1", st, 142 - n1, n1);
    end
    // partition-bit example: weights in per mille, other bits split evenly
    begin
      longint unsigned ones [KEY_W];
      longint unsigned freq [NTYPES+1];
      code_mask_t      g0;
      int              pick, skew;
      for (int k = 0; k < KEY_W; k++) ones[k] = 500;
      ones[15] = 200;   // instr[27]: 80 % at 0, 20 % at 1
      ones[14] = 100;   // instr[26]: 90 % at 0, 10 % at 1
      check(select_part_bit(ones, 1000) == 26, "partition example picks bit 26");
      ones[14] = 500;
      check(select_part_bit(ones, 1000) == 27, "partition example without bit 26 picks 27");
      for (int t = 0; t < 20; t++) begin
        pick = int'($urandom % KEY_W);
        skew = 300 + int'($urandom % 200);
        for (int k = 0; k < KEY_W; k++) ones[k] = 400 + $urandom % 201;
        ones[pick] = ($urandom % 2) ? 1000 - skew + 300 : skew - 300;
        check(select_part_bit(ones, 1000) == ((pick >= 8) ? pick + 12 : pick + 4),
              $sformatf("random profile, key bit %0d", pick));
      end
      for (int i = 0; i <= NTYPES; i++) freq[i] = $urandom % 1000;
      g0 = threshold_group0(freq, 500);
      for (int i = 1; i <= NTYPES; i++)
        check(g0[i] == (freq[i] > 500), "threshold partition");
      check(g0[0] == 0 && g0[255:143] == '0, "threshold partition leaves unused codes");
      g1 = s_group1_mask(STAGE_ID, g0);
      for (int i = 1; i <= NTYPES; i++) begin
        if (g0[i]) check(!g1[i], "frequent code stays in group 0");
        for (int j = 1; j <= NTYPES; j++)
          if (!g1[i] && g1[j]) begin
            wi = stage_ctrl(STAGE_ID, icode_t'(i));
            wj = stage_ctrl(STAGE_ID, icode_t'(j));
            if ((wi & ~wj) == '0) check(0, "profile partition not closed");
          end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
