// tb_partition_example: the partition-bit example run through the whole
// control path.
//
// An instruction stream is drawn so that 10 % of the instructions have
// instr[26] = 1 (word/byte LDR/STR) and 20 % have instr[27] = 1 (LDM/STM,
// B/BL); the rest are data-processing, multiply, halfword and swap
// instructions with both bits 0. Two control units run it side by side, one
// partitioned on bit 26 (the default) and one on bit 27. The test checks:
//  - both decode every instruction correctly (ISR code three cycles later);
//  - I-Decoder1 is on for 10 % +- 2 % of the instructions with bit 26 and
//    20 % +- 2 % with bit 27, I-Decoder0 for the rest;
//  - ctrl_pkg::select_part_bit, fed the per-bit profile of the stream,
//    chooses bit 26, the more uneven split.
module tb_partition_example;
  import ctrl_pkg::*;
  import tb_gen_pkg::*;

  localparam int N = 10000;

  logic        clk, rst_n, v;
  logic [31:0] instr;
  logic [31:0] ir26, ir27;
  icode_t      idc26, idc27, exc26, exc27, mc26, mc27;
  id_ctrl_t    idk26, idk27;
  ex_ctrl_t    exk26, exk27;
  mem_ctrl_t   mk26, mk27;
  logic        on26, on27, s0a, s0b, s1a, s1b;

  decomposed_control_unit u26 (
    .clk(clk), .rst_n(rst_n), .instr_valid(v), .instr(instr), .ir(ir26),
    .id_code(idc26), .id_ctrl(idk26), .ex_code(exc26), .ex_ctrl(exk26),
    .mem_code(mc26), .mem_ctrl(mk26), .i_dec1_on(on26), .s_id_dec1_on(s0a), .s_ex_dec1_on(s1a)
  );
  decomposed_control_unit #(.PART_BIT(27)) u27 (
    .clk(clk), .rst_n(rst_n), .instr_valid(v), .instr(instr), .ir(ir27),
    .id_code(idc27), .id_ctrl(idk27), .ex_code(exc27), .ex_ctrl(exk27),
    .mem_code(mc27), .mem_ctrl(mk27), .i_dec1_on(on27), .s_id_dec1_on(s0b), .s_ex_dec1_on(s1b)
  );

  int checks, failures;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  always #5 clk = ~clk;

  initial begin
    #((N + 100) * 10 * 2);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Draw a code: 10 % word/byte single transfers (bit 26), 20 % block
  // transfers and branches (bit 27), 70 % the rest.
  function automatic int draw_code();
    int r;
    r = int'($urandom % 100);
    if (r < 10) begin
      r = int'($urandom % 48);
      return (r < 24) ? 55 + r : 85 + r - 24;
    end else if (r < 30) begin
      r = int'($urandom % 26);
      return (r < 24) ? 115 + r : 141 + r - 24;
    end else begin
      r = int'($urandom % 68);
      if (r < 54) return 1 + r;                    // data processing, multiply
      if (r < 60) return 79 + r - 54;              // LDR halfword class
      if (r < 66) return 109 + r - 60;             // STR halfword class
      return 139 + r - 66;                         // SWP, SWPB
    end
  endfunction

  initial begin
    int              codes [$];
    int              c, on1_26, on1_27, pb;
    longint unsigned ones [KEY_W];
    key_t            k;
    checks = 0; failures = 0;
    on1_26 = 0; on1_27 = 0;
    for (int i = 0; i < KEY_W; i++) ones[i] = 0;
    clk = 0; rst_n = 0; v = 0; instr = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < N + 2; n++) begin
      if (n < N) begin
        c = draw_code();
        instr = gen_instr(c);
        v = 1;
        codes.push_back(c);
        k = {instr[27:20], instr[11:4]};
        for (int i = 0; i < KEY_W; i++) if (k[i]) ones[i]++;
      end else begin
        v = 0;
        codes.push_back(0);
      end
      @(posedge clk);
      #1;
      if (n >= 1 && n <= N) begin
        if (on26) on1_26++;
        if (on27) on1_27++;
        check(on26 == ir26[26] && on27 == ir27[27], "sub-decoder follows partition bit");
      end
      if (n >= 2) begin
        c = codes.pop_front();
        check(int'(mc26) == c && int'(mc27) == c,
              $sformatf("code %0d: got %0d / %0d", c, mc26, mc27));
        check(mk26 == mk27 && exc26 == exc27, "partitions agree");
      end
    end
    $display("bit 26: I-Decoder1 on %0d of %0d; bit 27: %0d of %0d", on1_26, N, on1_27, N);
    check(on1_26 >= N * 8 / 100 && on1_26 <= N * 12 / 100, "bit-26 split near 90/10");
    check(on1_27 >= N * 18 / 100 && on1_27 <= N * 22 / 100, "bit-27 split near 80/20");
    pb = select_part_bit(ones, longint'(N));
    $display("partition bit chosen from the profile: %0d", pb);
    check(pb == 26, "profile selects bit 26");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
