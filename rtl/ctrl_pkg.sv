// ctrl_pkg: shared types and functions of the decomposed ARM7TDMI instruction
// decoder.
//
// The decoder turns a 32-bit ARM instruction into an 8-bit intermediate code,
// one code per instruction type. The 142 types are counted per class as in
// the execution profile the design is built on: 3 forms each of the
// data-processing ops and of the two multiply classes, 6 forms of TST/TEQ
// together, 30 forms each of LDR and STR, 12 forms each of LDM and STM,
// 2 of SWP, 1 of B and 1 of BL. How each class splits into its forms is this
// design's own choice. Code 0 means "no instruction" (a bubble or an opcode
// outside the 142 types). Every decoder in the design outputs all zeros for
// it, so the all-zero output of a switched-off sub-decoder never disturbs
// the output OR.
//
// Only 16 instruction bits identify the type: instr[27:20] and instr[11:4].
// They form the decode key that the instruction decoder and its input gates
// see. The condition field and the register numbers travel beside the code
// and are not decoded here.
//
// The package also holds the control-signal words of the pipeline stages and
// a constant function that splits the intermediate codes between the two
// signal sub-decoders. It starts from a chosen set of frequent codes (group 0)
// and moves into group 0 every code that a group-0 code dominates. I1
// dominates I2 when every control signal that is 1 for I1 is also 1 for I2.
// Two more functions serve the design-time choices: select_part_bit picks the
// instruction bit whose 0/1 split of execution weight is most uneven (the
// partition bit of the instruction decoder), and threshold_group0 forms the
// initial frequent group from a per-code profile. The partition method
// (one partition bit, threshold then dominance) follows the decomposed-decoder
// scheme; the instruction types, code numbering and control signals are this
// design's own.
//
// Everything here is functions, types and constants; no state, no timing.
package ctrl_pkg;

  localparam int KEY_W     = 16;
  localparam int CODE_W    = 8;
  localparam int NUM_TYPES = 142;
  localparam int NUM_CODES = 1 << CODE_W;

  typedef logic [KEY_W-1:0]  key_t;
  typedef logic [CODE_W-1:0] icode_t;
  typedef logic [NUM_CODES-1:0] code_mask_t;

  // First code of each instruction class.
  localparam int DP_BASE  = 1;    // 16 ops x 3 forms  = 48
  localparam int MUL_BASE = 49;   // MUL MLA UMULL UMLAL SMULL SMLAL
  localparam int LDR_BASE = 55;   // 30
  localparam int STR_BASE = 85;   // 30
  localparam int LDM_BASE = 115;  // 12
  localparam int STM_BASE = 127;  // 12
  localparam int SWP_BASE = 139;  // SWP SWPB
  localparam int B_CODE   = 141;
  localparam int BL_CODE  = 142;

  // ARM data-processing opcodes used by the control words.
  localparam logic [3:0] OP_MOV = 4'hD;

  // Decode key of an instruction: {instr[27:20], instr[11:4]}.
  function automatic key_t instr_key(logic [31:0] instr);
    return {instr[27:20], instr[11:4]};
  endfunction

  // Position in the decode key of instruction bit b (b in 27..20 or 11..4).
  function automatic int key_pos(int b);
    return (b >= 20) ? b - 20 + 8 : b - 4;
  endfunction

  function automatic bit key_has_bit(int b);
    return (b >= 20 && b <= 27) || (b >= 4 && b <= 11);
  endfunction

  // Addressing modes of single transfers: post-indexed, pre-indexed,
  // pre-indexed with base write-back.
  function automatic int xfer_mode(logic p, logic w);
    return p ? (w ? 2 : 1) : 0;
  endfunction

  // Monolithic reference decode: key to intermediate code (0 if none).
  function automatic icode_t decode_key(key_t k);
    logic [7:0] hi;   // instr[27:20]
    logic [7:0] lo;   // instr[11:4]
    logic p, u, bs, w, l;
    int   code;
    hi = k[15:8];
    lo = k[7:0];
    p  = hi[4];
    u  = hi[3];
    bs = hi[2];
    w  = hi[1];
    l  = hi[0];
    code = 0;
    case (hi[7:5])
      3'b000: begin
        if (lo[3] && lo[0]) begin
          if (lo[2:1] == 2'b00) begin
            // multiply, multiply long, swap
            if (hi[4:2] == 3'b000)
              code = MUL_BASE + int'(w);
            else if (hi[4:3] == 2'b01)
              code = MUL_BASE + 2 + 2 * int'(bs) + int'(w);
            else if (hi[4:3] == 2'b10 && hi[1:0] == 2'b00 && lo[7:4] == 4'h0)
              code = SWP_BASE + int'(bs);
          end else begin
            // halfword and signed transfers; bs = immediate offset
            if (!(p == 1'b0 && w == 1'b1)) begin
              if (l)
                code = LDR_BASE + 24 + 3 * int'(bs) + xfer_mode(p, w);
              else if (lo[2:1] == 2'b01)
                code = STR_BASE + 24 + 3 * int'(bs) + xfer_mode(p, w);
            end
          end
        end else if (!(hi[4:3] == 2'b10 && !l)) begin
          // data processing, register operand: shift by immediate or register
          code = DP_BASE + 3 * int'(hi[4:1]) + (lo[0] ? 2 : 1);
        end
      end
      3'b001: begin
        if (!(hi[4:3] == 2'b10 && !l))
          code = DP_BASE + 3 * int'(hi[4:1]);
      end
      3'b010, 3'b011: begin
        // hi[5] = register offset; a register offset with instr[4] set is undefined
        if (!(hi[5] && lo[0])) begin
          if (l)
            code = LDR_BASE + 3 * (4 * int'(bs) + 2 * int'(hi[5]) + int'(u)) + xfer_mode(p, w);
          else
            code = STR_BASE + 3 * (4 * int'(bs) + 2 * int'(hi[5]) + int'(u)) + xfer_mode(p, w);
        end
      end
      3'b100: begin
        // block mode {P,U}: DA, IA, DB, IB; variant: plain, write-back, S bit
        if (l)
          code = LDM_BASE + 3 * int'({p, u}) + (bs ? 2 : (w ? 1 : 0));
        else
          code = STM_BASE + 3 * int'({p, u}) + (bs ? 2 : (w ? 1 : 0));
      end
      3'b101:  code = p ? BL_CODE : B_CODE;
      default: code = 0;
    endcase
    return icode_t'(code);
  endfunction

  // ------------------------------------------------------------------
  // Control-signal words
  // ------------------------------------------------------------------
  typedef enum logic [2:0] {
    IMM_NONE  = 3'd0,
    IMM_ROT8  = 3'd1,   // rotated 8-bit data-processing immediate
    IMM_OFF12 = 3'd2,   // 12-bit transfer offset
    IMM_OFF8  = 3'd3,   // split 8-bit halfword offset
    IMM_BR24  = 3'd4    // 24-bit branch offset
  } imm_sel_e;

  typedef enum logic [1:0] {
    OP2_SHIFT_IMM = 2'd0,  // register shifted by an immediate amount
    OP2_IMM       = 2'd1,  // immediate
    OP2_SHIFT_REG = 2'd2,  // register shifted by a register
    OP2_NONE      = 2'd3
  } op2_sel_e;

  typedef enum logic [1:0] {
    SZ_WORD = 2'd0,
    SZ_BYTE = 2'd1,
    SZ_HALF = 2'd2
  } mem_size_e;

  // Decode stage: register reads and immediate extraction.
  typedef struct packed {
    logic     rd_rn;
    logic     rd_rm;
    logic     rd_rs;
    logic     rd_rd;      // Rd read as store data or accumulator
    imm_sel_e imm_sel;
  } id_ctrl_t;

  // Execute stage: ALU, shifter, multiplier, address and branch.
  typedef struct packed {
    logic       alu_en;
    logic [3:0] alu_op;
    op2_sel_e   op2_sel;
    logic       test_only;  // compare/test: flags only, no result
    logic       mul_en;
    logic       mul_acc;
    logic       mul_long;
    logic       mul_signed;
    logic       agen;       // address generation
    logic       agen_up;
    logic       agen_pre;
    logic       branch;
    logic       link;
  } ex_ctrl_t;

  // Memory / write-back stage.
  typedef struct packed {
    logic      mem_rd;
    logic      mem_wr;
    mem_size_e mem_size;
    logic      mem_multi;
    logic      mem_user;   // user-bank registers / PSR (S bit of LDM/STM)
    logic      mem_swap;
    logic      wb_rd;
    logic      wb_rdhi;
    logic      wb_base;
    logic      wb_lr;
  } mem_ctrl_t;

  typedef struct packed {
    id_ctrl_t  id;
    ex_ctrl_t  ex;
    mem_ctrl_t mem;
  } ctrl_t;

  localparam int CTRL_W = $bits(ctrl_t);

  // Pipeline stages that own a signal decoder.
  localparam int STAGE_ID = 0;   // produces id (current state) and ex (to CSR)
  localparam int STAGE_EX = 1;   // produces mem (to CSR)

  // Every control signal of an intermediate code.
  function automatic ctrl_t full_ctrl(icode_t code);
    ctrl_t c;
    int    n;
    int    idx;
    int    mode;
    c = '0;
    n = int'(code);
    if (n >= DP_BASE && n < MUL_BASE) begin
      idx = n - DP_BASE;
      c.ex.alu_en    = 1'b1;
      c.ex.alu_op    = 4'(idx / 3);
      c.ex.test_only = (idx / 3) >= 8 && (idx / 3) <= 11;
      c.id.rd_rn     = !(4'(idx / 3) == OP_MOV || 4'(idx / 3) == 4'hF);
      case (idx % 3)
        0: begin c.ex.op2_sel = OP2_IMM;       c.id.imm_sel = IMM_ROT8; end
        1: begin c.ex.op2_sel = OP2_SHIFT_IMM; c.id.rd_rm = 1'b1;       end
        default: begin
          c.ex.op2_sel = OP2_SHIFT_REG;
          c.id.rd_rm   = 1'b1;
          c.id.rd_rs   = 1'b1;
        end
      endcase
      c.mem.wb_rd = !c.ex.test_only;
    end else if (n >= MUL_BASE && n < LDR_BASE) begin
      idx = n - MUL_BASE;
      c.ex.op2_sel    = OP2_NONE;
      c.ex.mul_en     = 1'b1;
      c.ex.mul_acc    = idx[0];
      c.ex.mul_long   = idx >= 2;
      c.ex.mul_signed = idx >= 4;
      c.id.rd_rm      = 1'b1;
      c.id.rd_rs      = 1'b1;
      c.id.rd_rn      = idx == 1;            // MLA accumulator
      c.id.rd_rd      = idx == 3 || idx == 5; // long accumulate: RdHi/RdLo
      c.mem.wb_rd     = 1'b1;
      c.mem.wb_rdhi   = idx >= 2;
    end else if (n >= LDR_BASE && n < LDM_BASE) begin
      idx = (n < STR_BASE) ? n - LDR_BASE : n - STR_BASE;
      mode = idx % 3;
      c.ex.op2_sel  = OP2_NONE;
      c.ex.agen     = 1'b1;
      c.ex.agen_pre = mode != 0;
      c.id.rd_rn    = 1'b1;
      c.mem.wb_base = mode != 1;
      if (n < STR_BASE) begin
        c.mem.mem_rd = 1'b1;
        c.mem.wb_rd  = 1'b1;
      end else begin
        c.mem.mem_wr = 1'b1;
        c.id.rd_rd   = 1'b1;
      end
      if (idx < 24) begin
        // ((B*2 + R)*2 + U)*3 + mode
        c.ex.agen_up  = ((idx / 3) % 2) == 1;
        c.mem.mem_size = ((idx / 12) == 1) ? SZ_BYTE : SZ_WORD;
        if (((idx / 6) % 2) == 1) begin
          c.id.rd_rm   = 1'b1;
          c.ex.op2_sel = OP2_SHIFT_IMM;
        end else begin
          c.id.imm_sel = IMM_OFF12;
          c.ex.op2_sel = OP2_IMM;
        end
      end else begin
        // halfword: 24 + 3*I + mode
        c.mem.mem_size = SZ_HALF;
        c.ex.agen_up   = 1'b1;
        if (idx >= 27) begin
          c.id.imm_sel = IMM_OFF8;
          c.ex.op2_sel = OP2_IMM;
        end else begin
          c.id.rd_rm   = 1'b1;
          c.ex.op2_sel = OP2_SHIFT_IMM;
        end
      end
    end else if (n >= LDM_BASE && n < SWP_BASE) begin
      idx = (n < STM_BASE) ? n - LDM_BASE : n - STM_BASE;
      c.ex.op2_sel   = OP2_NONE;
      c.ex.agen      = 1'b1;
      c.ex.agen_up   = ((idx / 3) % 2) == 1;  // {P,U} = idx/3
      c.ex.agen_pre  = (idx / 6) == 1;
      c.id.rd_rn     = 1'b1;
      c.mem.mem_multi = 1'b1;
      c.mem.wb_base  = (idx % 3) == 1;
      c.mem.mem_user = (idx % 3) == 2;
      if (n < STM_BASE) begin
        c.mem.mem_rd = 1'b1;
        c.mem.wb_rd  = 1'b1;
      end else begin
        c.mem.mem_wr = 1'b1;
        c.id.rd_rd   = 1'b1;
      end
    end else if (n >= SWP_BASE && n < B_CODE) begin
      c.ex.op2_sel   = OP2_NONE;
      c.ex.agen      = 1'b1;
      c.ex.agen_up   = 1'b1;
      c.ex.agen_pre  = 1'b1;
      c.id.rd_rn     = 1'b1;
      c.id.rd_rm     = 1'b1;
      c.mem.mem_rd   = 1'b1;
      c.mem.mem_wr   = 1'b1;
      c.mem.mem_swap = 1'b1;
      c.mem.mem_size = (n == SWP_BASE + 1) ? SZ_BYTE : SZ_WORD;
      c.mem.wb_rd    = 1'b1;
    end else if (n == B_CODE || n == BL_CODE) begin
      c.ex.op2_sel = OP2_NONE;
      c.id.imm_sel = IMM_BR24;
      c.ex.branch  = 1'b1;
      c.ex.link    = n == BL_CODE;
      c.mem.wb_lr  = n == BL_CODE;
    end
    return c;
  endfunction

  // The part of the control word that the signal decoder of a stage makes.
  function automatic ctrl_t stage_ctrl(int stage, icode_t code);
    ctrl_t f;
    ctrl_t s;
    f = full_ctrl(code);
    s = '0;
    if (stage == STAGE_ID) begin
      s.id = f.id;
      s.ex = f.ex;
    end else begin
      s.mem = f.mem;
    end
    return s;
  endfunction

  // Partition-bit selection for the instruction decoder. ones[k] is the
  // execution weight of the instructions whose decode-key bit k is 1, total
  // the weight of all instructions. The bit with the most uneven split
  // between 0 and 1 wins (the lowest key position on a tie); the result is
  // the instruction bit number, ready for PART_BIT.
  function automatic int select_part_bit(longint unsigned ones [KEY_W], longint unsigned total);
    longint best, d;
    int     bk;
    best = -1;
    bk   = 0;
    for (int k = 0; k < KEY_W; k++) begin
      d = 2 * longint'(ones[k]) - longint'(total);
      if (d < 0) d = -d;
      if (d > best) begin
        best = d;
        bk   = k;
      end
    end
    return (bk >= 8) ? bk - 8 + 20 : bk + 4;
  endfunction

  // Initial partition of a signal decoder: codes whose execution weight is
  // above thr go to group 0 (bit set in the result), the others to group 1.
  function automatic code_mask_t threshold_group0(longint unsigned freq [NUM_TYPES+1],
                                                  longint unsigned thr);
    code_mask_t m;
    m = '0;
    for (int i = 1; i <= NUM_TYPES; i++) m[i] = freq[i] > thr;
    return m;
  endfunction

  // Initial group 0 of the signal decoders: the three MOV instructions.
  function automatic code_mask_t mov_group();
    code_mask_t m;
    m = '0;
    for (int f = 0; f < 3; f++) m[DP_BASE + 3 * int'(OP_MOV) + f] = 1'b1;
    return m;
  endfunction

  // I1 dominates I2: every output that is 1 for I1 is 1 for I2.
  function automatic bit dominates(logic [CTRL_W-1:0] c1, logic [CTRL_W-1:0] c2);
    return (c1 & ~c2) == '0;
  endfunction

  // Group-1 mask of a stage's signal decoder: start from init_group0 and
  // move every group-1 code dominated by a group-0 code into group 0,
  // repeating until nothing moves. Code 0 and unused codes stay in group 0;
  // all signal decoders output zeros for them.
  function automatic code_mask_t s_group1_mask(int stage, code_mask_t init_group0);
    logic [CTRL_W-1:0] w [NUM_TYPES+1];
    bit         g0 [NUM_TYPES+1];
    bit         moved;
    code_mask_t m;
    for (int i = 0; i <= NUM_TYPES; i++) begin
      w[i]  = stage_ctrl(stage, icode_t'(i));
      g0[i] = (i == 0) ? 1'b1 : bit'(init_group0[i]);
    end
    moved = 1'b1;
    for (int pass = 0; pass < NUM_TYPES && moved; pass++) begin
      moved = 1'b0;
      for (int i = 1; i <= NUM_TYPES; i++) begin
        if (g0[i]) begin
          for (int j = 1; j <= NUM_TYPES; j++) begin
            if (!g0[j] && dominates(w[i], w[j])) begin
              g0[j] = 1'b1;
              moved = 1'b1;
            end
          end
        end
      end
    end
    m = '0;
    for (int i = 1; i <= NUM_TYPES; i++) m[i] = !g0[i];
    return m;
  endfunction

endpackage
