// tb_ref_pkg: hand-written control words of eleven representative codes,
// worked out from the instruction semantics, for checking the signal
// decoders independently of ctrl_pkg::full_ctrl.
package tb_ref_pkg;
  import ctrl_pkg::*;

  localparam int NREF = 11;
  localparam int REF_CODES [NREF] = '{40, 33, 60, 103, 83, 52, 125, 129, 140, 142, 0};

  function automatic ctrl_t hand_ctrl(int code);
    ctrl_t c;
    c = '0;
    c.ex.op2_sel = OP2_NONE;
    case (code)
      40: begin  // MOV immediate
        c.id.imm_sel = IMM_ROT8;
        c.ex.alu_en = 1; c.ex.alu_op = 4'hD; c.ex.op2_sel = OP2_IMM;
        c.mem.wb_rd = 1;
      end
      33: begin  // CMP, register shifted by register
        c.id.rd_rn = 1; c.id.rd_rm = 1; c.id.rd_rs = 1;
        c.ex.alu_en = 1; c.ex.alu_op = 4'hA; c.ex.op2_sel = OP2_SHIFT_REG; c.ex.test_only = 1;
      end
      60: begin  // LDR word, immediate offset, pre-indexed, up, write-back
        c.id.rd_rn = 1; c.id.imm_sel = IMM_OFF12;
        c.ex.op2_sel = OP2_IMM; c.ex.agen = 1; c.ex.agen_up = 1; c.ex.agen_pre = 1;
        c.mem.mem_rd = 1; c.mem.mem_size = SZ_WORD; c.mem.wb_rd = 1; c.mem.wb_base = 1;
      end
      103: begin // STRB, register offset, post-indexed, down
        c.id.rd_rn = 1; c.id.rd_rm = 1; c.id.rd_rd = 1;
        c.ex.op2_sel = OP2_SHIFT_IMM; c.ex.agen = 1;
        c.mem.mem_wr = 1; c.mem.mem_size = SZ_BYTE; c.mem.wb_base = 1;
      end
      83: begin  // LDR halfword class, immediate offset, pre-indexed
        c.id.rd_rn = 1; c.id.imm_sel = IMM_OFF8;
        c.ex.op2_sel = OP2_IMM; c.ex.agen = 1; c.ex.agen_up = 1; c.ex.agen_pre = 1;
        c.mem.mem_rd = 1; c.mem.mem_size = SZ_HALF; c.mem.wb_rd = 1;
      end
      52: begin  // UMLAL
        c.id.rd_rm = 1; c.id.rd_rs = 1; c.id.rd_rd = 1;
        c.ex.mul_en = 1; c.ex.mul_acc = 1; c.ex.mul_long = 1;
        c.mem.wb_rd = 1; c.mem.wb_rdhi = 1;
      end
      125: begin // LDMIB with write-back
        c.id.rd_rn = 1;
        c.ex.agen = 1; c.ex.agen_up = 1; c.ex.agen_pre = 1;
        c.mem.mem_rd = 1; c.mem.mem_multi = 1; c.mem.wb_rd = 1; c.mem.wb_base = 1;
      end
      129: begin // STMDA with S bit
        c.id.rd_rn = 1; c.id.rd_rd = 1;
        c.ex.agen = 1;
        c.mem.mem_wr = 1; c.mem.mem_multi = 1; c.mem.mem_user = 1;
      end
      140: begin // SWPB
        c.id.rd_rn = 1; c.id.rd_rm = 1;
        c.ex.agen = 1; c.ex.agen_up = 1; c.ex.agen_pre = 1;
        c.mem.mem_rd = 1; c.mem.mem_wr = 1; c.mem.mem_swap = 1; c.mem.mem_size = SZ_BYTE;
        c.mem.wb_rd = 1;
      end
      142: begin // BL
        c.id.imm_sel = IMM_BR24;
        c.ex.branch = 1; c.ex.link = 1;
        c.mem.wb_lr = 1;
      end
      default: c = '0;
    endcase
    return c;
  endfunction

  // The part of a control word that the signal decoder of a stage makes.
  function automatic ctrl_t hand_stage(int stage, int code);
    ctrl_t f, s;
    f = hand_ctrl(code);
    s = '0;
    if (stage == 0) begin s.id = f.id; s.ex = f.ex; end
    else            s.mem = f.mem;
    return s;
  endfunction
endpackage
