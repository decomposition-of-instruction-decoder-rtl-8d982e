// tb_gen_pkg: stimulus generator shared by the decoder testbenches.
//
// gen_instr builds an ARM instruction of a chosen intermediate code from the
// instruction-set encoding, with every field the code does not fix (condition,
// registers, offsets, shift, S bit where free) drawn at random. The expected
// code is therefore known by construction and does not come from the
// decoder under test. Code 0 gives an instruction outside the 142 types:
// coprocessor, SWI, MRS/MSR, BX, a register-offset transfer with bit 4 set,
// a halfword store with S set, or a post-indexed halfword with W set.
package tb_gen_pkg;

  localparam int NTYPES = 142;

  function automatic logic [31:0] gen_instr(int code);
    logic [31:0] i;
    logic [3:0]  cond;
    logic [3:0]  rn, rd, rs, rm;
    logic        s;
    int          idx, op, form, mode, sel;
    logic        p, w, u, b, r, l, imm;
    cond = 4'($urandom);
    rn   = 4'($urandom);
    rd   = 4'($urandom);
    rs   = 4'($urandom);
    rm   = 4'($urandom);
    s    = 1'($urandom);
    i    = '0;
    if (code >= 1 && code <= 48) begin
      idx  = code - 1;
      op   = idx / 3;
      form = idx % 3;
      if (op >= 8 && op <= 11) s = 1'b1;
      case (form)
        0: i = {cond, 3'b001, 4'(op), s, rn, rd, 4'($urandom), 8'($urandom)};
        1: i = {cond, 3'b000, 4'(op), s, rn, rd, 5'($urandom), 2'($urandom), 1'b0, rm};
        default: i = {cond, 3'b000, 4'(op), s, rn, rd, rs, 1'b0, 2'($urandom), 1'b1, rm};
      endcase
    end else if (code >= 49 && code <= 54) begin
      idx = code - 49;
      if (idx < 2) i = {cond, 6'b000000, 1'(idx), s, rd, rn, rs, 4'b1001, rm};
      else         i = {cond, 5'b00001, 1'(idx >= 4), 1'(idx % 2), s, rd, rn, rs, 4'b1001, rm};
    end else if (code >= 55 && code <= 114) begin
      l   = code <= 84;
      idx = l ? code - 55 : code - 85;
      if (idx < 24) begin
        b    = 1'(idx / 12);
        r    = 1'((idx / 6) % 2);
        u    = 1'((idx / 3) % 2);
        mode = idx % 3;
        p    = mode != 0;
        w    = (mode == 0) ? 1'($urandom) : (mode == 2);
        if (r) i = {cond, 3'b011, p, u, b, w, l, rn, rd, 5'($urandom), 2'($urandom), 1'b0, rm};
        else   i = {cond, 3'b010, p, u, b, w, l, rn, rd, 12'($urandom)};
      end else begin
        imm  = 1'((idx - 24) / 3);
        mode = (idx - 24) % 3;
        p    = mode != 0;
        w    = mode == 2;
        u    = 1'($urandom);
        sel  = l ? 1 + int'($urandom % 3) : 1;   // SH field
        if (imm) i = {cond, 3'b000, p, u, 1'b1, w, l, rn, rd, 4'($urandom), 1'b1, 2'(sel), 1'b1, 4'($urandom)};
        else     i = {cond, 3'b000, p, u, 1'b0, w, l, rn, rd, 4'b0000, 1'b1, 2'(sel), 1'b1, rm};
      end
    end else if (code >= 115 && code <= 138) begin
      l   = code <= 126;
      idx = l ? code - 115 : code - 127;
      p   = 1'(idx / 6);
      u   = 1'((idx / 3) % 2);
      case (idx % 3)
        0: begin s = 1'b0; w = 1'b0; end
        1: begin s = 1'b0; w = 1'b1; end
        default: begin s = 1'b1; w = 1'($urandom); end
      endcase
      i = {cond, 3'b100, p, u, s, w, l, rn, 16'($urandom)};
    end else if (code == 139 || code == 140) begin
      i = {cond, 5'b00010, 1'(code == 140), 2'b00, rn, rd, 4'b0000, 4'b1001, rm};
    end else if (code == 141 || code == 142) begin
      i = {cond, 3'b101, 1'(code == 142), 24'($urandom)};
    end else begin
      case ($urandom % 7)
        0: i = {cond, 4'b1110, 24'($urandom)};                               // coprocessor
        1: i = {cond, 4'b1111, 24'($urandom)};                               // SWI
        2: i = {cond, 5'b00010, 1'($urandom), 2'b00, 4'hF, rd, 12'h000};      // MRS
        3: i = {cond, 24'h12FFF1, rm};                                       // BX
        4: i = {cond, 3'b011, 5'($urandom), rn, rd, 7'($urandom), 1'b1, rm}; // undefined
        5: i = {cond, 3'b000, 1'b1, 1'($urandom), 1'($urandom), 1'($urandom), 1'b0,
                rn, rd, 4'h0, 1'b1, 1'b1, 1'($urandom), 1'b1, rm};           // STR with S set
        default: i = {cond, 3'b000, 1'b0, 1'($urandom), 1'($urandom), 1'b1, 1'b1,
                rn, rd, 4'h0, 1'b1, 2'b01, 1'b1, rm};                        // LDRH post, W set
      endcase
    end
    return i;
  endfunction

endpackage
