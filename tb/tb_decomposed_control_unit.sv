// tb_decomposed_control_unit: end-to-end test of the control path at its
// default parameters.
//
// A stream of instructions of every intermediate code (built by tb_gen_pkg,
// so the expected code is known by construction), with random bubbles and
// one reset in the middle, is fed one per cycle. A model of the pipeline
// timing (code and control signals of an instruction presented in cycle t
// appear at the decode stage in t+1, at the execute stage in t+2, at the
// memory/write-back stage in t+3) predicts every output each cycle. The
// control words come from ctrl_pkg::full_ctrl, the undecomposed decoder, and
// for the reference codes also from the hand-written words of tb_ref_pkg.
//
// Mechanisms counted, each must occur: each I-Decoder, each S-Decoder of
// both stages, a bubble holding the instruction register, an instruction
// outside the 142 types, a reset with instructions in flight.
module tb_decomposed_control_unit;
  import ctrl_pkg::*;
  import tb_gen_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 20000;

  logic        clk, rst_n, instr_valid;
  logic [31:0] instr, ir;
  icode_t      id_code, ex_code, mem_code;
  id_ctrl_t    id_ctrl;
  ex_ctrl_t    ex_ctrl;
  mem_ctrl_t   mem_ctrl;
  logic        i_dec1_on, s_id_dec1_on, s_ex_dec1_on;

  decomposed_control_unit dut (
    .clk(clk), .rst_n(rst_n), .instr_valid(instr_valid), .instr(instr),
    .ir(ir), .id_code(id_code), .id_ctrl(id_ctrl), .ex_code(ex_code), .ex_ctrl(ex_ctrl),
    .mem_code(mem_code), .mem_ctrl(mem_ctrl),
    .i_dec1_on(i_dec1_on), .s_id_dec1_on(s_id_dec1_on), .s_ex_dec1_on(s_ex_dec1_on)
  );

  int checks, failures;
  int n_idec [2], n_sid [2], n_sex [2];
  int n_bubble, n_undef, n_reset, n_ref;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t %s", $time, what);
    end
  endtask

  always #5 clk = ~clk;

  initial begin
    #((N + 100) * 10 * 2);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // expected state of the model
    logic [31:0] e_ir;
    int          e_id, e_ex, e_mem;   // expected codes per stage
    int          c;
    bit          v, do_reset;
    ctrl_t       w;
    checks = 0; failures = 0;
    n_idec = '{0, 0}; n_sid = '{0, 0}; n_sex = '{0, 0};
    n_bubble = 0; n_undef = 0; n_reset = 0; n_ref = 0;
    clk = 0; rst_n = 0; instr_valid = 0; instr = '0;
    repeat (2) @(posedge clk);
    #1;
    check(ir == '0 && id_code == 0 && ex_code == 0 && mem_code == 0 &&
          id_ctrl == '0 && ex_ctrl == '0 && mem_ctrl == '0, "reset state");
    e_ir = '0; e_id = 0; e_ex = 0; e_mem = 0;
    @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < N; n++) begin
      do_reset = (n == N / 2);
      v = ($urandom % 5) != 0;
      c = (n < 2 * (NTYPES + 1)) ? n % (NTYPES + 1) : int'($urandom % (NTYPES + 1));
      instr = gen_instr(c);
      instr_valid = v;
      rst_n = !do_reset;
      @(posedge clk);
      #1;
      // model update
      if (do_reset) begin
        e_ir = '0; e_id = 0; e_ex = 0; e_mem = 0;
        n_reset++;
        check(ir == '0 && id_code == 0 && ex_code == 0 && mem_code == 0 &&
              ex_ctrl == '0 && mem_ctrl == '0, "reset in flight");
      end else begin
        e_mem = e_ex;
        e_ex  = e_id;
        if (v) begin
          e_ir = instr;
          e_id = c;
        end else begin
          e_id = 0;
          n_bubble++;
        end
        check(ir == e_ir, "instruction register");
        check(int'(id_code) == e_id, $sformatf("id_code %0d expected %0d", id_code, e_id));
        check(int'(ex_code) == e_ex, $sformatf("ex_code %0d expected %0d", ex_code, e_ex));
        check(int'(mem_code) == e_mem, $sformatf("mem_code %0d expected %0d", mem_code, e_mem));
        w = full_ctrl(icode_t'(e_id));
        check(id_ctrl == w.id, "decode-stage signals");
        w = full_ctrl(icode_t'(e_ex));
        check(ex_ctrl == w.ex, "execute-stage CSR");
        w = full_ctrl(icode_t'(e_mem));
        check(mem_ctrl == w.mem, "memory-stage CSR");
        for (int r = 0; r < NREF - 1; r++)
          if (REF_CODES[r] == e_mem) begin
            w = hand_ctrl(e_mem);
            check(mem_ctrl == w.mem, "memory-stage CSR, hand word");
            n_ref++;
          end
        check(i_dec1_on == e_ir[26], "I-Decoder selection");
        n_idec[i_dec1_on]++;
        if (e_id != 0) n_sid[s_id_dec1_on]++;
        if (e_ex != 0) n_sex[s_ex_dec1_on]++;
        if (v && c == 0) n_undef++;
      end
    end
    check(n_idec[0] > 0 && n_idec[1] > 0, "both I-Decoders used");
    check(n_sid[0] > 0 && n_sid[1] > 0, "both decode-stage S-Decoders used");
    check(n_sex[0] > 0 && n_sex[1] > 0, "both execute-stage S-Decoders used");
    check(n_bubble > 0, "bubble");
    check(n_undef > 0, "instruction outside the set");
    check(n_reset > 0, "reset in flight");
    check(n_ref > 0, "hand-checked words reached");
    $display("I-Decoder0/1 on: %0d / %0d cycles", n_idec[0], n_idec[1]);
    $display("decode-stage S-Decoder0/1: %0d / %0d instructions", n_sid[0], n_sid[1]);
    $display("execute-stage S-Decoder0/1: %0d / %0d instructions", n_sex[0], n_sex[1]);
    $display("bubbles %0d, undefined %0d, resets %0d, hand-checked %0d",
             n_bubble, n_undef, n_reset, n_ref);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
