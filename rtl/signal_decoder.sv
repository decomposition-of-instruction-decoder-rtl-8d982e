// signal_decoder: the decomposed signal decoder of one pipeline stage.
//
// It maps the 8-bit intermediate code to that stage's control signals
// (ctrl_pkg::stage_ctrl). STAGE_ID, the decode stage, produces the
// decode-stage signals, used at once, and the execute-stage signals, which go
// to the control-signal registers (CSR). STAGE_EX, fed from the instruction
// state register (ISR), produces the memory/write-back signals. Fields a
// stage does not produce are zero.
//
// Like the instruction decoder it is split into two coupled sub-decoders:
//   - s_activate_control decodes the code and switches on S-Decoder0 for
//     group-0 codes, S-Decoder1 for group-1 codes;
//   - an input_gate in front of each sub-decoder freezes the code of the one
//     that is off at 0, the code of no instruction, for which both
//     sub-decoders output zeros;
//   - output_or merges the two control words.
// The groups come from ctrl_pkg::s_group1_mask: INIT_GROUP0 (by default the
// three MOV instructions) is the frequent group, and every code a group-0
// code dominates is moved into group 0. GROUP1 may be overridden directly.
//
// Purely combinational.
module signal_decoder
  import ctrl_pkg::*;
#(
  parameter int         STAGE       = STAGE_ID,
  parameter code_mask_t INIT_GROUP0 = mov_group(),
  parameter code_mask_t GROUP1      = s_group1_mask(STAGE, INIT_GROUP0)
) (
  input  icode_t code,
  output ctrl_t  ctrl,
  output logic   s_control0,   // 0: S-Decoder0 on
  output logic   s_control1    // 0: S-Decoder1 on
);
  icode_t code0, code1;
  ctrl_t  ctrl0, ctrl1;

  s_activate_control #(.GROUP1(GROUP1)) u_act (
    .code      (code),
    .s_control0(s_control0),
    .s_control1(s_control1)
  );

  input_gate #(.W(CODE_W), .FORCE('0)) u_gate0 (.din(code), .off(s_control0), .dout(code0));
  input_gate #(.W(CODE_W), .FORCE('0)) u_gate1 (.din(code), .off(s_control1), .dout(code1));

  s_sub_decoder #(.STAGE(STAGE), .GROUP(0), .GROUP1(GROUP1)) u_dec0 (.code(code0), .ctrl(ctrl0));
  s_sub_decoder #(.STAGE(STAGE), .GROUP(1), .GROUP1(GROUP1)) u_dec1 (.code(code1), .ctrl(ctrl1));

  output_or #(.W(CTRL_W)) u_or (.a(ctrl0), .b(ctrl1), .y(ctrl));

endmodule
