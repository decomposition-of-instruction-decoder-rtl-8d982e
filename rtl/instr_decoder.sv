// instr_decoder: the decomposed instruction decoder (ID).
//
// It maps a 32-bit ARM instruction to the 8-bit intermediate code of
// ctrl_pkg (0 = no instruction). Instead of one decoder it holds two coupled
// sub-decoders, I-Decoder0 and I-Decoder1, of which only one is on at a
// time:
//   - i_activate_control looks at one partition bit of the instruction,
//     PART_BIT, and switches on I-Decoder0 when it is 0, I-Decoder1 when it
//     is 1 (one inverter);
//   - an input_gate in front of each sub-decoder freezes the inputs of the
//     one that is off at a don't-care minterm of that sub-decoder: for
//     I-Decoder0 the key with only the partition bit set, for I-Decoder1 the
//     all-zero key. Both lie in the other group, so the idle sub-decoder
//     outputs zeros;
//   - output_or merges the two code outputs.
// The partition bit is chosen so that the split of execution frequency
// between the groups is as uneven as possible; bit 26 is the default.
//
// Purely combinational: the code is valid in the cycle the instruction is.
module instr_decoder
  import ctrl_pkg::*;
#(
  parameter int PART_BIT = 26
) (
  input  logic [31:0] instr,
  output icode_t      code,
  output logic        i_control0,   // 0: I-Decoder0 on
  output logic        i_control1    // 0: I-Decoder1 on
);
  localparam int   KB     = key_pos(PART_BIT);
  localparam key_t FORCE0 = key_t'(1) << KB;
  localparam key_t FORCE1 = '0;

  key_t   key, key0, key1;
  icode_t code0, code1;

  initial assert (key_has_bit(PART_BIT))
    else $error("PART_BIT must be one of instr[27:20] or instr[11:4]");

  assign key = instr_key(instr);

  i_activate_control u_act (
    .part_bit  (instr[PART_BIT]),
    .i_control0(i_control0),
    .i_control1(i_control1)
  );

  input_gate #(.W(KEY_W), .FORCE(FORCE0)) u_gate0 (.din(key), .off(i_control0), .dout(key0));
  input_gate #(.W(KEY_W), .FORCE(FORCE1)) u_gate1 (.din(key), .off(i_control1), .dout(key1));

  i_sub_decoder #(.GROUP(0), .KEY_BIT(KB)) u_dec0 (.key(key0), .code(code0));
  i_sub_decoder #(.GROUP(1), .KEY_BIT(KB)) u_dec1 (.key(key1), .code(code1));

  output_or #(.W(CODE_W)) u_or (.a(code0), .b(code1), .y(code));

endmodule
