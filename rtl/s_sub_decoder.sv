// s_sub_decoder: one of the two signal sub-decoders (S-Decoder0/1).
//
// It turns the 8-bit intermediate code into the control signals that the
// signal decoder of pipeline stage STAGE produces (ctrl_pkg::stage_ctrl):
// for STAGE_ID the decode-stage and execute-stage fields, for STAGE_EX the
// memory/write-back fields. It does so only for the codes of its own group
// (GROUP1 mask, GROUP = 0 or 1) and outputs all zeros for every other code,
// including code 0, the frozen input of a switched-off sub-decoder.
//
// Purely combinational.
module s_sub_decoder
  import ctrl_pkg::*;
#(
  parameter int         STAGE  = STAGE_ID,
  parameter int         GROUP  = 0,
  parameter code_mask_t GROUP1 = '0
) (
  input  icode_t code,
  output ctrl_t  ctrl
);
  always_comb begin
    if (int'(GROUP1[code]) == GROUP) ctrl = stage_ctrl(STAGE, code);
    else                             ctrl = '0;
  end
endmodule
