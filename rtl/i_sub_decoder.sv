// i_sub_decoder: one of the two instruction sub-decoders (I-Decoder0/1).
//
// It decodes the 16-bit decode key ({instr[27:20], instr[11:4]}) of the
// instructions of its own group into the 8-bit intermediate code of
// ctrl_pkg. The group is fixed by the partition bit: I-Decoder GROUP handles
// the keys whose bit KEY_BIT equals GROUP. For keys of the other group,
// including the frozen pattern its input gates apply while it is off, it
// outputs all zeros, so it can be merged with its twin by an OR. Everything
// the group does not need is a don't care to synthesis, which is where the
// decomposition saves logic.
//
// Purely combinational.
module i_sub_decoder
  import ctrl_pkg::*;
#(
  parameter int GROUP   = 0,
  parameter int KEY_BIT = key_pos(26)   // partition bit, position in the key
) (
  input  key_t   key,
  output icode_t code
);
  always_comb begin
    if (int'(key[KEY_BIT]) == GROUP) code = decode_key(key);
    else                             code = '0;
  end
endmodule
