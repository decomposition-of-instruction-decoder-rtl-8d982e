// i_activate_control: chooses which instruction sub-decoder is switched on.
//
// The instructions are split into two groups by a single bit of the
// instruction (the partition bit): group 0 holds the instructions with the
// bit at 0, group 1 those with the bit at 1. The control outputs are active
// low "on" signals, as in the decomposed-decoder scheme: i_control0 = 0
// switches I-Decoder0 on, i_control1 = 0 switches I-Decoder1 on. Exactly one
// is 0 at any time. The logic is one wire and one inverter:
// i_control0 = bit, i_control1 = !bit.
//
// Purely combinational. The partition bit itself is chosen by the parent
// (instr_decoder), which passes it in as part_bit.
module i_activate_control (
  input  logic part_bit,    // the partition bit of the instruction register
  output logic i_control0,  // 0: I-Decoder0 on
  output logic i_control1   // 0: I-Decoder1 on
);
  always_comb begin
    i_control0 = part_bit;
    i_control1 = ~part_bit;
  end
endmodule
