// s_activate_control: chooses which signal sub-decoder is switched on.
//
// It decodes the 8-bit intermediate code against the partition of the codes
// into group 0 (frequent) and group 1 (rare), given as a 256-bit mask with a
// 1 for every group-1 code. Outputs are active-low "on" signals:
// s_control0 = 0 switches S-Decoder0 on, s_control1 = 0 switches S-Decoder1
// on; exactly one is 0. Purely combinational.
module s_activate_control
  import ctrl_pkg::*;
#(
  parameter code_mask_t GROUP1 = '0
) (
  input  icode_t code,
  output logic   s_control0,
  output logic   s_control1
);
  logic in_g1;
  always_comb begin
    in_g1      = GROUP1[code];
    s_control0 = in_g1;
    s_control1 = ~in_g1;
  end
endmodule
