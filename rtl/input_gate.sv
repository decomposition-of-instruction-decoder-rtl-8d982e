// input_gate: the AND-OR gates in front of a sub-decoder.
//
// When the sub-decoder is switched off (off = 1) its inputs are frozen at a
// fixed pattern, FORCE, that is a don't-care minterm of that sub-decoder; the
// sub-decoder is built to output all zeros for it. Freezing the inputs stops
// switching activity from propagating into the idle sub-circuit. Each bit is
// one gate: an OR with the control where the FORCE bit is 1 (the off signal
// drives it to 1) and an AND with the inverted control where the FORCE bit is
// 0 (the off signal drives it to 0). For FORCE = 4'b1101 this is the
// OR-OR-AND-OR row of gates.
//
// Purely combinational; the bit order of FORCE follows the data input.
module input_gate #(
  parameter int          W     = 16,
  parameter logic [W-1:0] FORCE = '0
) (
  input  logic [W-1:0] din,
  input  logic         off,   // 1: sub-decoder switched off
  output logic [W-1:0] dout
);
  always_comb begin
    for (int i = 0; i < W; i++) begin
      if (FORCE[i]) dout[i] = din[i] | off;
      else          dout[i] = din[i] & ~off;
    end
  end
endmodule
