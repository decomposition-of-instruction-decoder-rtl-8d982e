// tb_input_gate: the four-input example with don't-care minterm 1101
// (OR-OR-AND-OR gates) plus a 16-bit gate with a random pattern. When off,
// the output must be the pattern whatever the input; when on, the input.
module tb_input_gate;
  logic [3:0]  d4, q4;
  logic [15:0] d16, q16;
  logic        off;
  int          checks, failures;
  localparam logic [15:0] P16 = 16'hA5C3;

  input_gate #(.W(4),  .FORCE(4'b1101)) dut4  (.din(d4),  .off(off), .dout(q4));
  input_gate #(.W(16), .FORCE(P16))     dut16 (.din(d16), .off(off), .dout(q16));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    checks = 0; failures = 0;
    for (int n = 0; n < 64; n++) begin
      d4  = 4'(n);
      d16 = 16'($urandom);
      off = 1'(n >> 4);
      #1;
      checks += 2;
      if (q4 != (off ? 4'b1101 : d4)) begin
        failures++; $display("FAIL 4-bit off=%b d=%b q=%b", off, d4, q4);
      end
      if (q16 != (off ? P16 : d16)) begin
        failures++; $display("FAIL 16-bit off=%b d=%h q=%h", off, d16, q16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
