// tb_output_or: random pairs, one of them often all zeros as from a
// switched-off sub-decoder.
module tb_output_or;
  logic [7:0] a, b, y;
  int         checks, failures;

  output_or #(.W(8)) dut (.a(a), .b(b), .y(y));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    checks = 0; failures = 0;
    for (int n = 0; n < 200; n++) begin
      a = 8'($urandom);
      b = 8'($urandom);
      if (n % 3 == 0) a = '0;
      if (n % 3 == 1) b = '0;
      #1;
      checks++;
      for (int k = 0; k < 8; k++)
        if (y[k] != (a[k] || b[k])) begin
          failures++; $display("FAIL a=%h b=%h y=%h", a, b, y); break;
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
