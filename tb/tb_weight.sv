// tb_weight -- exhaustive check of the syndrome weight against a bit count.
module tb_weight;
  logic [14:0] s;
  logic [3:0]  w;
  int checks = 0, failures = 0;

  weight dut (.s(s), .w(w));

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 15); v++) begin
      int c;
      s = 15'(v);
      #1;
      c = 0;
      for (int b = 0; b < 15; b++) if ((v >> b) & 1) c++;
      checks++;
      if (int'(w) != c) begin
        failures++;
        if (failures < 10) $display("FAIL s=%h w=%0d expected %0d", s, w, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
