// tb_cmp4le -- exhaustive check of the "weight <= t" comparator.
module tb_cmp4le;
  logic [3:0] a, b;
  logic       aleqb;
  int checks = 0, failures = 0;

  cmp4le dut (.a(a), .b(b), .aleqb(aleqb));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++) begin
        a = 4'(x);  b = 4'(y);
        #1;
        checks++;
        if (aleqb !== (x <= y)) begin
          failures++;
          $display("FAIL a=%0d b=%0d aleqb=%b", x, y, aleqb);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
