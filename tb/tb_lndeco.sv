// tb_lndeco -- checks that the line decoder outputs, after each falling clk1
// edge, the XOR of the code word bit and modification vector bit presented
// before that edge.
module tb_lndeco;
  logic clk1 = 1'b1, eclc = 1'b0, modv = 1'b0, ecc;
  int checks = 0, failures = 0;

  lndeco dut (.clk1(clk1), .eclc(eclc), .modv(modv), .ecc(ecc));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic a, b;
    for (int i = 0; i < 400; i++) begin
      a = 1'($urandom);  b = 1'($urandom);
      eclc = a;  modv = b;
      #5 clk1 = 1'b0;        // falling edge latches both bits
      #5 clk1 = 1'b1;
      checks++;
      if (ecc !== (a ^ b)) begin
        failures++;
        $display("FAIL step %0d: eclc=%b modv=%b ecc=%b", i, a, b, ecc);
      end
      // inputs changing between edges must not reach the output
      eclc = ~a;  modv = b;
      #1;
      checks++;
      if (ecc !== (a ^ b)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
