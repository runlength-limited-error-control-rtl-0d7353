// tb_modv_piso -- the modification vector register.
//
// With a single load pulse the 15-bit vector must come out first bit first
// and repeat every 15 clk1 periods (circular connection). With a load pulse
// every n periods (n < 15) only the first n bits must come out, restarting at
// every pulse. The output is checked once in every clk1 period, before the
// falling edge that would latch it in the decoder.
module tb_modv_piso;
  logic        clk1 = 1'b1, nload = 1'b1;
  logic [14:0] par = '0;
  logic        sout;
  int checks = 0, failures = 0;

  modv_piso #(.LEN(15)) dut (.clk1(clk1), .nload(nload), .par(par), .sout(sout));

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one clk1 period: set nload, check the bit due in this period, falling edge
  task automatic period(input logic nl, input logic exp_bit, input string what);
    #1 nload = nl;
    #1;
    checks++;
    if (sout !== exp_bit) begin
      failures++;
      if (failures < 10) $display("FAIL t=%0t %s: sout=%b expected %b", $time, what, sout, exp_bit);
    end
    #3 clk1 = 1'b1;
    #5 clk1 = 1'b0;
  endtask

  initial begin
    for (int v = 0; v < 20; v++) begin
      par = 15'($urandom);
      // single pulse, then three circulations
      for (int i = 0; i < 60; i++)
        period(i != 0, par[14 - (i % 15)], "single pulse");
      // frame pulse every n periods
      begin
        int n;
        n = $urandom_range(3, 15);
        for (int i = 0; i < 5 * n; i++)
          period((i % n) != 0, par[14 - (i % n)], "frame pulse");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
