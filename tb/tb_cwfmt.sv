// tb_cwfmt -- check-bit order correction.
//
// Two instances, the default BCH(15,5) size (N = 15, Q = 10) and a
// Hamming(7,4) size (N = 7, Q = 3), receive words back to back, one bit per
// falling wclk edge, with the check bits of each word in reverse order. The
// frame pulse is low at the edge of each word's last bit. After that edge
// dout must present the word in cyclic order (check bits in order, then the
// message, unchanged), one bit per wclk period, while the next word is
// already coming in. The words are built by the reference encoder.
module tb_cwfmt;
  import rlecc_tb_pkg::*;
  logic wclk = 1'b1, nload = 1'b1, din15 = 1'b0, din7 = 1'b0;
  logic dout15, dout7;
  int checks = 0, failures = 0;

  cwfmt dut15 (.wclk(wclk), .nload(nload), .din(din15), .dout(dout15));
  cwfmt #(.N(7), .Q(3)) dut7 (.wclk(wclk), .nload(nload), .din(din7), .dout(dout7));

  localparam int NW = 40;
  localparam logic [15:0] G_BCH15 = 16'h0537;
  localparam logic [15:0] G_HAM7  = 16'h000B;

  function automatic word_t invert_checks(input word_t c, input int n, input int q);
    word_t r = c;
    for (int i = 0; i < q; i++) r[n-1-i] = c[n-q+i];
    return r;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always #5 wclk = ~wclk;

  initial begin
    word_t c15[NW], c7[NW], inv;
    for (int x = 0; x < NW; x++) begin
      c15[x] = encode(word_t'($urandom_range(31)), 5, 10, G_BCH15);
      c7[x]  = encode(word_t'($urandom_range(15)), 4, 3, G_HAM7);
    end
    // 15-bit instance; edge e is the e-th falling wclk edge, inputs change
    // 1 time unit after the previous edge
    for (int e = 0; e < NW * 15; e++) begin
      int w15, b15;
      w15 = e / 15;  b15 = e % 15;
      inv   = invert_checks(c15[w15], 15, 10);
      din15 = inv[14 - b15];
      din7  = 1'b0;
      nload = !(b15 == 14);
      @(negedge wclk);
      #1;
      // output of the 15-bit instance: word w15 loaded at the edge of its
      // last bit, shown from then on
      if (e >= 14) begin
        int d, wo, bo;
        d = e - 14;  wo = d / 15;  bo = d % 15;
        check(dout15 == c15[wo][14 - bo],
              $sformatf("N=15 word %0d bit %0d = %b", wo, bo, dout15));
      end
    end
    // 7-bit instance on its own frame pulse
    for (int e = 0; e < NW * 7; e++) begin
      int w7, b7;
      w7 = e / 7;  b7 = e % 7;
      inv   = invert_checks(c7[w7], 7, 3);
      din7  = inv[6 - b7];
      din15 = 1'b0;
      nload = !(b7 == 6);
      @(negedge wclk);
      #1;
      if (e >= 6) begin
        int d, wo, bo;
        d = e - 6;  wo = d / 7;  bo = d % 7;
        check(dout7 == c7[wo][6 - bo], $sformatf("N=7 word %0d bit %0d = %b", wo, bo, dout7));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
