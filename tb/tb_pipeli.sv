// tb_pipeli -- the variable-length double buffer.
//
// Register 1 runs on clka, register 2 on clkb at twice the rate, with falling
// edges aligned (as in the input buffer). For random lengths L a word is shifted
// in on clka; at the clkb edge that latches its last bit the load is pulsed.
// With sinb tied to outb the word must then appear at outb first bit first and
// repeat every L clkb periods, while the next word is already being shifted
// into register 1. sel = 0 must bypass the buffer.
module tb_pipeli;
  logic       clka = 1'b1, clkb = 1'b1, ina = 1'b0, nloadb = 1'b1;
  logic [4:0] sel = 5'd1;
  logic       outb;
  int checks = 0, failures = 0;

  pipeli dut (.clka(clka), .ina(ina), .clkb(clkb), .sinb(outb), .nloadb(nloadb),
              .sel(sel), .outb(outb));

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one clka period = two clkb periods; falling edges of both at the start
  task automatic clka_period(input logic bit_in, input bit load_at_end,
                             input logic [30:0] word, input int len, input int base);
    ina = bit_in;
    #4 clka = 1'b1; clkb = 1'b1;
    #5 clkb = 1'b0;                    // mid-period clkb edge (register 2 only)
    #1;
    if (base >= 0) begin
      checks++;
      if (outb !== word[len - 1 - ((base + 1) % len)]) failures++;
    end
    if (load_at_end) nloadb = 1'b0;
    #4 clkb = 1'b1;
    #5 {clka, clkb} = 2'b00;           // common falling edge
    #1;
    nloadb = 1'b1;
    if (base >= 0 && !load_at_end) begin
      checks++;
      if (outb !== word[len - 1 - ((base + 2) % len)]) begin
        failures++;
        if (failures < 10) $display("FAIL len=%0d step %0d", len, base + 2);
      end
    end
  endtask

  initial begin
    logic [30:0] prev, cur;
    int plen, len;
    plen = 0;  prev = '0;
    // bring clocks to the common falling edge
    #5 {clka, clkb} = 2'b00;
    #1;
    for (int wd = 0; wd < 60; wd++) begin
      len = (wd == 0) ? 31 : $urandom_range(1, 31);
      cur = 31'($urandom);
      sel = 5'(plen == 0 ? len : plen);
      // send the len bits of cur, first bit first; the last one is loaded
      // straight from ina at the common edge ending this word
      for (int i = 0; i < len; i++)
        clka_period(cur[len - 1 - i], i == len - 1, prev, (plen == 0) ? 1 : plen,
                    (plen == 0) ? -1 : 2 * i);
      // after the load the first bit is on outb
      sel = 5'(len);
      #0;
      checks++;
      if (outb !== cur[len - 1]) begin
        failures++;
        $display("FAIL word %0d len %0d first bit", wd, len);
      end
      prev = cur;  plen = len;
    end
    // bypass
    sel = 5'd0;
    for (int i = 0; i < 20; i++) begin
      ina = 1'($urandom);
      #1;
      checks++;
      if (outb !== ina) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
