// tb_synreg -- the syndrome register as a polynomial divider.
//
// For several cyclic codes, random n-bit words r are shifted in first bit
// first with feedback = input XOR top stage. After n shifts the q highest
// stages must hold X^q r(X) mod g(X), computed here by long division, and the
// unused stages must be zero. Code words must leave a zero syndrome. The
// synchronous clear and a plain shift (feedback 0) are checked as well.
module tb_synreg;
  import rlecc_tb_pkg::*;
  logic        clk = 1'b1, clr_n = 1'b0, fb = 1'b0;
  logic [14:0] j = '0, s;
  int checks = 0, failures = 0;

  synreg dut (.clk(clk), .clr_n(clr_n), .fb(fb), .j(j), .s(s));

  task automatic tick();
    #5 clk = 1'b0;
    #5 clk = 1'b1;
  endtask

  function automatic logic [14:0] rem_xq(input word_t r, input int n, input int q, input logic [15:0] g);
    logic [46:0] x;
    x = 47'(r) << q;
    for (int i = n + q - 1; i >= q; i--) if (x[i]) x = x ^ (47'(g) << (i - q));
    return x[14:0];
  endfunction

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ns[3] = '{7, 15, 31};
    int ks[3] = '{4, 5, 16};
    logic [15:0] gs[3] = '{16'h000B, 16'h0537, 16'h8FAF};
    for (int c = 0; c < 3; c++) begin
      int n, k, q;
      n = ns[c];  k = ks[c];  q = n - k;
      j = j_pins(q, gs[c]);
      for (int trial = 0; trial < 60; trial++) begin
        word_t r;
        logic [14:0] exp_s;
        r = word_t'($urandom) & word_t'((64'd1 << n) - 1);
        if (trial % 3 == 0) r = encode(r & word_t'((1 << k) - 1), k, q, gs[c]);
        clr_n = 1'b0;  tick();  clr_n = 1'b1;
        for (int i = n - 1; i >= 0; i--) begin
          fb = r[i] ^ s[14];
          tick();
        end
        exp_s = rem_xq(r, n, q, gs[c]) << (15 - q);
        checks++;
        if (s !== exp_s) begin
          failures++;
          $display("FAIL n=%0d r=%h syndrome %h expected %h", n, r, s, exp_s);
        end
        if (trial % 3 == 0) begin
          checks++;
          if (s !== '0) failures++;
        end
        // plain shift without feedback moves the contents up one stage
        begin
          logic [14:0] prev_s;
          prev_s = s;
          fb = 1'b0;
          tick();
          checks++;
          if (s !== {prev_s[13:0], 1'b0}) failures++;
        end
      end
    end
    // clear
    fb = 1'b1;  j = '1;  tick();
    clr_n = 1'b0;  tick();
    checks++;
    if (s !== '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
