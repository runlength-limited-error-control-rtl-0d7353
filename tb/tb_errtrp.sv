// tb_errtrp -- the error-trapping decoder on its own.
//
// The testbench plays the control block: each frame is 2n clk2 periods, eting
// high for the first n, netrst low in the last. The received word (reference
// encoder plus an error pattern) is presented on din once per pass, first bit
// first. Checked per word: aleqb at the start of the second pass (high only
// if no error hit the message bits), nerrdet one period later, the k message
// bits on datout at the end of the second pass (corrected if the errors, at
// most t of them, lie in q cyclically consecutive positions, untouched
// otherwise) and aleqb in the last period (high when corrected).
module tb_errtrp;
  import rlecc_tb_pkg::*;
  logic        clk2 = 1'b1, netrst = 1'b0, eting = 1'b1, din = 1'b0;
  logic [14:0] j = '0;
  logic [3:0]  t = '0;
  logic        datout, aleqb, nerrdet;
  int checks = 0, failures = 0;

  errtrp dut (.clk2(clk2), .netrst(netrst), .eting(eting), .din(din), .j(j), .t(t),
              .datout(datout), .aleqb(aleqb), .nerrdet(nerrdet));

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s", what);
    end
  endfunction

  task automatic edge2();
    #4 clk2 = 1'b1;
    #5 clk2 = 1'b0;
  endtask

  task automatic run_word(input int n, input int k, input int tt, input logic [15:0] g,
                          input word_t u, input word_t e);
    int q;
    word_t r, kmask;
    bit corr, edb;
    q = n - k;
    kmask = word_t'((1 << k) - 1);
    r = encode(u, k, q, g) ^ e;
    corr = (e == '0) || (popcount(e) <= tt && confined(e, n, q));
    edb = corr && ((e & kmask) == '0);
    for (int p = 0; p < 2 * n; p++) begin
      #1;
      eting  = (p < n);
      netrst = (p != 2 * n - 1);
      din    = r[n - 1 - (p % n)];
      #0;
      if (p == n)
        check(aleqb == edb, $sformatf("n=%0d e=%h aleqb after first pass %b", n, e, aleqb));
      if (p == n + 1)
        check(nerrdet == edb, $sformatf("n=%0d e=%h nerrdet %b", n, e, nerrdet));
      if (p >= n + q) begin
        logic exp_bit;
        int b;
        b = k - 1 - (p - n - q);
        exp_bit = u[b] ^ (corr ? 1'b0 : e[b]);
        check(datout == exp_bit, $sformatf("n=%0d e=%h message bit %0d = %b", n, e, b, datout));
      end
      if (p == 2 * n - 1)
        check(aleqb == corr, $sformatf("n=%0d e=%h aleqb at end %b", n, e, aleqb));
      edge2();
    end
  endtask

  initial begin
    int ns[3] = '{7, 15, 31};
    int ks[3] = '{4, 5, 16};
    int ts[3] = '{1, 3, 3};
    logic [15:0] gs[3] = '{16'h000B, 16'h0537, 16'h8FAF};
    for (int c = 0; c < 3; c++) begin
      int n, k;
      n = ns[c];  k = ks[c];
      j = j_pins(n - k, gs[c]);
      t = 4'(ts[c]);
      // reset period
      #1 netrst = 1'b0;
      edge2();
      for (int x = 0; x < 150; x++) begin
        word_t u, e;
        int nerr;
        u = word_t'($urandom) & word_t'((1 << k) - 1);
        e = '0;
        nerr = $urandom_range(ts[c]);
        if (x % 3 == 0) begin
          int s0;
          s0 = $urandom_range(n - 1);
          for (int y = 0; y < nerr; y++) e[(s0 + $urandom_range(n - k - 1)) % n] = 1'b1;
        end else
          for (int y = 0; y < nerr; y++) e[$urandom_range(n - 1)] = 1'b1;
        run_word(n, k, ts[c], gs[c], u, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
