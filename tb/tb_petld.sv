// tb_petld -- the decoder chip driven pin by pin.
//
// Code words from a reference encoder, with a modification vector and
// channel errors added, go in on eclc while the vector itself goes in on
// modv, both changing on rising clk1 edges. The clocks keep the required
// ratios (f_clk2 = 2 f_clk1, f_clk3 = k/n f_clk1) with falling edges aligned
// at every frame start, and nreset is either a single reset pulse or a frame
// pulse. Checked per word: the message on dataout two frames later and
// nerrdet after the first pass and after the correction. Codes: BCH(15,5)
// t = 3, Hamming(7,4) t = 1, BCH(31,16) t = 3. Then the two register checks
// of the device's test program:
//  * input and output registers: all J pins low (no feedback, so nothing is
//    ever corrected) with n = k = 31 and with n = 20, k = 9 on alternating
//    zeros and ones; every message must come out unchanged;
//  * syndrome register: t = 15, so every syndrome counts as trapped and is
//    added onto the check bits; with M = n the whole word comes out, and its
//    check bits must equal the received ones plus the syndrome X^q r(X) mod
//    g(X) of the received word r (BCH(15,5), and BCH(31,16), which uses all 15
//    stages).
module tb_petld;
  import rlecc_tb_pkg::*;

  logic        wclk = 1'b0, dclk = 1'b0, mclk = 1'b0, dframe = 1'b0, dec_in = 1'b0, modv = 1'b0;
  logic [14:0] modv_sw = '0, j = '0;
  logic [4:0]  w = '0, m = '0;
  logic [3:0]  t = '0;
  logic        dec_out, nerrdet;

  petld dut (
    .clk1(wclk), .clk2(dclk), .clk3(mclk), .nreset(dframe), .eclc(dec_in), .modv(modv),
    .j(j), .w(w), .m(m), .t(t), .dataout(dec_out), .nerrdet(nerrdet)
  );

  int checks = 0, failures = 0;
  int n_trap1 = 0, n_trap2 = 0, n_endaround = 0, n_untrapped = 0;
  int n_modv = 0, n_single = 0, n_frame = 0, n_syncheck = 0, n_iocheck = 0;

  word_t us[$], es[$];

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t %s", $time, what);
    end
  endfunction

  // Sends the words us[]/es[] through the board for one code.
  // mo is the output length programmed on the M pins: k for normal decoding,
  // n to see the whole corrected word (used with t = 15, where every syndrome
  // counts as trapped and is added onto the check bits).
  task automatic run_session(input int n, input int k, input int tt, input logic [15:0] g,
                             input logic [14:0] par, input bit frame_pulse,
                             input int mo = 0);
    int q, T1, T2, T3, F, F0, nw, total;
    word_t cw[$], ow[$], mv, kmask;
    bit corr[$], untr[$];
    q  = n - k;
    if (mo == 0) mo = k;
    T2 = 2 * mo;  T1 = 4 * mo;  T3 = 4 * n;
    F  = n * T1;  F0 = F;
    nw = us.size();
    kmask = word_t'((1 << k) - 1);
    total = F0 + (nw + 3) * F;
    j = j_pins(q, g);  w = 5'(n);  m = 5'(mo);  t = 4'(tt);  modv_sw = par;
    mv = '0;
    for (int i = 0; i < n; i++) mv[n - 1 - i] = par[14 - (i % 15)];
    for (int x = 0; x < nw; x++) begin
      cw.push_back(encode(us[x], k, q, g));
      corr.push_back(tt == 15 || es[x] == '0 || (popcount(es[x]) <= tt && confined(es[x], n, q)));
      untr.push_back(!corr[x]);
      if (tt == 15) begin
        // every syndrome trapped: the syndrome of the received word lands on
        // its check bits, the message bits pass unchanged
        word_t rr;
        rr = cw[x] ^ es[x];
        ow.push_back(rr ^ (word_t'(check_bits(rr, n, q, g)) << k));
        n_syncheck++;
      end else
        ow.push_back((us[x] ^ (corr[x] ? word_t'(0) : es[x])) & kmask);
      if (tt != 15 && es[x] != '0 && corr[x]) begin
        if ((es[x] & kmask) == '0) n_trap1++; else n_trap2++;
        if (end_around(es[x], n, q)) n_endaround++;
      end
      if (untr[x]) n_untrapped++;
      if (mv != '0) n_modv++;
      if (frame_pulse) n_frame++; else n_single++;
    end
    for (int tick = 0; tick < total; tick++) begin
      wclk = (tick % T1) >= T1 / 2;
      dclk = (tick % T2) >= T2 / 2;
      mclk = (tick % T3) >= T3 / 2;
      // reset / frame pulse: low across the falling dclk edge that starts a frame
      if (tick < F0 + T2 / 2) dframe = 1'b0;
      else if (frame_pulse) dframe = !(((tick - F0 + T2 / 2) % F) < T2);
      else dframe = 1'b1;
      // line input: changes on rising wclk edges, latched on the next falling one
      if (tick % T1 == T1 / 2 && tick + T1 / 2 >= F0) begin
        int d, wi, bi;
        d  = (tick + T1 / 2 - F0) / T1;
        wi = d / n;  bi = d % n;
        if (wi < nw) dec_in = cw[wi][n-1-bi] ^ es[wi][n-1-bi] ^ mv[n-1-bi];
        else         dec_in = 1'b0;
        modv = mv[n-1-bi];
      end
      // nerrdet, sampled mid-period of dclk
      if (tick % T2 == T2 / 2 && tick > F0) begin
        int e, fr, pos;
        e = (tick - F0) / T2;  fr = e / (2 * n);  pos = e % (2 * n);
        if (pos == n + 1 && fr >= 1 && fr - 1 < nw)
          check(nerrdet == (tt == 15 || (corr[fr-1] && (es[fr-1] & kmask) == '0)),
                $sformatf("n=%0d word %0d nerrdet after first pass = %b", n, fr - 1, nerrdet));
        if (pos == 0 && fr >= 2 && fr - 2 < nw)
          check(nerrdet == corr[fr-2],
                $sformatf("n=%0d word %0d nerrdet after correction = %b", n, fr - 2, nerrdet));
      end
      // dec_out, sampled mid-period of mclk
      if (tick % T3 == T3 / 2 && tick > F0) begin
        int e3, fr, jb, wi;
        logic exp_bit;
        e3 = (tick - F0) / T3;  fr = e3 / mo;  jb = e3 % mo;  wi = fr - 2;
        if (wi >= 0 && wi < nw) begin
          exp_bit = ow[wi][mo-1-jb];
          check(dec_out == exp_bit,
                $sformatf("n=%0d word %0d output bit %0d = %b, expected %b", n, wi, jb, dec_out, exp_bit));
        end
      end
      #1;
    end
    us.delete();  es.delete();
  endtask

  localparam logic [15:0] G_BCH15  = 16'b0000_0101_0011_0111;  // X^10+X^8+X^5+X^4+X^2+X+1
  localparam logic [15:0] G_HAM7   = 16'b0000_0000_0000_1011;  // X^3+X+1
  localparam logic [15:0] G_BCH31  = 16'b1000_1111_1010_1111;  // X^15+X^11+...+X+1
  localparam logic [14:0] MODV_BCH15 = 15'b100010101001001;

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int rl;
    word_t v, u;
    // session 1: BCH(15,5), single reset pulse; all single errors, random
    // double and triple errors
    for (int x = 0; x < 3; x++) begin us.push_back(word_t'($urandom_range(31))); es.push_back('0); end
    for (int a = 0; a < 15; a++) begin
      us.push_back(word_t'($urandom_range(31))); es.push_back(word_t'(1) << a);
    end
    for (int x = 0; x < 60; x++) begin
      word_t e;
      e = '0;
      for (int y = 0; y < 2 + x % 2; y++) e[$urandom_range(14)] = 1'b1;
      us.push_back(word_t'($urandom_range(31))); es.push_back(e);
    end
    run_session(15, 5, 3, G_BCH15, MODV_BCH15, 1'b0);

    // session 2: Hamming(7,4), frame pulse, vector 1010101
    for (int a = 0; a < 16; a++) begin
      us.push_back(word_t'(a)); es.push_back('0);
      for (int b = 0; b < 7; b++) begin us.push_back(word_t'(a)); es.push_back(word_t'(1) << b); end
    end
    run_session(7, 4, 1, G_HAM7, {7'b1010101, 8'b0}, 1'b1);

    // session 3: BCH(31,16), t = 3, frame pulse
    for (int x = 0; x < 24; x++) begin
      word_t e;
      e = '0;
      if (x % 2 == 0) begin
        int s0;
        s0 = $urandom_range(30);
        for (int y = 0; y < x % 4; y++) e[(s0 + $urandom_range(14)) % 31] = 1'b1;
      end else
        for (int y = 0; y < 3; y++) e[$urandom_range(30)] = 1'b1;
      us.push_back(word_t'($urandom_range(32'hffff))); es.push_back(e);
    end
    run_session(31, 16, 3, G_BCH31, 15'($urandom_range(32'h7fff)) | 15'h1, 1'b1);

    // session 4: pass-through, n = k = 31, no feedback taps, t = 0
    for (int x = 0; x < 8; x++) begin us.push_back(word_t'($urandom)); es.push_back('0); end
    run_session(31, 31, 0, 16'h0001, 15'h0, 1'b0);
    n_iocheck += 8;

    // session 5: input and output register check: all J pins low, words of
    // alternating zeros and ones, lengths set by W = 20 and M = 9
    for (int x = 0; x < 8; x++) begin
      us.push_back(x % 2 ? word_t'(31'h2AAAAAAA) : word_t'(31'h55555555)); es.push_back('0);
    end
    run_session(20, 9, 0, 16'h0000, 15'h0, 1'b1);
    n_iocheck += 8;

    // session 6: syndrome register check: t = 15, so errors always count as
    // trapped and the syndrome of each received word appears on its check
    // bits at the output (M = n). BCH(15,5) and BCH(31,16), which uses all
    // fifteen stages and feedback taps.
    for (int x = 0; x < 16; x++) begin
      us.push_back(word_t'($urandom_range(31)));
      es.push_back(word_t'($urandom_range(32'h7fff)) & (x % 4 == 0 ? word_t'(0) : word_t'(32'h7fff)));
    end
    run_session(15, 5, 15, G_BCH15, MODV_BCH15, 1'b1, 15);
    for (int x = 0; x < 16; x++) begin
      us.push_back(word_t'($urandom_range(32'hffff)));
      es.push_back(word_t'($urandom) & (x % 4 == 0 ? word_t'(0) : word_t'(32'h7fffffff)));
    end
    run_session(31, 16, 15, G_BCH31, 15'h0, 1'b1, 31);

    $display("mechanisms: trapped after first pass %0d, trapped in second pass %0d, end-around %0d, untrappable %0d",
             n_trap1, n_trap2, n_endaround, n_untrapped);
    $display("            vector removed %0d, single-pulse words %0d, frame-pulse words %0d",
             n_modv, n_single, n_frame);
    $display("            register check words %0d, syndrome check words %0d", n_iocheck, n_syncheck);
    check(n_iocheck > 0 && n_syncheck > 0, "register and syndrome checks ran");
    check(n_trap1 > 0, "no word trapped after the first pass");
    check(n_trap2 > 0, "no word trapped in the second pass");
    check(n_endaround > 0, "no end-around pattern");
    check(n_untrapped > 0, "no untrappable pattern");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
