// tb_rlecc_decoder_board -- end-to-end test of the decoder board at its
// default size.
//
// Builds code words with a reference encoder (rlecc_tb_pkg), adds the
// modification vector and channel errors, sends the stream through the board
// with properly phased clocks (f_dclk = 2 f_wclk, f_mclk = k/n f_wclk, falling
// edges aligned at every frame start) and checks, per word:
//   * the message on dec_out, in frame w+2 (latency two frames);
//   * nerrdet one clk2 period after the first pass of frame w+1 (high = no
//     error in the message bits) and at the start of frame w+2 (high = errors
//     corrected).
// Three sessions: BCH(15,5), t = 3, with the modification vector that limits
// the runlength to 10 and a single reset pulse (the vector register
// circulates); then Hamming(7,4) and BCH(31,16) with a frame pulse on dframe.
// In BCH(15,5) every pattern of one, two and three errors is sent; 450 of
// the 455 triple patterns lie within 10 cyclically consecutive bits and must
// be corrected, the other 5 must pass uncorrected.
// Mechanisms counted: trapping after the first pass, trapping during the
// second pass, end-around trapping, untrappable patterns, vector removal,
// single-pulse and frame-pulse operation.
module tb_rlecc_decoder_board;
  import rlecc_tb_pkg::*;

  logic        wclk = 1'b0, dclk = 1'b0, mclk = 1'b0, dframe = 1'b0, dec_in = 1'b0;
  logic [14:0] modv_sw = '0, j = '0;
  logic [4:0]  w = '0, m = '0;
  logic [3:0]  t = '0;
  logic        dec_out, nerrdet;

  rlecc_decoder_board dut (
    .wclk(wclk), .dclk(dclk), .mclk(mclk), .dframe(dframe), .dec_in(dec_in),
    .modv_sw(modv_sw), .j(j), .w(w), .m(m), .t(t),
    .dec_out(dec_out), .nerrdet(nerrdet)
  );

  int checks = 0, failures = 0;
  int n_trap1 = 0, n_trap2 = 0, n_endaround = 0, n_untrapped = 0;
  int n_modv = 0, n_single = 0, n_frame = 0;
  int triple_ok = 0, triple_total = 0;

  word_t us[$], es[$];

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endfunction

  // Sends the words us[]/es[] through the board for one code.
  task automatic run_session(input int n, input int k, input int tt, input logic [15:0] g,
                             input logic [14:0] par, input bit frame_pulse, input bit triple_stats);
    int q, T1, T2, T3, F, F0, nw, total;
    word_t cw[$], mv, kmask;
    bit corr[$], untr[$], msg_ok[$];
    q  = n - k;
    T2 = 2 * k;  T1 = 4 * k;  T3 = 4 * n;
    F  = n * T1;  F0 = F;
    nw = us.size();
    kmask = word_t'((1 << k) - 1);
    total = F0 + (nw + 3) * F;
    j = j_pins(q, g);  w = 5'(n);  m = 5'(k);  t = 4'(tt);  modv_sw = par;
    mv = '0;
    for (int i = 0; i < n; i++) mv[n - 1 - i] = par[14 - (i % 15)];
    for (int x = 0; x < nw; x++) begin
      cw.push_back(encode(us[x], k, q, g));
      corr.push_back(es[x] == '0 || (popcount(es[x]) <= tt && confined(es[x], n, q)));
      untr.push_back(!corr[x]);
      msg_ok.push_back(1'b1);
      if (es[x] != '0 && corr[x]) begin
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
      end
      // nerrdet, sampled mid-period of dclk
      if (tick % T2 == T2 / 2 && tick > F0) begin
        int e, fr, pos;
        e = (tick - F0) / T2;  fr = e / (2 * n);  pos = e % (2 * n);
        if (pos == n + 1 && fr >= 1 && fr - 1 < nw)
          check(nerrdet == (corr[fr-1] && (es[fr-1] & kmask) == '0),
                $sformatf("n=%0d word %0d nerrdet after first pass = %b", n, fr - 1, nerrdet));
        if (pos == 0 && fr >= 2 && fr - 2 < nw)
          check(nerrdet == corr[fr-2],
                $sformatf("n=%0d word %0d nerrdet after correction = %b", n, fr - 2, nerrdet));
      end
      // dec_out, sampled mid-period of mclk
      if (tick % T3 == T3 / 2 && tick > F0) begin
        int e3, fr, jb, wi;
        logic exp_bit;
        e3 = (tick - F0) / T3;  fr = e3 / k;  jb = e3 % k;  wi = fr - 2;
        if (wi >= 0 && wi < nw) begin
          exp_bit = us[wi][k-1-jb] ^ (corr[wi] ? 1'b0 : es[wi][k-1-jb]);
          check(dec_out == exp_bit,
                $sformatf("n=%0d word %0d message bit %0d = %b, expected %b", n, wi, jb, dec_out, exp_bit));
          if (dec_out != us[wi][k-1-jb]) msg_ok[wi] = 1'b0;
          if (triple_stats && popcount(es[wi]) == 3 && jb == k - 1) begin
            triple_total++;
            if (msg_ok[wi]) triple_ok++;
          end
        end
      end
      #1;
    end
    us.delete();  es.delete();
  endtask

  // Longest run of equal bits over any two consecutive modified code words.
  function automatic int max_runlength(input int n, input int k, input logic [15:0] g, input word_t mv);
    int best;
    best = 0;
    for (int a = 0; a < (1 << k); a++)
      for (int b = 0; b < (1 << k); b++) begin
        logic [61:0] s;
        int run;
        s = {31'(encode(word_t'(a), k, n - k, g) ^ mv), 31'(encode(word_t'(b), k, n - k, g) ^ mv)};
        run = 1;
        for (int i = 1; i < 2 * n; i++) begin
          // bits of word a occupy s[31+n-1..31], word b s[n-1..0]
          int p0, p1;
          p0 = (i - 1 < n) ? 31 + n - i : 2 * n - i;
          p1 = (i < n) ? 31 + n - 1 - i : 2 * n - 1 - i;
          if (s[p1] == s[p0]) run++; else run = 1;
          if (run > best) best = run;
        end
      end
    return best;
  endfunction

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
    // reference encoder against worked examples: Hamming(7,4) message 0011
    // has check bits 101; BCH(31,16) message 0110100000000000 has
    // check bits 001110101110010
    check(encode(31'b0011, 4, 3, G_HAM7) == 31'b1010011, "Hamming(7,4) encoder reference");
    check(encode(31'b0110100000000000, 16, 15, G_BCH31) == 31'b001110101110010_0110100000000000,
          "BCH(31,16) encoder reference");
    check(j_pins(10, G_BCH15) == 15'b010011011100000, "BCH(15,5) J pins");
    // runlength bound of the modified BCH(15,5) code
    rl = max_runlength(15, 5, G_BCH15, word_t'(MODV_BCH15));
    check(rl == 10, $sformatf("modified BCH(15,5) runlength %0d, expected 10", rl));
    check(max_runlength(15, 5, G_BCH15, '0) > 15, "unmodified BCH(15,5) has unbounded runlength");

    // session 1: BCH(15,5), single reset pulse, circulating vector register
    for (int x = 0; x < 4; x++) begin us.push_back(word_t'($urandom_range(31))); es.push_back('0); end
    for (int a = 0; a < 15; a++) begin
      us.push_back(word_t'($urandom_range(31))); es.push_back(word_t'(1) << a);
    end
    for (int a = 0; a < 15; a++)
      for (int b = a + 1; b < 15; b++) begin
        us.push_back(word_t'($urandom_range(31))); es.push_back((word_t'(1) << a) | (word_t'(1) << b));
      end
    for (int a = 0; a < 15; a++)
      for (int b = a + 1; b < 15; b++)
        for (int c = b + 1; c < 15; c++) begin
          us.push_back(word_t'($urandom_range(31)));
          es.push_back((word_t'(1) << a) | (word_t'(1) << b) | (word_t'(1) << c));
        end
    run_session(15, 5, 3, G_BCH15, MODV_BCH15, 1'b0, 1'b1);
    check(triple_total == 455, $sformatf("triple-error patterns sent %0d", triple_total));
    check(triple_ok == 450, $sformatf("triple-error patterns corrected %0d of 455", triple_ok));

    // session 2: Hamming(7,4), frame pulse, vector 1010101
    for (int a = 0; a < 16; a++) begin
      us.push_back(word_t'(a)); es.push_back('0);
      for (int b = 0; b < 7; b++) begin us.push_back(word_t'(a)); es.push_back(word_t'(1) << b); end
    end
    run_session(7, 4, 1, G_HAM7, {7'b1010101, 8'b0}, 1'b1, 1'b0);

    // session 3: BCH(31,16), t = 3, frame pulse, vector from random switches
    u = 31'b0110100000000000;
    v = 31'b0011101010100100110110000000001;                // three errors, not trappable
    us.push_back(u); es.push_back(v ^ encode(u, 16, 15, G_BCH31));
    u = 31'b0111010111111100;
    v = 31'b1111011010111010111010111111101;                // three errors, end-around
    us.push_back(u); es.push_back(v ^ encode(u, 16, 15, G_BCH31));
    for (int x = 0; x < 40; x++) begin
      word_t e;
      int nerr;
      e = '0;
      nerr = $urandom_range(3);
      if (x % 2 == 0) begin
        // errors within 15 consecutive positions, possibly wrapping around
        int s0;
        s0 = $urandom_range(30);
        for (int y = 0; y < nerr; y++) e[(s0 + $urandom_range(14)) % 31] = 1'b1;
      end else
        for (int y = 0; y < nerr; y++) e[$urandom_range(30)] = 1'b1;
      us.push_back(word_t'($urandom_range(32'hffff))); es.push_back(e);
    end
    run_session(31, 16, 3, G_BCH31, 15'($urandom_range(15'h7fff)) | 15'h1, 1'b1, 1'b0);

    $display("mechanisms: trapped after first pass %0d, trapped in second pass %0d, end-around %0d, untrappable %0d",
             n_trap1, n_trap2, n_endaround, n_untrapped);
    $display("            vector removed %0d, single-pulse words %0d, frame-pulse words %0d",
             n_modv, n_single, n_frame);
    check(n_trap1 > 0, "no word trapped after the first pass");
    check(n_trap2 > 0, "no word trapped in the second pass");
    check(n_endaround > 0, "no end-around pattern");
    check(n_untrapped > 0, "no untrappable pattern");
    check(n_modv > 0, "no modification vector used");
    check(n_single > 0 && n_frame > 0, "both reset modes not exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
