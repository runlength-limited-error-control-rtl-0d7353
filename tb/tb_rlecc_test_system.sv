// tb_rlecc_test_system -- the whole link, end to end, at the default size.
//
// Plays the parts outside the design: the clocks and pulses of the link
// (f_dclk = 2 f_wclk and f_mclk = k/n f_wclk, falling edges aligned at every
// decoder frame start, and the eframe, eload and dframe pulses), the encoder
// chip and the channel. The design's own control signal generator runs
// alongside on its master clock; its outputs are checked per generated frame
// (30 dclk, 15 wclk and 5 mclk periods and one encoder frame pulse), and
// its encoder reset must be released after the button; they do not
// clock the link, whose phases the testbench sets itself.
//
// * Encoder chip model: it samples the serial vector from enc_modv just
//   before the falling wclk edge that takes each bit and, one period later,
//   emits the BCH(15,5) code word of a random message plus that vector bit,
//   with the order of the check bits inverted, as the real chip does.
// * Channel: line_tx is copied to line_rx half a wclk period later, with an
//   error pattern added. Every pattern of one, two and three errors is sent.
//
// Checked per word: line_tx carries the modified code word in cyclic format
// (check bits back in order and the vector, set in line order on the
// encoder's switches, added); dec_out carries the message two decoder frames
// after the word entered the decoder (corrected when the errors lie within
// q = 10 cyclically consecutive bits, unchanged otherwise); nerrdet after the
// first pass and after correction. 450 of the 455 triple patterns must be
// corrected. Sessions: dframe as a single reset pulse (the decoder's vector
// register circulates); dframe as a frame pulse; calibration mode, in which
// the source bits must reach sink_data through the channel latch with only
// the channel's errors; measurement mode again after the switch back.
// Mechanisms counted: check-bit reordering, vector addition and removal,
// trapping after the first pass, trapping in the second pass, end-around
// trapping, untrappable patterns, single-pulse and frame-pulse operation,
// calibration, mode switches and generated control signal frames.
module tb_rlecc_test_system;
  import rlecc_tb_pkg::*;

  localparam int N = 15, K = 5, Q = 10, TT = 3;
  localparam logic [15:0] G_BCH15 = 16'h0537;               // X^10+X^8+X^5+X^4+X^2+X+1
  localparam logic [14:0] MODV    = 15'b100010101001001;    // runlength 10

  logic        wclk = 1'b0, dclk = 1'b0, mclk = 1'b0;
  logic        eframe = 1'b1, eload = 1'b1, dframe = 1'b0;
  logic        enc_cw = 1'b0, line_rx = 1'b0, calib = 1'b0, src_data = 1'b0;
  logic [14:0] enc_modv_sw = MODV, dec_modv_sw = MODV, j = '0;
  logic [4:0]  w = '0, m = '0;
  logic [3:0]  t = '0;
  logic        enc_modv, line_tx, dec_out, nerrdet, sink_data;

  logic        xclk = 1'b0, enc_nrst = 1'b1;
  logic        csg_dclk, csg_wclk, csg_mclk, csg_dframe, csg_eframe, csg_ereset;

  rlecc_test_system dut (
    .xclk(xclk), .enc_nrst(enc_nrst), .csg_dclk(csg_dclk), .csg_wclk(csg_wclk),
    .csg_mclk(csg_mclk), .csg_dframe(csg_dframe), .csg_eframe(csg_eframe),
    .csg_ereset(csg_ereset),
    .wclk(wclk), .dclk(dclk), .mclk(mclk), .eframe(eframe), .eload(eload), .dframe(dframe),
    .calib(calib), .src_data(src_data),
    .enc_modv_sw(enc_modv_sw), .enc_modv(enc_modv), .enc_cw(enc_cw), .line_tx(line_tx),
    .line_rx(line_rx), .dec_modv_sw(dec_modv_sw), .j(j), .w(w), .m(m), .t(t),
    .dec_out(dec_out), .nerrdet(nerrdet), .sink_data(sink_data)
  );

  int checks = 0, failures = 0;
  int n_reorder = 0, n_modv = 0, n_trap1 = 0, n_trap2 = 0, n_endaround = 0, n_untrapped = 0;
  int n_single = 0, n_frame = 0, n_calib = 0, n_calib_err = 0, n_mode = 0;
  int triple_ok = 0, triple_total = 0;
  int n_gen_frames = 0;

  // control signal generator: free-running master clock; after a restart
  // every generated frame must hold 30 dclk, 15 wclk and 5 mclk periods and
  // one encoder pulse (falling edges, sampled on the falling xclk edge)
  always #3 xclk = ~xclk;
  initial begin
    logic pd, pw, pm, pf, pe;
    int   nd, nw, nm, ne;
    bit   started;
    @(negedge xclk);
    enc_nrst = 1'b0;
    @(negedge xclk);
    check(!csg_ereset, "encoder reset low while the button is pressed");
    enc_nrst = 1'b1;
    @(negedge xclk);
    {pd, pw, pm, pf, pe} = {csg_dclk, csg_wclk, csg_mclk, csg_dframe, csg_eframe};
    nd = 0; nw = 0; nm = 0; ne = 0; started = 0;
    forever begin
      @(negedge xclk);
      if (pd && !csg_dclk) nd++;
      if (pw && !csg_wclk) nw++;
      if (pm && !csg_mclk) nm++;
      if (pe && !csg_eframe) ne++;
      if (pf && !csg_dframe) begin
        if (n_gen_frames == 2) check(csg_ereset, "encoder reset released by the frame pulse");
        if (started) begin
          check(nd == 30 && nw == 15 && nm == 5 && ne == 1,
                $sformatf("generated frame: dclk %0d wclk %0d mclk %0d pulses %0d", nd, nw, nm, ne));
          n_gen_frames++;
        end
        started = 1;
        nd = 0; nw = 0; nm = 0; ne = 0;
      end
      {pd, pw, pm, pf, pe} = {csg_dclk, csg_wclk, csg_mclk, csg_dframe, csg_eframe};
    end
  end

  word_t us[$], es[$];

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endfunction

  // Code word as the encoder chip emits it: check bits in reverse order.
  function automatic word_t invert_checks(input word_t c);
    word_t r = c;
    for (int i = 0; i < Q; i++) r[N-1-i] = c[N-Q+i];
    return r;
  endfunction

  task automatic run_session(input bit frame_pulse);
    // time in ticks; wclk falls at multiples of T1. The encoder's frames start
    // at wclk edge A + f*N, the decoder's instant 0 is at tick F0 (wclk edge
    // A + N + 1 = 2N): one wclk period of encoder latency, one for the
    // reordering register, one for the channel latch.
    int T1, T2, T3, F, F0, A, nw, total;
    word_t cw[$], kmask;
    bit corr[$], msg_ok[$];
    logic prev_v;
    T2 = 2 * K;  T1 = 4 * K;  T3 = 4 * N;
    F  = N * T1;  A = N - 1;  F0 = 2 * F;
    nw = us.size();
    kmask = word_t'((1 << K) - 1);
    total = F0 + (nw + 3) * F;
    j = j_pins(Q, G_BCH15);  w = 5'(N);  m = 5'(K);  t = 4'(TT);
    prev_v = 1'b0;
    for (int x = 0; x < nw; x++) begin
      cw.push_back(encode(us[x], K, Q, G_BCH15));
      corr.push_back(es[x] == '0 || (popcount(es[x]) <= TT && confined(es[x], N, Q)));
      msg_ok.push_back(1'b1);
      if (invert_checks(cw[x]) != cw[x]) n_reorder++;
      n_modv++;
      if (es[x] != '0 && corr[x]) begin
        if ((es[x] & kmask) == '0) n_trap1++; else n_trap2++;
        if (end_around(es[x], N, Q)) n_endaround++;
      end
      if (!corr[x]) n_untrapped++;
      if (frame_pulse) n_frame++; else n_single++;
    end
    for (int tick = 0; tick < total; tick++) begin
      wclk = (tick % T1) >= T1 / 2;
      dclk = (tick % T2) >= T2 / 2;
      mclk = (tick % T3) >= T3 / 2;
      // encoder frame pulses: low from the rising wclk edge before the edge
      // that starts an encoder word until the next rising edge
      begin
        int r;
        r = tick + T1 / 2 - A * T1;
        eframe = !(r >= 0 && (r % F) < T1);
        eload  = eframe;
      end
      // decoder reset / frame pulse, across the falling dclk edge of instant 0
      if (tick < F0 + T2 / 2) dframe = 1'b0;
      else if (frame_pulse) dframe = !(((tick - F0 + T2 / 2) % F) < T2);
      else dframe = 1'b1;
      if (tick % T1 == T1 / 2) begin
        int ne, p, d;
        ne = (tick + T1 / 2) / T1;   // index of the next falling wclk edge
        // encoder chip: emit bit p of its current word, using the vector bit
        // shown before the previous falling edge
        p = ne - 1 - A;
        if (p >= 0) begin
          int f, i;
          word_t inv;
          f = p / N;  i = p % N;
          inv = (f < nw) ? invert_checks(cw[f]) : '0;
          enc_cw = inv[N-1-i] ^ prev_v;
          if (f < nw)
            check(prev_v == MODV[Q > i ? N - Q + i : N - 1 - i],
                  $sformatf("encoder vector bit %0d of word %0d = %b", i, f, prev_v));
        end
        // channel: line_rx takes line_tx plus the error pattern, for the
        // decoder to latch at the next falling edge
        d = (tick + T1 / 2 - F0) / T1;
        if (tick + T1 / 2 >= F0 && d / N < nw) begin
          int wi, bi;
          wi = d / N;  bi = d % N;
          check(line_tx == (cw[wi][N-1-bi] ^ MODV[N-1-bi]),
                $sformatf("line word %0d bit %0d = %b", wi, bi, line_tx));
          line_rx = line_tx ^ es[wi][N-1-bi];
        end else begin
          line_rx = line_tx;
        end
      end
      // encoder chip: vector bit sampled late in the low half of wclk, away
      // from the edges at which enc_modv and eframe change
      if (tick % T1 == 3 * T1 / 4) prev_v = enc_modv;
      // nerrdet, sampled mid-period of dclk
      if (tick % T2 == T2 / 2 && tick > F0) begin
        int e, fr, pos;
        e = (tick - F0) / T2;  fr = e / (2 * N);  pos = e % (2 * N);
        if (pos == N + 1 && fr >= 1 && fr - 1 < nw)
          check(nerrdet == (corr[fr-1] && (es[fr-1] & kmask) == '0),
                $sformatf("word %0d nerrdet after first pass = %b", fr - 1, nerrdet));
        if (pos == 0 && fr >= 2 && fr - 2 < nw)
          check(nerrdet == corr[fr-2],
                $sformatf("word %0d nerrdet after correction = %b", fr - 2, nerrdet));
      end
      // dec_out, sampled mid-period of mclk
      if (tick % T3 == T3 / 2 && tick > F0) begin
        int e3, fr, jb, wi;
        logic exp_bit;
        e3 = (tick - F0) / T3;  fr = e3 / K;  jb = e3 % K;  wi = fr - 2;
        if (wi >= 0 && wi < nw) begin
          exp_bit = us[wi][K-1-jb] ^ (corr[wi] ? 1'b0 : es[wi][K-1-jb]);
          check(dec_out == exp_bit,
                $sformatf("word %0d message bit %0d = %b, expected %b", wi, jb, dec_out, exp_bit));
          check(sink_data == dec_out, "sink_data follows dec_out in measurement mode");
          if (dec_out != us[wi][K-1-jb]) msg_ok[wi] = 1'b0;
          if (popcount(es[wi]) == 3 && jb == K - 1) begin
            triple_total++;
            if (msg_ok[wi]) triple_ok++;
          end
        end
      end
      #1;
    end
    us.delete();  es.delete();
  endtask

  // Calibration: encoder and decoder bypassed. Random source bits go to the
  // line, the channel adds errors at a rate of about 1 in 16, and sink_data
  // must give each received bit after the next falling wclk edge.
  task automatic run_calibration(input int nbits);
    int T1;
    logic sent;
    T1 = 4 * K;
    calib = 1'b1;  n_mode++;
    sent = 1'b0;
    for (int tick = 0; tick < (nbits + 1) * T1; tick++) begin
      wclk = (tick % T1) >= T1 / 2;
      if (tick % T1 == T1 / 2) begin
        src_data = 1'($urandom_range(1));
        // the line follows the source combinationally; the channel latch
        // sees it with an occasional error
        line_rx = src_data ^ ($urandom_range(15) == 0);
        if (line_rx != src_data) n_calib_err++;
        sent = line_rx;
      end
      if (tick % T1 == T1 / 4 && tick > T1) begin
        check(sink_data == sent, $sformatf("calibration bit %0d = %b", n_calib, sink_data));
        n_calib++;
      end
      if (tick % T1 == 3 * T1 / 4)
        check(line_tx == src_data, "line follows the source in calibration mode");
      #1;
    end
    calib = 1'b0;  n_mode++;
  endtask

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // session 1: single decoder reset pulse; clean words, then every pattern
    // of one, two and three errors
    for (int x = 0; x < 4; x++) begin us.push_back(word_t'($urandom_range(31))); es.push_back('0); end
    for (int a = 0; a < N; a++)
      for (int b = a; b < N; b++)
        for (int c = b; c < N; c++) begin
          // a == b == c: one error; a < b == c: two; a < b < c: three
          if ((a == b) != (b == c) && a == b) continue;
          us.push_back(word_t'($urandom_range(31)));
          es.push_back((word_t'(1) << a) | (word_t'(1) << b) | (word_t'(1) << c));
        end
    run_session(1'b0);
    check(triple_total == 455, $sformatf("triple-error patterns sent %0d", triple_total));
    check(triple_ok == 450, $sformatf("triple-error patterns corrected %0d of 455", triple_ok));
    // session 2: decoder frame pulse, random single and double errors
    for (int x = 0; x < 40; x++) begin
      word_t e;
      e = '0;
      for (int y = 0; y <= x % 3; y++) e[$urandom_range(N - 1)] = 1'b1;
      us.push_back(word_t'($urandom_range(31)));
      es.push_back(x % 3 == 0 ? word_t'(0) : e);
    end
    run_session(1'b1);
    // calibration, then measurement again with a fresh reset
    run_calibration(300);
    for (int x = 0; x < 12; x++) begin
      us.push_back(word_t'($urandom_range(31)));
      es.push_back(x % 2 ? word_t'(0) : word_t'(1) << $urandom_range(N - 1));
    end
    run_session(1'b1);

    $display("mechanisms: check bits reordered %0d, vector added and removed %0d", n_reorder, n_modv);
    $display("            trapped after first pass %0d, trapped in second pass %0d, end-around %0d, untrappable %0d",
             n_trap1, n_trap2, n_endaround, n_untrapped);
    $display("            single-pulse words %0d, frame-pulse words %0d", n_single, n_frame);
    $display("            calibration bits %0d (channel errors %0d), mode switches %0d", n_calib, n_calib_err, n_mode);
    check(n_reorder > 0, "no word needed its check bits reordered");
    check(n_modv > 0, "no modified word");
    check(n_trap1 > 0, "no word trapped after the first pass");
    check(n_trap2 > 0, "no word trapped in the second pass");
    check(n_endaround > 0, "no end-around pattern");
    check(n_untrapped > 0, "no untrappable pattern");
    check(n_single > 0 && n_frame > 0, "single-pulse and frame-pulse operation");
    check(n_calib > 0 && n_calib_err > 0 && n_mode >= 2, "calibration mode with channel errors");
    $display("            generated control signal frames %0d", n_gen_frames);
    check(n_gen_frames > 0, "no generated control signal frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
