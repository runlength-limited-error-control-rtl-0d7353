// tb_csgen -- control signal generator.
//
// Runs the generator for eight frames and checks what the patterns must give for the BCH(15,5) link (n = 15, k = 5), counted from
// the outputs alone: each 64-period frame holds exactly one decoder frame
// pulse and one encoder initialisation pulse, 30 dclk, 15 wclk and 5 mclk
// periods (falling edges); dframe falls every 64 xclk periods; each wclk
// period holds two dclk falling edges (f_dclk = 2 f_wclk) and each mclk
// period three wclk falling edges (f_mclk = f_wclk / 3); and every wclk
// falling edge coincides with a dclk falling edge. The encoder reset button
// is pressed twice, once with a frame pulse during the press; ereset must go
// low at the press and high again only at the first rising edge of eframe
// after the release. The outputs are sampled on the falling xclk edge, half
// a period after they change.
module tb_csgen;
  logic xclk = 1'b0, enc_nrst = 1'b1;
  logic dclk, wclk, mclk, dframe, eframe, ereset;
  int checks = 0, failures = 0;

  csgen dut (.xclk(xclk), .enc_nrst(enc_nrst), .dclk(dclk), .wclk(wclk), .mclk(mclk),
             .dframe(dframe), .eframe(eframe), .ereset(ereset));

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

  always #5 xclk = ~xclk;

  initial begin
    logic pd, pw, pm, pf, pe;
    int   nd, nw, nm, nf, ne;      // falling edges in the current frame
    int   d_since_w, w_since_m;    // edges since the last slower-clock edge
    int   last_frame, frames, tick;
    bit   exp_ereset, releases;
    // button pressed and released between frame pulses: ereset goes low
    // at once and stays low until eframe rises
    repeat (2) @(negedge xclk);
    enc_nrst = 1'b0;
    #1;
    check(!ereset, "ereset low while the button is pressed");
    repeat (3) @(negedge xclk);
    {pd, pw, pm, pf, pe} = {dclk, wclk, mclk, dframe, eframe};
    exp_ereset = 1'b0;
    releases = 0;
    nd = 0; nw = 0; nm = 0; nf = 0; ne = 0;
    d_since_w = -1; w_since_m = -1;
    last_frame = -1; frames = 0;
    for (tick = 0; tick < 8 * 64 + 2; tick++) begin
      @(negedge xclk);
      if (pd && !dclk) begin nd++; if (d_since_w >= 0) d_since_w++; end
      if (pw && !wclk) begin
        check(pd && !dclk, $sformatf("wclk falls without dclk at tick %0d", tick));
        if (d_since_w >= 0) check(d_since_w == 2, $sformatf("%0d dclk edges in a wclk period", d_since_w));
        d_since_w = 0;
        nw++;
        if (w_since_m >= 0) w_since_m++;
      end
      if (pm && !mclk) begin
        if (w_since_m >= 0) check(w_since_m == 3, $sformatf("%0d wclk edges in an mclk period", w_since_m));
        w_since_m = 0;
        nm++;
      end
      if (pe && !eframe) ne++;
      // button: released after 10 periods, pressed again for 100 periods
      // from period 200 on, so that frame pulses pass during the press
      // (after the check of this period, so it shows from the next one)
      if (!pe && eframe && releases) exp_ereset = 1'b1;
      check(ereset == exp_ereset, $sformatf("ereset %b at tick %0d", ereset, tick));
      if (tick == 10 || tick == 300) begin enc_nrst = 1'b1; releases = 1; end
      if (tick == 200) begin enc_nrst = 1'b0; exp_ereset = 1'b0; releases = 0; end
      if (pf && !dframe) begin
        if (last_frame >= 0) begin
          check(tick - last_frame == 64, $sformatf("frame of %0d periods", tick - last_frame));
          check(nd == 30, $sformatf("%0d dclk periods in a frame", nd));
          check(nw == 15, $sformatf("%0d wclk periods in a frame", nw));
          check(nm == 5,  $sformatf("%0d mclk periods in a frame", nm));
          check(ne == 1,  $sformatf("%0d encoder pulses in a frame", ne));
          frames++;
        end
        last_frame = tick;
        nd = 0; nw = 0; nm = 0; ne = 0;
      end
      {pd, pw, pm, pf, pe} = {dclk, wclk, mclk, dframe, eframe};
    end
    check(frames >= 7, $sformatf("%0d whole frames seen", frames));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
