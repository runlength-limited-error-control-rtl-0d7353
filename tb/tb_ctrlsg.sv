// tb_ctrlsg -- frame sequencing of the control block.
//
// For several code word lengths n, after a reset the block must give frames
// of exactly 2n clk2 periods: eting high for the first n periods, low for the
// next n, and netrst low only in the last period of each frame. A frame pulse
// on nreset at the frame boundary must leave the sequence unchanged, and a
// pulse at another time must restart the frame from that edge.
module tb_ctrlsg;
  logic       clk2 = 1'b1, nreset = 1'b0;
  logic [4:0] w = 5'd15;
  logic       eting, netrst;
  int checks = 0, failures = 0;

  ctrlsg dut (.clk2(clk2), .nreset(nreset), .w(w), .eting(eting), .netrst(netrst));

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one clk2 period at frame position pos, nreset held at nres during it;
  // the period ends with a falling clk2 edge
  task automatic period(input int pos, input int n, input logic nres);
    logic exp_eting, exp_netrst;
    #1 nreset = nres;
    #1;
    exp_eting  = (pos < n);
    exp_netrst = !(pos == 2 * n - 1) && nres;
    checks++;
    if (eting !== exp_eting || netrst !== exp_netrst) begin
      failures++;
      if (failures < 10)
        $display("FAIL t=%0t n=%0d pos=%0d eting=%b netrst=%b expected %b %b", $time, n, pos, eting, netrst,
                 exp_eting, exp_netrst);
    end
    #3 clk2 = 1'b1;
    #5 clk2 = 1'b0;
  endtask

  initial begin
    int lens[6] = '{7, 15, 31, 2, 20, 23};
    foreach (lens[i]) begin
      int n;
      n = lens[i];
      w = 5'(n);
      // reset: nreset low across one falling edge (instant 0)
      nreset = 1'b0;
      #5 clk2 = 1'b1;
      #5 clk2 = 1'b0;
      // five frames with a single reset, then five with a frame pulse
      for (int f = 0; f < 10; f++)
        for (int p = 0; p < 2 * n; p++)
          period(p, n, !(f >= 5 && p == 2 * n - 1));
      // a pulse in the middle of a frame restarts the frame at that edge
      for (int p = 0; p < n / 2; p++) period(p, n, 1'b1);
      checks++;
      #1 nreset = 1'b0;
      #1 if (netrst !== 1'b0) failures++;
      #3 clk2 = 1'b1;
      #5 clk2 = 1'b0;
      for (int p = 0; p < 4 * n; p++) period(p % (2 * n), n, 1'b1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
