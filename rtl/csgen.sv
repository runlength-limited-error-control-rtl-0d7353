// csgen -- control signal generator of the BCH(15,5) test board.
//
// Makes the clocks and frame pulses of the encoder and decoder by playing
// back stored patterns instead of dividing a clock: a 6-bit counter scans a
// 64-byte pattern memory (an EPROM on the board), and five flip-flops latch
// the data bits, so each output is a clean pattern in time. One scan of the
// 64 addresses is one code word frame:
//
//   data bit 4  dclk     decoder clock, 30 periods per frame (2n)
//   data bit 5  wclk     code word bit clock, 15 periods per frame (n)
//   data bit 3  mclk     message clock, 5 periods per frame (k)
//   data bit 6  dframe   decoder frame pulse, active low, once per frame
//   data bit 7  eframe   encoder frame pulse, active low, once per frame
//
// Bits 0 to 2 are high at every address and are not used. Four times per
// frame the patterns hold for one extra address, so a frame lasts 64 master
// clock periods for 60 half-periods of dclk. Each falling edge of mclk comes
// two xclk periods after a falling edge of wclk, never together with one.
//
// The encoder needs a single reset pulse rather than a periodic one. A
// flip-flop with its input tied high and clocked by eframe makes it: the
// encoder reset button (enc_nrst, active low) clears it, so ereset is low
// from the press until the first rising edge of eframe after the release.
//
// Timing: the counter advances on the falling edge of xclk and the output
// flip-flops load on the rising edge, half a period later, when the pattern
// memory's output has settled. All outputs but ereset therefore change only
// at rising xclk edges. The counter has no reset: it needs none, since it
// runs through all 64 addresses in any case, and the outputs are valid from
// the first rising edge.
//
// Follows the document: the counter, pattern memory and five output
// flip-flops, the output names, the eframe-clocked reset flip-flop with its
// button, the clock rates for BCH(15,5) and the 64 stored bytes. This
// design's own: which data bit drives which output, read from the pulse
// counts above and the frequency ratios the document gives.
module csgen (
  input  logic xclk,     // master clock
  input  logic enc_nrst, // encoder reset button, active low, asynchronous
  output logic dclk,     // decoder clock
  output logic wclk,     // code word bit clock
  output logic mclk,     // message clock
  output logic dframe,   // decoder frame pulse, active low
  output logic eframe,   // encoder frame pulse, active low
  output logic ereset    // encoder reset, active low, single pulse
);
  typedef logic [7:0] byte_t;

  // the pattern memory, address 0 first
  localparam byte_t PATTERN [64] = '{
    8'hC7, 8'h97, 8'hAF, 8'hFF, 8'hCF, 8'h5F, 8'h57, 8'h67,
    8'hF7, 8'hC7, 8'hD7, 8'hE7, 8'hF7, 8'hC7, 8'hD7, 8'hEF,
    8'hFF, 8'hCF, 8'hDF, 8'hE7, 8'hF7, 8'hC7, 8'hC7, 8'hD7,
    8'hE7, 8'hF7, 8'hC7, 8'hD7, 8'hEF, 8'hFF, 8'hCF, 8'hDF,
    8'hE7, 8'hF7, 8'hC7, 8'hD7, 8'hE7, 8'hF7, 8'hF7, 8'hC7,
    8'hD7, 8'hEF, 8'hFF, 8'hCF, 8'hDF, 8'hE7, 8'hF7, 8'hC7,
    8'hD7, 8'hE7, 8'hF7, 8'hC7, 8'hD7, 8'hEF, 8'hEF, 8'hFF,
    8'hCF, 8'hDF, 8'hE7, 8'hF7, 8'hC7, 8'hD7, 8'hE7, 8'hF7
  };

  logic [5:0] addr;
  logic [7:3] q;

  always_ff @(negedge xclk)
    addr <= addr + 6'd1;

  always_ff @(posedge xclk)
    q <= PATTERN[addr][7:3];

  always_ff @(posedge eframe or negedge enc_nrst)
    if (!enc_nrst) ereset <= 1'b0;
    else           ereset <= 1'b1;

  assign dclk   = q[4];
  assign wclk   = q[5];
  assign mclk   = q[3];
  assign dframe = q[6];
  assign eframe = q[7];
endmodule
