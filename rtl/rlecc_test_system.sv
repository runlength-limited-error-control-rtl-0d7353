// rlecc_test_system -- the digital part of the test link for a runlength
// limited BCH(15,5) code: the encoder-side support logic around the encoder
// chip, and the decoder board.
//
// Encoder side. The encoder chip (outside this design) takes its modification
// vector serially from a switch-loaded register, enc_piso, and emits modified
// code words on enc_cw with the order of their check bits inverted. cwfmt
// puts the check bits back in cyclic order and drives the line (line_tx).
// Because the encoder adds the vector before the reordering, the encoder's
// switches are wired to enc_piso with the Q check-bit positions reversed; the
// same vector can then be set on both sets of switches, in line order.
//
// Decoder side. The received line (line_rx, after the channel, which is also
// outside this design) goes to rlecc_decoder_board, which removes the vector,
// corrects errors and outputs the messages.
//
// Calibration switch. With calib high the encoder and decoder are bypassed:
// the source data (src_data) go straight to the line, and a flip-flop
// latches the received line on the falling wclk edge in place of the
// decoder, so the bit-error rate at sink_data is the channel's own. With
// calib low (measurement) line_tx carries the reordered code words and
// sink_data the decoded messages, so its error rate is the residual one.
//
// Clocks and frames: wclk is the code word bit clock of both sides, dclk the
// decoder clock (2 x wclk), mclk the decoder's message clock (k/n x wclk).
// eframe (active low) loads enc_piso at the start of each encoder word and
// eload (active low) loads cwfmt at the edge of the last bit the encoder
// emits for a word; dframe frames the decoder.
//
// Control signal generator. csgen plays back the board's stored clock and
// pulse patterns from a master clock, xclk: one 64-period scan gives the
// dclk, wclk and mclk of one BCH(15,5) frame and the decoder and encoder
// frame pulses, and the encoder reset button (enc_nrst) gives a single
// encoder reset pulse. Its outputs are brought out as csg_* ports. On the
// board they drive the clock and frame inputs above; here those inputs stay
// ports, so that a test can set the phases of each side itself. eload, the
// load pulse of cwfmt, comes from board logic not described in detail.
//
// The split into encoder module, channel and decoder module, the clock names,
// the calibration switch and the vector switch wiring follow the test circuit
// the decoder was evaluated in; the separate eload pin is this design's, since the drawing of the
// reordering circuit was not available. N and Q fix the encoder side to the
// BCH(15,5) code, as on the original board; the decoder side stays
// programmable through j, w, m and t.
module rlecc_test_system
  import petld_pkg::*;
#(
  parameter int unsigned N = 15,  // code word length of the encoder side
  parameter int unsigned Q = 10   // check bits of the encoder side
) (
  input  logic             xclk,        // generator master clock
  input  logic             enc_nrst,    // encoder reset button, active low
  output logic             csg_dclk,    // generated decoder clock
  output logic             csg_wclk,    // generated code word bit clock
  output logic             csg_mclk,    // generated message clock
  output logic             csg_dframe,  // generated decoder frame pulse, active low
  output logic             csg_eframe,  // generated encoder frame pulse, active low
  output logic             csg_ereset,  // generated single encoder reset pulse, active low
  input  logic             wclk,        // code word bit clock
  input  logic             dclk,        // decoder clock, 2 x wclk
  input  logic             mclk,        // decoder message clock, k/n x wclk
  input  logic             eframe,      // encoder vector register load, active low
  input  logic             eload,       // check-bit reorder load, active low
  input  logic             dframe,      // decoder reset / frame pulse, active low
  input  logic             calib,       // 1 = calibration (bypass), 0 = measurement
  input  logic             src_data,    // test data source, used in calibration
  input  logic [N-1:0]     enc_modv_sw, // encoder vector switches, line order, first bit MSB
  output logic             enc_modv,    // serial vector to the encoder chip
  input  logic             enc_cw,      // encoder chip output, check bits inverted
  output logic             line_tx,     // modified code words, cyclic format, to the channel
  input  logic             line_rx,     // received line, from the channel
  input  logic [N-1:0]     dec_modv_sw, // decoder vector switches, line order, first bit MSB
  input  logic [Q_MAX-1:0] j,           // decoder: shifted generator polynomial
  input  logic [LEN_W-1:0] w,           // decoder: code word length n
  input  logic [LEN_W-1:0] m,           // decoder: message length k
  input  logic [T_W-1:0]   t,           // decoder: error-correcting capability
  output logic             dec_out,     // decoded messages
  output logic             nerrdet,     // decoder error detection / correction flag
  output logic             sink_data    // to the error detector: dec_out or the latched line
);
  logic [N-1:0] enc_par;  // switches as wired to enc_piso
  logic         fmt_out;  // reordered code words
  logic         rx_q;     // line latched by the bypass flip-flop

  csgen u_csgen (
    .xclk(xclk), .enc_nrst(enc_nrst), .dclk(csg_dclk), .wclk(csg_wclk), .mclk(csg_mclk),
    .dframe(csg_dframe), .eframe(csg_eframe), .ereset(csg_ereset)
  );

  always_comb begin
    enc_par = enc_modv_sw;
    for (int i = 0; i < Q; i++)
      enc_par[N-1-i] = enc_modv_sw[N-Q+i];
  end

  modv_piso #(.LEN(N)) u_enc_piso (
    .clk1(wclk), .nload(eframe), .par(enc_par), .sout(enc_modv)
  );

  cwfmt #(.N(N), .Q(Q)) u_cwfmt (
    .wclk(wclk), .nload(eload), .din(enc_cw), .dout(fmt_out)
  );

  assign line_tx = calib ? src_data : fmt_out;

  always_ff @(negedge wclk)
    rx_q <= line_rx;

  assign sink_data = calib ? rx_q : dec_out;

  rlecc_decoder_board #(.MODV_LEN(N)) u_board (
    .wclk(wclk), .dclk(dclk), .mclk(mclk), .dframe(dframe), .dec_in(line_rx),
    .modv_sw(dec_modv_sw), .j(j), .w(w), .m(m), .t(t),
    .dec_out(dec_out), .nerrdet(nerrdet)
  );
endmodule
