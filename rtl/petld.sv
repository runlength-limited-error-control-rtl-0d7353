// petld -- programmable error-trapping line decoder (the decoder chip).
//
// Decodes runlength limited error control codes built from any cyclic code
// with n <= 31, k <= 31 and q = n - k <= 15. Each received (modified) code word
// goes through four stages:
//
//   lndeco  adds the modification vector back (ECLC XOR MODV) on clk1;
//   pipeli  (input buffer) collects the word on clk1 and, once per frame,
//           hands it to a circulating register shifted on clk2, so that the
//           decoder sees the word twice in one frame;
//   errtrp  error-trapping decoder on clk2: syndrome in the first pass,
//           correction in the second;
//   pipeli  (output buffer) collects the corrected bits on clk2 and shifts the
//           last k of them (the message) out on clk3.
//
// ctrlsg sequences the frame: 2n clk2 periods per code word, with a reset-load
// pulse at the end that clears the syndrome register and loads both buffers.
//
// Clocks: f(clk2) = 2 f(clk1), f(clk3) = (k/n) f(clk1). All blocks act on
// falling edges, and at the start of every frame (the reset-load edge) a falling
// edge of each clock coincides. Code words and modification vector enter first
// bit first, check bits before message bits. nreset must be low at the falling
// clk2 edge that starts the first frame ("instant 0"); it may also be a frame
// pulse, low for one clk2 period every 2n.
//
// Throughput is one message per code word. The word whose bits are latched in
// frame f is decoded in frame f+1 (nerrdet: high one clk2 period after the
// first pass if no error hit the message bits; high at the start of frame f+2
// if errors, if any, were corrected) and its message leaves dataout in frame
// f+2, most significant bit first.
//
// Configuration pins (static): j = shifted generator polynomial (J0..J14),
// w = n, m = k, t = error-correcting capability. w = 0 or m = 0 bypasses the
// corresponding buffer, which is meant for testing. The block split and the
// pins are those of the device; frame timing details are this design's.
module petld
  import petld_pkg::*;
(
  input  logic             clk1,     // code word bit clock
  input  logic             clk2,     // decoder clock, twice clk1
  input  logic             clk3,     // message bit clock, k/n of clk1
  input  logic             nreset,   // reset or frame pulse, active low
  input  logic             eclc,     // modified code word, serial
  input  logic             modv,     // modification vector, serial
  input  logic [Q_MAX-1:0] j,        // J0..J14
  input  logic [LEN_W-1:0] w,        // W0..W4: code word length n
  input  logic [LEN_W-1:0] m,        // M0..M4: message length k
  input  logic [T_W-1:0]   t,        // T0..T3: error-correcting capability
  output logic             dataout,  // decoded message, serial
  output logic             nerrdet   // error detection / correction flag
);
  logic ecc, eting, netrst, inbuf_out, datout;

  lndeco u_lndeco (.clk1(clk1), .eclc(eclc), .modv(modv), .ecc(ecc));

  ctrlsg u_ctrlsg (.clk2(clk2), .nreset(nreset), .w(w), .eting(eting), .netrst(netrst));

  pipeli u_inbuf (
    .clka(clk1), .ina(ecc), .clkb(clk2), .sinb(inbuf_out),
    .nloadb(netrst), .sel(w), .outb(inbuf_out)
  );

  errtrp u_errtrp (
    .clk2(clk2), .netrst(netrst), .eting(eting), .din(inbuf_out),
    .j(j), .t(t), .datout(datout), .aleqb(), .nerrdet(nerrdet)
  );

  pipeli u_outbuf (
    .clka(clk2), .ina(datout), .clkb(clk3), .sinb(1'b0),
    .nloadb(netrst), .sel(m), .outb(dataout)
  );
endmodule
