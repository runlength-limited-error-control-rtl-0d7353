// rlecc_decoder_board -- receiving end of a runlength limited error control
// link: the decoder chip plus the register that supplies its modification
// vector.
//
// The received bit stream (eclc) carries code words of a cyclic code to which
// a fixed modification vector was added at the transmitter, which bounds the
// number of equal consecutive bits on the line without adding redundancy.
// modv_piso replays that vector from switches (modv_sw, first bit in the most
// significant position) in step with the code words, and petld removes it,
// corrects errors by error trapping and outputs the messages.
//
// The frame pulse dframe drives both the decoder's NRESET pin and the load
// input of the vector register. Clocks, configuration and timing are those of
// petld: wclk is its clk1 (code word rate), dclk its clk2 (twice wclk), mclk
// its clk3 (message rate, k/n of wclk). The board arrangement follows the test
// setup the decoder was evaluated in; MODV_LEN = 15 matches the 15-bit
// vector of a BCH(15,5) based code.
module rlecc_decoder_board
  import petld_pkg::*;
#(
  parameter int unsigned MODV_LEN = 15
) (
  input  logic                wclk,     // code word bit clock
  input  logic                dclk,     // decoder clock, 2 x wclk
  input  logic                mclk,     // message bit clock
  input  logic                dframe,   // reset / frame pulse, active low
  input  logic                dec_in,   // received modified code words
  input  logic [MODV_LEN-1:0] modv_sw,  // modification vector switches
  input  logic [Q_MAX-1:0]    j,        // shifted generator polynomial
  input  logic [LEN_W-1:0]    w,        // code word length n
  input  logic [LEN_W-1:0]    m,        // message length k
  input  logic [T_W-1:0]      t,        // error-correcting capability
  output logic                dec_out,  // decoded messages
  output logic                nerrdet   // error detection / correction flag
);
  logic modv;

  modv_piso #(.LEN(MODV_LEN)) u_piso (
    .clk1(wclk), .nload(dframe), .par(modv_sw), .sout(modv)
  );

  petld u_petld (
    .clk1(wclk), .clk2(dclk), .clk3(mclk), .nreset(dframe),
    .eclc(dec_in), .modv(modv), .j(j), .w(w), .m(m), .t(t),
    .dataout(dec_out), .nerrdet(nerrdet)
  );
endmodule
