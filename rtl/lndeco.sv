// lndeco -- runlength limited (line) decoder.
//
// A runlength limited code word is an ordinary cyclic code word plus a fixed
// modification vector. This block removes the vector again: the modified
// code word bit (eclc) and the matching modification vector bit (modv) are
// each latched in a flip-flop on the falling edge of clk1 and added modulo 2.
// The block is symmetrical, so the two inputs may be swapped.
//
// Timing: ecc is the XOR of the two bits latched at the last falling clk1
// edge, so it is valid for the whole clk1 period that follows. Both streams
// must be aligned: the first bit of a code word and the first bit of the
// modification vector are latched by the same edge.
//
// Two flip-flops and one XOR gate, as in the device; there is no reset
// because the flip-flops are overwritten every clock.
module lndeco (
  input  logic clk1,  // code word bit clock, active on the falling edge
  input  logic eclc,  // modified code word, serial, first bit first
  input  logic modv,  // modification vector, serial, aligned with eclc
  output logic ecc    // unmodified code word bit
);
  logic eclc_q, modv_q;

  always_ff @(negedge clk1) begin
    eclc_q <= eclc;
    modv_q <= modv;
  end

  assign ecc = eclc_q ^ modv_q;
endmodule
