// cwfmt -- check-bit order correction between the encoder chip and the line.
//
// The encoder chip used with this decoder emits its code words with the q
// check bits in reverse order, while the decoder expects the cyclic format
// (check bits first, most significant first, then the message). This block
// restores the cyclic format: a serial-in parallel-out register collects each
// word on the falling edge of wclk, and at the frame edge the word moves in
// parallel into a parallel-in serial-out register with its first Q bits put
// back in order; that register then shifts the word out, first bit first.
//
// Timing: nload (the encoder frame pulse, active low) must be low at the
// falling wclk edge that latches the last bit of a word. As in the decoder's
// buffers, the bit on din at that edge goes straight into the parallel load,
// so the SIPO needs only N-1 stages. From that edge on, dout presents the
// reordered word, one bit per wclk period; the latency is one word.
//
// The SIPO/PISO pair, its clocking by wclk and its purpose follow the test
// circuit the decoder was evaluated in. That the inverted check bits sit at
// the start of the word (only their order differs) and that the frame pulse
// loads the PISO are this design's reading; the original circuit drawing was
// not available. N and Q default to the BCH(15,5) code it was built for.
module cwfmt #(
  parameter int unsigned N = 15,  // code word length
  parameter int unsigned Q = 10   // number of check bits
) (
  input  logic wclk,   // code word bit clock (falling edge)
  input  logic nload,  // frame pulse, active low: parallel load
  input  logic din,    // encoder output, check bits in reverse order
  output logic dout    // code word in cyclic format
);
  logic [N-2:0] sipo;  // sipo[0] holds the newest bit
  logic [N-1:0] word;  // complete word, word[N-1] = first bit received
  logic [N-1:0] fixed; // word with its check bits put back in order
  logic [N-1:0] piso;

  assign word = {sipo, din};

  always_comb begin
    fixed = word;
    for (int i = 0; i < Q; i++)
      fixed[N-1-i] = word[N-Q+i];
  end

  always_ff @(negedge wclk) begin
    sipo <= {sipo[N-3:0], din};
    if (!nload) piso <= fixed;
    else        piso <= {piso[N-2:0], 1'b0};
  end

  assign dout = piso[N-1];
endmodule
