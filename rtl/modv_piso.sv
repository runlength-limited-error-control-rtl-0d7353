// modv_piso -- modification vector register for the decoder's MODV input.
//
// A parallel-in serial-out register, clocked by the code word clock clk1,
// that repeats a modification vector set on switches (par, first bit in the
// most significant position). nload is the decoder's reset/frame pulse:
// while it is low the output already shows the first vector bit, and the
// falling clk1 edge at which it is low (the edge that starts the frame)
// loads the register rotated by one place, so the following edges present
// the second, third, ... bits. The register is connected circularly, so a
// single reset pulse is enough when LEN equals the code word length; with a
// frame pulse the vector is reloaded at every word.
//
// Its role (switches, clk1, frame pulse as load, optional circular
// connection) follows the test setup of the decoder; the load-and-rotate
// arrangement that lines the first bit up with the first code word bit is
// this design's own.
module modv_piso #(
  parameter int unsigned LEN = 15   // number of switches = vector length
) (
  input  logic           clk1,   // code word bit clock (falling edge)
  input  logic           nload,  // load, active low (decoder frame pulse)
  input  logic [LEN-1:0] par,    // modification vector, first bit = par[LEN-1]
  output logic           sout    // serial modification vector, to MODV
);
  logic [LEN-1:0] r;

  always_ff @(negedge clk1)
    if (!nload) r <= {par[LEN-2:0], par[LEN-1]};
    else        r <= {r[LEN-2:0], r[LEN-1]};

  assign sout = nload ? r[LEN-1] : par[LEN-1];
endmodule
