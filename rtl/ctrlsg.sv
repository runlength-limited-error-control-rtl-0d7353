// ctrlsg -- control signal generator of the decoder.
//
// A five-bit counter (COUNT5) runs on the falling edge of clk2 and is compared
// with the code word length W (COMP5). Each time the count equals W the
// counter starts again and a toggle flip-flop changes state, so the frame of
// one code word is 2n clk2 periods, split into two halves of n periods:
//
//  * eting (gate) is high in the first half (syndrome computation) and low in
//    the second (correction);
//  * netrst (reset-load, active low) is low for the one clk2 period at the end
//    of the second half. The error-trapping decoder takes it as a reset, the
//    two buffers as a load.
//
// nreset low at a falling clk2 edge puts the block in its initial state: the
// counter restarts, eting goes high and netrst is low while nreset is. The
// edge where nreset is last seen low is "instant 0", the start of the first
// frame. nreset may be a single pulse or a frame pulse every 2n periods,
// since it is only ANDed with the internal signals.
//
// Counter, comparator, toggle flip-flop and the gating of nreset follow the
// device. The counter runs from 1 to W (it restarts at 1) so that a half frame
// is exactly n periods; the device drawing does not show the restart value.
module ctrlsg
  import petld_pkg::*;
(
  input  logic             clk2,    // decoder clock (falling edge)
  input  logic             nreset,  // external reset or frame pulse, active low
  input  logic [LEN_W-1:0] w,       // code word length n
  output logic             eting,   // gate: high during the first pass
  output logic             netrst   // reset-load, active low
);
  logic [LEN_W-1:0] cnt;
  logic             q;   // toggle flip-flop, eting is its inverted output
  logic             eq;

  assign eq = (cnt == w);

  always_ff @(negedge clk2)
    if (!nreset) begin
      cnt <= LEN_W'(1);
      q   <= 1'b0;
    end else begin
      cnt <= eq ? LEN_W'(1) : cnt + 1'b1;
      q   <= q ^ eq;
    end

  assign eting  = ~q;
  assign netrst = nreset & (eting | ~eq);
endmodule
