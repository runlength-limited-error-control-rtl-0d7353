// synreg -- programmable syndrome register (polynomial divider).
//
// Fifteen stages s[0]..s[14] in a chain. Stage 0 takes (j[0] AND fb) and
// stage i takes s[i-1] XOR (j[i] AND fb), so each J pin enables one feedback
// tap. With fb = input XOR s[14] the register divides the incoming bit
// stream, first bit first, by g(X) premultiplied by X^q: a code with q check
// bits uses the q highest stages, J(15-q+i) carries coefficient g_i of g(X)
// (the leading coefficient g_q is implied), and the unused lower stages stay
// zero because their taps are off. With fb = 0 the register is a plain shift
// register towards s[14].
//
// Timing: one shift per falling clk edge; clr_n low at a falling edge clears
// the register instead (synchronous, as the decoder also uses the cycle in
// which clr_n is low to output its last corrected bit). Tap layout and the
// AND-gated connections follow the device; the synchronous clear is this
// design's choice.
module synreg
  import petld_pkg::*;
(
  input  logic             clk,    // decoder clock (falling edge)
  input  logic             clr_n,  // synchronous clear, active low
  input  logic             fb,     // feedback bit (already gated)
  input  logic [Q_MAX-1:0] j,      // feedback tap enables J0..J14
  output logic [Q_MAX-1:0] s       // register contents, s[Q_MAX-1] is the output stage
);
  logic [Q_MAX-1:0] taps;
  assign taps = j & {Q_MAX{fb}};

  always_ff @(negedge clk)
    if (!clr_n) s <= '0;
    else        s <= {s[Q_MAX-2:0], 1'b0} ^ taps;
endmodule
