// errtrp -- error-trapping decoder for cyclic codes.
//
// A code word r of n bits (q check bits first, then the k message bits, see
// the word format in the README) is presented twice on din, one bit per
// falling clk2 edge:
//
//  * first pass (eting high): gates G1 and G2 are open, G3 closed. The word
//    is divided into the syndrome register, whose feedback is
//    din XOR s[14]. After n shifts the register holds the syndrome of the word
//    cyclically shifted by q.
//  * second pass (eting low): G1 is closed. While the syndrome weight is above
//    t (aleqb low) G2 stays open, so every shift computes the syndrome of the
//    next cyclic shift, and the word passes to datout unchanged. As soon as the
//    weight is t or less (aleqb high) the errors are trapped: G2 closes, G3
//    opens, and the register shifts out without feedback, its top stage being
//    added to the word bit on din. Shifting without feedback can only lower
//    the weight, so aleqb stays high for the rest of the pass and no latch is
//    needed for the gate state.
//
// Each pass takes n clk2 periods; the cycle in which netrst is low is the last
// step of the second pass (its datout bit is still corrected) and clears the
// syndrome register at the closing edge. nerrdet is aleqb registered on the
// falling edge of clk2: high after the first pass means no error was seen in
// the message bits, high after the second pass means any errors were
// corrected.
//
// Gate arrangement, threshold gate and nerrdet follow the device; sharing the
// netrst cycle with the last correction step is this design's timing choice.
module errtrp
  import petld_pkg::*;
(
  input  logic             clk2,    // decoder clock (falling edge)
  input  logic             netrst,  // reset-load, active low, once per 2n clk2 periods
  input  logic             eting,   // gate signal: high during the first pass
  input  logic             din,     // code word bit from the input buffer
  input  logic [Q_MAX-1:0] j,       // shifted generator polynomial, J0..J14
  input  logic [T_W-1:0]   t,       // random-error-correcting capability
  output logic             datout,  // corrected code word bit (second pass)
  output logic             aleqb,   // syndrome weight <= t (threshold gate)
  output logic             nerrdet  // aleqb registered on clk2
);
  logic [Q_MAX-1:0] s;
  logic [T_W-1:0]   w;
  logic             g1, g2, g3, fb;

  assign g1 = eting;
  assign g2 = eting | ~aleqb;
  assign g3 = ~eting & aleqb;
  assign fb = g2 & ((g1 & din) ^ s[Q_MAX-1]);

  synreg u_synreg (.clk(clk2), .clr_n(netrst), .fb(fb), .j(j), .s(s));
  weight u_weight (.s(s), .w(w));
  cmp4le u_cmp4le (.a(w), .b(t), .aleqb(aleqb));

  assign datout = din ^ (g3 & s[Q_MAX-1]);

  always_ff @(negedge clk2)
    nerrdet <= aleqb;
endmodule
