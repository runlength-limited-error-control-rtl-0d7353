// pipeli -- variable-length double buffer (used twice in the decoder: as the
// input buffer and as the output buffer).
//
// A word is shifted serially into register 1 on the falling edge of clka.
// On a falling edge of clkb with nloadb low, the whole word moves in
// parallel into register 2; the bit present on ina at that moment goes
// straight into the first stage of register 2, so register 1 needs only
// N_MAX-1 stages and the word is available one clka period sooner. On other
// falling clkb edges register 2 shifts, taking sinb into its first stage
// (tie sinb to outb to circulate the word). A 32-to-1 multiplexer, steered by
// sel, picks the output: input i > 0 is stage i-1 of register 2, so a word of
// length L appears at outb first bit first when sel = L; sel = 0 selects ina
// itself and bypasses the buffer.
//
// The structure, the 31-stage second register and the bypass are those of the
// device. The clkb load edge must coincide with a clka edge for the bit on ina
// to be the last bit of the word; the caller guarantees this alignment.
module pipeli
  import petld_pkg::*;
(
  input  logic             clka,    // input bit clock (falling edge)
  input  logic             ina,     // serial input
  input  logic             clkb,    // output bit clock (falling edge)
  input  logic             sinb,    // serial input of register 2
  input  logic             nloadb,  // active-low parallel load, sampled on clkb
  input  logic [LEN_W-1:0] sel,     // word length, 0 = bypass
  output logic             outb     // serial output
);
  logic [N_MAX-2:0] reg1;  // reg1[0] holds the newest bit
  logic [N_MAX-1:0] reg2;

  always_ff @(negedge clka)
    reg1 <= {reg1[N_MAX-3:0], ina};

  always_ff @(negedge clkb)
    if (!nloadb) reg2 <= {reg1, ina};
    else         reg2 <= {reg2[N_MAX-2:0], sinb};

  always_comb
    if (sel == '0) outb = ina;
    else           outb = reg2[sel - 1'b1];
endmodule
