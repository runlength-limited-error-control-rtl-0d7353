// cmp4le -- four-bit "less than or equal" comparator.
//
// aleqb is high when the syndrome weight a does not exceed the programmed
// error-correcting capability b (pins T0..T3). Together with the weight
// counter it forms the variable threshold gate of the error-trapping decoder:
// errors are taken as trapped when aleqb is high. Combinational.
//
// How it works: the comparator uses the inverted b bits (nb). a > b when, at
// the highest bit where a and b differ, a has a 1 and b a 0. The four AND
// gates I1-I4 form a_i & nb_i ("a wins at bit i"). The three XOR gates I5-I7
// form a_i ^ nb_i, which is high when bit i of a and b is equal. I8-I10 allow
// a win at bits 2, 1 and 0 only if all higher bits are equal, and the NOR
// gate I11 gives aleqb = not (a > b).
//
// Follows the document: the function (aleqb = weight <= t), and from the
// device's comparator sheet the pin names A0..A3, NB0..NB3 and ALEQB and the
// count of eleven gates, I1..I11. This design's own: the function given to
// each gate, which is a plain magnitude comparator on the inverted b inputs,
// and making the inversion of b here rather than outside the block.
module cmp4le
  import petld_pkg::*;
(
  input  logic [T_W-1:0] a,      // syndrome weight
  input  logic [T_W-1:0] b,      // error-correcting capability t
  output logic           aleqb   // a <= b
);
  logic [3:0] nb;
  logic i1, i2, i3, i4, i5, i6, i7, i8, i9, i10;

  assign nb  = ~b;
  assign i1  = a[3] & nb[3];
  assign i2  = a[2] & nb[2];
  assign i3  = a[1] & nb[1];
  assign i4  = a[0] & nb[0];
  assign i5  = a[3] ^ nb[3];
  assign i6  = a[2] ^ nb[2];
  assign i7  = a[1] ^ nb[1];
  assign i8  = i5 & i2;
  assign i9  = i5 & i6 & i3;
  assign i10 = i5 & i6 & i7 & i4;
  assign aleqb = ~(i1 | i8 | i9 | i10);
endmodule
