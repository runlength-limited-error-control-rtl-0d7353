// weight -- syndrome weight.
//
// Counts the ones in the 15-bit syndrome register and gives the count in
// binary (0..15, four bits). Purely combinational. The whole register is
// counted: stages not used by a code with fewer check bits hold zeros, so
// they do not disturb the count.
//
// How it works: a tree of eleven full adders, as in the device's weight
// sheet (inputs D0..D14, outputs W0..W3, adders I1..I11). Five adders (I1-I5)
// reduce the fifteen bits to five sum bits of weight 1 and five carries of
// weight 2. I7 and I11 add the five weight-1 bits to give W0, with two more
// weight-2 carries. I6, I8 and I9 add the seven weight-2 bits to give W1,
// with three weight-4 carries, and I10 adds those to give W2 and W3.
//
// Follows the document: the count in binary over the full register, and a
// tree of eleven full adders. This design's own: which signal goes to which
// adder input, chosen so that each adder only adds bits of equal weight.
module weight
  import petld_pkg::*;
(
  input  logic [Q_MAX-1:0] s,  // syndrome register contents
  output logic [T_W-1:0]   w   // number of ones in s
);
  // full adder: {carry, sum} of three bits
  function automatic logic [1:0] fa(input logic a, input logic b, input logic c);
    return {(a & b) | (a & c) | (b & c), a ^ b ^ c};
  endfunction

  logic [1:0] i1, i2, i3, i4, i5, i6, i7, i8, i9, i10, i11;

  // weight 1 in, sums of weight 1, carries of weight 2
  assign i1  = fa(s[0],  s[1],  s[2]);
  assign i2  = fa(s[3],  s[4],  s[5]);
  assign i3  = fa(s[6],  s[7],  s[8]);
  assign i4  = fa(s[9],  s[10], s[11]);
  assign i5  = fa(s[12], s[13], s[14]);
  assign i7  = fa(i3[0], i4[0], i5[0]);
  assign i11 = fa(i1[0], i2[0], i7[0]);
  // weight 2 in, sums of weight 2, carries of weight 4
  assign i6  = fa(i1[1], i2[1], i3[1]);
  assign i8  = fa(i4[1], i5[1], i7[1]);
  assign i9  = fa(i6[0], i8[0], i11[1]);
  // weight 4 in: sum of weight 4, carry of weight 8
  assign i10 = fa(i6[1], i8[1], i9[1]);

  assign w = {i10[1], i10[0], i9[0], i11[0]};
endmodule
