// petld_pkg -- sizes shared by the blocks of the programmable error-trapping
// line decoder (PETLD).
//
// The decoder handles any cyclic code with code word length n <= 31, message
// length k <= 31 and q = n - k <= 15 check bits; its error-correcting
// capability t is given as a 4-bit number. These bounds are the ones the
// device was specified for. The widths of the W, M, J and T configuration
// pins follow from them.
package petld_pkg;
  localparam int unsigned N_MAX = 31;  // longest code word
  localparam int unsigned K_MAX = 31;  // longest message
  localparam int unsigned Q_MAX = 15;  // most check bits = syndrome register length
  localparam int unsigned LEN_W = 5;   // width of the W and M length pins
  localparam int unsigned T_W   = 4;   // width of the T pins and of the syndrome weight
endpackage
