// rlecc_tb_pkg -- reference arithmetic for the decoder testbenches.
//
// Code words are held in a 31-bit vector whose bit n-1 is sent first. The
// word format expected by the decoder is r(X) = u(X) + X^k b(X): the q check
// bits b occupy bits n-1..k and the k message bits u occupy bits k-1..0,
// where b(X) is the remainder of X^q u(X) divided by g(X). A generator
// polynomial g is written with its leading coefficient at bit q. These
// functions work on plain integers and are independent of the RTL.
package rlecc_tb_pkg;
  typedef logic [30:0] word_t;

  // remainder of X^q u(X) / g(X)
  function automatic logic [14:0] check_bits(input word_t u, input int k, input int q,
                                             input logic [15:0] g);
    logic [46:0] rem;
    rem = 47'(u) << q;
    for (int i = k + q - 1; i >= q; i--)
      if (rem[i]) rem = rem ^ (47'(g) << (i - q));
    return rem[14:0] & 15'((1 << q) - 1);
  endfunction

  // code word in the decoder's order: check bits first, then the message
  function automatic word_t encode(input word_t u, input int k, input int q,
                                   input logic [15:0] g);
    return (word_t'(check_bits(u, k, q, g)) << k) | (u & word_t'((1 << k) - 1));
  endfunction

  // J pins from g(X): J(15-q+i) = g_i for i < q, lower pins zero
  function automatic logic [14:0] j_pins(input int q, input logic [15:0] g);
    logic [14:0] j;
    j = '0;
    for (int i = 0; i < q; i++) j[15 - q + i] = g[i];
    return j;
  endfunction

  function automatic int popcount(input word_t v);
    int c;
    c = 0;
    for (int i = 0; i < 31; i++) c += int'(v[i]);
    return c;
  endfunction

  // all ones of e (an n-bit error pattern) lie in q cyclically consecutive positions
  function automatic bit confined(input word_t e, input int n, input int q);
    for (int s = 0; s < n; s++) begin
      word_t win;
      win = '0;
      for (int i = 0; i < q; i++) win[(s + i) % n] = 1'b1;
      if ((e & ~win) == '0) return 1'b1;
    end
    return 1'b0;
  endfunction

  // the window that covers e wraps from the first sent bit (n-1) to the last (0)
  function automatic bit end_around(input word_t e, input int n, input int q);
    for (int s = 0; s < n; s++) begin
      word_t win;
      win = '0;
      for (int i = 0; i < q; i++) win[(s + i) % n] = 1'b1;
      if ((e & ~win) == '0 && s + q <= n) return 1'b0;
    end
    return 1'b1;
  endfunction
endpackage
