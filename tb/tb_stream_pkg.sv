// tb_stream_pkg: character-stream builder and reference matcher shared by the
// scanner testbenches.
//
// A stream is a queue of character positions; -1 marks a position whose lane
// is invalid (a hole). Background characters are drawn from 0x80..0xFF, which
// no example signature uses, so every occurrence of a signature in the stream
// is one the test placed there. Word w of the stream (positions 4w..4w+3) is
// presented to the design in clock w. The reference matcher simply compares a
// signature string with the stream at a position.
package tb_stream_pkg;
  import cs_pkg::*;

  class stream_c;
    int q [$];

    function void add_bg(int n, int hole_pct = 0);
      for (int i = 0; i < n; i++)
        q.push_back(($urandom_range(0, 99) < hole_pct) ? -1 : int'($urandom_range(128, 255)));
    endfunction

    // pad with background until the next position is congruent to r modulo Q
    function void align_to(int r);
      while ((q.size() % Q) != r) q.push_back(int'($urandom_range(128, 255)));
    endfunction

    // append a signature; returns its start position
    function int add_sig(sig_t s);
      int p = q.size();
      for (int i = 0; i < int'(s.len); i++) q.push_back(int'(sig_char(s, i)));
      return p;
    endfunction

    // append the signature with character i replaced by c (-1: a hole)
    function void add_sig_mod(sig_t s, int i, int c);
      int p = add_sig(s);
      q[p + i] = c;
    endfunction

    // append only the u-substring of a signature (an impostor)
    function void add_usub(sig_t s);
      for (int i = 0; i < int'(s.ulen); i++) q.push_back(int'(sig_char(s, int'(s.uoff) + i)));
    endfunction

    function bit occurs(sig_t s, int p);
      if (p + int'(s.len) > q.size()) return 1'b0;
      for (int i = 0; i < int'(s.len); i++)
        if (q[p + i] != int'(sig_char(s, i))) return 1'b0;
      return 1'b1;
    endfunction

    function int words();
      return (q.size() + Q - 1) / Q;
    endfunction

    // character and valid of lane l of word w
    function void word(int w, output char_t [Q-1:0] ch, output logic [Q-1:0] v);
      for (int l = 0; l < Q; l++) begin
        int p = w*Q + l;
        int c = (p < q.size()) ? q[p] : -1;
        v[l]  = (c >= 0);
        ch[l] = (c >= 0) ? char_t'(c) : char_t'(0);
      end
    endfunction
  endclass

endpackage
