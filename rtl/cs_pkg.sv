// cs_pkg: types, constants and helper functions shared by the content scanner.
//
// The scanner reads Q characters per clock (Q = 4, a 32-bit input word). Each
// character is carried through the design as a 256-bit one-hot "character
// line". The pipeline window is addressed by age: age 0 is the newest
// character (lane Q-1 of the newest pipeline stage), age Q*r + (Q-1-l) is lane
// l of stage r. Lane 0 holds the earliest character of an input word.
//
// A signature is stored as a right-aligned string literal (character 0 in the
// most significant used byte), its length, and the offset and length of its
// unique substring (u-substring). The partitioning into u-sets and the
// h-set / t-set split by security threshold are done off-line; this package
// holds the result for the example signature database of the default top.
package cs_pkg;

  localparam int Q       = 4;    // characters per clock cycle
  localparam int CW      = 8;    // bits per character
  localparam int NCHAR   = 256;  // one-hot character line width
  localparam int AW      = $clog2(Q);
  localparam int MAXLEN  = 64;   // longest signature the tables hold
  localparam int LUT_IN  = 6;    // characters compared by one 6-input LUT
  localparam int TREE_FI = 6;    // fan-in of one level of an OR / AND tree

  typedef logic [NCHAR-1:0]  char_line_t;
  typedef logic [CW-1:0]     char_t;
  typedef logic [AW-1:0]     align_t;
  typedef logic [MAXLEN*CW-1:0] sig_str_t;

  typedef struct packed {
    sig_str_t   str;   // string literal, right-aligned
    logic [7:0] len;   // signature length in characters
    logic [7:0] uoff;  // offset of the u-substring inside the signature
    logic [7:0] ulen;  // u-substring length
  } sig_t;

  // Character i of a signature.
  function automatic char_t sig_char(sig_t s, int i);
    return s.str[(int'(s.len) - 1 - i)*CW +: CW];
  endfunction

  // Number of registered levels a tree of fan-in TREE_FI needs to reduce n
  // inputs to one (0 for a single input).
  function automatic int tree_levels(int n);
    int lv = 0;
    int w  = n;
    while (w > 1) begin
      w  = (w + TREE_FI - 1) / TREE_FI;
      lv = lv + 1;
    end
    return lv;
  endfunction

  function automatic int imax(int a, int b);
    return (a > b) ? a : b;
  endfunction

  function automatic int cdiv(int a, int b);
    return (a + b - 1) / b;
  endfunction

  // ---------------------------------------------------------------------
  // Example signature database (NIDS-style strings), already partitioned.
  // ---------------------------------------------------------------------

  // h-set: signatures with long prefixes before their u-substring.
  localparam int H_NSIG = 6;
  localparam sig_t [H_NSIG-1:0] H_SIGS = '{
    '{str: "Content-Disposition: form-data", len: 30, uoff: 23, ulen: 3},   // id 5
    '{str: "Authorization: Basic",      len: 20, uoff: 17, ulen: 3},   // id 4
    '{str: "GET /default.ida?",         len: 17, uoff: 15, ulen: 2},   // id 3
    '{str: "SITE EXEC %p",              len: 12, uoff: 10, ulen: 2},   // id 2
    '{str: "cmd.exe?/c+dir",            len: 14, uoff: 10, ulen: 2},   // id 1
    '{str: "/etc/passwd",               len: 11, uoff:  9, ulen: 2}    // id 0
  };

  // t-set: signatures with long suffixes after their u-substring.
  localparam int T_NSIG = 5;
  localparam sig_t [T_NSIG-1:0] T_SIGS = '{
    '{str: "%c1%1c../winnt",  len: 14, uoff: 0, ulen: 3},   // id 4
    '{str: "Qsuperuser",      len: 10, uoff: 0, ulen: 2},   // id 3
    '{str: "/bin/sh -i",      len: 10, uoff: 0, ulen: 2},   // id 2
    '{str: "<script>alert(",  len: 14, uoff: 0, ulen: 2},   // id 1
    '{str: "xp_cmdshell",     len: 11, uoff: 0, ulen: 2}    // id 0
  };

  // Short signatures (seven characters or fewer) for the naive matcher.
  localparam int N_NSIG = 5;
  localparam sig_t [N_NSIG-1:0] N_SIGS = '{
    '{str: "passwd",  len: 6, uoff: 0, ulen: 6},   // id 4
    '{str: "cmd.exe", len: 7, uoff: 0, ulen: 7},   // id 3
    '{str: "wget ",   len: 5, uoff: 0, ulen: 5},   // id 2
    '{str: "%00",     len: 3, uoff: 0, ulen: 3},   // id 1
    '{str: "root",    len: 4, uoff: 0, ulen: 4}    // id 0
  };

  // Table of matching engines: one entry per h-set or t-set, padded to the
  // largest set. Engine e uses the first ENG_NSIG[e] entries of ENG_SIGS[e].
  localparam int NENG   = 2;
  localparam int MAXSET = 6;
  localparam int IDW    = $clog2(MAXSET);   // identifier width of every engine
  typedef sig_t [MAXSET-1:0] set_t;
  localparam int ENG_NSIG [NENG] = '{H_NSIG, T_NSIG};
  localparam set_t [NENG-1:0] ENG_SIGS = '{set_t'(T_SIGS), set_t'(H_SIGS)};

endpackage
