// tb_engine_workload: matching engines built from generated signature sets
// with the sizes of two mid-sized partitions of a real rule set: an h-set of
// 35 signatures averaging about 20 characters (long prefixes, u-substring at
// the end) and a t-set of 96 signatures averaging about 11 characters
// (u-substring at the start), one of them 44 characters long.
//
// Signatures are generated at elaboration by a fixed pseudo-random sequence.
// Bodies use lower-case letters and punctuation only; the two-character
// u-substring of signature k is a pair of upper-case letters or digits unique
// to k, so it occurs once in its signature and nowhere else in the set.
// Neighbouring signatures share body characters, so matrix multiplexers are
// shared. The larger sets need deeper OR and encoder trees than the example
// database, and the t-set's long suffixes make the engine delay its alignment
// code (D > 0).
// The stream holds every signature of both sets at random alignments plus
// near misses, separated by background bytes. Reference: every occurrence of
// every signature, found by string comparison, reported with its index in
// clock (u-substring position)/4 + LATENCY.
module automatic tb_engine_workload;
  import cs_pkg::*;
  import tb_stream_pkg::*;

  localparam int NH = 35;    // h-set size
  localparam int NT = 96;    // t-set size
  localparam int DEPTH = 24;
  localparam int WIN = DEPTH * Q;
  localparam string UC   = "ABCDEFGHIJKLMNOPQRSTUVWXYZ0123456789";
  localparam string BODY = "abcdefghijklmnopqrstuvwxyz ./:=-_";

  // Generated set: n signatures, lengths lmin..lmax, u-substring at the end
  // (h-set) or at the start (t-set), bodies from BODY.
  function automatic sig_t gen_sig(int k, int seed, bit hset, int lmin, int lmax);
    sig_t s = '0;
    int unsigned x = seed * 7919 + k * 104729 + 12345;
    int len, off;
    x = x * 1103515245 + 12345;
    len = lmin + int'((x >> 16) % (lmax - lmin + 1));
    if (!hset && k == 0) len = 44;   // one long suffix forces the alignment delay
    x = x * 1103515245 + 12345;
    off = hset ? len - 2 - int'((x >> 16) % 3) : int'((x >> 16) % 3);
    s.len  = 8'(len);
    s.uoff = 8'(off);
    s.ulen = 8'd2;
    for (int i = 0; i < len; i++) begin
      char_t c;
      x = x * 1103515245 + 12345;
      // share the first body characters between neighbours of the set
      if (i < 4) c = char_t'(BODY[(k / 8 + i) % 26]);
      else       c = char_t'(BODY[(x >> 16) % BODY.len()]);
      if (i == off)     c = char_t'(UC[k / 36]);
      if (i == off + 1) c = char_t'(UC[k % 36]);
      s.str[(len - 1 - i)*CW +: CW] = c;
    end
    return s;
  endfunction

  function automatic sig_t [NH-1:0] gen_h();
    sig_t [NH-1:0] t;
    for (int k = 0; k < NH; k++) t[k] = gen_sig(k, 1, 1'b1, 10, 30);
    return t;
  endfunction

  function automatic sig_t [NT-1:0] gen_t();
    sig_t [NT-1:0] t;
    for (int k = 0; k < NT; k++) t[k] = gen_sig(k, 2, 1'b0, 4, 18);
    return t;
  endfunction

  localparam sig_t [NH-1:0] HS = gen_h();
  localparam sig_t [NT-1:0] TS = gen_t();

  logic clk = 0, rst_n = 0;
  char_t [Q-1:0] in_chars;
  logic  [Q-1:0] in_valid;
  char_line_t    win [WIN];
  logic h_v, t_v;
  logic [5:0] h_id;
  logic [6:0] t_id;
  int checks = 0, failures = 0, nh = 0, nt = 0, hchars = 0, tchars = 0;
  int exp_h [int], exp_t [int];
  stream_c st;

  char_pipeline #(.DEPTH(DEPTH)) u_pipe (.clk, .rst_n, .in_chars, .in_valid, .win);
  matching_engine #(.NSIG(NH), .SIGS(HS), .WIN(WIN), .IW(6)) dut_h (
    .clk, .rst_n, .win, .match_valid(h_v), .match_id(h_id),
    .cand_valid(), .cand_align(), .cand_multi());
  matching_engine #(.NSIG(NT), .SIGS(TS), .WIN(WIN), .IW(7)) dut_t (
    .clk, .rst_n, .win, .match_valid(t_v), .match_id(t_id),
    .cand_valid(), .cand_align(), .cand_multi());

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    st = new();
    st.add_bg(8);
    for (int k = 0; k < NH; k++) hchars += int'(HS[k].len);
    for (int k = 0; k < NT; k++) tchars += int'(TS[k].len);
    $display("h-set %0d signatures %0d characters, latency %0d, D %0d", NH, hchars, dut_h.LATENCY, dut_h.D);
    $display("t-set %0d signatures %0d characters, latency %0d, D %0d", NT, tchars, dut_t.LATENCY, dut_t.D);
    // every signature twice at random places, plus near misses
    for (int r = 0; r < 2; r++) begin
      for (int k = 0; k < NH + NT; k++) begin
        sig_t s = (k < NH) ? HS[k] : TS[k - NH];
        st.add_bg($urandom_range(0, 3));
        if ($urandom_range(0, 5) == 0) st.add_sig_mod(s, $urandom_range(0, int'(s.len)-1), 170);
        else void'(st.add_sig(s));
        st.add_bg($urandom_range(4, 9));
      end
    end
    st.add_bg(32);
    for (int p = 0; p < st.q.size(); p++) begin
      for (int k = 0; k < NH; k++)
        if (st.occurs(HS[k], p)) exp_h[(p + int'(HS[k].uoff)) / Q + dut_h.LATENCY] = k;
      for (int k = 0; k < NT; k++)
        if (st.occurs(TS[k], p)) exp_t[(p + int'(TS[k].uoff)) / Q + dut_t.LATENCY] = k;
    end
    checks++;
    if (dut_t.D == 0) begin
      failures++;
      $display("FAIL: the t-set does not exercise the alignment delay");
    end

    in_chars = '0;
    in_valid = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < st.words() + 40; cyc++) begin
      @(negedge clk);
      checks++;
      if (exp_h.exists(cyc)) begin
        nh++;
        if (!h_v || int'(h_id) != exp_h[cyc]) begin
          failures++;
          if (failures < 10) $display("FAIL: h clock %0d expected %0d got v=%b id=%0d", cyc, exp_h[cyc], h_v, h_id);
        end
      end else if (h_v) begin
        failures++;
        if (failures < 10) $display("FAIL: h clock %0d unexpected id %0d", cyc, h_id);
      end
      checks++;
      if (exp_t.exists(cyc)) begin
        nt++;
        if (!t_v || int'(t_id) != exp_t[cyc]) begin
          failures++;
          if (failures < 10) $display("FAIL: t clock %0d expected %0d got v=%b id=%0d", cyc, exp_t[cyc], t_v, t_id);
        end
      end else if (t_v) begin
        failures++;
        if (failures < 10) $display("FAIL: t clock %0d unexpected id %0d", cyc, t_id);
      end
      st.word(cyc, in_chars, in_valid);
    end
    $display("h matches %0d, t matches %0d", nh, nt);
    checks++;
    if (nh < NH || nt < NT) begin
      failures++;
      $display("FAIL: too few matches");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
