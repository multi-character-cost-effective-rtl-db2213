// tb_content_scanner: the whole scanner at its default size, end to end.
// Four characters enter every clock with no stall. The stream carries background, whole signatures of both sets at every
// alignment, near misses (one character changed or replaced by an invalid
// lane) and lone u-substrings (impostors). It also places "/etc/passwd" with
// its u-substring "wd" in lane 0 followed at once by the u-substring "%p" of
// another h-set signature: a double detection that the priority encoder must
// resolve in favour of the earlier, genuine signature.
// Short signatures are mixed in for the naive matcher, some back to back.
// Reference: every occurrence of engine signature k at position p must be
// reported with identifier k in clock (p + uoff_k)/4 + 9, every occurrence of
// short signature k ending at position e must raise n_hit[k][e mod 4] in clock
// e/4 + 2, and nothing else may be reported. Each mechanism (matches of each
// part, every alignment in each engine, double detection, near misses,
// impostors, broken-by-invalid-lane signatures, several short hits in one
// clock) is counted and must occur.
// Both engines have a latency of 9 clocks: pipeline entry 1, common stage 1,
// u-substring register 1, OR level 1, encoder 1, matrix 1, comparators 1,
// AND level 1, identifier encoder 1.
module automatic tb_content_scanner;
  import cs_pkg::*;
  import tb_stream_pkg::*;
  localparam int LAT   = 9;
  localparam int NLAT  = 2;

  logic clk = 0, rst_n = 0;
  char_t [Q-1:0] in_chars;
  logic  [Q-1:0] in_valid;
  logic [N_NSIG-1:0][Q-1:0] n_hit;
  logic [N_NSIG-1:0][Q-1:0] exp_n [int];
  int nn = 0, nnmulti = 0, nmod = 0, nhole = 0, nimp = 0;
  logic h_v, t_v, h_cv, t_cv, h_m, t_m;
  logic [IDW-1:0] h_id, t_id;
  align_t h_ca, t_ca;
  int checks = 0, failures = 0;
  int exp_h [int], exp_t [int];
  int nh = 0, nt = 0, nmulti = 0;
  int al_h [Q], al_t [Q];
  stream_c st;

  logic [NENG-1:0]          m_v, c_v, c_m;
  logic [NENG-1:0][IDW-1:0] m_id;
  align_t [NENG-1:0]        c_a;

  content_scanner dut (
    .clk, .rst_n, .in_chars, .in_valid,
    .match_valid(m_v), .match_id(m_id), .cand_valid(c_v), .cand_align(c_a), .cand_multi(c_m),
    .n_hit);

  // engine 0 is the h-set, engine 1 the t-set
  assign h_v = m_v[0];  assign h_id = m_id[0];  assign h_cv = c_v[0];  assign h_ca = c_a[0];  assign h_m = c_m[0];
  assign t_v = m_v[1];  assign t_id = m_id[1];  assign t_cv = c_v[1];  assign t_ca = c_a[1];  assign t_m = c_m[1];

  always #5 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_port(string nm, logic v, logic [IDW-1:0] id, int cyc, ref int exp_m [int], ref int cnt);
    checks++;
    if (exp_m.exists(cyc)) begin
      cnt++;
      if (!v || int'(id) != exp_m[cyc]) begin
        failures++;
        $display("FAIL: %s clock %0d expected id %0d got v=%b id=%0d", nm, cyc, exp_m[cyc], v, id);
      end
    end else if (v) begin
      failures++;
      $display("FAIL: %s clock %0d unexpected id %0d", nm, cyc, id);
    end
  endtask

  initial begin
    st = new();
    st.add_bg(8);
    for (int n = 0; n < 600; n++) begin
      int part = $urandom_range(0, 2);
      int k  = (part == 0) ? $urandom_range(0, H_NSIG-1) :
               (part == 1) ? $urandom_range(0, T_NSIG-1) : $urandom_range(0, N_NSIG-1);
      sig_t s = (part == 0) ? H_SIGS[k] : (part == 1) ? T_SIGS[k] : N_SIGS[k];
      if (part == 2 && $urandom_range(0, 2) == 0) begin   // short signatures back to back
        void'(st.add_sig(s));
        s = N_SIGS[$urandom_range(0, N_NSIG-1)];
      end
      case ($urandom_range(0, 9))
        0: begin st.add_sig_mod(s, $urandom_range(0, int'(s.len)-1), 150); nmod++; end
        1: begin st.add_sig_mod(s, $urandom_range(0, int'(s.len)-1), -1); nhole++; end
        2: begin if (part != 2) begin st.add_usub(s); nimp++; end end
        3: begin   // double detection: "/etc/passwd" then the u-substring of "SITE EXEC %p"
          st.align_to(Q - 1);            // "/etc/passwd" starts in lane 3, "wd" in lane 0
          void'(st.add_sig(H_SIGS[0]));
          st.add_usub(H_SIGS[2]);
        end
        default: void'(st.add_sig(s));
      endcase
      st.add_bg($urandom_range(4, 12), 5);
    end
    st.add_bg(16);
    for (int p = 0; p < st.q.size(); p++) begin
      for (int k = 0; k < H_NSIG; k++)
        if (st.occurs(H_SIGS[k], p)) exp_h[(p + int'(H_SIGS[k].uoff)) / Q + LAT] = k;
      for (int k = 0; k < T_NSIG; k++)
        if (st.occurs(T_SIGS[k], p)) exp_t[(p + int'(T_SIGS[k].uoff)) / Q + LAT] = k;
      for (int k = 0; k < N_NSIG; k++)
        if (st.occurs(N_SIGS[k], p)) begin
          int e = p + int'(N_SIGS[k].len) - 1;
          int c = e / Q + NLAT;
          if (!exp_n.exists(c)) exp_n[c] = '0;
          exp_n[c][k][e % Q] = 1'b1;
        end
    end

    in_chars = '0;
    in_valid = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < st.words() + LAT + 2; cyc++) begin
      @(negedge clk);
      check_port("h", h_v, h_id, cyc, exp_h, nh);
      check_port("t", t_v, t_id, cyc, exp_t, nt);
      if (h_cv) al_h[h_ca]++;
      if (t_cv) al_t[t_ca]++;
      if (h_m) nmulti++;
      begin
        logic [N_NSIG-1:0][Q-1:0] e = exp_n.exists(cyc) ? exp_n[cyc] : '0;
        checks++;
        if (e != '0) nn++;
        if ($countones(e) > 1) nnmulti++;
        if (n_hit !== e) begin
          failures++;
          if (failures < 10) $display("FAIL: naive clock %0d expected %h got %h", cyc, e, n_hit);
        end
      end
      st.word(cyc, in_chars, in_valid);
    end
    $display("h matches %0d, t matches %0d, short-signature clocks %0d (several hits %0d)",
             nh, nt, nn, nnmulti);
    $display("double detections %0d, near misses %0d, broken by invalid lane %0d, impostors %0d",
             nmulti, nmod, nhole, nimp);
    checks++;
    if (nh == 0 || nt == 0 || nmulti == 0 || nn == 0 || nnmulti == 0 ||
        nmod == 0 || nhole == 0 || nimp == 0) begin
      failures++;
      $display("FAIL: a mechanism never happened");
    end
    for (int a = 0; a < Q; a++) begin
      checks++;
      if (al_h[a] == 0 || al_t[a] == 0) begin
        failures++;
        $display("FAIL: alignment %0d never detected", a);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
