// tb_matching_engine: the h-set and t-set engines behind the shared pipeline.
// The stream carries background, whole signatures of both sets at every
// alignment, near misses (one character changed or replaced by an invalid
// lane) and lone u-substrings (impostors). It also places "/etc/passwd" with
// its u-substring "wd" in lane 0 followed at once by the u-substring "%p" of
// another h-set signature: a double detection that the priority encoder must
// resolve in favour of the earlier, genuine signature.
// Reference: every occurrence of signature k at position p must be reported
// with identifier k in clock (p + uoff_k)/4 + 9; nothing else may be reported.
// Both engines have a latency of 9 clocks: pipeline entry 1, common stage 1,
// u-substring register 1, OR level 1, encoder 1, matrix 1, comparators 1,
// AND level 1, identifier encoder 1.
module automatic tb_matching_engine;
  import cs_pkg::*;
  import tb_stream_pkg::*;
  localparam int DEPTH = 12;
  localparam int WIN   = DEPTH * Q;
  localparam int LAT   = 9;

  logic clk = 0, rst_n = 0;
  char_t [Q-1:0] in_chars;
  logic  [Q-1:0] in_valid;
  char_line_t    win [WIN];
  logic h_v, t_v, h_cv, t_cv, h_m, t_m;
  logic [2:0] h_id, t_id;
  align_t h_ca, t_ca;
  int checks = 0, failures = 0;
  int exp_h [int], exp_t [int];
  int nh = 0, nt = 0, nmulti = 0;
  int al_h [Q], al_t [Q];
  stream_c st;

  char_pipeline #(.DEPTH(DEPTH)) u_pipe (.clk, .rst_n, .in_chars, .in_valid, .win);
  matching_engine #(.NSIG(H_NSIG), .SIGS(H_SIGS), .WIN(WIN), .IW(3)) dut_h (
    .clk, .rst_n, .win, .match_valid(h_v), .match_id(h_id),
    .cand_valid(h_cv), .cand_align(h_ca), .cand_multi(h_m));
  matching_engine #(.NSIG(T_NSIG), .SIGS(T_SIGS), .WIN(WIN), .IW(3)) dut_t (
    .clk, .rst_n, .win, .match_valid(t_v), .match_id(t_id),
    .cand_valid(t_cv), .cand_align(t_ca), .cand_multi(t_m));

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_port(string nm, logic v, logic [2:0] id, int cyc, ref int exp_m [int], ref int cnt);
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
    for (int n = 0; n < 400; n++) begin
      bit hs = $urandom_range(0, 1);
      int k  = hs ? $urandom_range(0, H_NSIG-1) : $urandom_range(0, T_NSIG-1);
      sig_t s = hs ? H_SIGS[k] : T_SIGS[k];
      case ($urandom_range(0, 9))
        0: st.add_sig_mod(s, $urandom_range(0, int'(s.len)-1), 150);
        1: st.add_sig_mod(s, $urandom_range(0, int'(s.len)-1), -1);
        2: st.add_usub(s);
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
    end

    checks++;
    if (dut_h.LATENCY != LAT || dut_t.LATENCY != LAT) begin
      failures++;
      $display("FAIL: engine latency %0d/%0d, expected %0d", dut_h.LATENCY, dut_t.LATENCY, LAT);
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
      st.word(cyc, in_chars, in_valid);
    end
    $display("h matches %0d, t matches %0d, double detections %0d", nh, nt, nmulti);
    checks++;
    if (nh == 0 || nt == 0 || nmulti == 0) begin
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
