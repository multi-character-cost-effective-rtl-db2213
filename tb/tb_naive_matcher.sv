// tb_naive_matcher: the short-signature matcher behind the shared pipeline.
// The stream mixes background, the five short signatures (back to back, so
// that several end in one word), copies with one character changed and
// copies broken by an invalid lane. Every occurrence of signature k ending at
// position e must raise hit[k][e mod 4] in clock e/4 + 2, and no other hit may
// appear.
module automatic tb_naive_matcher;
  import cs_pkg::*;
  import tb_stream_pkg::*;
  localparam int DEPTH = 3;
  localparam int WIN   = DEPTH * Q;
  localparam int LAT   = 2;   // pipeline register + comparator register

  logic clk = 0, rst_n = 0;
  char_t [Q-1:0] in_chars;
  logic  [Q-1:0] in_valid;
  char_line_t    win [WIN];
  logic [N_NSIG-1:0][Q-1:0] hit;
  int checks = 0, failures = 0, nmatch = 0, nmulti = 0;
  logic [N_NSIG-1:0][Q-1:0] exp_hit [int];
  stream_c st;

  char_pipeline #(.DEPTH(DEPTH)) u_pipe (.clk, .rst_n, .in_chars, .in_valid, .win);
  naive_matcher #(.NSIG(N_NSIG), .SIGS(N_SIGS), .WIN(WIN)) dut (.clk, .rst_n, .win, .hit);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    st = new();
    for (int n = 0; n < 600; n++) begin
      int k = $urandom_range(0, N_NSIG-1);
      case ($urandom_range(0, 5))
        0: st.add_sig_mod(N_SIGS[k], $urandom_range(0, int'(N_SIGS[k].len)-1), 200);
        1: st.add_sig_mod(N_SIGS[k], $urandom_range(0, int'(N_SIGS[k].len)-1), -1);
        default: void'(st.add_sig(N_SIGS[k]));
      endcase
      if ($urandom_range(0, 2) == 0) st.add_bg($urandom_range(0, 6), 10);
    end
    st.add_bg(8);
    for (int p = 0; p < st.q.size(); p++)
      for (int k = 0; k < N_NSIG; k++)
        if (st.occurs(N_SIGS[k], p)) begin
          int e = p + int'(N_SIGS[k].len) - 1;
          int c = e / Q + LAT;
          if (!exp_hit.exists(c)) exp_hit[c] = '0;
          exp_hit[c][k][e % Q] = 1'b1;
        end

    in_chars = '0;
    in_valid = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < st.words() + LAT + 2; cyc++) begin
      logic [N_NSIG-1:0][Q-1:0] e;
      @(negedge clk);
      // outputs of clock cyc, then the inputs of clock cyc
      e = exp_hit.exists(cyc) ? exp_hit[cyc] : '0;
      checks++;
      if (e != '0) nmatch++;
      if ($countones(e) > 1) nmulti++;
      if (hit !== e) begin
        failures++;
        if (failures < 10) $display("FAIL: clock %0d expected %h got %h", cyc, e, hit);
      end
      st.word(cyc, in_chars, in_valid);
    end
    checks++;
    if (nmatch == 0 || nmulti == 0) begin
      failures++;
      $display("FAIL: matches %0d, clocks with several hits %0d", nmatch, nmulti);
    end
    $display("naive: clocks with hits %0d, with several hits %0d", nmatch, nmulti);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
