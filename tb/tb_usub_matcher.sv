// tb_usub_matcher: u-substring detection of the example h-set.
// The window is driven from a model of the character stream made of the
// characters that occur in the u-substrings, so that detections, also several
// in one word, are frequent. For each word the expected alignment vector is
// found by comparing every u-substring string with the stream at the four
// positions of the common stage; it must appear 1 + 1 clocks later (hit
// register plus one OR level for six signatures).
module automatic tb_usub_matcher;
  import cs_pkg::*;
  localparam int WIN = 48;
  localparam int SC  = 1;
  localparam int LAT = 2;
  localparam string ALPHA = "wd+%pa?sicrm-xy";

  logic clk = 0, rst_n = 0;
  char_line_t   win [WIN];
  logic [Q-1:0] align_hot;
  int checks = 0, failures = 0;
  int stream [$];
  logic [Q-1:0] exp_q [$];
  int seen [Q];

  usub_matcher #(.NSIG(H_NSIG), .SIGS(H_SIGS), .SC(SC), .WIN(WIN)) dut (
    .clk, .rst_n, .win, .align_hot);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic usub_at(int k, int p);
    for (int m = 0; m < int'(H_SIGS[k].ulen); m++) begin
      if (p + m >= stream.size()) return 1'b0;
      if (stream[p + m] != int'(sig_char(H_SIGS[k], int'(H_SIGS[k].uoff) + m))) return 1'b0;
    end
    return 1'b1;
  endfunction

  initial begin
    for (int i = 0; i < WIN; i++) begin
      stream.push_back(-1);
      win[i] = '0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      logic [Q-1:0] e;
      int s;
      @(negedge clk);
      for (int l = 0; l < Q; l++) stream.push_back(int'(ALPHA[$urandom_range(0, ALPHA.len()-1)]));
      s = stream.size();
      for (int age = 0; age < WIN; age++) begin
        win[age] = '0;
        win[age][stream[s-1-age]] = 1'b1;
      end
      // lane a of stage SC holds stream position s - Q*(SC+1) + a
      e = '0;
      for (int a = 0; a < Q; a++)
        for (int k = 0; k < H_NSIG; k++)
          if (usub_at(k, s - Q*(SC+1) + a)) e[a] = 1'b1;
      exp_q.push_back(e);
      @(posedge clk);
      #1;
      if (exp_q.size() >= LAT) begin
        logic [Q-1:0] x = exp_q[exp_q.size() - LAT];
        checks++;
        for (int a = 0; a < Q; a++) if (x[a]) seen[a]++;
        if (align_hot !== x) begin
          failures++;
          if (failures < 10) $display("FAIL: word %0d expected %b got %b", n, x, align_hot);
        end
      end
    end
    for (int a = 0; a < Q; a++) begin
      checks++;
      if (seen[a] == 0) begin
        failures++;
        $display("FAIL: alignment %0d never exercised", a);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
