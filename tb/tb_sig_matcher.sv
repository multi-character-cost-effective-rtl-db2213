// tb_sig_matcher: signature comparators of the example h-set on aligned
// columns. Each clock either a random signature is written into its columns
// (sometimes with one character changed) or the columns get random
// signature characters. The hit vector must follow two clocks later
// (comparator register plus one AND level: the longest signature, 30
// characters, needs five 6-character comparators).
module automatic tb_sig_matcher;
  import cs_pkg::*;
  localparam int U    = 23;
  localparam int NCOL = 30;
  localparam int LAT  = 2;

  logic clk = 0, rst_n = 0;
  logic       in_valid;
  char_line_t col [NCOL];
  logic [H_NSIG-1:0] hit;
  int checks = 0, failures = 0;
  logic [H_NSIG-1:0] exp_q [$];
  int nhit [H_NSIG];

  sig_matcher #(.NSIG(H_NSIG), .SIGS(H_SIGS)) dut (.clk, .rst_n, .in_valid, .col, .hit);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < NCOL; j++) col[j] = '0;
    in_valid = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int cc [NCOL];
      logic [H_NSIG-1:0] e;
      logic v;
      @(negedge clk);
      for (int j = 0; j < NCOL; j++) begin
        int k = $urandom_range(0, H_NSIG-1);
        cc[j] = int'(sig_char(H_SIGS[k], $urandom_range(0, int'(H_SIGS[k].len)-1)));
      end
      if ($urandom_range(0, 1) == 1) begin
        int k = $urandom_range(0, H_NSIG-1);
        for (int i = 0; i < int'(H_SIGS[k].len); i++)
          cc[U - int'(H_SIGS[k].uoff) + i] = int'(sig_char(H_SIGS[k], i));
        if ($urandom_range(0, 3) == 0)
          cc[U - int'(H_SIGS[k].uoff) + $urandom_range(0, int'(H_SIGS[k].len)-1)] = 1;
      end
      v = ($urandom_range(0, 5) != 0);
      in_valid = v;
      for (int j = 0; j < NCOL; j++) begin
        col[j] = '0;
        col[j][cc[j]] = 1'b1;
      end
      for (int k = 0; k < H_NSIG; k++) begin
        e[k] = v;
        for (int i = 0; i < int'(H_SIGS[k].len); i++)
          if (cc[U - int'(H_SIGS[k].uoff) + i] != int'(sig_char(H_SIGS[k], i))) e[k] = 1'b0;
      end
      exp_q.push_back(e);
      @(posedge clk);
      #1;
      if (exp_q.size() >= LAT) begin
        logic [H_NSIG-1:0] x = exp_q[exp_q.size() - LAT];
        checks++;
        for (int k = 0; k < H_NSIG; k++) if (x[k]) nhit[k]++;
        if (hit !== x) begin
          failures++;
          if (failures < 10) $display("FAIL: word %0d expected %b got %b", n, x, hit);
        end
      end
    end
    for (int k = 0; k < H_NSIG; k++) begin
      checks++;
      if (nhit[k] == 0) begin
        failures++;
        $display("FAIL: signature %0d never matched", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
