// tb_char_matrix: alignment correction for the example h-set.
// A random character stream fills the window; every clock a random alignment
// (and valid) is applied. One clock later column j must hold the line of the
// stream character at (position of lane a of stage TAP) - U + j, kept only if
// some signature has that character in column j. The set of characters per
// column is built here from the signature strings.
module automatic tb_char_matrix;
  import cs_pkg::*;
  localparam int WIN  = 48;
  localparam int TAP  = 4;
  localparam int U    = 23;   // largest u-substring offset of the h-set
  localparam int NCOL = 30;   // widest aligned signature of the h-set

  logic clk = 0, rst_n = 0;
  char_line_t win [WIN];
  logic       in_valid, out_valid;
  align_t     in_align;
  char_line_t col [NCOL];
  int checks = 0, failures = 0;
  int stream [$];
  bit used [NCOL][256];

  char_matrix #(.NSIG(H_NSIG), .SIGS(H_SIGS), .TAP(TAP), .WIN(WIN)) dut (
    .clk, .rst_n, .win, .in_valid, .in_align, .out_valid, .col);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < H_NSIG; k++)
      for (int i = 0; i < int'(H_SIGS[k].len); i++)
        used[U - int'(H_SIGS[k].uoff) + i][sig_char(H_SIGS[k], i)] = 1'b1;
    for (int i = 0; i < WIN; i++) begin
      stream.push_back(0);
      win[i] = '0;
    end
    in_valid = 0;
    in_align = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      int s, a, base;
      logic v;
      @(negedge clk);
      // mostly characters the signatures use, so columns are often non-zero
      for (int l = 0; l < Q; l++) begin
        int k = $urandom_range(0, H_NSIG-1);
        stream.push_back($urandom_range(0, 3) == 0 ? int'($urandom_range(0, 255))
                         : int'(sig_char(H_SIGS[k], $urandom_range(0, int'(H_SIGS[k].len)-1))));
      end
      s = stream.size();
      for (int age = 0; age < WIN; age++) begin
        win[age] = '0;
        win[age][stream[s-1-age]] = 1'b1;
      end
      a = $urandom_range(0, Q-1);
      v = ($urandom_range(0, 4) != 0);
      in_align = align_t'(a);
      in_valid = v;
      base = s - 1 - (Q*TAP + Q-1-a);   // position of the u-substring start
      @(posedge clk);
      #1;
      checks++;
      if (out_valid !== v) begin
        failures++;
        $display("FAIL: valid");
      end
      for (int j = 0; j < NCOL; j++) begin
        int c = stream[base - U + j];
        char_line_t e = '0;
        if (used[j][c]) e[c] = 1'b1;
        checks++;
        if (col[j] !== e) begin
          failures++;
          if (failures < 10) $display("FAIL: word %0d col %0d align %0d", n, j, a);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
