// tb_align_encoder: random alignment vectors; one clock later the encoder
// must give valid = any bit, align = lowest set lane (earliest in the data
// flow) and multi = more than one bit.
module automatic tb_align_encoder;
  import cs_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [Q-1:0] hot;
  logic valid, multi;
  align_t align;
  int checks = 0, failures = 0;

  align_encoder dut (.clk, .rst_n, .hot, .valid, .align, .multi);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [Q-1:0] prev;
    hot = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 400; n++) begin
      int low, cnt;
      prev = (n < 16) ? Q'(n) : Q'($urandom_range(0, 15));
      hot = prev;
      @(posedge clk);
      #1;
      low = 0; cnt = 0;
      for (int a = Q-1; a >= 0; a--) if (prev[a]) begin low = a; cnt++; end
      checks++;
      if (valid !== (cnt > 0) || multi !== (cnt > 1) || (cnt > 0 && int'(align) != low)) begin
        failures++;
        $display("FAIL: hot=%b valid=%b align=%0d multi=%b", prev, valid, align, multi);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
