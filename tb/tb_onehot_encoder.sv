// tb_onehot_encoder: a 40-line encoder (three tree levels of 6-input ORs,
// hence a latency of three clocks) fed every clock with either no line or one
// random line; the identifier and valid are compared three clocks later.
module automatic tb_onehot_encoder;
  localparam int N   = 40;
  localparam int IW  = 6;
  localparam int LAT = 3;      // 40 -> 7 -> 2 -> 1
  logic clk = 0, rst_n = 0;
  logic [N-1:0]  in;
  logic          valid;
  logic [IW-1:0] id;
  int checks = 0, failures = 0;
  int hist [$];

  onehot_encoder #(.N(N), .IW(IW)) dut (.clk, .rst_n, .in, .valid, .id);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      int sel;
      @(negedge clk);
      sel = ($urandom_range(0, 3) == 0) ? -1 : int'($urandom_range(0, N-1));
      in = '0;
      if (sel >= 0) in[sel] = 1'b1;
      hist.push_back(sel);
      @(posedge clk);
      #1;
      // after the clock edge of word n the outputs show word n-(LAT-1)
      if (hist.size() >= LAT) begin
        int e = hist[hist.size() - LAT];
        checks++;
        if (valid !== (e >= 0) || (e >= 0 && int'(id) != e)) begin
          failures++;
          $display("FAIL: expected %0d got valid=%b id=%0d", e, valid, id);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
