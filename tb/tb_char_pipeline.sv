// tb_char_pipeline: the shared pipeline window against a model of the
// character stream. Random words with random lane valids are pushed in; each
// clock every window entry win[age] must be the one-hot line of the stream
// character 'age' positions before the newest one (zero if that lane was
// invalid or not yet filled).
module automatic tb_char_pipeline;
  import cs_pkg::*;
  localparam int DEPTH = 3;
  localparam int WIN   = DEPTH * Q;
  localparam int NW    = 200;

  logic clk = 0, rst_n = 0;
  char_t [Q-1:0] in_chars;
  logic  [Q-1:0] in_valid;
  char_line_t    win [WIN];
  int checks = 0, failures = 0;
  int stream [$];   // one entry per character position, -1 = no character

  char_pipeline #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .in_chars, .in_valid, .win);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_chars = '0;
    in_valid = '0;
    for (int i = 0; i < WIN; i++) stream.push_back(-1);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < NW; w++) begin
      @(negedge clk);
      for (int l = 0; l < Q; l++) begin
        in_chars[l] = char_t'($urandom_range(0, 255));
        in_valid[l] = ($urandom_range(0, 7) != 0);
        stream.push_back(in_valid[l] ? int'(in_chars[l]) : -1);
      end
      @(posedge clk);
      #1;
      for (int age = 0; age < WIN; age++) begin
        int c = stream[stream.size() - 1 - age];
        char_line_t exp_line = '0;
        if (c >= 0) exp_line[c] = 1'b1;
        checks++;
        if (win[age] !== exp_line) begin
          failures++;
          if (failures < 10) $display("FAIL: word %0d age %0d", w, age);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
