// tb_char_decoder: exhaustive check of the one-hot character decoder.
// Every character value is decoded with valid high (exactly that bit set)
// and with valid low (all-zero line).
module automatic tb_char_decoder;
  import cs_pkg::*;
  char_t      ch;
  logic       valid;
  char_line_t line;
  int checks = 0, failures = 0;
  logic clk = 0;

  char_decoder dut (.ch, .valid, .line);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2; v++) begin
      for (int c = 0; c < 256; c++) begin
        ch = char_t'(c);
        valid = v[0];
        #1;
        checks++;
        if (v == 1) begin
          if (!line[c] || $countones(line) != 1) begin
            failures++;
            $display("FAIL: char %0d decoded to %h", c, line);
          end
        end else if (line != '0) begin
          failures++;
          $display("FAIL: invalid lane char %0d decoded to %h", c, line);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
