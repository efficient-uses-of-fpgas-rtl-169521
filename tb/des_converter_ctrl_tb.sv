// des_converter_ctrl_tb: checks the converter's control state.
// With start held high upload must rise exactly in the cycle after every
// fourth word (words at edges t..t+3 -> upload after edge t+3) and stay high
// for one cycle; dropping start part-way must discard the partial block;
// shift_en must follow start.
module des_converter_ctrl_tb;
  int unsigned checks = 0, failures = 0;
  logic clk = 0, rst, start, shift_en, upload;
  int   words;          // model: words held for the block being gathered
  bit   exp_upload;

  des_converter_ctrl #(.WORDS(4)) dut (.clk, .rst, .start, .shift_en, .upload);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int uploads = 0, aborts = 0;
    rst   = 1;
    start = 0;
    words = 0;
    exp_upload = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 0;
    for (int i = 0; i < 1000; i++) begin
      // mostly long bursts, sometimes a short one that is cut off
      start = (i % 50) < 45 ? 1'b1 : ((i % 50) == 47);
      #1;
      checks++;
      if (shift_en != start) begin
        failures++;
        $display("FAIL shift_en != start at %0d", i);
      end
      @(posedge clk);
      if (start) begin
        if (words == 4) words = 0;
        words++;
      end else begin
        if (words > 0 && words < 4) aborts++;
        words = 0;
      end
      exp_upload = (words == 4);
      @(negedge clk);
      checks++;
      if (upload != exp_upload) begin
        failures++;
        $display("FAIL cycle %0d: upload %0d, expected %0d", i, upload, exp_upload);
      end
      if (upload) uploads++;
    end
    checks++;
    if (uploads < 100 || aborts == 0) begin
      failures++;
      $display("FAIL coverage: %0d uploads, %0d aborted blocks", uploads, aborts);
    end
    $display("uploads=%0d aborted=%0d", uploads, aborts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
