// des_converter_tb: shifts random 16-bit words into the 64-bit accumulator,
// with random pauses of the enable, and compares the accumulator with the
// last four enabled words, first word in the most significant bits.
module des_converter_tb;
  int unsigned checks = 0, failures = 0;
  logic        clk = 0;
  logic        shift_en;
  logic [15:0] din;
  logic [63:0] block, model;

  des_converter #(.WORD_W(16), .BLOCK_W(64)) dut (.clk, .shift_en, .din, .block);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n = 0;
    shift_en = 0;
    din      = '0;
    model    = '0;
    @(negedge clk);
    for (int i = 0; i < 200; i++) begin
      shift_en = ($urandom % 4) != 0;
      din      = 16'($urandom);
      @(posedge clk);
      if (shift_en) begin
        model = {model[47:0], din};
        n++;
      end
      @(negedge clk);
      if (n >= 4) begin
        checks++;
        if (block != model) begin
          failures++;
          $display("FAIL cycle %0d: block %h, expected %h", i, block, model);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
