// tb_accumulator: checks the accumulator register (clear, preset load, sum
// capture and their priority) against a software model with random inputs.
module tb_accumulator;
  localparam int W = 10;
  logic clk = 0, clr, load;
  logic [W-1:0] preset, sum, q, model;
  int checks = 0, failures = 0;

  accumulator #(.WIDTH(W)) dut (.clk, .clr, .load, .preset, .sum, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 1; load = 0; preset = 0; sum = 0;
    @(posedge clk); #1;
    model = 0;
    for (int i = 0; i < 400; i++) begin
      clr    = ($urandom % 8) == 0;
      load   = ($urandom % 3) == 0;
      preset = W'($urandom);
      sum    = W'($urandom);
      @(posedge clk); #1;
      model = clr ? '0 : load ? preset : sum;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL cycle %0d: q=%0d expected %0d", i, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
