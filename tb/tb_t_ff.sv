// tb_t_ff: checks the T flip-flop against a software model over random
// toggle and clear inputs.
module tb_t_ff;
  logic clk = 0, clr, t, q;
  int checks = 0, failures = 0;
  bit model;

  t_ff dut (.clk, .clr, .t, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 1; t = 0;
    @(posedge clk); #1;
    model = 0;
    for (int i = 0; i < 300; i++) begin
      clr = ($urandom % 10) == 0;
      t   = $urandom % 2;
      @(posedge clk); #1;
      if (clr)    model = 0;
      else if (t) model = ~model;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL cycle %0d: q=%0b expected %0b", i, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
