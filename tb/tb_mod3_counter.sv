// tb_mod3_counter: checks the modulo-3 up/down counter against a software
// model over random enable, direction and clear inputs.
module tb_mod3_counter;
  logic clk = 0, clr, en, up;
  logic [1:0] q;
  int checks = 0, failures = 0;
  int model;

  mod3_counter dut (.clk, .clr, .en, .up, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 1; en = 0; up = 0;
    @(posedge clk); #1;
    model = 0;
    for (int i = 0; i < 400; i++) begin
      clr = ($urandom % 16) == 0;
      en  = ($urandom % 4) != 0;
      up  = $urandom % 2;
      @(posedge clk); #1;
      if (clr)     model = 0;
      else if (en) model = up ? (model + 1) % 3 : (model + 2) % 3;
      checks++;
      if (int'(q) != model) begin
        failures++;
        $display("FAIL cycle %0d: q=%0d expected %0d", i, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
