// tb_carry_select_adder: checks the 10-bit carry select adder exhaustively
// over all increments 0..127 against a sampled set of accumulator values,
// plus random full-width operands with carry-in, against the + operator.
module tb_carry_select_adder;
  localparam int W = 10;
  logic [W-1:0] a, b, sum;
  logic cin, cout;
  int checks = 0, failures = 0;

  carry_select_adder #(.WIDTH(W), .BLOCK(4)) dut (.a, .b, .cin, .sum, .cout);

  task automatic check();
    logic [W:0] exp;
    #1;
    exp = {1'b0, a} + {1'b0, b} + (W+1)'(cin);
    checks++;
    if ({cout, sum} !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %0d + %0d + %0d = %0d, expected %0d", a, b, cin, {cout, sum}, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 1024; x += 7)
      for (int y = 0; y < 128; y++) begin
        a = W'(x); b = W'(y); cin = 0; check();
      end
    for (int i = 0; i < 3000; i++) begin
      a = W'($urandom); b = W'($urandom); cin = 1'($urandom); check();
    end
    a = '1; b = '0; cin = 1; check();
    a = '1; b = '1; cin = 1; check();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
