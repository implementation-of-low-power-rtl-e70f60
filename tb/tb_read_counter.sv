// tb_read_counter: runs the read address counter with the terminal count of
// every block size of the interleaver and checks the count sequence, the
// wrap flag and the period (Ncbps clocks).
module tb_read_counter;
  import ilv_ref_pkg::*;
  localparam int W = 10;
  logic clk = 0, clr;
  logic [W-1:0] tc, q;
  logic wrap;
  int checks = 0, failures = 0;

  read_counter #(.WIDTH(W)) dut (.clk, .clr, .tc, .q, .wrap);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sizes [5] = '{48, 96, 192, 432, 576};
    foreach (sizes[s]) begin
      int n;
      n = sizes[s];
      clr = 1; tc = W'(n - 1);
      @(posedge clk); #1;
      clr = 0;
      for (int c = 0; c < 2 * n; c++) begin
        checks++;
        if (int'(q) != c % n || wrap != (c % n == n - 1)) begin
          failures++;
          $display("FAIL n=%0d c=%0d q=%0d wrap=%0b", n, c, q, wrap);
        end
        @(posedge clk); #1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
