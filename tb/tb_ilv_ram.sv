// tb_ilv_ram: random writes and reads of one RAM bank against an array model;
// checks the one-clock synchronous read latency.
module tb_ilv_ram;
  localparam int DW = 8, AW = 10, DEPTH = 576;
  logic clk = 0, we;
  logic [AW-1:0] a;
  logic [DW-1:0] din, dout;
  logic [DW-1:0] model [DEPTH];
  bit            valid [DEPTH];
  int checks = 0, failures = 0;

  ilv_ram #(.DATA_W(DW), .ADDR_W(AW), .DEPTH(DEPTH)) dut (.clk, .we, .a, .din, .dout);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; a = 0; din = 0;
    // fill every word once
    for (int i = 0; i < DEPTH; i++) begin
      we = 1; a = AW'(i); din = DW'($urandom);
      model[i] = din; valid[i] = 1;
      @(posedge clk); #1;
    end
    for (int i = 0; i < 3000; i++) begin
      logic [DW-1:0] exp;
      we  = ($urandom % 3) == 0;
      a   = AW'($urandom % DEPTH);
      din = DW'($urandom);
      exp = model[a];
      @(posedge clk); #1;
      if (we) model[a] = din;
      checks++;
      if (dout !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL a=%0d dout=%0h expected %0h", a, dout, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
