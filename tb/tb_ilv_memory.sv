// tb_ilv_memory: drives the double-buffered memory with blocks written at a
// random permutation of addresses while the other bank is read in order, and
// checks that each block comes out, one block period later and one clock
// after its read address, in permuted order, from the correct bank.
module tb_ilv_memory;
  localparam int DW = 8, AW = 10, N = 96;
  logic clk = 0, sel = 0, swap;
  logic [AW-1:0] rd_addr, wr_addr;
  logic [DW-1:0] din, dout;
  int checks = 0, failures = 0;
  int perm [N];
  logic [DW-1:0] prev [N];   // prev[a]: word written at address a last block
  logic [DW-1:0] cur  [N];

  ilv_memory #(.DATA_W(DW), .ADDR_W(AW), .MEM_DEPTH(576)) dut (
    .clk, .sel, .rd_addr, .wr_addr, .din, .dout);

  always #5 clk = ~clk;

  // sel is a register that flips on the edge ending a block, as in the
  // address generator
  always_ff @(posedge clk) if (swap) sel <= ~sel;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    swap = 0; rd_addr = 0; wr_addr = 0; din = 0;
    for (int blk = 0; blk < 6; blk++) begin
      // random permutation of 0..N-1
      for (int i = 0; i < N; i++) perm[i] = i;
      for (int i = N - 1; i > 0; i--) begin
        int j, t;
        j = $urandom % (i + 1);
        t = perm[i]; perm[i] = perm[j]; perm[j] = t;
      end
      for (int c = 0; c < N; c++) begin
        wr_addr = AW'(perm[c]);
        rd_addr = AW'(c);
        din     = DW'($urandom);
        cur[perm[c]] = din;
        swap = (c == N - 1);
        @(posedge clk); #1;
        if (blk > 0) begin
          checks++;
          if (dout !== prev[c]) begin
            failures++;
            if (failures < 10) $display("FAIL blk %0d addr %0d dout=%0h expected %0h", blk, c, dout, prev[c]);
          end
        end
      end
      prev = cur;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
