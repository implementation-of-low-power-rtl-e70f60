// tb_addr_gen: checks the address generator for every modulation and depth
// over two blocks: write address against the reference permutation, read
// address, end-of-block flag and bank swap after exactly Ncbps clocks. It also
// compares the first 32 write addresses of the four tabulated example modes
// with the published address table, and checks that a mode change restarts
// the sequence.
module tb_addr_gen;
  import ilv_pkg::*;
  import ilv_ref_pkg::*;
  logic clk = 0, clr;
  mod_t mod_type;
  logic [2:0] id;
  logic [9:0] wr_addr, rd_addr;
  logic sel, blk_last;
  int checks = 0, failures = 0;

  // first 32 write addresses: BPSK 48, QPSK 96, 16-QAM 192, 64-QAM 288
  int table1 [4][32] = '{
    '{0,3,6,9,12,15,18,21,24,27,30,33,36,39,42,45,1,4,7,10,13,16,19,22,25,28,31,34,37,40,43,46},
    '{0,6,12,18,24,30,36,42,48,54,60,66,72,78,84,90,1,7,13,19,25,31,37,43,49,55,61,67,73,79,85,91},
    '{0,13,24,37,48,61,72,85,96,109,120,133,144,157,168,181,1,12,25,36,49,60,73,84,97,108,121,132,145,156,169,180},
    '{0,20,37,54,74,91,108,128,145,162,182,199,216,236,253,270,1,18,38,55,72,92,109,126,146,163,180,200,217,234,254,271}
  };

  addr_gen #(.ADDR_W(10)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, int got, int exp, int m, int i, int k);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL mod=%0d id=%0d k=%0d %s=%0d expected %0d", m, i, k, what, got, exp);
    end
  endtask

  // the cycle after this task's first edge is k = 0
  task automatic run_mode(int m, int i, int nblk, bit use_clr, int tab);
    int n = ref_ncbps(m, i), s = ref_s(m);
    logic sel0;
    mod_type = mod_t'(m); id = 3'(i);
    clr = use_clr;
    @(posedge clk); #1;
    clr = 0;
    sel0 = sel;
    for (int k = 0; k < nblk * n; k++) begin
      chk("wr_addr", int'(wr_addr), ref_jk(n, s, k % n), m, i, k);
      chk("rd_addr", int'(rd_addr), k % n, m, i, k);
      chk("blk_last", int'(blk_last), int'(k % n == n - 1), m, i, k);
      chk("sel", int'(sel), int'(sel0 ^ 1'((k / n) % 2)), m, i, k);
      if (tab >= 0 && k < 32) chk("table", int'(wr_addr), table1[tab][k], m, i, k);
      @(posedge clk); #1;
    end
  endtask

  initial begin
    clr = 1; mod_type = MOD_BPSK; id = 0;
    // published table
    run_mode(0, 0, 1, 1, 0);
    run_mode(1, 0, 1, 1, 1);
    run_mode(2, 0, 1, 1, 2);
    run_mode(3, 0, 1, 1, 3);
    // every mode, two blocks after clr
    for (int m = 0; m < 4; m++)
      for (int i = 0; i < 8; i++) begin
        if (m == 0 && i > 0) continue;
        if (m >= 2 && i > 3) continue;
        run_mode(m, i, 2, 1, -1);
      end
    // mode changes without clr, in the middle of a block
    run_mode(1, 2, 1, 1, -1);
    repeat (50) @(posedge clk);
    #1;
    run_mode(3, 1, 2, 0, -1);
    repeat (100) @(posedge clk);
    #1;
    run_mode(2, 3, 1, 0, -1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
