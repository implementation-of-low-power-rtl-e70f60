// tb_preset_logic: checks the controller outputs address by address for
// every mode: row-end preset of the accumulator with the next row index,
// phase counter control, end of block after Ncbps addresses, and the restart
// on a change of mode.
module tb_preset_logic;
  import ilv_pkg::*;
  import ilv_ref_pkg::*;
  logic clk = 0, clr;
  mod_t mod_type, cfg_mod;
  logic [2:0] id, cfg_id;
  logic ph_clr, acc_load, tff_t, m3_up, row_end, blk_last, restart;
  logic [9:0] acc_preset;
  int checks = 0, failures = 0;
  int n_restart = 0;

  preset_logic #(.ADDR_W(10)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_bit(string what, logic got, logic exp, int k);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL k=%0d %s=%0b expected %0b", k, what, got, exp);
    end
  endtask

  // run one block and a bit of the next in the current mode
  task automatic run_mode(int m, int i, int extra);
    int n = ref_ncbps(m, i);
    for (int k = 0; k < n + extra; k++) begin
      int kk = k % n;
      int q = kk % 16, r = kk / 16;
      bit last = (kk == n - 1);
      #1;
      expect_bit("restart",  restart,  1'b0, k);
      expect_bit("row_end",  row_end,  q == 15, k);
      expect_bit("blk_last", blk_last, last, k);
      expect_bit("acc_load", acc_load, q == 15 && !last, k);
      expect_bit("ph_clr",   ph_clr,   last, k);
      expect_bit("tff_t",    tff_t,    q != 15, k);
      expect_bit("m3_up",    m3_up,    q == 15, k);
      if (q == 15 && !last) begin
        checks++;
        if (int'(acc_preset) != r + 1) begin
          failures++;
          $display("FAIL k=%0d acc_preset=%0d expected %0d", k, acc_preset, r + 1);
        end
      end
      checks++;
      if (int'(cfg_mod) != m || int'(cfg_id) != i) failures++;
      @(posedge clk);
    end
  endtask

  initial begin
    clr = 1; mod_type = MOD_BPSK; id = 0;
    @(posedge clk); #1;
    clr = 0;
    run_mode(0, 0, 20);
    // change of mode without clr: restart seen in the cycle the input changes
    for (int m = 1; m < 4; m++)
      for (int i = 0; i < 8; i += 3) begin
        #1;
        mod_type = mod_t'(m); id = 3'(i);
        #1;
        checks++;
        if (restart !== 1'b1 || ph_clr !== 1'b1) begin
          failures++;
          $display("FAIL restart not seen for mode %0d id %0d", m, i);
        end else n_restart++;
        @(posedge clk);
        run_mode(m, i, 37);
      end
    checks++;
    if (n_restart != 9) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
