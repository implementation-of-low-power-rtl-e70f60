// tb_interleaver_top: end-to-end test of the interleaver at its default
// sizes (8-bit symbols, 576-word banks).
//
// For every modulation and depth of the mode table it clears the design,
// streams three blocks of random symbols and checks that each block comes
// out during the next block period in interleaved order: output j of a block
// must be the input k whose write address jk (computed with the reference
// permutation) equals j, one clock after read address j. It then switches
// mode in the middle of a block without clr and checks that the stream
// restarts correctly. It counts how often each mechanism of the design was
// exercised (each modulation, bank swap in both directions, row preset of the
// accumulator, both 16-QAM and all three 64-QAM increment phases, read
// counter wrap, mode-change restart) and counts a failure for any that never
// happened.
module tb_interleaver_top;
  import ilv_pkg::*;
  import ilv_ref_pkg::*;
  logic clk = 0, clr;
  mod_t mod_type;
  logic [2:0] id;
  logic [7:0] data, data_out;
  int checks = 0, failures = 0;

  interleaver_top dut (.clk, .clr, .mod_type, .id, .data, .data_out);

  always #5 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters, sampled on every working clock
  int n_mod [4];
  int n_swap01 = 0, n_swap10 = 0, n_row_preset = 0, n_rd_wrap = 0, n_restart = 0;
  int n_tff [2];
  int n_m3 [3];
  always @(posedge clk) if (!clr) begin
    n_mod[dut.u_ag.cfg_mod]++;
    if (dut.u_ag.blk_last && !dut.u_ag.sel) n_swap01++;
    if (dut.u_ag.blk_last &&  dut.u_ag.sel) n_swap10++;
    if (dut.u_ag.acc_load) n_row_preset++;
    if (dut.u_ag.rd_wrap) n_rd_wrap++;
    if (dut.u_ag.restart) n_restart++;
    if (dut.u_ag.cfg_mod == MOD_16QAM) n_tff[dut.u_ag.tff_q]++;
    if (dut.u_ag.cfg_mod == MOD_64QAM && dut.u_ag.m3_q < 3) n_m3[dut.u_ag.m3_q]++;
  end

  // stream nblk blocks in mode (m, i); the cycle after the first edge here is
  // k = 0 of block 0. Blocks 1.. are checked against the block before.
  task automatic stream(int m, int i, int nblk, bit use_clr);
    int n, s;
    int inv [576];
    logic [7:0] blk_in [576];
    logic [7:0] prev_in [576];
    n = ref_ncbps(m, i);
    s = ref_s(m);
    for (int k = 0; k < n; k++) inv[ref_jk(n, s, k)] = k;
    mod_type = mod_t'(m); id = 3'(i); clr = use_clr;
    @(posedge clk); #1;
    clr = 0;
    for (int b = 0; b < nblk; b++) begin
      for (int c = 0; c < n; c++) begin
        data = 8'($urandom);
        blk_in[c] = data;
        @(posedge clk); #1;
        if (b > 0) begin
          checks++;
          if (data_out !== prev_in[inv[c]]) begin
            failures++;
            if (failures < 20)
              $display("FAIL mod=%0d id=%0d blk=%0d pos=%0d out=%0h expected %0h (input %0d)",
                       m, i, b, c, data_out, prev_in[inv[c]], inv[c]);
          end
        end
      end
      prev_in = blk_in;
    end
  endtask

  task automatic need(string what, int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else $display("  %-28s %0d", what, count);
  endtask

  initial begin
    clr = 1; mod_type = MOD_BPSK; id = 0; data = 0;
    for (int m = 0; m < 4; m++)
      for (int i = 0; i < 8; i++) begin
        if (m == 0 && i > 0) continue;
        if (m >= 2 && i > 3) continue;
        stream(m, i, 3, 1);
      end
    // mode change in the middle of a block, no clr
    stream(1, 5, 1, 1);
    repeat (77) begin data = 8'($urandom); @(posedge clk); end
    #1;
    stream(3, 2, 3, 0);
    repeat (101) begin data = 8'($urandom); @(posedge clk); end
    #1;
    stream(2, 1, 2, 0);

    $display("mechanisms exercised (clocks or events):");
    need("BPSK clocks", n_mod[0]);
    need("QPSK clocks", n_mod[1]);
    need("16-QAM clocks", n_mod[2]);
    need("64-QAM clocks", n_mod[3]);
    need("bank swap sel 0->1", n_swap01);
    need("bank swap sel 1->0", n_swap10);
    need("row preset of accumulator", n_row_preset);
    need("read counter wrap", n_rd_wrap);
    need("16-QAM phase 0 (n+1)", n_tff[0]);
    need("16-QAM phase 1 (n-1)", n_tff[1]);
    need("64-QAM phase 0 (n+2)", n_m3[0]);
    need("64-QAM phase 1 (n-1)", n_m3[1]);
    need("64-QAM phase 2 (n-1)", n_m3[2]);
    need("mode-change restart", n_restart);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
