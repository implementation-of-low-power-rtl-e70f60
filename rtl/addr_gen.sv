// addr_gen: multimode address generator of the interleaver.
//
// Write address: the accumulator holds the current address; each clock the
// carry select adder adds the increment picked by the mux tree (incr_mux),
// zero-padded from 7 to ADDR_W bits. The increment depends on mod_type, ID
// and, for 16-QAM and 64-QAM, on the phase kept by a T flip-flop and a mod-3
// counter. The preset logic reloads the accumulator with the start address of
// each new row of 16 addresses and clears it after the last row, so the
// sequence equals the 802.16e two-step permutation jk for k = 0..Ncbps-1
// without any division or floor operation.
// Read address: a counter that runs 0..Ncbps-1 in step with the write side.
// sel: toggles after the last address of each block, swapping the two memory
// banks; it is 0 after clr.
// Timing: one write and one read address per clock. After clr (synchronous,
// active high) the first cycle with clr low issues k = 0 / read address 0.
// A new mod_type or ID is taken one clock after it appears and restarts both
// sequences at 0 (sel keeps its value).
// The datapath structure is the document's; the restart rule and the exact
// row-end handling of the phase counters are this design's choices.
module addr_gen
  import ilv_pkg::*;
#(
  parameter int unsigned ADDR_W = 10
) (
  input  logic              clk,
  input  logic              clr,
  input  mod_t              mod_type,
  input  logic [2:0]        id,
  output logic [ADDR_W-1:0] wr_addr,
  output logic [ADDR_W-1:0] rd_addr,
  output logic              sel,
  output logic              blk_last
);
  mod_t              cfg_mod;
  logic [2:0]        cfg_id;
  logic              ph_clr, acc_load, tff_t, m3_up, restart;
  logic [ADDR_W-1:0] acc_preset, acc_q, sum, tc;
  logic              tff_q;
  logic [1:0]        m3_q;
  logic [INC_W-1:0]  inc;
  logic              cout_unused;
  logic              rd_wrap;

  preset_logic #(.ADDR_W(ADDR_W)) u_preset (
    .clk, .clr, .mod_type, .id,
    .cfg_mod, .cfg_id, .ph_clr, .acc_load, .acc_preset,
    .tff_t, .m3_up, .row_end(), .blk_last, .restart
  );

  t_ff u_tff (.clk, .clr(ph_clr), .t(tff_t), .q(tff_q));

  mod3_counter u_m3 (.clk, .clr(ph_clr), .en(1'b1), .up(m3_up), .q(m3_q));

  incr_mux u_inc (.mod_type(cfg_mod), .id(cfg_id), .tff_q, .m3_q, .inc);

  carry_select_adder #(.WIDTH(ADDR_W)) u_add (
    .a(acc_q), .b({{(ADDR_W-INC_W){1'b0}}, inc}), .cin(1'b0),
    .sum, .cout(cout_unused)
  );

  accumulator #(.WIDTH(ADDR_W)) u_acc (
    .clk, .clr(ph_clr), .load(acc_load), .preset(acc_preset), .sum, .q(acc_q)
  );

  assign tc = ADDR_W'(ncbps_of(cfg_mod, cfg_id) - 1);

  read_counter #(.WIDTH(ADDR_W)) u_rd (
    .clk, .clr(clr || restart), .tc, .q(rd_addr), .wrap(rd_wrap)
  );

  always_ff @(posedge clk) begin
    if (clr)           sel <= 1'b0;
    else if (blk_last) sel <= ~sel;
  end

  assign wr_addr = acc_q;

  // the write side and the read side finish a block together
  assert property (@(posedge clk) disable iff (clr || restart) blk_last == rd_wrap);
endmodule
