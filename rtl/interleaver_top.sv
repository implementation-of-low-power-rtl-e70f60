// interleaver_top: multimode block interleaver for IEEE 802.16e / WLAN OFDM.
//
// The address generator produces, every clock, a write address that follows
// the two-step 802.16e permutation for the selected modulation (mod_type) and
// interleaver depth (id), a sequential read address, and the bank select sel.
// The interleaver memory writes each incoming symbol into one RAM bank at the
// permuted address while the other bank, filled during the previous block, is
// read out in order. So symbol k of a block leaves at position jk of the next
// block period.
// Interface: clk, synchronous active-high clr, mod_type (00 BPSK, 01 QPSK,
// 10 16-QAM, 11 64-QAM), id (depth select), data in and data_out, 23 pins in
// all at the default 8-bit symbols. No handshake: a symbol enters every clock.
// Timing: after clr, block 0 occupies the first Ncbps clocks with clr low;
// output word j of block b appears Ncbps*(b+1) + j + 1 clocks after the first
// input of block 0 (one clock of RAM read latency). A change of mod_type or id
// restarts the block; the output of the block period after a change is not
// valid. The structure follows the document; the latency and the restart rule
// are this design's choices.
module interleaver_top
  import ilv_pkg::*;
#(
  parameter int unsigned DATA_W    = 8,
  parameter int unsigned ADDR_W    = 10,
  parameter int unsigned MEM_DEPTH = 576
) (
  input  logic              clk,
  input  logic              clr,
  input  mod_t              mod_type,
  input  logic [2:0]        id,
  input  logic [DATA_W-1:0] data,
  output logic [DATA_W-1:0] data_out
);
  logic [ADDR_W-1:0] wr_addr, rd_addr;
  logic              sel;

  addr_gen #(.ADDR_W(ADDR_W)) u_ag (
    .clk, .clr, .mod_type, .id, .wr_addr, .rd_addr, .sel, .blk_last()
  );

  ilv_memory #(.DATA_W(DATA_W), .ADDR_W(ADDR_W), .MEM_DEPTH(MEM_DEPTH)) u_mem (
    .clk, .sel, .rd_addr, .wr_addr, .din(data), .dout(data_out)
  );
endmodule
