// ilv_ram: single-port RAM, one bank of the interleaver memory.
//
// DEPTH words of DATA_W bits. On a rising clock edge, with we = 1 din is
// written at address a; dout always returns the word at a from before the
// edge (synchronous read, one clock latency), as an FPGA block RAM does. The
// contents are not initialised. A bank is only ever written or read at a
// time, so the read-during-write behaviour does not matter here. The bank's
// ports are the document's; the synchronous read is this design's choice.
module ilv_ram #(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned ADDR_W = 10,
  parameter int unsigned DEPTH  = 576
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] a,
  input  logic [DATA_W-1:0] din,
  output logic [DATA_W-1:0] dout
);
  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && a < ADDR_W'(DEPTH)) mem[a] <= din;
    dout <= mem[a];
  end
endmodule
