// ilv_memory: double-buffered interleaver memory.
//
// Two RAM banks share the raw data input. sel drives the write enable of
// RAM-1 directly and, through an inverter, that of RAM-2. Each bank's address
// comes through a 2:1 mux: RAM-1 gets the read address when sel = 0 and the
// write address when sel = 1, RAM-2 the other way round. So with sel = 0 the
// symbols are written into RAM-2 at the permuted write addresses while RAM-1
// is read out in order, and with sel = 1 the roles swap. An output mux routes
// the bank being read to dout (input 0 = RAM-1).
// Timing: dout is the word at the read address of the previous clock. The
// output mux is therefore steered by sel delayed one clock, so the last word
// of a block still comes from the right bank; this register is this design's
// addition, the rest of the structure is the document's.
module ilv_memory #(
  parameter int unsigned DATA_W    = 8,
  parameter int unsigned ADDR_W    = 10,
  parameter int unsigned MEM_DEPTH = 576
) (
  input  logic              clk,
  input  logic              sel,
  input  logic [ADDR_W-1:0] rd_addr,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [DATA_W-1:0] din,
  output logic [DATA_W-1:0] dout
);
  logic [ADDR_W-1:0] a1, a2;
  logic [DATA_W-1:0] d1, d2;
  logic              we1, we2, sel_q;

  assign we1 = sel;
  assign we2 = ~sel;
  assign a1  = sel ? wr_addr : rd_addr;
  assign a2  = sel ? rd_addr : wr_addr;

  ilv_ram #(.DATA_W(DATA_W), .ADDR_W(ADDR_W), .DEPTH(MEM_DEPTH)) u_ram1 (
    .clk, .we(we1), .a(a1), .din, .dout(d1)
  );
  ilv_ram #(.DATA_W(DATA_W), .ADDR_W(ADDR_W), .DEPTH(MEM_DEPTH)) u_ram2 (
    .clk, .we(we2), .a(a2), .din, .dout(d2)
  );

  always_ff @(posedge clk) sel_q <= sel;

  assign dout = sel_q ? d2 : d1;
endmodule
