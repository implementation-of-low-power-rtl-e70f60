// carry_select_adder: WIDTH-bit carry select adder used to advance the write
// address.
//
// The operands are cut into sections of BLOCK bits (the top section may be
// shorter). The lowest section is a plain ripple-carry adder. Every higher
// section holds two ripple-carry adders, one assuming a carry-in of 0 and one
// assuming 1, and a multiplexer that picks the right sum once the carry from
// the section below is known, so the carry only passes one mux per section.
// Combinational. Using a carry select adder in place of a carry save adder is
// the document's proposal; the section size is this design's choice.
module carry_select_adder #(
  parameter int unsigned WIDTH = 10,
  parameter int unsigned BLOCK = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int unsigned NSEC = (WIDTH + BLOCK - 1) / BLOCK;

  logic [NSEC:0] c;   // carry into each section
  assign c[0] = cin;

  for (genvar s = 0; s < NSEC; s++) begin : g_sec
    localparam int unsigned LO = s * BLOCK;
    localparam int unsigned W  = (LO + BLOCK > WIDTH) ? WIDTH - LO : BLOCK;

    // ripple-carry sum of this section for a given carry-in
    function automatic logic [W:0] ripple(logic [W-1:0] x, logic [W-1:0] y, logic ci);
      logic [W:0] r;
      logic       k;
      k = ci;
      for (int i = 0; i < int'(W); i++) begin
        r[i] = x[i] ^ y[i] ^ k;
        k    = (x[i] & y[i]) | (k & (x[i] ^ y[i]));
      end
      r[W] = k;
      return r;
    endfunction

    if (s == 0) begin : g_ripple
      logic [W:0] r;
      assign r            = ripple(a[LO +: W], b[LO +: W], c[0]);
      assign sum[LO +: W] = r[W-1:0];
      assign c[1]         = r[W];
    end else begin : g_select
      logic [W:0] r0, r1;
      assign r0           = ripple(a[LO +: W], b[LO +: W], 1'b0);
      assign r1           = ripple(a[LO +: W], b[LO +: W], 1'b1);
      assign sum[LO +: W] = c[s] ? r1[W-1:0] : r0[W-1:0];
      assign c[s+1]       = c[s] ? r1[W] : r0[W];
    end
  end

  assign cout = c[NSEC];
endmodule
