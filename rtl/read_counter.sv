// read_counter: up counter that produces the sequential read address.
//
// q counts 0, 1, ..., tc and then wraps to 0, tc being Ncbps-1 of the selected
// mode; wrap is high while q has reached tc. Synchronous active-high clr sets 0.
// A counter reset at the mode's terminal count is the document's; the wrap
// output is this design's.
module read_counter #(
  parameter int unsigned WIDTH = 10
) (
  input  logic             clk,
  input  logic             clr,
  input  logic [WIDTH-1:0] tc,
  output logic [WIDTH-1:0] q,
  output logic             wrap
);
  // >= also recovers if tc shrinks below q after a mode change
  assign wrap = (q >= tc);

  always_ff @(posedge clk) begin
    if (clr || wrap) q <= '0;
    else             q <= q + 1'b1;
  end
endmodule
