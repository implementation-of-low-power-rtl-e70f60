// accumulator: register that holds the current write address.
//
// Each clock it takes the adder sum (the previous address plus the selected
// increment) unless the preset logic asks for a load, in which case it takes
// the preset value, the start address of the next row. A synchronous,
// active-high clr sets it to 0 and wins over load. The output is the write
// address. Register and preset load follow the document; the priority of clr
// over load is this design's choice.
module accumulator #(
  parameter int unsigned WIDTH = 10
) (
  input  logic             clk,
  input  logic             clr,
  input  logic             load,
  input  logic [WIDTH-1:0] preset,
  input  logic [WIDTH-1:0] sum,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clk) begin
    if (clr)       q <= '0;
    else if (load) q <= preset;
    else           q <= sum;
  end
endmodule
