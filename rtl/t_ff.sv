// t_ff: T flip-flop that selects between the two 16-QAM address increments.
//
// q toggles on every clock with t = 1 and holds with t = 0. A synchronous,
// active-high clr forces q to 0 and wins over t. In the address generator
// the preset logic drives t so that q equals the increment phase
// (r - q) mod 2 of the interleaver equation. The T flip-flop itself is the
// document's; the clear and the hold input are this design's choice.
module t_ff (
  input  logic clk,
  input  logic clr,
  input  logic t,
  output logic q
);
  always_ff @(posedge clk) begin
    if (clr)    q <= 1'b0;
    else if (t) q <= ~q;
  end
endmodule
