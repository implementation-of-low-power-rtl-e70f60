// mod3_counter: modulo-3 counter that selects among the three 64-QAM address
// increments.
//
// q runs through 0, 1, 2. With en = 1 it steps down (up = 0: 0->2->1->0) or
// up (up = 1: 0->1->2->0); with en = 0 it holds. Synchronous active-high clr
// forces 0 and wins. The address generator counts down inside an iteration
// and steps up once at each iteration boundary, which keeps q equal to the
// phase (r - q) mod 3 of the interleaver equation. The counter is named by the
// document; the up/down control is this design's choice.
module mod3_counter (
  input  logic       clk,
  input  logic       clr,
  input  logic       en,
  input  logic       up,
  output logic [1:0] q
);
  logic [1:0] q_next;

  always_comb begin
    if (up) q_next = (q == 2'd2) ? 2'd0 : q + 2'd1;
    else    q_next = (q == 2'd0) ? 2'd2 : q - 2'd1;
  end

  always_ff @(posedge clk) begin
    if (clr)     q <= 2'd0;
    else if (en) q <= q_next;
  end

  // q never reaches 3
  assert property (@(posedge clk) disable iff (clr) q != 2'd3);
endmodule
