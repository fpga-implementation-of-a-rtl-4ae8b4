`timescale 1ps/1ps
// div2_counter: the divide-by-2 counter that clocks DFF2 of the TRNG.
//
// A T flip-flop clocked by IDout: while `t` is high it toggles on every rising
// IDout edge, so q = IDout / 2 (200 MHz at the nominal 400 MHz IDout); while
// `t` is low it holds. Using the board's T-FF input switch as its T input is
// this design's reading. Reset (async, active high) clears q.
module div2_counter (
  input  logic clk,   // IDout
  input  logic rst,
  input  logic t,     // toggle enable
  output logic q
);
  always_ff @(posedge clk or posedge rst) begin
    if (rst)    q <= 1'b0;
    else if (t) q <= ~q;
  end
endmodule
