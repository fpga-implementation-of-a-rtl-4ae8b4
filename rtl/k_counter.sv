`timescale 1ps/1ps
// k_counter: the loop filter of the ADPLL, an up/down counter of modulus K.
//
// On every K clock the counter steps down while DN/UP (the phase detector
// output) is high and up while it is low. Stepping up from K-1 wraps to 0 and
// raises `carry` for one clock; stepping down from 0 wraps to K-1 and raises
// `borrow` for one clock. The carry and borrow pulses tell the DCO to add or
// drop one output pulse. A phase error that keeps DN/UP high (or low) for more
// than half of each reference period thus produces a net stream of borrows (or
// carries), and the size of K sets the loop gain.
//
// The modulus K and the carry output follow the specification; the borrow
// output and the modulus being K itself (not 2^K) are this design's reading.
// Timing: carry/borrow are registered, one K-clock wide, one clock after the
// step that wraps. Reset (async, active high) clears the count to 0.
module k_counter #(
  parameter int unsigned K = trng_pkg::ADPLL_K
) (
  input  logic clk,     // K clock, M * f0
  input  logic rst,
  input  logic dn_up,   // 1 = count down
  output logic carry,
  output logic borrow
);
  localparam int unsigned W = (K > 1) ? $clog2(K) : 1;
  localparam logic [W-1:0] TOP = W'(K - 1);

  logic [W-1:0] count;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      count  <= '0;
      carry  <= 1'b0;
      borrow <= 1'b0;
    end else if (dn_up) begin
      // a step wraps in one direction only
      assert (!(carry && borrow)) else $error("k_counter: carry and borrow together");
      carry  <= 1'b0;
      borrow <= (count == '0);
      count  <= (count == '0) ? TOP : count - 1'b1;
    end else begin
      borrow <= 1'b0;
      carry  <= (count == TOP);
      count  <= (count == TOP) ? '0 : count + 1'b1;
    end
  end

  initial assert (K >= 2) else $error("k_counter: K must be at least 2");
endmodule
