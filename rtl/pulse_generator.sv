`timescale 1ps/1ps
// pulse_generator: makes the pulse that holds and restarts the ring
// oscillators, from the 100 MHz system clock.
//
// A counter runs modulo PERIOD; `pulse` is high for the first WIDTH counts of
// each period. While it is high the rings rest in a known state; each time it
// falls they start again, so the phase they have when they are sampled comes
// only from jitter accumulated since the restart. The specification names the
// block and its clock only; the counter, PERIOD and WIDTH are this design's
// choices. Output registered; with reset (async, active high) the pulse is
// high, so the rings are held during reset.
module pulse_generator #(
  parameter int unsigned PERIOD = trng_pkg::PULSE_PERIOD,
  parameter int unsigned WIDTH  = trng_pkg::PULSE_WIDTH
) (
  input  logic clk,    // system clock
  input  logic rst,
  output logic pulse   // ring hold pulse
);
  localparam int unsigned W = (PERIOD > 1) ? $clog2(PERIOD) : 1;
  localparam logic [W-1:0] LAST = W'(PERIOD - 1);

  logic [W-1:0] count;
  logic [W-1:0] count_nxt;

  always_comb count_nxt = (count == LAST) ? '0 : count + 1'b1;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      count <= '0;
      pulse <= 1'b1;
    end else begin
      count <= count_nxt;
      pulse <= (32'(count_nxt) < WIDTH);
    end
  end

  initial assert (WIDTH >= 1 && WIDTH < PERIOD)
    else $error("pulse_generator: need 1 <= WIDTH < PERIOD");
endmodule
