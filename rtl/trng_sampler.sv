`timescale 1ps/1ps
// trng_sampler: the entropy-collecting flip-flops of the TRNG.
//
// d1 = ro1 ^ ro2 ^ IDout ^ Q1 is captured by DFF1 on every rising IDout edge.
// The two ring oscillators run freely against IDout, IDout itself carries the
// ADPLL's phase ripple, and Q1 is fed back, so DFF1 samples a signal whose
// value at the clock edge is unpredictable (and, in silicon, often
// metastable). DFF2 re-samples Q1 on the rising edge of IDout / 2 from the
// divide-by-2 counter; Q2 is the random bit stream, one bit per two IDout
// cycles (200 Mbit/s at the nominal 400 MHz IDout).
//
// This structure is the specification's. Because IDout is both a data input
// of the XOR and the clock of DFF1, the data changes right at the clock edge:
// in a two-state simulation DFF1 sees IDout's new, high value there.
// Reset (async, active high) clears Q1, Q2 and the divider.
module trng_sampler (
  input  logic rst,
  input  logic t,       // T input of the divide-by-2 T flip-flop
  input  logic ro1,     // ring oscillator 1
  input  logic ro2,     // ring oscillator 2
  input  logic id_out,  // ADPLL IDout, clock of DFF1
  output logic q1,      // DFF1
  output logic q2       // DFF2: random bits
);
  logic d1;
  logic clk_div2;

  always_comb d1 = ro1 ^ ro2 ^ id_out ^ q1;

  // DFF1
  always_ff @(posedge id_out or posedge rst) begin
    if (rst) q1 <= 1'b0;
    else     q1 <= d1;
  end

  div2_counter u_div2 (.clk(id_out), .rst(rst), .t(t), .q(clk_div2));

  // DFF2
  always_ff @(posedge clk_div2 or posedge rst) begin
    if (rst) q2 <= 1'b0;
    else     q2 <= q1;
  end
endmodule
