`timescale 1ps/1ps
// div_n_counter: the divide-by-N feedback counter of the ADPLL.
//
// Counts rising edges of IDout modulo N and outputs a square wave that is low
// for counts 0..N/2-1 and high for N/2..N-1, so div_out = IDout / N, which is
// f0 when the DCO runs at N * f0. The output is registered in the IDout
// domain. N comes from the specification; the half-and-half duty cycle is this
// design's choice. Reset (async, active high) clears the count.
module div_n_counter #(
  parameter int unsigned N = trng_pkg::ADPLL_N
) (
  input  logic clk,      // IDout
  input  logic rst,
  output logic div_out
);
  localparam int unsigned W = (N > 1) ? $clog2(N) : 1;
  localparam logic [W-1:0] LAST = W'(N - 1);
  localparam logic [W-1:0] HALF = W'(N / 2);

  logic [W-1:0] count;
  logic [W-1:0] count_nxt;

  always_comb count_nxt = (count == LAST) ? '0 : count + 1'b1;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      count   <= '0;
      div_out <= 1'b0;
    end else begin
      count   <= count_nxt;
      div_out <= (count_nxt >= HALF);
    end
  end

  initial assert (N >= 2) else $error("div_n_counter: N must be at least 2");
endmodule
