`timescale 1ps/1ps
// adpll: all-digital phase-locked loop used as the clock and jitter source of
// the TRNG.
//
// Loop: XOR phase detector (reference vs. IDout/N) -> K counter (loop filter,
// up/down modulus K) -> carry/borrow -> ID counter (DCO, IDout = ID clock / 2
// plus or minus corrections) -> divide-by-N counter -> back to the phase
// detector. In lock the XOR output is high half of the time, the K counter
// walks up and down by the same amount and emits carries and borrows in
// alternation, so IDout is N * f0 on average with a small phase ripple.
//
// The structure and K = 4, N = 8, M = 16 follow the specification. With those
// numbers the K clock (M * f0) and the ID clock (2N * f0) are both 800 MHz, so
// one clock input, clk_dco, drives both counters. The carry and borrow pulses
// are brought out so that loop activity can be observed.
module adpll #(
  parameter int unsigned K = trng_pkg::ADPLL_K,
  parameter int unsigned N = trng_pkg::ADPLL_N,
  parameter int unsigned M = trng_pkg::ADPLL_M
) (
  input  logic clk_dco,  // ID clock and K clock
  input  logic rst,
  input  logic ref_in,   // reference input signal, f0
  output logic id_out,   // DCO output
  output logic fb_out,   // IDout / N
  output logic carry,
  output logic borrow
);
  logic dn_up;

  phase_detector u_pd (.ref_in(ref_in), .fb_in(fb_out), .dn_up(dn_up));

  k_counter #(.K(K)) u_kcnt (
    .clk(clk_dco), .rst(rst), .dn_up(dn_up), .carry(carry), .borrow(borrow));

  id_counter u_dco (
    .clk(clk_dco), .rst(rst), .carry(carry), .borrow(borrow), .id_out(id_out));

  div_n_counter #(.N(N)) u_divn (.clk(id_out), .rst(rst), .div_out(fb_out));

  initial assert (M == 2 * N)
    else $error("adpll: one clock serves as K clock (M*f0) and ID clock (2N*f0); needs M == 2N");
endmodule
