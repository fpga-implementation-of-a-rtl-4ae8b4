`timescale 1ps/1ps
// adpll_trng: true random number generator built round one ADPLL.
//
// Sources of randomness: two NOR ring oscillators, restarted by the pulse
// generator, and the phase ripple of the ADPLL output IDout. trng_sampler
// XORs both rings with IDout and with its own DFF1 output, samples the result
// on IDout and re-samples it on IDout / 2, giving one random bit every two
// IDout cycles on `random_bit` (nominally 200 Mbit/s).
//
// Clocks: `clk` is the 100 MHz board clock; it runs the pulse generator and a
// toggle register that makes the ADPLL reference, f0 = clk / 2 = 50 MHz.
// `clk_dco` is the ADPLL's 800 MHz ID/K clock. Which signal is the reference
// is this design's choice; the rest of the structure is the specification's.
// Reset is asynchronous and active high and resets every register.
module adpll_trng #(
  parameter int unsigned K            = trng_pkg::ADPLL_K,
  parameter int unsigned N            = trng_pkg::ADPLL_N,
  parameter int unsigned M            = trng_pkg::ADPLL_M,
  parameter int unsigned PULSE_PERIOD = trng_pkg::PULSE_PERIOD
) (
  input  logic clk,         // system clock, 100 MHz
  input  logic clk_dco,     // ADPLL ID/K clock, 800 MHz
  input  logic t,           // T-FF input switch
  input  logic rst,
  output logic random_bit,  // Q2 of DFF2
  output logic id_out       // ADPLL output, for observation
);
  logic ref_f0;
  logic pulse;
  logic ro1, ro2;
  logic fb, carry, borrow;
  logic q1;

  // Reference f0 = system clock / 2.
  always_ff @(posedge clk or posedge rst) begin
    if (rst) ref_f0 <= 1'b0;
    else     ref_f0 <= ~ref_f0;
  end

  pulse_generator #(.PERIOD(PULSE_PERIOD)) u_pulse (.clk(clk), .rst(rst), .pulse(pulse));

  // Two rings of the same design; their delays differ slightly, as two
  // placements on a chip would.
  ring_oscillator #(.STAGE_DELAY_PS(310)) u_ro1 (.hold(pulse), .ro_out(ro1));
  ring_oscillator #(.STAGE_DELAY_PS(335)) u_ro2 (.hold(pulse), .ro_out(ro2));

  adpll #(.K(K), .N(N), .M(M)) u_adpll (
    .clk_dco(clk_dco), .rst(rst), .ref_in(ref_f0),
    .id_out(id_out), .fb_out(fb), .carry(carry), .borrow(borrow));

  trng_sampler u_samp (
    .rst(rst), .t(t), .ro1(ro1), .ro2(ro2), .id_out(id_out),
    .q1(q1), .q2(random_bit));
endmodule
