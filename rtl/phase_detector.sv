`timescale 1ps/1ps
// phase_detector: XOR phase detector of the ADPLL.
//
// The reference input and the divide-by-N feedback are XORed. The output X(n)
// is high while the two signals differ, so its duty cycle measures the phase
// error: 50 % at the lock point (90 degrees apart), more when the feedback lags
// further, less when it leads. It drives the DN/UP input of the K counter,
// which samples it on the K clock. Purely combinational; no latency.
module phase_detector (
  input  logic ref_in,  // reference input signal, f0
  input  logic fb_in,   // DCO output divided by N
  output logic dn_up    // X(n): 1 = K counter counts down, 0 = up
);
  always_comb dn_up = ref_in ^ fb_in;
endmodule
