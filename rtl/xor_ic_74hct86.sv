`timescale 1ps/1ps
// xor_ic_74hct86: logic function of the quad 2-input XOR IC on the receiver
// breadboard.
//
// Four independent gates, y[i] = a[i] ^ b[i]. In the system one gate XORs the
// encrypted bit received over Bluetooth with the receiver TRNG's bit. Supply
// pins, 5 V levels and the few-nanosecond gate delay of the real part are not
// modelled. Combinational.
module xor_ic_74hct86 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [3:0] y
);
  always_comb y = a ^ b;
endmodule
