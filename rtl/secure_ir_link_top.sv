`timescale 1ps/1ps
// secure_ir_link_top: both ends of the secure IR sensor link.
//
// Transmitter: tx_fpga XORs the registered IR sensor bit with its TRNG bit and
// drives xorout towards the transmitter Arduino and the Bluetooth master.
// Receiver: the bit that arrives through the Bluetooth slave and the receiver
// Arduino enters on link_rx; gate 0 of the 74HCT86 XORs it with the receiver
// FPGA's TRNG bit q3 and gives data_out for display. The Arduinos, the
// Bluetooth modules and the sensor are outside this RTL, so their signals are
// ports. Gates 1..3 of the XOR IC are unused and tied low.
//
// Note on the key: the two TRNGs are independent sources, so
// data_out = sensor ^ q1 ^ q3 recovers the sensor bit only where the two key
// bits happen to agree. The link implements the XOR decryption as specified;
// sharing the key between the ends is not part of it.
module secure_ir_link_top (
  // transmitter board
  input  logic clk_tx,
  input  logic clk_dco_tx,
  input  logic t_tx,
  input  logic rst_tx,
  input  logic sensor,
  output logic q1,
  output logic xorout,
  // receiver board
  input  logic clk_rx,
  input  logic clk_dco_rx,
  input  logic t_rx,
  input  logic rst_rx,
  output logic q3,
  input  logic link_rx,
  output logic data_out
);
  logic [3:0] xor_y;

  tx_fpga u_tx (
    .clk(clk_tx), .clk_dco(clk_dco_tx), .t(t_tx), .rst(rst_tx),
    .sensor(sensor), .q1(q1), .xorout(xorout));

  rx_fpga u_rx (
    .clk(clk_rx), .clk_dco(clk_dco_rx), .t(t_rx), .rst(rst_rx), .q3(q3));

  xor_ic_74hct86 u_xor_ic (
    .a({3'b000, link_rx}), .b({3'b000, q3}), .y(xor_y));

  assign data_out = xor_y[0];
endmodule
