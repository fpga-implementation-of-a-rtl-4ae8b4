`timescale 1ps/1ps
// tx_fpga: transmitter FPGA of the secure IR link.
//
// The active-low IR sensor output is registered on the 100 MHz system clock
// and XORed with the bit stream of the ADPLL-based TRNG; the result, xorout,
// goes to the transmitter Arduino, which sends it over the Bluetooth master.
// With an object in front of the sensor, sensor = 0 and xorout equals the key
// bit; with none, sensor = 1 and xorout is the inverted key bit. q1 brings
// the key bit itself out.
//
// Port names are the board's pin names. The sensor register and the output
// XOR follow the gate-level schematic of the design; clk_dco (the 800 MHz
// ADPLL clock) is an extra port because how it is made on the board is not
// specified. xorout is combinational from two registers in different clock
// domains (system clock and IDout / 2), as in the original.
module tx_fpga (
  input  logic clk,       // system clock, 100 MHz
  input  logic clk_dco,   // ADPLL ID/K clock, 800 MHz
  input  logic t,         // T-FF input switch
  input  logic rst,       // reset, active high
  input  logic sensor,    // IR sensor, active low
  output logic q1,        // random bit
  output logic xorout     // encrypted sensor bit
);
  logic sensor_q;
  logic key_bit;
  logic id_out;

  adpll_trng u_trng (
    .clk(clk), .clk_dco(clk_dco), .t(t), .rst(rst),
    .random_bit(key_bit), .id_out(id_out));

  always_ff @(posedge clk or posedge rst) begin
    if (rst) sensor_q <= 1'b1;   // idle: no object
    else     sensor_q <= sensor;
  end

  assign q1     = key_bit;
  assign xorout = sensor_q ^ key_bit;
endmodule
