`timescale 1ps/1ps
// rx_fpga: receiver FPGA of the secure IR link.
//
// Runs the same ADPLL-based TRNG as the transmitter and brings its bit stream
// out on q3, which feeds one input of the discrete XOR gate that decrypts the
// received data. The decryption itself happens outside the FPGA. Port names
// are the board's pin names; clk_dco is the 800 MHz ADPLL clock.
module rx_fpga (
  input  logic clk,       // system clock, 100 MHz
  input  logic clk_dco,   // ADPLL ID/K clock, 800 MHz
  input  logic t,         // T-FF input switch
  input  logic rst,       // reset, active high
  output logic q3         // random bit
);
  logic id_out;

  adpll_trng u_trng (
    .clk(clk), .clk_dco(clk_dco), .t(t), .rst(rst),
    .random_bit(q3), .id_out(id_out));
endmodule
