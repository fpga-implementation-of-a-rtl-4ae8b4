`timescale 1ps/1ps
// tb_sensor_sequence: sends a recorded IR sensor sequence through the whole
// link, one sensor value per "Arduino read".
//
// The 19 values 0,1,1,1,1,1,1,0,0,0,0,0,0,0,0,0,0,0,1 are those of a logged
// transmitter session. Each value is applied to the sensor input and held
// for 1 us; the transmitter Arduino model reads xorout in the middle of that
// time together with the key bit q1, and the receiver side gets the bit on
// link_rx 200 ns later. For each value the testbench checks
//   xorout   = value ^ q1            (encryption of the registered sensor bit)
//   data_out = xorout ^ q3           (decryption with the receiver key)
// and counts how many values come back unchanged (the two keys agreed).
module tb_sensor_sequence;
  localparam int NV = 19;
  localparam bit SEQ [NV] = '{0,1,1,1,1,1,1,0,0,0,0,0,0,0,0,0,0,0,1};
  logic clk_tx = 1'b0, clk_dco_tx = 1'b0, t_tx = 1'b1, rst_tx = 1'b0, sensor = 1'b1;
  logic clk_rx = 1'b0, clk_dco_rx = 1'b0, t_rx = 1'b1, rst_rx = 1'b0, link_rx = 1'b1;
  logic q1, xorout, q3, data_out;
  int checks = 0, failures = 0, same = 0;

  secure_ir_link_top dut (
    .clk_tx(clk_tx), .clk_dco_tx(clk_dco_tx), .t_tx(t_tx), .rst_tx(rst_tx),
    .sensor(sensor), .q1(q1), .xorout(xorout),
    .clk_rx(clk_rx), .clk_dco_rx(clk_dco_rx), .t_rx(t_rx), .rst_rx(rst_rx),
    .q3(q3), .link_rx(link_rx), .data_out(data_out));

  always #(trng_pkg::SYS_CLK_PS / 2) clk_tx = ~clk_tx;
  always #(trng_pkg::DCO_CLK_PS / 2) clk_dco_tx = ~clk_dco_tx;
  initial begin #1_730; forever #(trng_pkg::SYS_CLK_PS / 2) clk_rx = ~clk_rx; end
  initial begin #211;   forever #(trng_pkg::DCO_CLK_PS / 2) clk_dco_rx = ~clk_dco_rx; end

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic sent, key;
    #1 rst_tx = 1'b1;
    rst_rx = 1'b1;
    #50_000;
    rst_tx = 1'b0;
    rst_rx = 1'b0;
    #2_000_000;
    for (int i = 0; i < NV; i++) begin
      sensor = SEQ[i];
      #500_000;
      // Arduino read on the transmitter side, away from a system clock edge
      @(negedge clk_tx);
      sent = xorout;
      key  = q1;
      checks++;
      if (sent !== (SEQ[i] ^ key)) begin
        failures++;
        $display("FAIL value %0d: xorout=%0b sensor=%0b q1=%0b", i, sent, SEQ[i], key);
      end
      #200_000;
      link_rx = sent;
      #1;
      checks++;
      if (data_out !== (sent ^ q3)) begin
        failures++;
        $display("FAIL value %0d: data_out=%0b link=%0b q3=%0b", i, data_out, sent, q3);
      end
      if (data_out == SEQ[i]) same++;
      $display("value %2d sensor=%0b key_tx=%0b sent=%0b key_rx=%0b received=%0b", i, SEQ[i], key, sent, q3, data_out);
      #299_999;
    end
    $display("%0d of %0d values came back unchanged", same, NV);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
