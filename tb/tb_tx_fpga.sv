`timescale 1ps/1ps
// tb_tx_fpga: runs the transmitter FPGA with an IR sensor that switches
// between "object" (0) and "no object" (1) at random times. A model of the
// sensor register (captured on each system clock edge, 1 during reset) is
// kept here, and at every ID clock edge xorout must equal that register XOR
// the random bit q1. Also checks that the key bit takes both values and that
// encryption both keeps and flips the sensor bit (counted), and that the
// reset value of the sensor register is "no object".
module tb_tx_fpga;
  logic clk = 1'b0, clk_dco = 1'b0, t = 1'b1, rst = 1'b0, sensor = 1'b1;
  logic q1, xorout;
  logic sens_model = 1'b1;
  int checks = 0, failures = 0;
  int n_key1, n_key0, n_flip, n_keep, n_obj, n_noobj;
  bit run = 0;

  tx_fpga dut (.clk(clk), .clk_dco(clk_dco), .t(t), .rst(rst), .sensor(sensor),
               .q1(q1), .xorout(xorout));

  always #(trng_pkg::SYS_CLK_PS / 2) clk = ~clk;
  always #(trng_pkg::DCO_CLK_PS / 2) clk_dco = ~clk_dco;

  always @(posedge clk or posedge rst) sens_model <= rst ? 1'b1 : sensor;

  always @(negedge clk_dco) if (run) begin
    checks++;
    if (xorout !== (sens_model ^ q1)) begin
      failures++;
      $display("FAIL %0t xorout=%0b sensor_q=%0b q1=%0b", $time, xorout, sens_model, q1);
    end
    if (q1) n_key1++; else n_key0++;
    if (xorout != sens_model) n_flip++; else n_keep++;
    if (sens_model) n_noobj++; else n_obj++;
  end

  initial begin
    #200_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial #1 rst = 1'b1;

  initial begin
    n_key1 = 0; n_key0 = 0; n_flip = 0; n_keep = 0; n_obj = 0; n_noobj = 0;
    repeat (3) @(posedge clk);
    sensor = 1'b0;
    #1;
    checks++;
    if (dut.sensor_q !== 1'b1 || xorout !== 1'b1) begin failures++; $display("FAIL reset values"); end
    @(negedge clk) rst = 1'b0;
    #1_000_000;
    run = 1;
    repeat (200) begin
      repeat ($urandom_range(30, 1)) #1000;
      sensor = ~sensor;
    end
    run = 0;
    $display("key 1/0=%0d/%0d flipped/kept=%0d/%0d object/none=%0d/%0d", n_key1, n_key0, n_flip, n_keep, n_obj, n_noobj);
    checks++;
    if (n_key1 == 0 || n_key0 == 0 || n_flip == 0 || n_keep == 0 || n_obj == 0 || n_noobj == 0) begin
      failures++; $display("FAIL a case never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
