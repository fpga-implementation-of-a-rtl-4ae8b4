`timescale 1ps/1ps
// tb_pulse_generator: the pulse must be high during reset and afterwards be
// high for the first WIDTH of every PERIOD system clocks.
module tb_pulse_generator;
  localparam int unsigned PERIOD = trng_pkg::PULSE_PERIOD;
  localparam int unsigned WIDTH  = trng_pkg::PULSE_WIDTH;
  logic clk = 1'b0, rst = 1'b0, pulse;
  int checks = 0, failures = 0;
  int edges = 0, highs = 0;

  pulse_generator #(.PERIOD(PERIOD), .WIDTH(WIDTH)) dut (.clk(clk), .rst(rst), .pulse(pulse));

  always #(trng_pkg::SYS_CLK_PS / 2) clk = ~clk;

  // reset is raised (an edge) at 1 ps and held until released below
  initial #1 rst = 1'b1;

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    checks++;
    if (pulse !== 1'b1) begin failures++; $display("FAIL pulse low in reset"); end
    rst = 1'b0;
    repeat (25 * PERIOD) begin
      @(posedge clk);
      edges++;
      #1;
      checks++;
      if (pulse !== ((edges % PERIOD) < WIDTH)) begin
        failures++;
        $display("FAIL edge %0d pulse=%0b", edges, pulse);
      end
      highs += int'(pulse);
    end
    checks++;
    if (highs != 25 * WIDTH) begin failures++; $display("FAIL high count %0d", highs); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
