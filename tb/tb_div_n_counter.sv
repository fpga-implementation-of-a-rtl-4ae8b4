`timescale 1ps/1ps
// tb_div_n_counter: clocks the divide-by-N counter and checks after every
// edge that the output is the upper half of the edge count modulo N, and that
// the output period is N input edges with N/2 high.
module tb_div_n_counter;
  localparam int unsigned N = trng_pkg::ADPLL_N;
  logic clk = 1'b0, rst = 1'b0, div_out;
  int checks = 0, failures = 0;
  int edges = 0, highs = 0, rises = 0;
  logic prev;

  div_n_counter #(.N(N)) dut (.clk(clk), .rst(rst), .div_out(div_out));

  always #2500 clk = ~clk;

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
    if (div_out !== 1'b0) begin failures++; $display("FAIL output in reset"); end
    rst = 1'b0;
    prev = div_out;
    repeat (20 * N) begin
      @(posedge clk);
      edges++;
      #1;
      checks++;
      if (div_out !== ((edges % N) >= N / 2)) begin
        failures++;
        $display("FAIL edge %0d div_out=%0b", edges, div_out);
      end
      highs += int'(div_out);
      if (div_out && !prev) rises++;
      prev = div_out;
    end
    checks++;
    if (highs != 20 * N / 2 || rises != 20) begin
      failures++;
      $display("FAIL highs=%0d rises=%0d", highs, rises);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
