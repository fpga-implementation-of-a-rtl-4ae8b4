`timescale 1ps/1ps
// tb_div2_counter: with t high q must toggle on every rising clock (half the
// clock rate), with t low it must hold; reset clears it.
module tb_div2_counter;
  logic clk = 1'b0, rst = 1'b0, t = 1'b1, q;
  logic exp_q;
  int checks = 0, failures = 0;

  div2_counter dut (.clk(clk), .rst(rst), .t(t), .q(q));

  always #1250 clk = ~clk;

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
    if (q !== 1'b0) begin failures++; $display("FAIL q in reset"); end
    exp_q = 1'b0;
    repeat (400) begin
      t = ($urandom_range(3, 0) != 0);
      rst = 1'b0;
      @(posedge clk);
      if (t) exp_q = ~exp_q;
      #1;
      checks++;
      if (q !== exp_q) begin failures++; $display("FAIL t=%0b q=%0b exp=%0b", t, q, exp_q); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
