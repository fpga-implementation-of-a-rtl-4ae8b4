`timescale 1ps/1ps
// tb_k_counter: drives the K counter with runs of DN/UP (long up runs, long
// down runs, random) and checks carry and borrow against a count kept in the
// testbench: a carry one clock after every K-th net up step past the top, a
// borrow after every step below zero. Also checks the carry rate over a long
// up run (one carry per K clocks).
module tb_k_counter;
  localparam int unsigned K = trng_pkg::ADPLL_K;
  logic clk = 1'b0, rst = 1'b0, dn_up = 1'b0;
  logic carry, borrow;
  int checks = 0, failures = 0;
  int model;              // reference count
  logic exp_carry, exp_borrow;
  int n_carry, n_borrow;

  k_counter #(.K(K)) dut (.clk(clk), .rst(rst), .dn_up(dn_up), .carry(carry), .borrow(borrow));

  always #(trng_pkg::DCO_CLK_PS / 2) clk = ~clk;

  // reset is raised (an edge) at 1 ps and held until released below
  initial #1 rst = 1'b1;

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic d);
    dn_up = d;
    @(posedge clk);
    // reference: what the clock edge just did
    exp_carry  = 1'b0;
    exp_borrow = 1'b0;
    if (d) begin
      if (model == 0) begin model = K - 1; exp_borrow = 1'b1; end
      else model--;
    end else begin
      if (model == K - 1) begin model = 0; exp_carry = 1'b1; end
      else model++;
    end
    #1;
    checks++;
    if (carry !== exp_carry || borrow !== exp_borrow) begin
      failures++;
      $display("FAIL t=%0t d=%0b carry=%0b/%0b borrow=%0b/%0b", $time, d, carry, exp_carry, borrow, exp_borrow);
    end
    n_carry  += int'(carry);
    n_borrow += int'(borrow);
  endtask

  initial begin
    model = 0; n_carry = 0; n_borrow = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (carry !== 1'b0 || borrow !== 1'b0) begin failures++; $display("FAIL outputs during reset"); end
    rst = 1'b0;
    // long up run: one carry per K clocks
    repeat (8 * K) step(1'b0);
    checks++;
    if (n_carry != 8) begin failures++; $display("FAIL up run carries=%0d", n_carry); end
    // long down run
    n_borrow = 0;
    repeat (8 * K) step(1'b1);
    checks++;
    if (n_borrow != 8) begin failures++; $display("FAIL down run borrows=%0d", n_borrow); end
    // random
    repeat (2000) step(1'($urandom_range(1, 0)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
