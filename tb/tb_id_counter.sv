`timescale 1ps/1ps
// tb_id_counter: checks the DCO through the spacing of its output pulses.
// Without corrections consecutive IDout pulses are two ID clocks apart
// (IDout = ID clock / 2). Each carry must shorten exactly one gap to one ID
// clock (one pulse inserted) and each borrow lengthen exactly one gap to three
// ID clocks (one pulse deleted); no other gap may occur. IDout may only be
// high while the ID clock is high (no glitches between pulses).
module tb_id_counter;
  localparam longint T = longint'(trng_pkg::DCO_CLK_PS);
  logic clk = 1'b0, rst = 1'b0, carry = 1'b0, borrow = 1'b0;
  logic id_out;
  int checks = 0, failures = 0;
  int g1, g2, g3, gother, pulses;
  longint last;
  bit counting = 0;

  id_counter dut (.clk(clk), .rst(rst), .carry(carry), .borrow(borrow), .id_out(id_out));

  always #(T / 2) clk = ~clk;

  always @(posedge id_out) if (counting) begin
    pulses++;
    if (last >= 0) begin
      if ($time - last == T) g1++;
      else if ($time - last == 2 * T) g2++;
      else if ($time - last == 3 * T) g3++;
      else gother++;
    end
    last = $time;
  end

  // IDout high only inside the high phase of the ID clock
  always @(id_out) if (id_out && !clk && !rst) begin
    failures++;
    $display("FAIL IDout high while clock low at %0t", $time);
  end

  // reset is raised (an edge) at 1 ps and held until released below
  initial #1 rst = 1'b1;

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // WIN ID clocks with `nc` carries and `nb` borrows, each a one-clock pulse
  // driven after a rising clock edge as the K counter does.
  task automatic window(input int win, input int nc, input int nb);
    g1 = 0; g2 = 0; g3 = 0; gother = 0; pulses = 0; last = -1;
    counting = 1;
    for (int i = 0; i < win; i++) begin
      @(posedge clk);
      #1;
      carry  = (i >= 10 && i < 10 + 8 * nc && (i - 10) % 8 == 0);
      borrow = (i >= 80 && i < 80 + 8 * nb && (i - 80) % 8 == 0);
    end
    carry = 1'b0; borrow = 1'b0;
    repeat (6) @(posedge clk);
    #1 counting = 0;
    checks++;
    if (g1 != nc || g3 != nb || gother != 0 || g2 != pulses - 1 - nc - nb) begin
      failures++;
      $display("FAIL nc=%0d nb=%0d gaps 1T=%0d 2T=%0d 3T=%0d other=%0d pulses=%0d", nc, nb, g1, g2, g3, gother, pulses);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    checks++;
    if (id_out !== 1'b0) begin failures++; $display("FAIL IDout active in reset"); end
    @(negedge clk); #1 rst = 1'b0;
    repeat (4) @(posedge clk);
    window(200, 0, 0);
    checks++;
    if (pulses < 102 || pulses > 104) begin failures++; $display("FAIL nominal rate %0d", pulses); end
    window(200, 1, 0);
    window(200, 0, 1);
    window(200, 3, 0);
    window(200, 0, 3);
    window(200, 2, 2);
    window(200, 5, 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
