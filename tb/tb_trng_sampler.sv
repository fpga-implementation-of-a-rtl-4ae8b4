`timescale 1ps/1ps
// tb_trng_sampler: drives IDout as a 400 MHz clock and the two ring inputs
// with random values that change between clock edges. A model in the
// testbench computes DFF1 (q1 <= ro1 ^ ro2 ^ IDout ^ q1, with IDout high at
// its own rising edge), the divide-by-2 T flip-flop and DFF2 (takes the new
// Q1 when the divider rises), and the outputs are compared after every edge.
// t is pulled low now and then; DFF2 must then hold. Also checks the random
// bit rate: one DFF2 update per two IDout edges while t is high.
module tb_trng_sampler;
  logic rst = 1'b0, t = 1'b1, ro1 = 1'b0, ro2 = 1'b0, id_out = 1'b0;
  logic q1, q2;
  logic m_q1, m_div, m_q2;
  int checks = 0, failures = 0;
  int div_rises = 0;

  trng_sampler dut (.rst(rst), .t(t), .ro1(ro1), .ro2(ro2), .id_out(id_out), .q1(q1), .q2(q2));

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
    #3000;
    checks++;
    if (q1 !== 1'b0 || q2 !== 1'b0) begin failures++; $display("FAIL reset values"); end
    rst = 1'b0;
    m_q1 = 1'b0; m_div = 1'b0; m_q2 = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      // inputs change in the low phase of IDout
      ro1 = 1'($urandom_range(1, 0));
      ro2 = 1'($urandom_range(1, 0));
      if (i % 50 == 0) t = (i % 200 != 100);
      #625 id_out = 1'b1;
      // model of the edge
      m_q1 = ro1 ^ ro2 ^ 1'b1 ^ m_q1;
      if (t) begin
        m_div = ~m_div;
        if (m_div) begin m_q2 = m_q1; div_rises++; end
      end
      #1;
      checks++;
      if (q1 !== m_q1 || q2 !== m_q2) begin
        failures++;
        $display("FAIL step %0d q1=%0b/%0b q2=%0b/%0b", i, q1, m_q1, q2, m_q2);
      end
      #624 id_out = 1'b0;
      #1250;
    end
    // 2000 edges, t low for 10 blocks of 50 -> 1500 toggling edges -> 750 bits
    checks++;
    if (div_rises != 750) begin failures++; $display("FAIL bit count %0d", div_rises); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
