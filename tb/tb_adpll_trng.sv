`timescale 1ps/1ps
// tb_adpll_trng: runs the complete TRNG at its default parameters.
//  - random bit rate: DFF2 updates on every second IDout edge, 200 Mbit/s at
//    the nominal 400 MHz IDout (200 +-8 updates per microsecond);
//  - IDout locked at N * f0 (400 +-8 pulses per microsecond);
//  - a 150-bit sequence (the length the design's randomness evaluation used)
//    and a 2000-bit sequence must pass the SP 800-22 frequency (monobit)
//    test at the 0.001 level (the pass level the design was judged by),
//    computed here from the erfc formula; the runs
//    test p-value is printed for information;
//  - with the t switch low the random output must freeze.
module tb_adpll_trng;
  logic clk = 1'b0, clk_dco = 1'b0, t = 1'b1, rst = 1'b0;
  logic random_bit, id_out;
  int checks = 0, failures = 0;
  int n_id, n_upd;
  bit counting = 0;
  bit bits[$];

  adpll_trng dut (.clk(clk), .clk_dco(clk_dco), .t(t), .rst(rst),
                  .random_bit(random_bit), .id_out(id_out));

  always #(trng_pkg::SYS_CLK_PS / 2) clk = ~clk;
  always #(trng_pkg::DCO_CLK_PS / 2) clk_dco = ~clk_dco;

  always @(posedge id_out) if (counting) n_id++;
  // DFF2 clock (IDout / 2), observed inside the sampler
  always @(posedge dut.u_samp.clk_div2) begin
    if (counting) n_upd++;
    #1 bits.push_back(random_bit);
  end

  // reset is raised (an edge) at 1 ps and held until released below
  initial #1 rst = 1'b1;

  initial begin
    #200_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // SP 800-22 frequency and runs tests on bits[first +: n]; p >= 0.001 passes.
  task automatic nist(input int first, input int n);
    int ones = 0, runs = 1;
    real s, pi, p_freq, p_runs;
    for (int i = first; i < first + n; i++) begin
      ones += int'(bits[i]);
      if (i > first && bits[i] != bits[i-1]) runs++;
    end
    s = $itor(2 * ones - n);
    p_freq = erfc_approx((s < 0 ? -s : s) / $sqrt(2.0 * n));
    pi = $itor(ones) / n;
    p_runs = erfc_approx(((runs - 2.0 * n * pi * (1.0 - pi)) < 0 ? -(runs - 2.0 * n * pi * (1.0 - pi)) : (runs - 2.0 * n * pi * (1.0 - pi)))
                         / (2.0 * $sqrt(2.0 * n) * pi * (1.0 - pi)));
    $display("n=%0d ones=%0d runs=%0d p_freq=%f p_runs=%f", n, ones, runs, p_freq, p_runs);
    checks++;
    if (p_freq < 0.001) begin failures++; $display("FAIL frequency test"); end
    // The runs statistic is reported, not judged: the design's own evaluation
    // reports the runs test as failed, and this model fails it too.
  endtask

  // erfc(x) for x >= 0 (Abramowitz-Stegun 7.1.26, error below 1.5e-7)
  function automatic real erfc_approx(input real x);
    real tt = 1.0 / (1.0 + 0.3275911 * x);
    return tt * (0.254829592 + tt * (-0.284496736 + tt * (1.421413741 + tt * (-1.453152027 + tt * 1.061405429))))
           * $exp(-x * x);
  endfunction

  initial begin
    logic frozen;
    bit changed;
    repeat (3) @(posedge clk);
    checks++;
    if (random_bit !== 1'b0 || id_out !== 1'b0) begin failures++; $display("FAIL outputs in reset"); end
    @(negedge clk) rst = 1'b0;
    #2_000_000;                          // ADPLL settles
    bits.delete();
    n_id = 0; n_upd = 0;
    counting = 1;
    #1_000_000;
    counting = 0;
    $display("per microsecond: IDout pulses=%0d random bits=%0d", n_id, n_upd);
    checks++;
    if (n_id < 392 || n_id > 408) begin failures++; $display("FAIL IDout rate"); end
    checks++;
    if (n_upd < 196 || n_upd > 204) begin failures++; $display("FAIL random bit rate"); end
    wait (bits.size() >= 2200);
    nist(0, 150);
    nist(150, 2000);
    // t low: DFF2 no longer clocked, output frozen
    @(negedge clk) t = 1'b0;
    #20_000;
    frozen = random_bit;
    changed = 0;
    repeat (200) begin
      #1000;
      if (random_bit !== frozen) changed = 1;
    end
    checks++;
    if (changed) begin failures++; $display("FAIL output moved with t low"); end
    t = 1'b1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
