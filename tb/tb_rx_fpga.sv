`timescale 1ps/1ps
// tb_rx_fpga: runs the receiver FPGA. q3 must be low in reset, then change
// at most once per DFF2 clock (IDout / 2, 200 MHz nominal: at most 200
// changes and about 200 clocks per microsecond), take both values in
// roughly equal measure (frequency test on 1000 bits, p >= 0.001), and freeze
// while t is low.
module tb_rx_fpga;
  logic clk = 1'b0, clk_dco = 1'b0, t = 1'b1, rst = 1'b0;
  logic q3;
  int checks = 0, failures = 0;
  int n_chg, n_clk, ones, nbits;
  bit counting = 0;

  rx_fpga dut (.clk(clk), .clk_dco(clk_dco), .t(t), .rst(rst), .q3(q3));

  always #(trng_pkg::SYS_CLK_PS / 2) clk = ~clk;
  always #(trng_pkg::DCO_CLK_PS / 2) clk_dco = ~clk_dco;

  always @(q3) if (counting) n_chg++;
  always @(posedge dut.u_trng.u_samp.clk_div2) if (counting) begin
    n_clk++;
    #1;
    nbits++;
    ones += int'(q3);
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
    logic frozen;
    bit moved;
    real z;
    repeat (3) @(posedge clk);
    checks++;
    if (q3 !== 1'b0) begin failures++; $display("FAIL q3 in reset"); end
    @(negedge clk) rst = 1'b0;
    #2_000_000;
    n_chg = 0; n_clk = 0; ones = 0; nbits = 0;
    counting = 1;
    #5_000_000;
    counting = 0;
    $display("5 us: DFF2 clocks=%0d q3 changes=%0d ones=%0d of %0d", n_clk, n_chg, ones, nbits);
    checks++;
    if (n_clk < 990 || n_clk > 1010) begin failures++; $display("FAIL bit clock rate"); end
    checks++;
    if (n_chg > n_clk) begin failures++; $display("FAIL q3 changes faster than DFF2 clock"); end
    // monobit: |2*ones - n| / sqrt(n) < 3.29 is p >= 0.001
    z = $itor(2 * ones - nbits) / $sqrt($itor(nbits));
    checks++;
    if (z > 3.29 || z < -3.29) begin failures++; $display("FAIL frequency test z=%f", z); end
    @(negedge clk) t = 1'b0;
    #20_000;
    frozen = q3;
    moved = 0;
    repeat (100) begin #1000; if (q3 !== frozen) moved = 1; end
    checks++;
    if (moved) begin failures++; $display("FAIL q3 moved with t low"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
