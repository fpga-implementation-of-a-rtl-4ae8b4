`timescale 1ps/1ps
// tb_adpll: closes the loop on an 800 MHz ID/K clock against three reference
// frequencies (f0 = 50 MHz and about 3 % either side). After settling, over a
// window of 40 reference periods it checks that the feedback runs at the
// reference frequency (40 +-1 rising edges) and IDout at N times it
// (N*40 +-N edges), and that the K counter produced both carries and borrows
// (the correcting activity of a locked XOR/K-counter loop).
module tb_adpll;
  localparam int unsigned N = trng_pkg::ADPLL_N;
  logic clk = 1'b0, rst = 1'b0, ref_in = 1'b0;
  logic id_out, fb_out, carry, borrow;
  int checks = 0, failures = 0;
  int ref_half = 10_000;
  int n_id, n_fb, n_ref, n_c, n_b;
  bit counting = 0;

  adpll dut (.clk_dco(clk), .rst(rst), .ref_in(ref_in), .id_out(id_out),
             .fb_out(fb_out), .carry(carry), .borrow(borrow));

  always #(trng_pkg::DCO_CLK_PS / 2) clk = ~clk;
  always begin repeat (ref_half / 100) #100; ref_in = ~ref_in; end

  always @(posedge id_out) if (counting) n_id++;
  always @(posedge fb_out) if (counting) n_fb++;
  always @(posedge ref_in) if (counting) n_ref++;
  always @(posedge clk) if (counting) begin n_c += int'(carry); n_b += int'(borrow); end

  // reset is raised (an edge) at 1 ps and held until released below
  initial #1 rst = 1'b1;

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int half);
    ref_half = half;
    #3_000_000;                      // settle
    @(posedge ref_in);
    n_id = 0; n_fb = 0; n_ref = 0; n_c = 0; n_b = 0;
    counting = 1;
    repeat (40) @(posedge ref_in);
    counting = 0;
    $display("ref half %0d ps: ref=%0d fb=%0d id=%0d carries=%0d borrows=%0d", half, n_ref, n_fb, n_id, n_c, n_b);
    checks++;
    if (n_fb < 39 || n_fb > 41) begin failures++; $display("FAIL feedback not locked to reference"); end
    checks++;
    if (n_id < N * 40 - N || n_id > N * 40 + N) begin failures++; $display("FAIL IDout not N * f_ref"); end
    checks++;
    if (n_c == 0 || n_b == 0) begin failures++; $display("FAIL no carry/borrow activity"); end
  endtask

  initial begin
    repeat (4) @(posedge clk);
    checks++;
    if (id_out !== 1'b0 || fb_out !== 1'b0) begin failures++; $display("FAIL outputs in reset"); end
    rst = 1'b0;
    run(10_000);   // 50 MHz
    run(10_300);   // 48.5 MHz
    run(9_700);    // 51.5 MHz
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
