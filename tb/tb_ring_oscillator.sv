`timescale 1ps/1ps
// tb_ring_oscillator: while hold is high the ring output must stay at its rest
// value (low for three stages); after hold falls the ring must oscillate with
// a period near 2 * STAGES * (STAGE_DELAY_PS + JITTER_PS / 2), and the
// periods must not all be equal (jitter present). Holding again stops it.
module tb_ring_oscillator;
  localparam int unsigned STAGES = 3, D = 310, J = 25;
  localparam int unsigned PMIN = 2 * STAGES * D, PMAX = 2 * STAGES * (D + J);
  logic hold = 1'b1, ro_out;
  int checks = 0, failures = 0;
  int rises = 0;
  longint last_rise = -1, pmin = 1 << 30, pmax = 0, p;
  bit meas = 0;

  ring_oscillator #(.STAGES(STAGES), .STAGE_DELAY_PS(D), .JITTER_PS(J)) dut (.hold(hold), .ro_out(ro_out));

  always @(posedge ro_out) if (meas) begin
    rises++;
    if (last_rise >= 0) begin
      p = $time - last_rise;
      if (p < pmin) pmin = p;
      if (p > pmax) pmax = p;
    end
    last_rise = $time;
  end

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // held: no activity
    repeat (20) begin
      #137;
      checks++;
      if (ro_out !== 1'b0) begin failures++; $display("FAIL ring not at rest while held"); end
    end
    hold = 1'b0;
    meas = 1;
    #200_000;
    meas = 0;
    $display("rises=%0d period min=%0d max=%0d ps", rises, pmin, pmax);
    checks++;
    // 200 ns / (2*3*(310..335) ps) -> 99..107 rising edges
    if (rises < 97 || rises > 109) begin failures++; $display("FAIL rise count %0d", rises); end
    checks++;
    if (pmin < longint'(PMIN) || pmax > longint'(PMAX)) begin
      failures++; $display("FAIL period outside the gate-delay bounds");
    end
    checks++;
    if (pmax == pmin) begin failures++; $display("FAIL no jitter"); end
    hold = 1'b1;
    #2000;
    repeat (20) begin
      #113;
      checks++;
      if (ro_out !== 1'b0) begin failures++; $display("FAIL ring still running after hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
