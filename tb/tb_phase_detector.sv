`timescale 1ps/1ps
// tb_phase_detector: applies all four input pairs to the XOR phase detector
// and checks DN/UP against the truth table of "inputs differ".
module tb_phase_detector;
  logic ref_in, fb_in, dn_up;
  int checks = 0, failures = 0;

  phase_detector dut (.ref_in(ref_in), .fb_in(fb_in), .dn_up(dn_up));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 2; r++)
      for (int f = 0; f < 2; f++) begin
        ref_in = r[0];
        fb_in  = f[0];
        #100;
        checks++;
        if (dn_up !== (r != f)) begin
          failures++;
          $display("FAIL ref=%0d fb=%0d dn_up=%0b", r, f, dn_up);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
