`timescale 1ps/1ps
// tb_xor_ic_74hct86: all 256 input combinations of the quad XOR; each output
// bit is checked to be 1 exactly when its two inputs differ.
module tb_xor_ic_74hct86;
  logic [3:0] a, b, y;
  int checks = 0, failures = 0;

  xor_ic_74hct86 dut (.a(a), .b(b), .y(y));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      a = i[3:0];
      b = i[7:4];
      #100;
      for (int g = 0; g < 4; g++) begin
        checks++;
        if (y[g] !== (a[g] != b[g])) begin
          failures++;
          $display("FAIL gate %0d a=%0b b=%0b y=%0b", g, a[g], b[g], y[g]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
