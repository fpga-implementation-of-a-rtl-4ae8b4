`timescale 1ps/1ps
// tb_secure_ir_link_top: end-to-end run of both boards at their default
// parameters.
//
// The IR sensor toggles between object (0) and no object (1) at random times.
// The Arduino/Bluetooth path, which is not part of the RTL, is modelled here
// as a sampler: every 40 ns it takes xorout and, three samples later, drives
// it onto link_rx. The two boards get their own clocks with different phases.
// Checks:
//  - transmitter: xorout = registered sensor ^ q1 at every ID clock edge;
//  - receiver: data_out = link_rx ^ q3 at every ID clock edge;
//  - end to end: each delivered bit gives data_out = sensor ^ q1 (as sent)
//    ^ q3 (at delivery), so the original bit comes back exactly when the two
//    key bits agree; both outcomes are counted;
//  - the t switch: with t low on the transmitter, q1 must freeze.
// Every mechanism must occur at least once: ADPLL carries and borrows on both
// boards, ring restarts on both boards, both sensor states, both key values
// on both boards, t hold, correct recovery.
module tb_secure_ir_link_top;
  logic clk_tx = 1'b0, clk_dco_tx = 1'b0, t_tx = 1'b1, rst_tx = 1'b0, sensor = 1'b1;
  logic clk_rx = 1'b0, clk_dco_rx = 1'b0, t_rx = 1'b1, rst_rx = 1'b0, link_rx = 1'b1;
  logic q1, xorout, q3, data_out;
  logic sens_model = 1'b1;
  int checks = 0, failures = 0;
  bit run = 0;

  typedef struct { logic bit_sent; logic sensor_q; logic key; } link_word_t;
  link_word_t pipe[$];

  // mechanism counters
  int n_carry_tx, n_borrow_tx, n_carry_rx, n_borrow_rx;
  int n_restart_tx, n_restart_rx, n_obj, n_noobj;
  int n_q1_1, n_q1_0, n_q3_1, n_q3_0, n_hold, n_ok, n_wrong;

  secure_ir_link_top dut (
    .clk_tx(clk_tx), .clk_dco_tx(clk_dco_tx), .t_tx(t_tx), .rst_tx(rst_tx),
    .sensor(sensor), .q1(q1), .xorout(xorout),
    .clk_rx(clk_rx), .clk_dco_rx(clk_dco_rx), .t_rx(t_rx), .rst_rx(rst_rx),
    .q3(q3), .link_rx(link_rx), .data_out(data_out));

  always #(trng_pkg::SYS_CLK_PS / 2) clk_tx = ~clk_tx;
  always #(trng_pkg::DCO_CLK_PS / 2) clk_dco_tx = ~clk_dco_tx;
  initial begin
    #3_210;
    forever #(trng_pkg::SYS_CLK_PS / 2) clk_rx = ~clk_rx;
  end
  initial begin
    #437;
    forever #(trng_pkg::DCO_CLK_PS / 2) clk_dco_rx = ~clk_dco_rx;
  end

  always @(posedge clk_tx or posedge rst_tx) sens_model <= rst_tx ? 1'b1 : sensor;

  // transmitter and receiver identities
  always @(negedge clk_dco_tx) if (run) begin
    checks++;
    if (xorout !== (sens_model ^ q1)) begin
      failures++;
      $display("FAIL tx %0t xorout=%0b sensor_q=%0b q1=%0b", $time, xorout, sens_model, q1);
    end
    if (q1) n_q1_1++; else n_q1_0++;
    if (sens_model) n_noobj++; else n_obj++;
  end
  always @(negedge clk_dco_rx) if (run) begin
    checks++;
    if (data_out !== (link_rx ^ q3)) begin
      failures++;
      $display("FAIL rx %0t data_out=%0b link_rx=%0b q3=%0b", $time, data_out, link_rx, q3);
    end
    if (q3) n_q3_1++; else n_q3_0++;
  end

  // ADPLL and ring activity, observed inside the boards
  always @(posedge clk_dco_tx) if (run) begin
    n_carry_tx  += int'(dut.u_tx.u_trng.carry);
    n_borrow_tx += int'(dut.u_tx.u_trng.borrow);
  end
  always @(posedge clk_dco_rx) if (run) begin
    n_carry_rx  += int'(dut.u_rx.u_trng.carry);
    n_borrow_rx += int'(dut.u_rx.u_trng.borrow);
  end
  always @(negedge dut.u_tx.u_trng.pulse) if (run) n_restart_tx++;
  always @(negedge dut.u_rx.u_trng.pulse) if (run) n_restart_rx++;

  // Bluetooth link model: sample every 40 ns, deliver three samples later
  initial begin
    link_word_t w;
    forever begin
      #40_000;
      w.bit_sent = xorout;
      w.sensor_q = sens_model;
      w.key      = q1;
      pipe.push_back(w);
      if (pipe.size() > 3) begin
        w = pipe.pop_front();
        link_rx = w.bit_sent;
        #1;
        if (run) begin
          checks++;
          if (data_out !== (w.sensor_q ^ w.key ^ q3)) begin
            failures++;
            $display("FAIL end-to-end %0t data_out=%0b", $time, data_out);
          end
          if (w.key == q3) begin
            n_ok++;
            checks++;
            if (data_out !== w.sensor_q) begin failures++; $display("FAIL recovery with equal keys"); end
          end else n_wrong++;
        end
      end
    end
  end

  initial begin
    #400_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_tx = 1'b1;
    rst_rx = 1'b1;
  end

  initial begin
    logic frozen;
    bit moved;
    {n_carry_tx, n_borrow_tx, n_carry_rx, n_borrow_rx} = '0;
    {n_restart_tx, n_restart_rx, n_obj, n_noobj} = '0;
    {n_q1_1, n_q1_0, n_q3_1, n_q3_0, n_hold, n_ok, n_wrong} = '0;
    #50_000;
    checks++;
    if (q1 !== 1'b0 || q3 !== 1'b0 || xorout !== 1'b1) begin failures++; $display("FAIL reset values"); end
    rst_tx = 1'b0;
    #7_000;
    rst_rx = 1'b0;
    #2_000_000;           // loops settle
    run = 1;
    repeat (150) begin
      repeat ($urandom_range(60, 5)) #1000;
      sensor = ~sensor;
    end
    // t switch on the transmitter: key frozen
    @(negedge clk_tx) t_tx = 1'b0;
    #20_000;
    frozen = q1;
    moved = 0;
    repeat (100) begin #1000; if (q1 !== frozen) moved = 1; end
    checks++;
    if (moved) begin failures++; $display("FAIL q1 moved with t low"); end
    else n_hold++;
    t_tx = 1'b1;
    #500_000;
    run = 0;
    $display("tx carries=%0d borrows=%0d restarts=%0d | rx carries=%0d borrows=%0d restarts=%0d",
             n_carry_tx, n_borrow_tx, n_restart_tx, n_carry_rx, n_borrow_rx, n_restart_rx);
    $display("sensor object/none=%0d/%0d q1 1/0=%0d/%0d q3 1/0=%0d/%0d t-hold=%0d recovered ok/wrong=%0d/%0d",
             n_obj, n_noobj, n_q1_1, n_q1_0, n_q3_1, n_q3_0, n_hold, n_ok, n_wrong);
    if (n_carry_tx == 0)   begin failures++; $display("FAIL no tx carry"); end
    if (n_borrow_tx == 0)  begin failures++; $display("FAIL no tx borrow"); end
    if (n_carry_rx == 0)   begin failures++; $display("FAIL no rx carry"); end
    if (n_borrow_rx == 0)  begin failures++; $display("FAIL no rx borrow"); end
    if (n_restart_tx == 0) begin failures++; $display("FAIL no tx ring restart"); end
    if (n_restart_rx == 0) begin failures++; $display("FAIL no rx ring restart"); end
    if (n_obj == 0 || n_noobj == 0) begin failures++; $display("FAIL a sensor state missing"); end
    if (n_q1_1 == 0 || n_q1_0 == 0) begin failures++; $display("FAIL tx key constant"); end
    if (n_q3_1 == 0 || n_q3_0 == 0) begin failures++; $display("FAIL rx key constant"); end
    if (n_hold == 0) begin failures++; $display("FAIL t hold never exercised"); end
    if (n_ok == 0) begin failures++; $display("FAIL no correct recovery"); end
    checks += 11;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
