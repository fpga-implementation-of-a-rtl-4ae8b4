`timescale 1ps/1ps
// ring_oscillator: BEHAVIOURAL MODEL (not synthesizable) of one NOR-gate ring
// oscillator of the TRNG.
//
// On the FPGA the ring is a closed loop of NOR gates whose frequency and
// period jitter are properties of the silicon and the routing, so it cannot be
// written as clocked logic. This model reproduces its port behaviour: STAGES
// NOR gates in a loop, the first one NOR(hold, last stage output) and the
// others NOR gates with both inputs tied together, i.e. inverters. While
// `hold` is high the first gate is forced low and the ring rests in a fixed
// state; when `hold` falls the ring oscillates with a period of about
// 2 * STAGES * STAGE_DELAY_PS. Every gate delay gets a random extra
// 0..JITTER_PS, so the phase of the ring drifts randomly against the clocks
// that sample it, which is the entropy the TRNG collects.
//
// NOR-gate rings are what the specification calls for; the number of stages
// (three per ring), the gate wiring, the delay and the jitter are this
// design's choices. The transition travels round the ring one gate per delay;
// a change of `hold` is seen at the end of the gate delay in progress.
module ring_oscillator #(
  parameter int unsigned STAGES         = 3,
  parameter int unsigned STAGE_DELAY_PS = 310,
  parameter int unsigned JITTER_PS      = 25
) (
  input  logic hold,    // high: ring held at rest
  output logic ro_out   // last stage output
);
  logic [STAGES-1:0] stage;
  int unsigned       pos;
  int unsigned       jit;

  initial begin
    stage = '0;
    pos   = 0;
    forever begin
      if (hold) begin
        // Rest state with the first gate forced low: 0,1,0,1,...
        for (int i = 0; i < STAGES; i++) stage[i] = (i % 2 == 1);
        pos = 0;
        wait (!hold);
      end else begin
        // gate delay: the fixed part, then the random part in 1 ps steps
        jit = $urandom_range(JITTER_PS, 0);
        #(STAGE_DELAY_PS);
        repeat (jit) #1;
        if (pos == 0) stage[0] = ~(hold | stage[STAGES-1]);
        else          stage[pos] = ~(stage[pos-1] | stage[pos-1]);
        pos = (pos + 1) % STAGES;
      end
    end
  end

  assign ro_out = stage[STAGES-1];
endmodule
