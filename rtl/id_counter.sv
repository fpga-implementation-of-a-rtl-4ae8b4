`timescale 1ps/1ps
// id_counter: the DCO of the ADPLL, an increment/decrement counter.
//
// A toggle register `gate` changes on every falling edge of the ID clock, and
// IDout is the ID clock ANDed with it: one IDout pulse (the high half of an ID
// clock period) every two ID clocks, i.e. IDout = ID clock / 2 = N * f0 when
// the loop sends no corrections. A carry from the K counter is remembered
// until the next falling edge at which `gate` would go low; there it stays
// high instead, so one extra IDout pulse is inserted and the output phase
// advances. A borrow is remembered until `gate` would go high; it stays low,
// one pulse is deleted and the phase falls back. Both may be pending at once.
//
// The AND producing IDout follows the gate-level schematic of the design; the
// insert/delete rule is this design's choice, in the manner of classic
// increment/decrement counters. Because `gate` only changes while the ID clock
// is low, IDout has no glitches. carry/borrow come from logic clocked on the
// rising ID clock edge and are sampled on the following falling edge.
// Reset (async, active high) holds `gate` low, so IDout stays low.
module id_counter (
  input  logic clk,      // ID clock, 2 * N * f0
  input  logic rst,
  input  logic carry,    // insert one pulse
  input  logic borrow,   // delete one pulse
  output logic id_out    // IDout pulse train
);
  logic gate;
  logic carry_pend, borrow_pend;
  logic gate_nxt, carry_use, borrow_use;

  always_comb begin
    gate_nxt   = ~gate;
    carry_use  = 1'b0;
    borrow_use = 1'b0;
    if ((carry_pend || carry) && !gate_nxt) begin
      gate_nxt  = 1'b1;
      carry_use = 1'b1;
    end else if ((borrow_pend || borrow) && gate_nxt) begin
      gate_nxt   = 1'b0;
      borrow_use = 1'b1;
    end
  end

  always_ff @(negedge clk or posedge rst) begin
    if (rst) begin
      gate        <= 1'b0;
      carry_pend  <= 1'b0;
      borrow_pend <= 1'b0;
    end else begin
      gate        <= gate_nxt;
      carry_pend  <= (carry_pend  || carry)  && !carry_use;
      borrow_pend <= (borrow_pend || borrow) && !borrow_use;
    end
  end

  assign id_out = clk & gate;
endmodule
