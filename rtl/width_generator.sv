// width_generator: turns an asynchronous START/STOP pulse pair into the two
// complementary steering pulses of the time-to-voltage converter.
//
// Vright is high from the captured START to the captured STOP; Vleft is its
// complement. Vright enables the selected channel transistor (through
// channel_select), Vleft keeps the dump transistor M0 on outside the interval.
//
// Structure (two flip-flops per input, as in the gate-level schematic):
//   * Capture stage. Each input has a flip-flop clocked by (input AND CLK).
//     It therefore sets the first time the input and CLK are high together:
//     at a rising CLK edge inside the pulse, or at once if the pulse rises
//     while CLK is high. In the schematic its D is the input itself, which is
//     always 1 when the gated clock rises; D is written here as the constant
//     1, the same function without feeding the input to both a clock and a
//     data pin. Once set it stays set until clr_n. A pulse of half a
//     clock period is always caught.
//   * Re-timing stage. A second flip-flop per input, clocked by CLK, samples
//     the capture flip-flop, so both results change only on CLK edges.
//   * Output. Vright = start_s AND NOT stop_s, Vleft = NOT start_s OR stop_s,
//     each built from its own flip-flop outputs so the two paths are alike.
// All four flip-flops are cleared by the active-low asynchronous clr_n. The
// generator is single-shot: after STOP it must be cleared before the next
// START is accepted.
//
// Timing: Vright rises on the first CLK rising edge after START is captured
// and falls on the first CLK rising edge after STOP is captured, so the pulse
// width is a whole number of clock periods (4 ns at 250 MHz).
//
// Follows the design: the four flip-flops, the gated capture clocks, the
// AND/OR output gates and the active-low clear. This RTL's own choices: the
// two inverters that delay CLK ahead of each capture AND gate are left out
// (they only skew the gated clock in the real circuit), and the outputs are
// ideal logic levels.
module width_generator (
  input  logic clk,
  input  logic clr_n,
  input  logic start,
  input  logic stop,
  output logic vleft,
  output logic vright
);
  timeunit 1ns;
  timeprecision 1ps;

  logic start_clk, stop_clk;   // gated capture clocks
  logic start_cap, stop_cap;   // capture stage
  logic start_s, stop_s;       // re-timing stage

  assign start_clk = start & clk;
  assign stop_clk  = stop & clk;

  always_ff @(posedge start_clk or negedge clr_n)
    if (!clr_n) start_cap <= 1'b0;
    else        start_cap <= 1'b1;

  always_ff @(posedge stop_clk or negedge clr_n)
    if (!clr_n) stop_cap <= 1'b0;
    else        stop_cap <= 1'b1;

  always_ff @(posedge clk or negedge clr_n)
    if (!clr_n) begin
      start_s <= 1'b0;
      stop_s  <= 1'b0;
    end else begin
      start_s <= start_cap;
      stop_s  <= stop_cap;
    end

  assign vright = start_s & ~stop_s;
  assign vleft  = ~start_s | stop_s;
endmodule
