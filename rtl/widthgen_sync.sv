// widthgen_sync: register-transfer width generator with one input register.
//
// START and STOP are registered once on CLK. A state bit is set on a clock
// edge where the registered START is high and cleared on one where the
// registered STOP is high; START has priority. Vleft is the state bit and
// Vright its complement, so here Vleft is the pulse that is high for the
// measured interval. Unlike width_generator it needs no clear between
// measurements: a new START simply sets the state again.
//
// Interface: clk, active-low rst_n (clears the input registers and the state),
// start, stop, vleft, vright.
// Timing: vleft rises two CLK edges after the edge that first samples START
// high (one edge into the input register, one into the state) and falls the
// same way after STOP, so the pulse width equals the START-to-STOP distance
// rounded to clock periods.
//
// Follows the design: the input registers, the set/clear priority and the
// complementary outputs. This RTL's own choice: the reset input clears the
// registers asynchronously; the design registers its reset but does not use
// it, relying on initial values instead.
module widthgen_sync (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic stop,
  output logic vleft,
  output logic vright
);
  timeunit 1ns;
  timeprecision 1ps;

  logic start_d, stop_d, state;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      start_d <= 1'b0;
      stop_d  <= 1'b0;
      state   <= 1'b0;
    end else begin
      start_d <= start;
      stop_d  <= stop;
      if (start_d)     state <= 1'b1;
      else if (stop_d) state <= 1'b0;
    end

  assign vleft  = state;
  assign vright = ~state;
endmodule
