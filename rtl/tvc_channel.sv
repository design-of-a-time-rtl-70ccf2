// tvc_channel: behavioural model of one analog memory channel of the
// time-to-voltage converter. It is not synthesizable logic: the real part is
// a switching transistor Mn, a storage capacitor Cn, a precharge switch S1 and
// an output buffer, sharing the current source Io with the other channels.
//
// Behaviour: while precharge is high the capacitor is held at VDD. While gate
// (the gate of Mn) is high, the steered current Io discharges the capacitor
// linearly, Vout = VDD - Io/C * t, t being the time Mn was on; this is the
// time-to-voltage conversion. When gate is low the charge is held, and vout
// can be read any number of times without disturbing it. The voltage cannot
// fall below 0 V.
//
// Interface: gate and precharge are logic levels; vout is a real voltage.
// Timing: vout is updated when gate falls (the end of the interval) and when
// precharge rises; during an interval it still shows the value from before.
//
// Follows the design: precharge to VDD, the linear discharge law, Io = 50 uA
// and C = 1 pF (50 mV per ns), non-destructive read-out. This model's own
// choices: the ideal switching of Mn (no offset from the short overlap of M0
// and Mn, no transient at the common source node, no parasitic capacitance),
// the update only at the end of the interval, and the 0 V floor.
module tvc_channel #(
  parameter real VDD_V = tvc_pkg::VDD_V,
  parameter real IO_A  = tvc_pkg::IO_A,
  parameter real C_F   = tvc_pkg::C_F
) (
  input  logic gate,
  input  logic precharge,
  output real  vout
);
  timeunit 1ns;
  timeprecision 1ps;

  real     v_cap;
  realtime t_on;

  initial begin
    v_cap = VDD_V;
    t_on  = 0.0;
  end

  always @(posedge gate) t_on <= $realtime;

  // End of an interval or start of a precharge; precharge wins.
  always @(negedge gate or posedge precharge)
    if (precharge)
      v_cap <= VDD_V;
    else if (v_cap > tvc_pkg::droop_v($realtime - t_on, IO_A, C_F))
      v_cap <= v_cap - tvc_pkg::droop_v($realtime - t_on, IO_A, C_F);
    else
      v_cap <= 0.0;

  assign vout = v_cap;
endmodule
