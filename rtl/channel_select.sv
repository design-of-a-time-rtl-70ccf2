// channel_select: steering logic between the width generator and the
// analog memory channels.
//
// Each channel n has its own switching transistor Mn; one shared dump
// transistor M0 takes the current Io whenever no measurement is running.
// gate_mn[n] = vright AND select[n] turns Mn on for the measured interval if
// channel n is the selected one; gate_m0 follows vleft through a two-inverter
// buffer (a plain copy in logic). With exactly one select bit high the
// current Io is steered from M0 to that channel's capacitor at START and back
// to M0 at STOP.
//
// Interface: vleft/vright from the width generator, select[N_CHANNELS-1:0]
// (SELECT1..SELECTn, bit 0 = channel 1), gate_m0 and gate_mn[] to the
// transistors. Purely combinational, no clock.
//
// Follows the design: one AND gate per channel fed by Vright and that
// channel's SELECT, M0 driven from Vleft. This RTL's own choice: an assertion
// that at most one channel is selected, since the design enables one storage
// capacitor at a time.
module channel_select #(
  parameter int N_CHANNELS = tvc_pkg::N_CHANNELS
) (
  input  logic                  vleft,
  input  logic                  vright,
  input  logic [N_CHANNELS-1:0] select,
  output logic                  gate_m0,
  output logic [N_CHANNELS-1:0] gate_mn
);
  timeunit 1ns;
  timeprecision 1ps;

  always_comb begin
    gate_m0 = vleft;
    gate_mn = select & {N_CHANNELS{vright}};
  end

  always_comb
    a_one_channel : assert final ($onehot0(select))
      else $error("channel_select: more than one channel selected (%b)", select);
endmodule
