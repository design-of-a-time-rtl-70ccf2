// tvc_pkg: constants shared by the time-to-voltage converter.
//
// The converter measures the interval between a START and a STOP pulse by
// steering a constant current Io onto a precharged storage capacitor C for
// exactly that interval, so the capacitor loses Io/C volts per second of
// interval. The values below are the nominal ones of the design: eight memory
// channels, Io = 50 uA, C = 1 pF (50 mV per ns) and a 5 V supply to which each
// capacitor is precharged. CLK_PERIOD_NS is the 250 MHz clock of the width
// generator; it is used only by testbenches and models, the RTL has no notion
// of absolute time.
package tvc_pkg;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int  N_CHANNELS    = 8;
  localparam real VDD_V         = 5.0;
  localparam real IO_A          = 50.0e-6;
  localparam real C_F           = 1.0e-12;
  localparam real CLK_PERIOD_NS = 4.0;

  // Voltage lost by a channel for an integration time of t_ns nanoseconds.
  function automatic real droop_v(real t_ns, real io_a, real c_f);
    return io_a / c_f * t_ns * 1.0e-9;
  endfunction
endpackage
