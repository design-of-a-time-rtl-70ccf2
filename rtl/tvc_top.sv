// tvc_top: eight-channel time-to-voltage converter with analog memory.
//
// A START pulse and a later STOP pulse mark an interval. The width generator
// turns them into the complementary pulses Vright/Vleft, clocked by the
// 250 MHz CLK. channel_select routes Vright to the transistor of the one
// channel whose select bit is high, and Vleft to the shared dump transistor
// M0, so the current Io flows into the selected storage capacitor for exactly
// the width of Vright and into M0 otherwise. Each capacitor was precharged to
// VDD, so after the measurement it holds VDD - Io/C * t and keeps it while
// other channels are used: the eight channels form an analog memory for eight
// measurements in quick succession. One precharge input recharges all of them.
//
// Sequence of use: pulse precharge; set select to one channel; clear the width
// generator with clr_n low; release clr_n; apply START then STOP; read vout
// of that channel. Move select to the next channel and repeat.
//
// Beside the converter sits widthgen_sync, the register-transfer form of the
// width generator, fed by the same CLK, START and STOP (reset by clr_n). Its
// outputs are brought out as sync_vleft/sync_vright for comparison; it drives
// no channel.
//
// Interface: clk, clr_n (active low), start, stop, select[N_CHANNELS-1:0]
// (bit n selects channel n+1), precharge (active high), vleft/vright and
// gate_m0 for observation, vout[] as real voltages (model of the analog part).
//
// Follows the design: the block diagram (digital width generator feeding an
// analog part), eight channels, one AND gate per channel, a common precharge.
// This RTL's own choice: bringing vleft, vright, gate_m0 and the second width
// generator's outputs out as ports.
module tvc_top #(
  parameter int  N_CHANNELS = tvc_pkg::N_CHANNELS,
  parameter real VDD_V      = tvc_pkg::VDD_V,
  parameter real IO_A       = tvc_pkg::IO_A,
  parameter real C_F        = tvc_pkg::C_F
) (
  input  logic                  clk,
  input  logic                  clr_n,
  input  logic                  start,
  input  logic                  stop,
  input  logic [N_CHANNELS-1:0] select,
  input  logic                  precharge,
  output logic                  vleft,
  output logic                  vright,
  output logic                  gate_m0,
  output real                   vout [N_CHANNELS],
  output logic                  sync_vleft,
  output logic                  sync_vright
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [N_CHANNELS-1:0] gate_mn;

  width_generator u_wg (
    .clk    (clk),
    .clr_n  (clr_n),
    .start  (start),
    .stop   (stop),
    .vleft  (vleft),
    .vright (vright)
  );

  channel_select #(.N_CHANNELS(N_CHANNELS)) u_sel (
    .vleft   (vleft),
    .vright  (vright),
    .select  (select),
    .gate_m0 (gate_m0),
    .gate_mn (gate_mn)
  );

  for (genvar n = 0; n < N_CHANNELS; n++) begin : g_ch
    tvc_channel #(.VDD_V(VDD_V), .IO_A(IO_A), .C_F(C_F)) u_ch (
      .gate      (gate_mn[n]),
      .precharge (precharge),
      .vout      (vout[n])
    );
  end

  widthgen_sync u_wg_sync (
    .clk    (clk),
    .rst_n  (clr_n),
    .start  (start),
    .stop   (stop),
    .vleft  (sync_vleft),
    .vright (sync_vright)
  );
endmodule
