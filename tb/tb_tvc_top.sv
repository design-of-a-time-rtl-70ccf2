// tb_tvc_top: end-to-end test of the eight-channel time-to-voltage converter
// at its default parameters (eight channels, Io = 50 uA, C = 1 pF, 5 V), with
// the 250 MHz clock.
//
// One complete operation: precharge all channels, then for each channel in
// turn select it, clear the width generator, apply START and, some time later,
// STOP, and read the channel's voltage. The interval seen by the capacitor is
// worked out here from the capture rule of the width generator (an input is
// captured when it and CLK are first high together; the output moves on the
// next rising CLK edge), and the expected voltage is 5 V - 0.05 V/ns times
// that width. After each measurement every other channel must still hold its
// own earlier value (analog memory, non-destructive read-out). A second pass
// measures intervals in the 17 ns to 33 ns linear range. Further mechanisms:
// precharge restoring all channels, START ignored until the width generator
// is cleared (single shot), a measurement with no channel selected leaving
// every capacitor alone, and the register-transfer width generator beside
// the converter producing its pulse for the same START/STOP. Each mechanism is
// counted and one that never happened counts as a failure.
`timescale 1ns/1ps
module tb_tvc_top;
  import tvc_pkg::*;
  localparam int  N = N_CHANNELS;
  localparam real T = CLK_PERIOD_NS;

  logic         clk = 1'b0, clr_n = 1'b0, start = 1'b0, stop = 1'b0, precharge = 1'b0;
  logic [N-1:0] select = '0;
  logic         vleft, vright, gate_m0, sync_vleft, sync_vright;
  real          vout [N];

  int  checks = 0, failures = 0;
  real exp_v [N];
  int  n_precharge = 0, n_measure = 0, n_hold = 0, n_single_shot = 0,
       n_no_select = 0, n_sync_pulse = 0, n_linear = 0;

  tvc_top dut (.*);

  always #(T/2) clk = ~clk;
  always @(posedge sync_vleft) n_sync_pulse++;

  function automatic real next_rise_after(real t);
    return T/2 + ($floor((t - T/2) / T) + 1.0) * T;
  endfunction

  function automatic real capture_time(real t_r);
    real ph;
    ph = t_r - T * $floor(t_r / T);
    return (ph >= T/2) ? t_r : next_rise_after(t_r);
  endfunction

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  function automatic bit close(real a, real b);
    return (a < b + 1.0e-6) && (a > b - 1.0e-6);
  endfunction

  task automatic check_all(input string what);
    for (int n = 0; n < N; n++)
      check($sformatf("%s: channel %0d vout=%f expected %f", what, n + 1, vout[n], exp_v[n]),
            close(vout[n], exp_v[n]));
  endtask

  task automatic precharge_all();
    precharge = 1'b1; #(3.0); precharge = 1'b0; #(1.0);
    for (int n = 0; n < N; n++) exp_v[n] = VDD_V;
    check_all("after precharge");
    n_precharge++;
  endtask

  task automatic clear();
    clr_n = 1'b0; #(1.3); clr_n = 1'b1; #(2 * T);
  endtask

  // One measurement on channel ch (or none if ch < 0) of an interval of
  // about gap ns, START ofs ns after the call.
  task automatic measure(input int ch, input real ofs, input real gap);
    real ts, tp, width;
    select = (ch < 0) ? '0 : (N'(1) << ch);
    clear();
    #(ofs);
    ts = $realtime;
    start = 1'b1; #(2.2); start = 1'b0;
    #(gap - 2.2);
    tp = $realtime;
    stop = 1'b1; #(2.2); stop = 1'b0;
    #(3 * T);
    width = next_rise_after(capture_time(tp)) - next_rise_after(capture_time(ts));
    if (ch >= 0) begin
      exp_v[ch] = exp_v[ch] - 0.05 * width;
      if (exp_v[ch] < 0.0) exp_v[ch] = 0.0;
      n_measure++;
      if (width >= 17.0 && width <= 33.0) n_linear++;
    end else begin
      n_no_select++;
    end
    check_all($sformatf("measurement of %0.2f ns on channel %0d", width, ch + 1));
    if (ch >= 0) n_hold += N - 1;
    // A second START without a clear must not reach the capacitor.
    start = 1'b1; #(2.2); start = 1'b0; #(3 * T);
    check_all("START without clear");
    check("vright stays low without clear", vright == 1'b0 && gate_m0 == 1'b1);
    n_single_shot++;
    select = '0;
  endtask

  initial begin
    #(1.1);
    clear();
    precharge_all();

    // Pass 1: every channel, random intervals from 20 ns to 80 ns.
    for (int n = 0; n < N; n++)
      measure(n, 0.05 + 0.1 * ($urandom % 40), 20.0 + 0.1 * ($urandom % 600));
    #(1000.0);
    check_all("held after 1 us");

    // No channel selected: every capacitor keeps its charge.
    measure(-1, 0.35, 40.0);

    // Pass 2: precharge, then the 17 ns to 33 ns linear range, channels in
    // reverse order.
    precharge_all();
    for (int n = N - 1; n >= 0; n--)
      measure(n, 0.05 + 0.1 * ($urandom % 40), 17.0 + 2.0 * real'(N - 1 - n));

    check("precharge happened", n_precharge > 0);
    check("measurements happened", n_measure == 2 * N);
    check("linear-range intervals measured", n_linear > 0);
    check("other channels held their charge", n_hold > 0);
    check("single-shot START ignored", n_single_shot > 0);
    check("unselected measurement", n_no_select > 0);
    check("register-transfer width generator pulsed", n_sync_pulse > 0);
    $display("mechanisms: precharge=%0d measure=%0d linear=%0d hold=%0d single_shot=%0d no_select=%0d sync_pulse=%0d",
             n_precharge, n_measure, n_linear, n_hold, n_single_shot, n_no_select, n_sync_pulse);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(200000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
