// tb_tvc_workloads: the converter run on the measurements the design is
// specified for, at default parameters.
//
// 1. The width-generator stimulus of the design's own gate-level simulation:
//    250 MHz clock high at t = 0 (falling at 2 ns, rising at 4 ns, ...), clear
//    released at 1 ns, START high from 2 ns to 8 ns and STOP from 22 ns to
//    28 ns. Both pulses are moved 0.1 ns later so that they do not rise on
//    the same instant as a falling clock edge, which a zero-delay simulation
//    cannot order. START is then captured at 4 ns and re-timed at 8 ns, STOP
//    captured at 24 ns and re-timed at 28 ns: Vright must be high from 8 ns to
//    28 ns, and channel 1 must read 5 V - 20 ns * 0.05 V/ns = 4.0 V.
// 2. A sweep of the 17 ns to 33 ns linear range in 0.5 ns steps, each on a
//    freshly precharged channel (channels in rotation): vout must equal
//    5 V - 0.05 V/ns times the interval rounded by the capture rule to whole
//    clock periods (START lands at a random phase of the clock), and must
//    agree with the measured width of the Vright pulse.
`timescale 1ns/1ps
module tb_tvc_workloads;
  import tvc_pkg::*;
  localparam int  N = N_CHANNELS;
  localparam real T = CLK_PERIOD_NS;

  logic         clk = 1'b1, clr_n = 1'b0, start = 1'b0, stop = 1'b0, precharge = 1'b0;
  logic [N-1:0] select = '0;
  logic         vleft, vright, gate_m0, sync_vleft, sync_vright;
  real          vout [N];
  realtime      t_rise = -1.0, t_fall = -1.0;
  int           checks = 0, failures = 0, n_sweep = 0, n_steps = 0;

  tvc_top dut (.*);

  // High at 0, falling at 2 ns, rising at 4 ns, as in the stimulus.
  always #(T/2) clk = ~clk;
  always @(posedge vright) t_rise = $realtime;
  always @(negedge vright) t_fall = $realtime;

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

  // Rising clock edges are at 4k ns here; high phase is [4k, 4k + 2).
  function automatic real next_rise_after(real t);
    return T * ($floor(t / T) + 1.0);
  endfunction

  function automatic real capture_time(real t_r);
    real ph;
    ph = t_r - T * $floor(t_r / T);
    return (ph < T/2) ? t_r : next_rise_after(t_r);
  endfunction

  initial begin
    real prev_v;
    // Workload 1.
    select = N'(1);
    precharge = 1'b1;
    #(1.0);
    clr_n = 1'b1; precharge = 1'b0;
    #(1.1); start = 1'b1;     // 2.1 ns
    #(6.0); start = 1'b0;     // 8.1 ns
    #(14.0); stop = 1'b1;     // 22.1 ns
    #(6.0); stop = 1'b0;      // 28.1 ns
    #(20.0);
    check($sformatf("Vright rises at %0.2f ns, expected 8", t_rise), close(t_rise, 8.0));
    check($sformatf("Vright falls at %0.2f ns, expected 28", t_fall), close(t_fall, 28.0));
    check($sformatf("Vout1 = %f V, expected 4.0", vout[0]), close(vout[0], 4.0));
    for (int n = 1; n < N; n++)
      check($sformatf("Vout%0d untouched", n + 1), close(vout[n], VDD_V));

    // Workload 2.
    prev_v = VDD_V;
    for (int i = 0; i <= 32; i++) begin
      real gap, ts, tp, width, exp_v;
      int  ch;
      ch = i % N;
      gap = 17.0 + 0.5 * i;
      select = N'(1) << ch;
      precharge = 1'b1; clr_n = 1'b0;
      #(3.0);
      precharge = 1'b0; clr_n = 1'b1;
      @(posedge clk); #(0.3 + 0.1 * ($urandom % 37));
      ts = $realtime;
      start = 1'b1; #(3.0); start = 1'b0;
      #(gap - 3.0);
      tp = $realtime;
      stop = 1'b1; #(3.0); stop = 1'b0;
      #(3 * T);
      width = next_rise_after(capture_time(tp)) - next_rise_after(capture_time(ts));
      exp_v = VDD_V - 0.05 * width;
      check($sformatf("interval %0.1f ns: Vout%0d = %f V, expected %f", gap, ch + 1, vout[ch], exp_v),
            close(vout[ch], exp_v));
      check("pulse width matches capacitor droop",
            close(vout[ch], VDD_V - 0.05 * (t_fall - t_rise)));
      check($sformatf("interval %0.1f ns quantised to %0.1f ns", gap, width),
            width > gap - T - 0.01 && width < gap + T + 0.01);
      n_sweep++;
      if (!close(vout[ch], prev_v)) n_steps++;
      prev_v = vout[ch];
      select = '0;
    end
    check("sweep ran", n_sweep == 33);
    check("vout stepped across the range", n_steps > 0);
    $display("sweep points=%0d voltage steps=%0d", n_sweep, n_steps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(100000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
