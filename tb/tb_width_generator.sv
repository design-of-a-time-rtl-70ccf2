// tb_width_generator: self-checking test of the width generator.
//
// The clock runs at 250 MHz (4 ns period, rising edges at 2 + 4k ns). Each
// trial clears the generator, applies a START pulse and a later STOP pulse at
// random sub-nanosecond positions, and measures when vright rises and falls.
// The expected edge times come from a reference written directly from the
// capture rule: an input is captured when it and CLK are first high together,
// and the output changes on the first rising CLK edge strictly after that.
// Also checked: vleft is always the complement of vright, a STOP without a
// START leaves vright low, a second START after STOP is ignored until a
// clear (single shot), and clr_n low in the middle of an interval ends it.
`timescale 1ns/1ps
module tb_width_generator;
  localparam real T = 4.0;

  logic clk = 1'b0, clr_n = 1'b0, start = 1'b0, stop = 1'b0;
  logic vleft, vright;
  int checks = 0, failures = 0;
  realtime t_rise, t_fall;

  width_generator dut (.*);

  always #(T/2) clk = ~clk;

  always @(posedge vright) t_rise = $realtime;
  always @(negedge vright) t_fall = $realtime;

  // Complement check on every clock phase.
  always @(negedge clk) begin
    checks++;
    if (vleft !== ~vright) begin
      failures++;
      $display("FAIL %0t: vleft=%b vright=%b", $time, vleft, vright);
    end
  end

  function automatic real next_rise_after(real t);  // strictly after t
    real k;
    k = $floor((t - T/2) / T) + 1.0;
    return T/2 + k * T;
  endfunction

  function automatic bit clk_high_at(real t);
    real ph;
    ph = t - T * $floor(t / T);
    return (ph >= T/2);
  endfunction

  function automatic real capture_time(real t_r);
    return clk_high_at(t_r) ? t_r : next_rise_after(t_r);
  endfunction

  task automatic clear();
    clr_n = 1'b0;
    #(1.3);
    clr_n = 1'b1;
    #(T * 2);
  endtask

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  task automatic trial(input real start_ofs, input real start_w,
                       input real gap, input real stop_w);
    real t0, ts, tp, exp_rise, exp_fall;
    t0 = $realtime;
    t_rise = -1.0; t_fall = -1.0;
    #(start_ofs);
    ts = $realtime;
    start = 1'b1; #(start_w); start = 1'b0;
    #(gap - start_w);
    tp = $realtime;
    stop = 1'b1; #(stop_w); stop = 1'b0;
    #(3 * T);
    exp_rise = next_rise_after(capture_time(ts));
    exp_fall = next_rise_after(capture_time(tp));
    check($sformatf("rise at %0.3f expected %0.3f (start %0.3f)", t_rise, exp_rise, ts),
          t_rise > exp_rise - 0.01 && t_rise < exp_rise + 0.01);
    check($sformatf("fall at %0.3f expected %0.3f (stop %0.3f)", t_fall, exp_fall, tp),
          t_fall > exp_fall - 0.01 && t_fall < exp_fall + 0.01);
    // Width is a whole number of clock periods.
    check("width is whole periods",
          $rtoi((t_fall - t_rise) / T + 0.5) * T > (t_fall - t_rise) - 0.01 &&
          $rtoi((t_fall - t_rise) / T + 0.5) * T < (t_fall - t_rise) + 0.01);
    // Single shot: another START before a clear does nothing.
    start = 1'b1; #(T * 1.5); start = 1'b0; #(T * 3);
    check("second START ignored without clear", vright == 1'b0 && vleft == 1'b1);
    clear();
  endtask

  initial begin
    #(1.1);
    clear();
    check("idle after clear", vright == 1'b0 && vleft == 1'b1);

    // STOP alone does not start a measurement.
    stop = 1'b1; #(T); stop = 1'b0; #(3 * T);
    check("STOP alone keeps vright low", vright == 1'b0);
    clear();

    // Pulses of half a period, rising in the low and in the high clock phase.
    trial(0.55, 2.0, 20.3, 2.0);
    trial(2.45, 2.0, 17.9, 2.0);
    // The document's own stimulus shape: 6 ns pulses 20 ns apart.
    trial(0.95, 6.0, 20.0, 6.0);
    // Random intervals from 10 ns to 200 ns.
    repeat (40) begin
      trial(0.05 + 0.1 * ($urandom % 40), 2.05 + 0.1 * ($urandom % 40),
            10.0 + 0.1 * ($urandom % 1900), 2.05 + 0.1 * ($urandom % 40));
    end

    // Clear during an interval ends it at once.
    start = 1'b1; #(T); start = 1'b0; #(3 * T);
    check("vright high during interval", vright == 1'b1);
    clr_n = 1'b0; #(0.5);
    check("clr_n ends the interval", vright == 1'b0 && vleft == 1'b1);
    clr_n = 1'b1; #(T);

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
