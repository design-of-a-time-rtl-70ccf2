// tb_tvc_channel: self-checking test of the analog memory channel model.
//
// With the nominal Io = 50 uA and C = 1 pF the capacitor must lose exactly
// 50 mV per nanosecond of gate-on time. The test precharges the channel,
// applies gate pulses of known length (among them the 17 ns to 33 ns linear
// range of the design) and compares vout with 5 V - 0.05 V/ns * t worked out
// here. It also checks that the voltage holds while the gate is off (the
// read-out is non-destructive), that two intervals without a precharge add
// up, that precharge restores 5 V, and that a very long interval stops at 0 V.
`timescale 1ns/1ps
module tb_tvc_channel;
  logic gate = 1'b0, precharge = 1'b0;
  real  vout;
  int   checks = 0, failures = 0;

  tvc_channel dut (.*);

  task automatic check_v(input string what, input real exp_v);
    checks++;
    if (vout > exp_v + 1.0e-6 || vout < exp_v - 1.0e-6) begin
      failures++;
      $display("FAIL %0t: %s: vout=%f expected %f", $time, what, vout, exp_v);
    end
  endtask

  task automatic do_precharge();
    precharge = 1'b1; #(2.5); precharge = 1'b0; #(1.0);
  endtask

  task automatic pulse(input real t_ns);
    gate = 1'b1; #(t_ns); gate = 1'b0; #(0.5);
  endtask

  initial begin
    #(1.0);
    do_precharge();
    check_v("precharged", 5.0);

    // Linear range of the design and a few other widths.
    foreach (widths[i]) begin
      do_precharge();
      pulse(widths[i]);
      check_v($sformatf("after %0.1f ns", widths[i]), 5.0 - 0.05 * widths[i]);
      #(500.0);
      check_v("held after 500 ns", 5.0 - 0.05 * widths[i]);
    end

    // Two intervals accumulate.
    do_precharge();
    pulse(12.0);
    #(20.0);
    pulse(8.0);
    check_v("12 ns + 8 ns", 5.0 - 0.05 * 20.0);

    // Random widths up to 96 ns.
    repeat (50) begin
      real w;
      w = 0.25 * real'(1 + $urandom % 384);
      do_precharge();
      pulse(w);
      check_v($sformatf("random %0.2f ns", w), 5.0 - 0.05 * w);
    end

    // Longer than the 100 ns full scale: floor at 0 V.
    do_precharge();
    pulse(140.0);
    check_v("floor at 0 V", 0.0);
    do_precharge();
    check_v("precharge after floor", 5.0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real widths[6] = '{4.0, 17.0, 20.0, 25.0, 33.0, 60.0};

  initial begin
    #(100000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
