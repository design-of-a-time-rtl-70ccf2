// tb_widthgen_sync: self-checking test of the register-transfer width
// generator.
//
// START and STOP are driven just after a falling clock edge and held for a
// whole number of periods, so the clock edge that first samples each is
// known. Expected: vleft rises two rising edges after the one that first
// samples START and falls two after the one that first samples STOP, and
// vright is always its complement. Also checked: START wins when both are
// registered together, a new START re-arms without reset, reset clears. The
// first trial is the document's force-file stimulus scaled to this clock:
// START for one period, STOP for one period some periods later.
`timescale 1ns/1ps
module tb_widthgen_sync;
  localparam real T = 10.0;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, stop = 1'b0;
  logic vleft, vright;
  int checks = 0, failures = 0;
  int cyc = 0, rise_cyc = -1, fall_cyc = -1;

  widthgen_sync dut (.*);

  always #(T/2) clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge vleft)  rise_cyc = cyc;
  always @(negedge vleft)  fall_cyc = cyc;

  always @(negedge clk) begin
    checks++;
    if (vright !== ~vleft) begin
      failures++;
      $display("FAIL %0t: vleft=%b vright=%b", $time, vleft, vright);
    end
  end

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  // Pulses start right after a falling edge; the next rising edge has cycle
  // number cyc+1 once it has counted (cyc updates on that edge).
  task automatic trial(input int start_w, input int gap, input int stop_w);
    int c_start, c_stop;
    @(negedge clk);
    c_start = cyc + 1;          // first edge that samples START
    start = 1'b1; repeat (start_w) @(negedge clk); start = 1'b0;
    repeat (gap - start_w) @(negedge clk);
    c_stop = cyc + 1;
    stop = 1'b1; repeat (stop_w) @(negedge clk); stop = 1'b0;
    repeat (4) @(negedge clk);
    // vleft changes on edge c+1; the cycle counter reads c+1 after that edge
    // is counted, and the monitor sees the value the counter had before it.
    check($sformatf("rise cycle %0d expected %0d", rise_cyc, c_start + 1), rise_cyc == c_start + 1);
    check($sformatf("fall cycle %0d expected %0d", fall_cyc, c_stop + 1), fall_cyc == c_stop + 1);
    check("idle low after STOP", vleft == 1'b0);
  endtask

  initial begin
    #(3 * T);
    rst_n = 1'b1;
    check("reset state", vleft == 1'b0 && vright == 1'b1);
    trial(1, 5, 1);
    trial(2, 2, 2);
    repeat (30) trial(1 + $urandom % 3, 4 + $urandom % 20, 1 + $urandom % 3);

    // START and STOP sampled on the same edge: START has priority.
    @(negedge clk); start = 1'b1; stop = 1'b1;
    @(negedge clk); start = 1'b0; stop = 1'b0;
    @(negedge clk);
    check("START wins over STOP", vleft == 1'b1);
    @(negedge clk);
    check("the coincident STOP is lost", vleft == 1'b1);
    stop = 1'b1; @(negedge clk); stop = 1'b0;
    @(negedge clk);
    check("a later STOP clears", vleft == 1'b0);

    // Reset in the middle of an interval.
    start = 1'b1; @(negedge clk); start = 1'b0; @(negedge clk); @(negedge clk);
    check("interval running", vleft == 1'b1);
    rst_n = 1'b0; #1;
    check("reset clears", vleft == 1'b0);
    rst_n = 1'b1;

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
