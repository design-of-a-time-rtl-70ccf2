// tb_channel_select: exhaustive self-checking test of the channel steering
// gates for eight channels.
//
// For every legal select value (no channel or exactly one) and every
// combination of vleft/vright, the expected gate levels are worked out bit
// by bit: channel n conducts only if it is selected and vright is high, and
// the dump transistor M0 follows vleft. Also checked in a full measurement
// shape: with vleft/vright complementary, the current is always steered to
// exactly one of M0 or the selected channel.
`timescale 1ns/1ps
module tb_channel_select;
  localparam int N = 8;

  logic         vleft, vright, gate_m0;
  logic [N-1:0] select, gate_mn;
  int checks = 0, failures = 0;

  channel_select #(.N_CHANNELS(N)) dut (.*);

  initial begin
    for (int s = -1; s < N; s++) begin
      for (int lr = 0; lr < 4; lr++) begin
        logic [N-1:0] exp_mn;
        select = (s < 0) ? '0 : (N'(1) << s);
        {vleft, vright} = 2'(lr);
        #1;
        for (int n = 0; n < N; n++) exp_mn[n] = (n == s) && vright;
        checks++;
        if (gate_mn !== exp_mn || gate_m0 !== vleft) begin
          failures++;
          $display("FAIL select=%b vleft=%b vright=%b: gate_mn=%b gate_m0=%b",
                   select, vleft, vright, gate_mn, gate_m0);
        end
        // Complementary drive steers the current to exactly one place
        // whenever a channel is selected.
        if (s >= 0 && vleft == ~vright) begin
          checks++;
          if ($countones({gate_m0, gate_mn}) != 1) begin
            failures++;
            $display("FAIL steering not exclusive: select=%b vright=%b", select, vright);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
