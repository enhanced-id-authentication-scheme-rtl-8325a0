// tb_ring_oscillator: checks the behavioural ring model.
//
// With jitter off, the ring must hold its output at 1 while disabled and,
// once enabled, toggle with a half period of (STAGES+1)*STAGE_DELAY_PS +
// EXTRA_PS picoseconds.  The test measures the time between rising edges
// and the idle level after disabling.
module tb_ring_oscillator;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned STAGES = 16, D = 542, EXTRA = 7;
  localparam int unsigned PERIOD_PS = 2 * ((STAGES + 1) * D + EXTRA);

  logic en = 1'b0;
  logic osc;
  int   checks = 0, failures = 0;
  realtime t0, t1;

  ring_oscillator #(.STAGES(STAGES), .STAGE_DELAY_PS(D), .EXTRA_PS(EXTRA), .JITTER_PS(0))
    dut (.en, .osc);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100ns;
    check(osc == 1'b1, "idle level while disabled");
    en = 1'b1;
    @(posedge osc); t0 = $realtime;
    repeat (10) @(posedge osc);
    t1 = $realtime;
    check(((t1 - t0) / 10.0 > (PERIOD_PS - 1) * 1ps) && ((t1 - t0) / 10.0 < (PERIOD_PS + 1) * 1ps),
          $sformatf("period %0t expected %0d ps", (t1 - t0) / 10.0, PERIOD_PS));
    en = 1'b0;
    #1ns;
    check(osc == 1'b1, "returns to 1 when disabled");
    #(5 * PERIOD_PS * 1ps);
    check(osc == 1'b1, "stays quiet when disabled");
    // restart
    en = 1'b1;
    @(posedge osc); t0 = $realtime;
    @(posedge osc); t1 = $realtime;
    check((t1 - t0 > (PERIOD_PS - 1) * 1ps) && (t1 - t0 < (PERIOD_PS + 1) * 1ps), "period after restart");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
