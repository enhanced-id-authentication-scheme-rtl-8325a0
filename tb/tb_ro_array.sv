// tb_ro_array: checks the ring array model.
//
// Every ring is enabled alone and its period measured; it must equal
// 2*((STAGES+1)*NOMINAL + local + GLOBAL) ps, with local in
// [0, LOCAL_SPREAD) and independent of GLOBAL.  A second array with the
// same seed and a global shift must be slower by exactly 2*GLOBAL ps per
// ring, and a third with another seed must differ in at least one ring.
// Disabled rings must stay at 1.
module tb_ro_array;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned N = 8, NOM = 542, SPREAD = 12, GSHIFT = 30;
  localparam int unsigned BASE_HALF = 17 * NOM;

  logic [N-1:0] en = '0;
  logic [N-1:0] osc_a, osc_b, osc_c;
  int   checks = 0, failures = 0;
  int   pa [N], pb [N], pc [N];
  realtime t0;

  ro_array #(.N_RO(N), .LOCAL_SPREAD_PS(SPREAD), .GLOBAL_SHIFT_PS(0), .JITTER_PS(0), .DIE_SEED(5))
    u_a (.en, .osc(osc_a));
  ro_array #(.N_RO(N), .LOCAL_SPREAD_PS(SPREAD), .GLOBAL_SHIFT_PS(GSHIFT), .JITTER_PS(0), .DIE_SEED(5))
    u_b (.en, .osc(osc_b));
  ro_array #(.N_RO(N), .LOCAL_SPREAD_PS(SPREAD), .GLOBAL_SHIFT_PS(0), .JITTER_PS(0), .DIE_SEED(9))
    u_c (.en, .osc(osc_c));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic period(input int i, input int which, output int ps);
    realtime a;
    case (which)
      0: begin @(posedge osc_a[i]); a = $realtime; @(posedge osc_a[i]); end
      1: begin @(posedge osc_b[i]); a = $realtime; @(posedge osc_b[i]); end
      default: begin @(posedge osc_c[i]); a = $realtime; @(posedge osc_c[i]); end
    endcase
    ps = int'(($realtime - a) / 1ps);
  endtask

  initial begin
    bit any_diff = 1'b0;
    #50ns;
    check(osc_a == '1 && osc_b == '1, "all rings idle at 1");
    for (int i = 0; i < N; i++) begin
      en = '0; en[i] = 1'b1;
      period(i, 0, pa[i]);
      period(i, 1, pb[i]);
      period(i, 2, pc[i]);
      check(pa[i] >= 2 * BASE_HALF && pa[i] < 2 * (BASE_HALF + SPREAD),
            $sformatf("ring %0d period %0d out of range", i, pa[i]));
      check(pb[i] == pa[i] + 2 * GSHIFT, $sformatf("ring %0d global shift %0d vs %0d", i, pb[i], pa[i]));
      if (pc[i] != pa[i]) any_diff = 1'b1;
      // the other rings stay quiet
      check((osc_a | en) == '1, $sformatf("ring %0d: others idle", i));
    end
    check(any_diff, "different dies give different local patterns");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
