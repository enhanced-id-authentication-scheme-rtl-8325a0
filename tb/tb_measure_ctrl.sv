// tb_measure_ctrl: checks the ring sequencer with a model counter.
//
// The counter is replaced by a model that counts system cycles during
// which the gate is open plus 1000 times the ring index, so each sample's
// expected value is GATE + 1000*idx.  The testbench checks the ring order,
// that only one ring is enabled while the gate is open, the exact gate
// length, the stall on a withheld ready, the last flag, done, and the
// cycle count of a run without stalls:
//   N_RO * (SETTLE + GATE + HOLD + 1) cycles from the edge that samples
// start to the edge that raises done (the testbench's counter adds 2).
module tb_measure_ctrl;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned N = 6, GATE = 40, SETTLE = 5, HOLD = 4;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic busy, done, ro_run, cnt_clear, cnt_gate, s_valid, s_ready, s_last;
  logic [2:0]  sel, s_idx;
  logic [31:0] cnt_value, s_freq;
  int checks = 0, failures = 0;
  int gate_len, cyc, t_start, got, stalls;
  bit stall_mode;

  always #5ns clk = ~clk;

  measure_ctrl #(.N_RO(N), .M_BITS(32), .GATE_CYCLES(GATE), .SETTLE_CYCLES(SETTLE),
                 .HOLD_CYCLES(HOLD)) dut (.*);

  // model counter
  logic [31:0] model_cnt;
  always_ff @(posedge clk) begin
    if (cnt_clear) model_cnt <= 1000 * 32'(sel);
    else if (cnt_gate) model_cnt <= model_cnt + 1;
  end
  assign cnt_value = model_cnt;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (cnt_gate) gate_len <= gate_len + 1;
    if (cnt_clear) gate_len <= 0;
    if (stall_mode) s_ready <= ($urandom % 3 == 0);
    else            s_ready <= 1'b1;
    if (s_valid && !s_ready) stalls <= stalls + 1;
    if (s_valid && s_ready) begin
      check(32'(s_idx) == got, $sformatf("order: idx %0d expected %0d", s_idx, got));
      check(s_freq == GATE + 1000 * 32'(s_idx), $sformatf("idx %0d value %0d", s_idx, s_freq));
      check(gate_len == GATE, $sformatf("gate length %0d", gate_len));
      check(s_last == (got == N - 1), "last flag");
      got <= got + 1;
    end
    if (cnt_gate) check(ro_run && !cnt_clear, "ring runs while gate open");
  end

  task automatic run(input bit stall);
    stall_mode = stall;
    got = 0;
    @(posedge clk); start <= 1'b1; t_start = cyc;
    @(posedge clk); start <= 1'b0;
    @(negedge clk);
    check(busy, "busy after start");
    wait (done); @(negedge clk);
    check(got == N, $sformatf("got %0d samples", got));
    if (!stall)
      check(cyc - t_start == N * (SETTLE + GATE + HOLD + 1) + 2,
            $sformatf("run took %0d cycles, expected %0d", cyc - t_start, N * (SETTLE + GATE + HOLD + 1) + 2));
    @(posedge clk);
    check(!busy, "idle after done");
  endtask

  initial begin
    cyc = 0; gate_len = 0; stalls = 0; s_ready = 1'b1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(1'b0);
    run(1'b1);
    check(stalls > 0, "stall exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
