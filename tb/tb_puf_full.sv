// tb_puf_full: one complete ID extraction at the design's default sizes.
//
// puf_top is used with every parameter at its default: 32 rings, 32-bit
// counter, 21-bit ID elements, a 2^20-cycle counting gate and 115200 baud
// from a 50 MHz clock.  One MODE_ID run is made.  The testbench
//   * predicts every ring count from the ring model's period,
//     2^20 * 20 ns / period, and from it the 31 neighbour differences;
//   * checks that the elements produced, and the records decoded from the
//     serial line, equal those predictions to within 3 counts;
//   * loads the predicted ID as the enrolled reference (the role of the
//     host, which computes a nominal ID) and checks that the on-chip
//     authenticator reports the exact sum of squared differences it
//     computes itself and accepts the die;
//   * checks that the run lasts 32 * (16 + 2^20 + 16 + 1) cycles.
module tb_puf_full;
  timeunit 1ns;
  timeprecision 1ps;
  import puf_pkg::*;

  localparam int unsigned N = 32, K = 21, GATE = 1 << 20, SETTLE = 16, HOLD = 16;
  localparam int unsigned CPB = 434, SPREAD = 12, NOM = 542, SEED = 1;
  localparam int unsigned IDX_W = 5, ACC_W = 2 * K + 2 + 5;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  out_mode_e mode = MODE_ID;
  logic ref_we = 1'b0;
  logic [IDX_W-1:0] ref_addr = '0;
  logic signed [K-1:0] ref_data = '0;
  logic [23:0] thr = '0;
  logic busy, done, txd, id_valid, auth_done, auth_match;
  logic [IDX_W-1:0] id_idx;
  logic signed [K-1:0] id_delta;
  logic [ACC_W-1:0] auth_dist_sq;

  always #10ns clk = ~clk;

  puf_top dut (.clk, .rst_n, .start, .mode, .busy, .done, .uart_txd(txd),
               .id_valid, .id_idx, .id_delta, .ref_we, .ref_addr, .ref_data, .thr,
               .auth_done, .auth_match, .auth_dist_sq);

  int checks = 0, failures = 0, cyc = 0, t0 = 0, n_ids = 0;
  int ids [N-1];
  int pred [N-1];
  logic [7:0] rx_q [$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (id_valid) begin ids[id_idx] = int'(id_delta); n_ids++; end
  end

  function automatic int unsigned local_offset(int unsigned ring, int unsigned seed);
    logic [31:0] h;
    h = 32'(ring) * 32'h9E37_79B1 ^ 32'(seed) * 32'h85EB_CA6B;
    h = h ^ (h >> 15);
    h = h * 32'h2C1B_3C6D;
    h = h ^ (h >> 13);
    return h % SPREAD;
  endfunction

  function automatic int expected_count(int unsigned ring);
    real period_ps = 2.0 * real'(17 * NOM + local_offset(ring, SEED));
    return int'(real'(GATE) * 20000.0 / period_ps);
  endfunction

  initial begin
    logic [7:0] b;
    wait (rst_n);
    repeat (4) @(posedge clk);
    forever begin
      @(negedge txd);
      repeat (CPB / 2) @(posedge clk);
      for (int k = 0; k < 8; k++) begin
        repeat (CPB) @(posedge clk);
        b[k] = txd;
      end
      repeat (CPB) @(posedge clk);
      rx_q.push_back(b);
    end
  end

  initial begin
    longint s = 0;
    for (int i = 0; i < N - 1; i++) pred[i] = expected_count(i + 1) - expected_count(i);
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    // enrol the predicted ID; threshold 4 counts rms per element
    for (int i = 0; i < N - 1; i++) begin
      @(negedge clk);
      ref_we = 1'b1; ref_addr = IDX_W'(i); ref_data = K'(pred[i]);
    end
    @(negedge clk);
    ref_we = 1'b0;
    thr = 24'(4 * (1 << 24) / (1 << K));
    @(negedge clk);
    start = 1'b1; t0 = cyc;
    @(negedge clk);
    start = 1'b0;
    wait (done);
    @(negedge clk);
    check(cyc - t0 == N * (SETTLE + GATE + HOLD + 1) + 1,
          $sformatf("run took %0d cycles, expected %0d", cyc - t0, N * (SETTLE + GATE + HOLD + 1) + 1));
    wait (auth_done);
    repeat (60 * CPB) @(posedge clk);
    check(n_ids == N - 1, $sformatf("%0d elements", n_ids));
    for (int i = 0; i < N - 1; i++) begin
      check(ids[i] - pred[i] <= 3 && ids[i] - pred[i] >= -3,
            $sformatf("element %0d = %0d, predicted %0d", i, ids[i], pred[i]));
      s += longint'(ids[i] - pred[i]) * longint'(ids[i] - pred[i]);
    end
    check(auth_dist_sq == ACC_W'(s), $sformatf("distance %0d expected %0d", auth_dist_sq, s));
    check(auth_match, "die accepted against its predicted ID");
    check(rx_q.size() == 4 * (N - 1), $sformatf("%0d serial bytes", rx_q.size()));
    for (int i = 0; i < N - 1 && rx_q.size() >= 4; i++) begin
      logic [7:0] idx;
      logic [23:0] d;
      idx = rx_q.pop_front();
      d = '0;
      for (int k = 0; k < 3; k++) d = {d[15:0], rx_q.pop_front()};
      check(idx == 8'(i) && int'($signed(d)) == ids[i], $sformatf("serial record %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #800ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
