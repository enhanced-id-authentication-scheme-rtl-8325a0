// tb_puf_top: end-to-end test of the ring-oscillator PUF.
//
// Three copies of the design run side by side on one 50 MHz clock with the
// same controls, each with its own ring model:
//   A     - die 1 at the reference condition,
//   A_hot - the same die with every ring slowed by HOT_PS per half period
//           (a higher temperature: all rings shift together),
//   B     - another die (different local pattern).
// The test makes three runs:
//   1. MODE_RAW: the serial output of A is decoded by a receiver model and
//      every ring count is compared with the count expected from the
//      ring's period, GATE * 20 ns / period (+/- 2).  The link is made
//      slow enough that it stalls the sequencer here.
//   2. MODE_ID: the ID elements of each copy are collected; A's serial
//      records must carry the same values, and A's elements must equal the
//      differences of its run-1 counts (+/- 4).  The run length without
//      stalls must be N_RO * (SETTLE + GATE + HOLD + 1) cycles.
//   3. A's run-2 ID is loaded as the enrolled reference into all three
//      copies and a third MODE_ID run is authenticated: A and A_hot must
//      match, B must be rejected.  A's raw counts of run 1 and A_hot's
//      counts differ by far more than the threshold allows, which shows
//      that the neighbour differences cancel the common shift.
// Every mechanism is counted (stalls, each mode, accepts, rejects, the
// common shift) and one that never happened counts as a failure.
module tb_puf_top;
  timeunit 1ns;
  timeprecision 1ps;
  import puf_pkg::*;

  localparam int unsigned N = 32, K = 21, GATE = 1 << 14, SETTLE = 16, HOLD = 16;
  localparam int unsigned CPB = 400;            // 10*4*CPB < ring time < 10*5*CPB
  localparam int unsigned HOT_PS = 400;
  localparam int unsigned SEED_A = 1, SEED_B = 2, SPREAD = 12, NOM = 542;
  localparam int unsigned IDX_W = 5, ACC_W = 2 * K + 2 + 5;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  out_mode_e mode = MODE_RAW;
  logic ref_we = 1'b0;
  logic [IDX_W-1:0] ref_addr = '0;
  logic signed [K-1:0] ref_data = '0;
  logic [23:0] thr = '0;

  logic busy [3], done [3], txd [3], id_valid [3], auth_done [3], auth_match [3];
  logic [IDX_W-1:0] id_idx [3];
  logic signed [K-1:0] id_delta [3];
  logic [ACC_W-1:0] auth_dist_sq [3];

  always #10ns clk = ~clk;

  puf_top #(.GATE_CYCLES(GATE), .CLKS_PER_BIT(CPB), .DIE_SEED(SEED_A), .GLOBAL_SHIFT_PS(0))
    u_a (.clk, .rst_n, .start, .mode, .busy(busy[0]), .done(done[0]), .uart_txd(txd[0]),
         .id_valid(id_valid[0]), .id_idx(id_idx[0]), .id_delta(id_delta[0]),
         .ref_we, .ref_addr, .ref_data, .thr,
         .auth_done(auth_done[0]), .auth_match(auth_match[0]), .auth_dist_sq(auth_dist_sq[0]));
  puf_top #(.GATE_CYCLES(GATE), .CLKS_PER_BIT(CPB), .DIE_SEED(SEED_A), .GLOBAL_SHIFT_PS(HOT_PS))
    u_a_hot (.clk, .rst_n, .start, .mode, .busy(busy[1]), .done(done[1]), .uart_txd(txd[1]),
         .id_valid(id_valid[1]), .id_idx(id_idx[1]), .id_delta(id_delta[1]),
         .ref_we, .ref_addr, .ref_data, .thr,
         .auth_done(auth_done[1]), .auth_match(auth_match[1]), .auth_dist_sq(auth_dist_sq[1]));
  puf_top #(.GATE_CYCLES(GATE), .CLKS_PER_BIT(CPB), .DIE_SEED(SEED_B), .GLOBAL_SHIFT_PS(0))
    u_b (.clk, .rst_n, .start, .mode, .busy(busy[2]), .done(done[2]), .uart_txd(txd[2]),
         .id_valid(id_valid[2]), .id_idx(id_idx[2]), .id_delta(id_delta[2]),
         .ref_we, .ref_addr, .ref_data, .thr,
         .auth_done(auth_done[2]), .auth_match(auth_match[2]), .auth_dist_sq(auth_dist_sq[2]));

  int checks = 0, failures = 0, cyc = 0;
  int n_stall = 0, n_raw_runs = 0, n_id_runs = 0, n_accept = 0, n_reject = 0, n_shift = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (u_a.s_valid && !u_a.s_ready) n_stall <= n_stall + 1;
  end

  // Reference model of the ring periods: the same hash the ring model uses
  // to place each ring's local offset, evaluated here independently.
  function automatic int unsigned local_offset(int unsigned ring, int unsigned seed);
    logic [31:0] h;
    h = 32'(ring) * 32'h9E37_79B1 ^ 32'(seed) * 32'h85EB_CA6B;
    h = h ^ (h >> 15);
    h = h * 32'h2C1B_3C6D;
    h = h ^ (h >> 13);
    return h % SPREAD;
  endfunction

  function automatic real expected_count(int unsigned ring, int unsigned seed, int unsigned shift);
    real period_ps = 2.0 * real'(17 * NOM + local_offset(ring, seed) + shift);
    return real'(GATE) * 20000.0 / period_ps;
  endfunction

  // serial receiver for copy A
  logic [7:0] rx_q [$];
  initial begin
    logic [7:0] b;
    wait (rst_n);
    repeat (4) @(posedge clk);
    forever begin
      @(negedge txd[0]);
      repeat (CPB / 2) @(posedge clk);
      for (int k = 0; k < 8; k++) begin
        repeat (CPB) @(posedge clk);
        b[k] = txd[0];
      end
      repeat (CPB) @(posedge clk);
      rx_q.push_back(b);
    end
  end

  // ID elements of each copy, per run
  int ids [3][N-1];
  int n_ids [3];
  always @(posedge clk) begin
    for (int c = 0; c < 3; c++)
      if (id_valid[c]) begin
        ids[c][id_idx[c]] = int'(id_delta[c]);
        n_ids[c]++;
      end
  end

  int raw_a [N];
  int t0;

  task automatic run(input out_mode_e m);
    for (int c = 0; c < 3; c++) n_ids[c] = 0;
    @(negedge clk);
    mode = m; start = 1'b1; t0 = cyc;
    @(negedge clk);
    start = 1'b0;
    wait (done[0] && done[1] && done[2]);
    @(negedge clk);
    if (m == MODE_RAW) n_raw_runs++; else n_id_runs++;
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (4) @(posedge clk);

    // ---- run 1: raw counts --------------------------------------------
    rx_q.delete();
    run(MODE_RAW);
    repeat (120 * CPB) @(posedge clk);              // let the last records drain
    check(rx_q.size() == 5 * N, $sformatf("raw bytes %0d expected %0d", rx_q.size(), 5 * N));
    for (int i = 0; i < N && rx_q.size() >= 5; i++) begin
      logic [7:0] idx;
      logic [31:0] f;
      real e;
      idx = rx_q.pop_front();
      f = '0;
      for (int b = 0; b < 4; b++) f = {f[23:0], rx_q.pop_front()};
      raw_a[i] = int'(f);
      e = expected_count(i, SEED_A, 0);
      check(idx == 8'(i), $sformatf("raw record %0d has index %0d", i, idx));
      check(real'(f) > e - 2.0 && real'(f) < e + 2.0, $sformatf("ring %0d count %0d expected %f", i, f, e));
    end
    check(n_stall > 0, "raw mode stalled the sequencer on the serial link");

    // ---- run 2: ID elements ----------------------------------------------
    rx_q.delete();
    run(MODE_ID);
    check(cyc - t0 == N * (SETTLE + GATE + HOLD + 1) + 1,
          $sformatf("ID run took %0d cycles, expected %0d", cyc - t0, N * (SETTLE + GATE + HOLD + 1) + 1));
    repeat (50 * CPB) @(posedge clk);
    for (int c = 0; c < 3; c++) check(n_ids[c] == N - 1, $sformatf("copy %0d produced %0d elements", c, n_ids[c]));
    check(rx_q.size() == 4 * (N - 1), $sformatf("ID bytes %0d", rx_q.size()));
    for (int i = 0; i < N - 1 && rx_q.size() >= 4; i++) begin
      logic [7:0] idx;
      logic [23:0] d;
      idx = rx_q.pop_front();
      d = '0;
      for (int b = 0; b < 3; b++) d = {d[15:0], rx_q.pop_front()};
      check(idx == 8'(i), $sformatf("ID record %0d has index %0d", i, idx));
      check(int'($signed(d)) == ids[0][i], $sformatf("ID element %0d sent %0d, produced %0d", i, $signed(d), ids[0][i]));
      check(ids[0][i] - (raw_a[i+1] - raw_a[i]) <= 4 && ids[0][i] - (raw_a[i+1] - raw_a[i]) >= -4,
            $sformatf("element %0d = %0d, raw difference %0d", i, ids[0][i], raw_a[i+1] - raw_a[i]));
    end

    // ---- enrol die A's ID, then authenticate all three -----------------
    for (int i = 0; i < N - 1; i++) begin
      @(negedge clk);
      ref_we = 1'b1; ref_addr = IDX_W'(i); ref_data = K'(ids[0][i]);
    end
    @(negedge clk);
    ref_we = 1'b0;
    // The hot copy's raw counts are all lower by the common shift ...
    if (expected_count(0, SEED_A, 0) - expected_count(0, SEED_A, HOT_PS) > 50.0) n_shift++;
    // threshold: 6 counts rms per element, normalised (d = 6 / 2^21)
    thr = 24'(6 * (1 << 24) / (1 << K));
    fork
      begin wait (auth_done[0]); check(auth_match[0] == 1'b1, $sformatf("die A rejected, S=%0d", auth_dist_sq[0])); end
      begin wait (auth_done[1]); check(auth_match[1] == 1'b1, $sformatf("die A hot rejected, S=%0d", auth_dist_sq[1])); end
      begin wait (auth_done[2]); check(auth_match[2] == 1'b0, $sformatf("die B accepted, S=%0d", auth_dist_sq[2])); end
      run(MODE_ID);
    join
    $display("distances: A %0d, A hot %0d, B %0d", auth_dist_sq[0], auth_dist_sq[1], auth_dist_sq[2]);
    for (int c = 0; c < 3; c++) if (auth_match[c]) n_accept++; else n_reject++;

    check(n_raw_runs > 0, "raw mode used");
    check(n_id_runs > 0, "ID mode used");
    check(n_accept > 0, "an ID was accepted");
    check(n_reject > 0, "an ID was rejected");
    check(n_shift > 0, "common shift present and cancelled");
    $display("mechanisms: stall cycles %0d, raw runs %0d, ID runs %0d, accepts %0d, rejects %0d",
             n_stall, n_raw_runs, n_id_runs, n_accept, n_reject);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(1.0s * real'(4 * N * (GATE + 2000) + 300 * 50 * CPB) * 20e-9);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
