// tb_puf_dies: five dies at two temperatures, in the manner of a
// uniqueness and reliability evaluation.
//
// Ten copies of puf_top run on one clock: dies 1..5 (DIE_SEED), each at a
// reference condition and "hot" (every ring slowed by HOT_PS per half
// period, about a 2.3 MHz drop).  The gate is shortened to 2^13 cycles.
//   Run 1 (MODE_ID): the testbench, acting as the host, collects all ten
//   IDs and computes the normalised Euclidean distances
//   d = |R_a - R_b| / (2^21 * sqrt(31)).  It prints the inter-die table
//   at the reference condition and the intra-die distance of each die
//   across temperature, and checks that the smallest inter-die distance is
//   at least three times the largest intra-die one.
//   Run 2: die 1's reference-condition ID is enrolled in every copy, with
//   a threshold midway (geometrically) between the two; both copies of
//   die 1 must be accepted and all eight others rejected.
module tb_puf_dies;
  timeunit 1ns;
  timeprecision 1ps;
  import puf_pkg::*;

  localparam int unsigned N = 32, K = 21, GATE = 1 << 13, CPB = 16, HOT_PS = 400;
  localparam int unsigned NC = 10, IDX_W = 5, ACC_W = 2 * K + 2 + 5;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  out_mode_e mode = MODE_ID;
  logic ref_we = 1'b0;
  logic [IDX_W-1:0] ref_addr = '0;
  logic signed [K-1:0] ref_data = '0;
  logic [23:0] thr = '0;

  logic [NC-1:0] busy, done, txd, id_valid, auth_done, auth_match;
  logic [IDX_W-1:0] id_idx [NC];
  logic signed [K-1:0] id_delta [NC];
  logic [ACC_W-1:0] auth_dist_sq [NC];

  always #10ns clk = ~clk;

  // copy c: die c/2 + 1, hot when c is odd
  for (genvar c = 0; c < NC; c++) begin : g_die
    puf_top #(.GATE_CYCLES(GATE), .CLKS_PER_BIT(CPB), .DIE_SEED(c / 2 + 1),
              .GLOBAL_SHIFT_PS((c % 2) * HOT_PS))
      u_puf (.clk, .rst_n, .start, .mode, .busy(busy[c]), .done(done[c]), .uart_txd(txd[c]),
             .id_valid(id_valid[c]), .id_idx(id_idx[c]), .id_delta(id_delta[c]),
             .ref_we, .ref_addr, .ref_data, .thr,
             .auth_done(auth_done[c]), .auth_match(auth_match[c]), .auth_dist_sq(auth_dist_sq[c]));
  end

  int checks = 0, failures = 0;
  int ids [NC][N-1];
  int n_ids [NC];
  int n_accept = 0, n_reject = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk)
    for (int c = 0; c < NC; c++)
      if (id_valid[c]) begin ids[c][id_idx[c]] = int'(id_delta[c]); n_ids[c]++; end

  function automatic real id_dist(int a, int b);
    real s = 0.0;
    for (int i = 0; i < N - 1; i++) s += real'(ids[a][i] - ids[b][i]) ** 2;
    return $sqrt(s) / (real'(1 << K) * $sqrt(real'(N - 1)));
  endfunction

  task automatic run();
    for (int c = 0; c < NC; c++) n_ids[c] = 0;
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    wait (&done);
    repeat (300) @(negedge clk);
  endtask

  initial begin
    real max_intra = 0.0, min_inter = 1.0, d, d_th;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (4) @(posedge clk);

    run();
    for (int c = 0; c < NC; c++) check(n_ids[c] == N - 1, $sformatf("copy %0d: %0d elements", c, n_ids[c]));
    for (int a = 0; a < 5; a++) begin
      string line;
      line = $sformatf("die %0d:", a + 1);
      for (int b = 0; b < 5; b++) begin
        d = id_dist(2 * a, 2 * b);
        line = {line, $sformatf("  %8.2e", d)};
        if (b > a && d < min_inter) min_inter = d;
      end
      d = id_dist(2 * a, 2 * a + 1);
      if (d > max_intra) max_intra = d;
      $display("%s   | intra (hot vs ref) %8.2e", line, d);
    end
    $display("min inter-die %8.2e, max intra-die %8.2e, ratio %f", min_inter, max_intra, min_inter / max_intra);
    check(min_inter > 3.0 * max_intra, "inter-die distances well above intra-die ones");

    // enrol die 1, threshold at the geometric mean of the two limits
    d_th = $sqrt(min_inter * max_intra);
    for (int i = 0; i < N - 1; i++) begin
      @(negedge clk);
      ref_we = 1'b1; ref_addr = IDX_W'(i); ref_data = K'(ids[0][i]);
    end
    @(negedge clk); ref_we = 1'b0;
    thr = 24'(int'(d_th * real'(1 << 24)));
    run();
    for (int c = 0; c < NC; c++) begin
      check(auth_match[c] == (c < 2), $sformatf("copy %0d (die %0d%s): match %b", c, c / 2 + 1,
                                                 (c % 2) ? " hot" : "", auth_match[c]));
      if (auth_match[c]) n_accept++; else n_reject++;
    end
    check(n_accept == 2 && n_reject == NC - 2, "accepts and rejects");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(1.0s * real'(3 * N * (GATE + 200)) * 20e-9);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
